// pnme: one processing-near-memory element, between one UB row (input
// channel) and one MU row.
//
// The DEMUX steers the incoming byte either into the 1-byte scale-factor
// register (ld_scale) or into the MAC. The MAC multiplies the IFmap element by
// the scale factor and adds a rounding constant; the product is shifted right
// by shift and saturated to INT8. The comparator clamps negative results to
// zero when relu is set. The MUX then chooses the preprocessed value (en) or
// the raw element. The result is registered: out is valid one cycle after
// in_valid. The element list (DEMUX, MAC, ReLU comparator, MUX, 1-byte
// register) follows the document; the fixed-point format (signed scale,
// right shift with rounding) and the output register are this design's
// choices.
module pnme
  import mvp_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     ld_scale,  // DEMUX: 1 = byte is a scale factor
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                     en,        // MUX: 1 = use the preprocessed value
  input  logic                     relu,
  input  logic [2:0]               shift,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_data
);
  logic signed [DATA_W-1:0] scale_q;
  logic signed [17:0]       mac;
  logic signed [7:0]        scaled, act;

  always_comb begin
    logic signed [17:0] rnd;
    rnd    = (shift == 3'd0) ? 18'sd0 : 18'sd1 <<< (shift - 3'd1);
    mac    = 18'(in_data * scale_q) + rnd;
    scaled = sat8(48'(mac >>> shift));
    act    = (relu && scaled < 0) ? 8'sd0 : scaled;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scale_q   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (in_valid && ld_scale) scale_q <= in_data;
      out_valid <= in_valid && !ld_scale;
      if (in_valid && !ld_scale) out_data <= en ? act : in_data;
    end
  end
endmodule
