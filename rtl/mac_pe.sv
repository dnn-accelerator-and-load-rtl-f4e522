// mac_pe: one cell of the weight-stationary systolic matrix unit.
//
// The cell holds one INT8 weight (loaded through w_we), multiplies the INT8
// IFmap element arriving from the left with it and adds the INT32 partial sum
// arriving from above. The IFmap element is passed on to the right and the new
// partial sum downwards, both registered, so a cell adds one cycle in each
// direction. The weight register and the two directions of flow follow the
// systolic array the accelerator is built around; loading weights by a row
// enable (instead of shifting them down the columns) is this design's choice.
module mac_pe
  import mvp_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     w_we,     // load w_in into the weight register
  input  logic signed [DATA_W-1:0] w_in,
  input  logic signed [DATA_W-1:0] a_in,     // IFmap element from the left
  input  logic signed [ACC_W-1:0]  ps_in,    // partial sum from above
  output logic signed [DATA_W-1:0] a_out,    // to the right, one cycle later
  output logic signed [ACC_W-1:0]  ps_out    // downwards, one cycle later
);
  logic signed [DATA_W-1:0] w_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q    <= '0;
      a_out  <= '0;
      ps_out <= '0;
    end else begin
      if (w_we) w_q <= w_in;
      a_out  <= a_in;
      ps_out <= ps_in + ACC_W'(a_in * w_q);
    end
  end
endmodule
