// vu_na: the NORM/ACT vector unit, shared by PW-CONV and DW-CONV results.
//
// Each of the LANES lanes turns an INT32 OFmap element into INT8:
//   y = sat8(((x * scale) >>> shift) + bias), then ReLU if enabled,
// with one set of scale/bias/shift/ReLU per lane for each of the two sources
// (folded batch normalisation of the PW layer and of the DW layer). Instead of
// a second copy of the unit, the PW stream (from the accumulator) and the DW
// stream (from VU-DW) are multiplexed onto one datapath: a DW vector always
// wins, and the PW stream is told to wait through pw_ready, so it is the
// PW-CONV side that stalls. The result leaves one cycle later, tagged with its
// source (out_dw). Sharing by multiplexing follows the document; the priority
// to DW, the requantisation formula and the parameter registers are this
// design's choices.
module vu_na
  import mvp_pkg::*;
#(
  parameter int unsigned LANES = W_MU
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // per-lane parameters: cfg_dw selects the DW set
  input  logic                          cfg_we,
  input  logic                          cfg_dw,
  input  logic [$clog2(LANES)-1:0]      cfg_lane,
  input  na_cfg_t                       cfg_data,
  // PW-CONV results from the accumulator
  input  logic                          pw_valid,
  output logic                          pw_ready,
  input  logic [LANES-1:0][ACC_W-1:0]   pw_data,
  // DW-CONV / POOL results from VU-DW (never stalled)
  input  logic                          dw_valid,
  input  logic [LANES-1:0][ACC_W-1:0]   dw_data,
  // INT8 result
  output logic                          out_valid,
  output logic                          out_dw,
  output logic [LANES-1:0][DATA_W-1:0]  out_data
);
  na_cfg_t cfg_pw_q [LANES];
  na_cfg_t cfg_dw_q [LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        cfg_pw_q[l] <= '{scale: 16'sd1, bias: '0, shift: '0, relu: 1'b0};
        cfg_dw_q[l] <= '{scale: 16'sd1, bias: '0, shift: '0, relu: 1'b0};
      end
    end else if (cfg_we) begin
      if (cfg_dw) cfg_dw_q[cfg_lane] <= cfg_data;
      else        cfg_pw_q[cfg_lane] <= cfg_data;
    end
  end

  assign pw_ready = !dw_valid;

  logic sel_dw, take;
  assign sel_dw = dw_valid;
  assign take   = dw_valid || pw_valid;

  logic [LANES-1:0][DATA_W-1:0] y;
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      na_cfg_t           c;
      logic signed [47:0] prod, v;
      logic signed [7:0]  q;
      c    = sel_dw ? cfg_dw_q[l] : cfg_pw_q[l];
      prod = 48'(signed'(sel_dw ? dw_data[l] : pw_data[l])) * 48'(c.scale);
      v    = (prod >>> c.shift) + 48'(c.bias);
      q    = sat8(v);
      y[l] = (c.relu && q < 0) ? '0 : q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_dw    <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= take;
      out_dw    <= sel_dw;
      if (take) out_data <= y;
    end
  end
endmodule
