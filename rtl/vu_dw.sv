// vu_dw: the depth-wise vector unit, one DWPE per SysAr lane.
//
// Lane l convolves the IFmap tile of channel l with its own kernel. All lanes
// share the tile geometry and the control (start, in_valid, weight-write
// address), so they run in lockstep and out_valid/busy of lane 0 stand for all
// of them. The INT8 inputs come from VU-NA, one pixel (one byte per lane) per
// cycle; weights are written one kernel tap (one byte per lane) per cycle;
// the INT32 results go back to VU-NA. One DWPE per lane follows the document.
module vu_dw
  import mvp_pkg::*;
#(
  parameter int unsigned LANES = W_MU
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  dw_cfg_t                       cfg,
  input  logic                          in_valid,
  input  logic [LANES-1:0][DATA_W-1:0]  in_data,
  input  logic                          w_we,
  input  logic [6:0]                    w_addr,
  input  logic [LANES-1:0][DATA_W-1:0]  w_data,
  output logic                          busy,
  output logic                          out_valid,
  output logic [LANES-1:0][ACC_W-1:0]   out_data
);
  logic [LANES-1:0] b, v;
  for (genvar l = 0; l < LANES; l++) begin : g_pe
    dwpe u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (start),
      .cfg      (cfg),
      .in_valid (in_valid),
      .in_data  (in_data[l]),
      .w_we     (w_we),
      .w_addr   (w_addr),
      .w_data   (w_data[l]),
      .busy     (b[l]),
      .out_valid(v[l]),
      .out_data (out_data[l])
    );
  end
  assign busy      = b[0];
  assign out_valid = v[0];
endmodule
