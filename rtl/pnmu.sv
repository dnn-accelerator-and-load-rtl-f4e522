// pnmu: processing-near-memory unit, LANES PNMEs side by side, lane i between
// UB byte i and MU row i.
//
// With ld_scale a UB row is taken as one scale factor per input channel and
// kept in the elements (it is then reused for every pixel of the tile); other
// rows are scaled (SE-Scale), optionally passed through ReLU, and sent to the
// systolic data setup one cycle later. With en low the rows pass unchanged
// (still with one cycle of latency), which is how layers without
// preprocessing use the path. Shared control and one element per lane follow
// the document.
module pnmu
  import mvp_pkg::*;
#(
  parameter int unsigned LANES = H_MU
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic                         ld_scale,
  input  logic [LANES-1:0][DATA_W-1:0] in_row,
  input  logic                         en,
  input  logic                         relu,
  input  logic [2:0]                   shift,
  output logic                         out_valid,
  output logic [LANES-1:0][DATA_W-1:0] out_row
);
  logic [LANES-1:0] v;
  for (genvar i = 0; i < LANES; i++) begin : g_e
    pnme u_e (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .ld_scale (ld_scale),
      .in_data  (in_row[i]),
      .en       (en),
      .relu     (relu),
      .shift    (shift),
      .out_valid(v[i]),
      .out_data (out_row[i])
    );
  end
  assign out_valid = v[0];
endmodule
