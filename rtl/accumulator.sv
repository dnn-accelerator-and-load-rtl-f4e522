// accumulator: the ACC unit and buffer behind the matrix unit.
//
// LANES INT32 adders and a buffer of DEPTH rows x LANES words (512 x 2048 bits =
// 128 KB by default). A valid partial-sum vector from the MU is written to row
// wr_addr: added to the row's contents when accumulate is high (further input-
// channel tiles), written over them otherwise (first tile). The row rd_addr is
// read combinationally for the drain towards the vector unit. Write and read
// addressing by the controller and the asynchronous read are this design's
// choices.
module accumulator
  import mvp_pkg::*;
#(
  parameter int unsigned LANES = W_MU,
  parameter int unsigned DEPTH = ACC_DEPTH
) (
  input  logic                          clk,
  input  logic                          wr_valid,
  input  logic                          accumulate,
  input  logic [$clog2(DEPTH)-1:0]      wr_addr,
  input  logic [LANES-1:0][ACC_W-1:0]   psum,
  input  logic [$clog2(DEPTH)-1:0]      rd_addr,
  output logic [LANES-1:0][ACC_W-1:0]   rd_data
);
  logic [LANES-1:0][ACC_W-1:0] mem [DEPTH];
  logic [LANES-1:0][ACC_W-1:0] sum;

  always_comb begin
    for (int l = 0; l < LANES; l++)
      sum[l] = accumulate ? mem[wr_addr][l] + psum[l] : psum[l];
  end

  always_ff @(posedge clk) begin
    if (wr_valid) mem[wr_addr] <= sum;
  end

  assign rd_data = mem[rd_addr];
endmodule
