// unified_buffer: the on-chip buffer for IFmaps and OFmaps (UB).
//
// DEPTH rows of WIDTH bits (8192 x 512 bits = 512 KB by default); a row holds
// the H_MU channels of one pixel, or one tap of depth-wise weights per lane,
// or one scale factor per channel. One synchronous read port (data one cycle
// after re_) and one write port; a read and a write of the same row in the
// same cycle return the old contents. The port arrangement is this design's
// choice: the document gives the size and organisation only.
module unified_buffer
  import mvp_pkg::*;
#(
  parameter int unsigned DEPTH = UB_DEPTH,
  parameter int unsigned WIDTH = H_MU * DATA_W
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end
endmodule
