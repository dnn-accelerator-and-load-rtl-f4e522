// weight_fifo: first-word-fall-through FIFO of weight rows (W_MU bytes each)
// between the main-memory controller and the weight registers of the matrix
// unit.
//
// push writes a row when not full; dout shows the oldest row whenever empty is
// low and pop removes it. count gives the rows held. One push and one pop can
// happen in the same cycle. The depth (one full MU tile of rows) is this
// design's choice; the document names the FIFO and its role only.
module weight_fifo
  import mvp_pkg::*;
#(
  parameter int unsigned WIDTH = W_MU * DATA_W,
  parameter int unsigned DEPTH = WFIFO_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         din,
  input  logic                     pop,
  output logic [WIDTH-1:0]         dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign dout    = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  // A push into a full FIFO or a pop from an empty one is a caller error.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("weight_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("weight_fifo: pop while empty");
endmodule
