// tb_weight_fifo: random pushes and pops against a queue model: data order,
// empty/full flags, count, and simultaneous push and pop.
module tb_weight_fifo;
  import mvp_pkg::*;
  localparam int WD = 32, D = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic push, pop, empty, full;
  logic [WD-1:0] din, dout;
  logic [$clog2(D):0] count;
  logic [WD-1:0] q [$];
  weight_fifo #(.WIDTH(WD), .DEPTH(D)) dut (.clk, .rst_n, .push, .din, .pop, .dout,
                                            .empty, .full, .count);
  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks += 3;
      if (empty !== (q.size() == 0)) failures++;
      if (full !== (q.size() == D)) failures++;
      if (int'(count) != q.size()) failures++;
      push = !full && ($urandom % 2 == 0 || n < 20);
      pop  = !empty && ($urandom % 2 == 0) && n > 20;
      din  = $urandom;
      if (pop) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL data %0h exp %0h", dout, q[0]); end
      end
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
      #1 push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
