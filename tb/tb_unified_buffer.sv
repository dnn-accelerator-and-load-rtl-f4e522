// tb_unified_buffer: writes random rows at random addresses of the full-size
// UB, reads them back (one-cycle read latency) against a model, including a
// read and a write of the same row in one cycle (old data returned).
module tb_unified_buffer;
  import mvp_pkg::*;
  localparam int D = UB_DEPTH, WD = H_MU * DATA_W;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic re, we;
  logic [12:0] raddr, waddr;
  logic [WD-1:0] rdata, wdata;
  logic [WD-1:0] model [int];
  unified_buffer dut (.clk, .re, .raddr, .rdata, .we, .waddr, .wdata);
  function automatic logic [WD-1:0] rnd();
    logic [WD-1:0] v;
    for (int i = 0; i < WD / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction
  initial begin
    int a [200];
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = '0;
    for (int n = 0; n < 200; n++) begin
      a[n] = (n == 0) ? 0 : (n == 1) ? D - 1 : int'($urandom % D);
      @(negedge clk); we = 1; waddr = 13'(a[n]); wdata = rnd(); model[a[n]] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk); re = 1; raddr = 13'(a[n]);
      @(negedge clk); re = 0;
      checks++;
      if (rdata !== model[a[n]]) begin failures++; $display("FAIL addr %0d", a[n]); end
    end
    // read-during-write returns the old row
    @(negedge clk); re = 1; raddr = 13'(a[5]); we = 1; waddr = 13'(a[5]); wdata = rnd();
    @(negedge clk); re = 0; we = 0;
    checks++;
    if (rdata !== model[a[5]]) begin failures++; $display("FAIL rdw"); end
    model[a[5]] = wdata;
    @(negedge clk); re = 1; raddr = 13'(a[5]);
    @(negedge clk); re = 0;
    checks++;
    if (rdata !== model[a[5]]) begin failures++; $display("FAIL after rdw"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
