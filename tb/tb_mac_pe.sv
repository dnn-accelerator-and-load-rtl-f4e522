// tb_mac_pe: checks one MU cell: weight load, the registered pass-through of
// the IFmap element and ps_out = ps_in + a_in * w one cycle later, over
// random signed operands.
module tb_mac_pe;
  import mvp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic w_we;
  logic signed [7:0] w_in, a_in, a_out;
  logic signed [31:0] ps_in, ps_out;
  mac_pe dut (.clk, .rst_n, .w_we, .w_in, .a_in, .ps_in, .a_out, .ps_out);
  initial begin
    logic signed [7:0] w;
    w_we = 0; w_in = 0; a_in = 0; ps_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      if (n % 50 == 0) begin
        w = 8'($urandom);
        @(negedge clk); w_we = 1; w_in = w;
        @(negedge clk); w_we = 0; w_in = 8'($urandom);
      end
      a_in  = 8'($urandom);
      ps_in = 32'($urandom) >>> 4;
      @(posedge clk); #1;
      checks += 2;
      if (ps_out !== ps_in + 32'(a_in * w)) begin
        failures++; $display("FAIL ps %0d: %0d*%0d+%0d = %0d", n, a_in, w, ps_in, ps_out);
      end
      if (a_out !== a_in) begin failures++; $display("FAIL a %0d", n); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
