// tb_accumulator: overwrites and accumulates random partial-sum vectors into
// random rows of the full-size ACC and checks the rows read back against a
// model.
module tb_accumulator;
  import mvp_pkg::*;
  localparam int L = W_MU, D = ACC_DEPTH;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic wr_valid, accumulate;
  logic [8:0] wr_addr, rd_addr;
  logic [L-1:0][31:0] psum, rd_data;
  logic [L-1:0][31:0] model [D];
  bit written [D];
  accumulator dut (.clk, .wr_valid, .accumulate, .wr_addr, .psum, .rd_addr, .rd_data);
  initial begin
    wr_valid = 0; accumulate = 0; wr_addr = 0; rd_addr = 0; psum = '0;
    for (int n = 0; n < 2000; n++) begin
      int a;
      @(negedge clk);
      a = int'($urandom % 32);
      wr_valid = 1; wr_addr = 9'(a);
      accumulate = written[a] && ($urandom % 4 != 0);
      for (int l = 0; l < L; l++) psum[l] = $urandom;
      for (int l = 0; l < L; l++) model[a][l] = accumulate ? model[a][l] + psum[l] : psum[l];
      written[a] = 1;
      rd_addr = 9'($urandom % 32);
      @(posedge clk); #1 wr_valid = 0;
      if (written[rd_addr]) begin
        checks++;
        if (rd_data !== model[rd_addr]) begin
          failures++; $display("FAIL row %0d", rd_addr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
