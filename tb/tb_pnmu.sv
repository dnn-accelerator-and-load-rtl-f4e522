// tb_pnmu: SE-Scale of a tile: one scale row is loaded into the elements,
// then pixel rows are scaled per channel (channel i by scale factor i) and
// checked, with a pass-through row in between.
module tb_pnmu;
  import mvp_pkg::*;
  localparam int L = H_MU;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic in_valid, ld_scale, en, relu, out_valid;
  logic [2:0] shift;
  logic [L-1:0][7:0] in_row, out_row, sc;
  pnmu dut (.clk, .rst_n, .in_valid, .ld_scale, .in_row, .en, .relu, .shift,
            .out_valid, .out_row);
  initial begin
    in_valid = 0; ld_scale = 0; en = 1; relu = 0; shift = 3'd6; in_row = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      for (int i = 0; i < L; i++) sc[i] = 8'($urandom % 128);  // sigmoid-like, Q1.6
      @(negedge clk); in_valid = 1; ld_scale = 1; in_row = sc;
      for (int p = 0; p < 30; p++) begin
        logic [L-1:0][7:0] x;
        for (int i = 0; i < L; i++) x[i] = 8'($urandom);
        @(negedge clk); in_valid = 1; ld_scale = 0; in_row = x;
        en = (p != 7); relu = (t == 2);
        @(posedge clk); #1;
        checks++;
        if (!out_valid) failures++;
        for (int i = 0; i < L; i++) begin
          int v;
          v = (int'(signed'(x[i])) * int'(signed'(sc[i])) + 32) >>> 6;
          if (v > 127) v = 127;
          if (v < -128) v = -128;
          if (relu && v < 0) v = 0;
          checks++;
          if (out_row[i] !== (en ? 8'(v) : x[i])) begin
            failures++; $display("FAIL tile %0d pix %0d ch %0d", t, p, i);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
