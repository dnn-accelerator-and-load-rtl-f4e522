// tb_systolic_data_setup: feeds random rows and checks that output row i at
// cycle t equals input row i of cycle t-i (zero for invalid cycles).
module tb_systolic_data_setup;
  import mvp_pkg::*;
  localparam int H = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic in_valid, out_valid;
  logic [H-1:0][7:0] in_row, out_row;
  logic [H-1:0][7:0] hist [200];
  systolic_data_setup #(.H(H)) dut (.clk, .rst_n, .in_valid, .in_row, .out_valid, .out_row);
  initial begin
    in_valid = 0; in_row = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      in_valid = ($urandom % 4) != 0;
      for (int i = 0; i < H; i++) in_row[i] = 8'($urandom);
      hist[t] = in_valid ? in_row : '0;
      #1;
      checks++;
      if (out_valid !== in_valid) failures++;
      for (int i = 0; i < H; i++) begin
        logic [7:0] e;
        e = (t >= i) ? hist[t-i][i] : 8'd0;
        checks++;
        if (out_row[i] !== e) begin
          failures++; $display("FAIL t=%0d row %0d: %0h exp %0h", t, i, out_row[i], e);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
