// tb_pnme: loads scale factors through the DEMUX and checks the scaled,
// rounded, saturated and optionally ReLU-clamped output, the raw pass through
// the MUX, and the one-cycle latency.
module tb_pnme;
  import mvp_pkg::*;
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
  logic signed [7:0] in_data, out_data;
  pnme dut (.clk, .rst_n, .in_valid, .ld_scale, .in_data, .en, .relu, .shift,
            .out_valid, .out_data);
  initial begin
    logic signed [7:0] s;
    in_valid = 0; ld_scale = 0; en = 0; relu = 0; shift = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int v;
      logic signed [7:0] e;
      if (n % 25 == 0) begin
        s = 8'($urandom);
        @(negedge clk); in_valid = 1; ld_scale = 1; in_data = s;
        @(posedge clk); #1;
        checks++;
        if (out_valid !== 1'b0) failures++;
        @(negedge clk);
      end
      in_valid = 1; ld_scale = 0; in_data = 8'($urandom);
      en = ($urandom % 4) != 0; relu = 1'($urandom); shift = 3'($urandom);
      v = int'(in_data) * int'(s);
      if (shift != 0) v = (v + (1 << (shift - 1))) >>> shift;
      if (v > 127) v = 127;
      if (v < -128) v = -128;
      if (relu && v < 0) v = 0;
      e = en ? 8'(v) : in_data;
      @(posedge clk); #1;
      checks += 2;
      if (out_valid !== 1'b1) failures++;
      if (out_data !== e) begin
        failures++; $display("FAIL %0d*%0d>>%0d relu%0d en%0d: %0d exp %0d",
                             in_data, s, shift, relu, en, out_data, e);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
