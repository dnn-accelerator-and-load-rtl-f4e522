// tb_vu_na: per-lane requantisation of PW and DW inputs against a model, the
// one-cycle latency, the source tag, and the sharing rule: while a DW vector
// is present the PW input is not taken (pw_ready low) and the DW vector wins.
module tb_vu_na;
  import mvp_pkg::*;
  localparam int L = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic cfg_we, cfg_dw, pw_valid, pw_ready, dw_valid, out_valid, out_dw;
  logic [2:0] cfg_lane;
  na_cfg_t cfg_data;
  na_cfg_t cp [L], cd [L];
  logic [L-1:0][31:0] pw_data, dw_data;
  logic [L-1:0][7:0] out_data;
  vu_na #(.LANES(L)) dut (.clk, .rst_n, .cfg_we, .cfg_dw, .cfg_lane, .cfg_data,
    .pw_valid, .pw_ready, .pw_data, .dw_valid, .dw_data, .out_valid, .out_dw, .out_data);

  function automatic logic [7:0] model(input logic signed [31:0] x, input na_cfg_t c);
    longint v;
    v = (longint'(x) * longint'(c.scale)) >>> c.shift;
    v = v + longint'(c.bias);
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    if (c.relu && v < 0) v = 0;
    return 8'(v);
  endfunction

  initial begin
    cfg_we = 0; cfg_dw = 0; cfg_lane = 0; cfg_data = '0;
    pw_valid = 0; dw_valid = 0; pw_data = '0; dw_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++)
      for (int l = 0; l < L; l++) begin
        na_cfg_t c;
        c.scale = 16'($urandom % 512) - 16'sd100;
        c.bias  = 16'($urandom % 64) - 16'sd32;
        c.shift = 5'(4 + $urandom % 10);
        c.relu  = 1'($urandom);
        if (s == 1) cd[l] = c; else cp[l] = c;
        @(negedge clk); cfg_we = 1; cfg_dw = 1'(s); cfg_lane = 3'(l); cfg_data = c;
      end
    @(negedge clk); cfg_we = 0;
    for (int n = 0; n < 500; n++) begin
      logic pv, dv;
      logic [L-1:0][31:0] pd, dd;
      pv = 1'($urandom); dv = 1'($urandom);
      for (int l = 0; l < L; l++) begin
        pd[l] = 32'($urandom) >>> ($urandom % 28);
        dd[l] = 32'($urandom) >>> ($urandom % 28);
      end
      pw_valid = pv; dw_valid = dv; pw_data = pd; dw_data = dd;
      #1;
      checks++;
      if (pw_ready !== !dv) begin failures++; $display("FAIL pw_ready"); end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== (pv || dv)) failures++;
      if (pv || dv) begin
        checks++;
        if (out_dw !== dv) failures++;
        for (int l = 0; l < L; l++) begin
          logic [7:0] e;
          e = dv ? model(dd[l], cd[l]) : model(pd[l], cp[l]);
          checks++;
          if (out_data[l] !== e) begin
            failures++; $display("FAIL n=%0d lane %0d: %0d exp %0d", n, l, out_data[l], e);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
