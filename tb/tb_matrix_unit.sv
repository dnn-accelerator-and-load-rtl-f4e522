// tb_matrix_unit: loads random weights into a full-size 64x64 MU, streams
// random pixels through a systolic data setup and checks every output vector
// against the dot products computed here, and that a pixel entering at cycle
// T leaves at cycle T+H+W-1.
module tb_matrix_unit;
  import mvp_pkg::*;
  localparam int H = H_MU, W = W_MU, NPIX = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic w_we, pv, sv, ov;
  logic [$clog2(H)-1:0] w_row;
  logic [W-1:0][7:0] w_data;
  logic [H-1:0][7:0] prow, srow;
  logic [W-1:0][31:0] ps;
  logic signed [7:0] wt [H][W];
  logic signed [7:0] px [NPIX][H];
  int in_cyc [NPIX];

  systolic_data_setup #(.H(H)) u_sds (.clk, .rst_n, .in_valid(pv), .in_row(prow),
                                      .out_valid(sv), .out_row(srow));
  matrix_unit #(.H(H), .W(W)) dut (.clk, .rst_n, .w_we, .w_row, .w_data,
                                   .in_valid(sv), .a_in(srow), .out_valid(ov), .ps_out(ps));
  int nout = 0;
  always @(posedge clk) if (rst_n && ov) begin
    for (int j = 0; j < W; j++) begin
      int e;
      e = 0;
      for (int i = 0; i < H; i++) e += int'(px[nout][i]) * int'(wt[i][j]);
      checks++;
      if (int'(signed'(ps[j])) != e) begin
        failures++;
        if (failures < 10) $display("FAIL pix %0d col %0d: %0d exp %0d", nout, j, ps[j], e);
      end
    end
    checks++;
    if (cyc - in_cyc[nout] != H + W - 1) begin
      failures++; $display("FAIL latency %0d", cyc - in_cyc[nout]);
    end
    nout++;
  end
  initial begin
    w_we = 0; w_row = 0; w_data = '0; pv = 0; prow = '0;
    for (int i = 0; i < H; i++) for (int j = 0; j < W; j++) wt[i][j] = 8'($urandom);
    for (int p = 0; p < NPIX; p++) for (int i = 0; i < H; i++) px[p][i] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < H; i++) begin
      @(negedge clk); w_we = 1; w_row = 6'(i);
      for (int j = 0; j < W; j++) w_data[j] = wt[i][j];
    end
    @(negedge clk); w_we = 0;
    for (int p = 0; p < NPIX; p++) begin
      pv = 1; in_cyc[p] = cyc;
      for (int i = 0; i < H; i++) prow[i] = px[p][i];
      @(negedge clk);
      if (p == 20) begin pv = 0; repeat (3) @(negedge clk); end  // a bubble
    end
    pv = 0;
    repeat (H + W + 10) @(negedge clk);
    checks++;
    if (nout != NPIX) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
