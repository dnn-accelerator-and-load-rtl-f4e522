// tb_vu_dw: runs a 7x7 tile with 3x3 kernels (stride 1, padding 1) through
// eight lanes, each with its own kernel and IFmap, and checks every result
// against a direct depth-wise convolution; then a pooling tile.
module tb_vu_dw;
  import mvp_pkg::*;
  localparam int L = 8, N = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic start, in_valid, w_we, busy, out_valid;
  dw_cfg_t cfg;
  logic [L-1:0][7:0] in_data, w_data;
  logic [6:0] w_addr;
  logic [L-1:0][31:0] out_data;
  logic signed [7:0] img [L][N][N];
  logic signed [7:0] ker [L][3][3];
  vu_dw #(.LANES(L)) dut (.clk, .rst_n, .start, .cfg, .in_valid, .in_data, .w_we,
                          .w_addr, .w_data, .busy, .out_valid, .out_data);
  int nout = 0;
  bit pool_mode = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    for (int l = 0; l < L; l++) begin
      int e, orow, ocol;
      e = 0;
      orow = nout / N;
      ocol = nout % N;
      if (pool_mode) begin
        for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) e += int'(img[l][r][c]);
      end else begin
        for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
          int r, c;
          r = orow - 1 + i;
          c = ocol - 1 + j;
          if (r >= 0 && c >= 0 && r < N && c < N) e += int'(img[l][r][c]) * int'(ker[l][i][j]);
        end
      end
      checks++;
      if (int'(signed'(out_data[l])) != e) begin
        failures++; $display("FAIL out %0d lane %0d: %0d exp %0d", nout, l, out_data[l], e);
      end
    end
    nout++;
  end
  initial begin
    start = 0; in_valid = 0; w_we = 0; in_data = '0; w_data = '0; w_addr = 0; cfg = '0;
    for (int l = 0; l < L; l++) begin
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) img[l][r][c] = 8'($urandom);
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) ker[l][i][j] = 8'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 9; t++) begin
      @(negedge clk); w_we = 1; w_addr = 7'(t);
      for (int l = 0; l < L; l++) w_data[l] = ker[l][t % 3][t / 3];
    end
    @(negedge clk); w_we = 0;
    cfg = '{ih: 4'(N), iw: 4'(N), oh: 4'(N), ow: 4'(N), kh: 3'd3, kw: 3'd3, st: 2'd1,
            pad: 2'd1, eh: 3'd0, ew: 3'd0, pool: 1'b0};
    start = 1;
    @(negedge clk); start = 0;
    for (int e = 0; e < N * N; e++) begin
      in_valid = 1;
      for (int l = 0; l < L; l++) in_data[l] = img[l][e / N][e % N];
      @(negedge clk);
    end
    in_valid = 0;
    wait (!busy);
    repeat (3) @(negedge clk);
    checks++;
    if (nout != N * N) begin failures++; $display("FAIL count %0d", nout); end
    // pooling
    pool_mode = 1; nout = 0;
    cfg.pool = 1'b1;
    start = 1;
    @(negedge clk); start = 0;
    for (int e = 0; e < N * N; e++) begin
      in_valid = 1;
      for (int l = 0; l < L; l++) in_data[l] = img[l][e / N][e % N];
      @(negedge clk);
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (nout != 1) begin failures++; $display("FAIL pool count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
