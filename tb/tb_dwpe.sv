// tb_dwpe: self-checking test of one depth-wise processing element.
//
// For several tile geometries it writes weights and a random IFmap tile (one
// element per cycle, row-major), collects the results and compares each with
// a direct depth-wise convolution computed here (zero padding at the top and
// left, taps outside the tile are zero). It also checks the timing: with
// K >= KH*KW an output leaves two cycles after the last element it needs
// arrived (the 4x4 IFmap, 2x2 kernel, four-multiplier case produces output n
// at cycle n+2), and once the whole tile is in, outputs follow every
// ceil(KH*KW/K) cycles. Pooling mode is checked against the tile sum. Tiles
// with edge IFmaps receive the top rows and left columns first and the
// interior afterwards; the result must equal the convolution of the whole tile.
module tb_dwpe;
  import mvp_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Two elements: K=4 for the worked example, K=5 as built.
  logic    start4, start5, inv, wwe;
  dw_cfg_t cfg;
  logic signed [7:0] ind, wd;
  logic [6:0] wa;
  logic busy4, busy5, ov4, ov5;
  logic signed [31:0] od4, od5;

  dwpe #(.K(4), .IB_BYTES(260), .WB_BYTES(100)) u4 (
    .clk, .rst_n, .start(start4), .cfg, .in_valid(inv), .in_data(ind),
    .w_we(wwe), .w_addr(wa), .w_data(wd), .busy(busy4), .out_valid(ov4), .out_data(od4));
  dwpe u5 (
    .clk, .rst_n, .start(start5), .cfg, .in_valid(inv), .in_data(ind),
    .w_we(wwe), .w_addr(wa), .w_data(wd), .busy(busy5), .out_valid(ov5), .out_data(od5));

  logic signed [7:0] img [16][16];
  logic signed [7:0] ker [8][8];
  int got [256];
  int got_cyc [256];
  int nout;

  function automatic int ref_out(int orow, int ocol);
    int s = 0;
    for (int i = 0; i < int'(cfg.kh); i++)
      for (int j = 0; j < int'(cfg.kw); j++) begin
        int r = orow * int'(cfg.st) - (cfg.eh != 0 ? 0 : int'(cfg.pad)) + i;
        int c = ocol * int'(cfg.st) - (cfg.ew != 0 ? 0 : int'(cfg.pad)) + j;
        if (r >= 0 && c >= 0 && r < int'(cfg.ih) && c < int'(cfg.iw))
          s += int'(img[r][c]) * int'(ker[i][j]);
      end
    return s;
  endfunction

  // Runs one tile on the element selected by k5 and checks it.
  task automatic run(input bit k5, input int ih, iw, oh, ow, kh, kw, st, pad,
                     input bit pool, input bit chk_example, input int eh = 0, ew = 0);
    int t0, kk, p, n, expect_sum;
    kk = k5 ? 5 : 4;
    cfg = '0;
    cfg.ih = 4'(ih); cfg.iw = 4'(iw); cfg.oh = 4'(oh); cfg.ow = 4'(ow);
    cfg.kh = 3'(kh); cfg.kw = 3'(kw); cfg.st = 2'(st); cfg.pad = 2'(pad); cfg.pool = pool;
    cfg.eh = 3'(eh); cfg.ew = 3'(ew);
    for (int r = 0; r < ih; r++) for (int c = 0; c < iw; c++) img[r][c] = 8'($urandom);
    for (int i = 0; i < kh; i++) for (int j = 0; j < kw; j++) ker[i][j] = 8'($urandom);
    // weights: tap t = i + j*kh at byte address t
    for (int j = 0; j < kw; j++)
      for (int i = 0; i < kh; i++) begin
        @(negedge clk); wwe = 1; wa = 7'(i + j * kh); wd = ker[i][j];
      end
    @(negedge clk); wwe = 0;
    if (k5) start5 = 1; else start4 = 1;
    @(negedge clk); start4 = 0; start5 = 0;
    nout = 0;
    t0 = cyc;
    fork
      begin
        // edge IFmaps first (top rows, then left columns), then the interior
        for (int e = 0; e < ih * iw; e++)
          if (e / iw < eh || e % iw < ew) begin
            inv = 1; ind = img[e / iw][e % iw];
            @(negedge clk);
          end
        for (int e = 0; e < ih * iw; e++)
          if (!(e / iw < eh || e % iw < ew)) begin
            inv = 1; ind = img[e / iw][e % iw];
            @(negedge clk);
          end
        inv = 0;
      end
      begin
        int lim = 0;
        while (nout < (pool ? 1 : oh * ow) && lim < 5000) begin
          @(posedge clk); #1;
          if (k5 ? ov5 : ov4) begin
            got[nout] = k5 ? od5 : od4;
            got_cyc[nout] = cyc - t0;
            nout++;
          end
          lim++;
        end
      end
    join
    @(negedge clk);
    checks++;
    if (nout != (pool ? 1 : oh * ow)) begin
      failures++; $display("FAIL: %0d outputs", nout);
    end
    if (pool) begin
      expect_sum = 0;
      for (int r = 0; r < ih; r++) for (int c = 0; c < iw; c++) expect_sum += int'(img[r][c]);
      checks++;
      if (got[0] != expect_sum) begin
        failures++; $display("FAIL pool: got %0d exp %0d", got[0], expect_sum);
      end
    end else begin
      p = (kh * kw + kk - 1) / kk;
      for (n = 0; n < oh * ow; n++) begin
        checks++;
        if (got[n] != ref_out(n / ow, n % ow)) begin
          failures++;
          $display("FAIL k%0d %0dx%0d k%0dx%0d st%0d pad%0d out %0d: got %0d exp %0d",
                   kk, ih, iw, kh, kw, st, pad, n, got[n], ref_out(n / ow, n % ow));
        end
        if (chk_example) begin
          checks++;
          if (got_cyc[n] != n + 2) begin
            failures++; $display("FAIL timing: out %0d at cycle %0d", n, got_cyc[n]);
          end
        end
        // once the tile is in, one output every P cycles
        if (n > 0 && got_cyc[n-1] > ih * iw + 1) begin
          checks++;
          if (got_cyc[n] - got_cyc[n-1] != p) begin
            failures++; $display("FAIL rate: out %0d after %0d cycles, P=%0d", n,
                                 got_cyc[n] - got_cyc[n-1], p);
          end
        end
      end
    end
    checks++;
    if ((k5 ? busy5 : busy4) !== 1'b0) begin failures++; $display("FAIL busy"); end
  endtask

  initial begin
    start4 = 0; start5 = 0; inv = 0; wwe = 0; ind = 0; wd = 0; wa = 0; cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // the worked example: 4x4 IFmap, 2x2 kernel, stride 1, padding 1, 4 DWMULs
    run(0, 4, 4, 4, 4, 2, 2, 1, 1, 0, 1);
    // as built (5 DWMULs)
    run(1, 4, 4, 4, 4, 2, 2, 1, 1, 0, 0);
    run(1, 7, 7, 7, 7, 3, 3, 1, 1, 0, 0);
    run(1, 8, 8, 4, 4, 3, 3, 2, 1, 0, 0);
    run(1, 9, 9, 9, 9, 5, 5, 1, 2, 0, 0);
    run(1, 10, 10, 5, 5, 5, 5, 2, 2, 0, 0);
    run(1, 6, 5, 6, 5, 3, 3, 1, 1, 0, 0);
    run(1, 7, 7, 7, 7, 1, 1, 1, 0, 0, 0);
    run(0, 7, 7, 7, 7, 3, 3, 1, 1, 0, 0);
    run(1, 7, 7, 1, 1, 1, 1, 1, 0, 1, 0);
    for (int k = 0; k < 4; k++) run(1, 7, 7, 7, 7, 3, 3, 1, 1, 0, 0);
    // tiles continuing a larger IFmap: edge IFmaps from the tiles above / left
    run(1, 8, 8, 6, 6, 3, 3, 1, 0, 0, 0, 2, 2);
    run(1, 12, 12, 8, 8, 5, 5, 1, 0, 0, 0, 4, 4);
    run(1, 9, 9, 8, 7, 3, 3, 1, 1, 0, 0, 0, 2);
    run(1, 9, 10, 7, 9, 3, 3, 1, 1, 0, 0, 2, 0);
    run(1, 11, 11, 5, 5, 3, 3, 2, 0, 0, 0, 1, 1);
    run(0, 8, 8, 7, 7, 2, 2, 1, 0, 0, 0, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
