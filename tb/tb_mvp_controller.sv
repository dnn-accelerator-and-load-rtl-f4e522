// tb_mvp_controller: exercises the tile sequencer inside a reduced MVP (8x8
// MU, 8 DWPEs): every phase of the sequencer and every routing decision it
// makes shows up in the results compared below.
//
// The DRAM model is filled with random IFmap tiles, PW weights, DW weights
// and an SE scale-factor row. The test then runs, through the DMA and tile
// command ports:
//   A, B  two 10x10 PW-CONV tiles, each followed by a 5x5 DW-CONV (stride 1,
//         padding 2) in VU-DW; B is issued at once, so its PW-CONV overlaps
//         A's DW-CONV and then waits for VU-DW;
//   C     a 7x7 PW-CONV over two input-channel tiles accumulated in ACC, with
//         SE-Scale in the PNMU on both, written to the UB past VU-DW;
//   D     a 7x7 PW-CONV followed by global pooling in VU-DW;
//   E     a 14x10 PW-CONV + 3x3 DW-CONV split into two tiles of 7 rows: the
//         upper tile keeps its PW rows in the UB, the lower one takes the
//         last two of them back into VU-DW as edge IFmaps;
// and stores all results back to DRAM, where they are compared with a model
// computed here. It counts how often each mechanism occurred (overlap of MU
// and VU-DW, MU stall waiting for VU-DW, PW stall on the shared VU-NA, VU-DW
// bypass, PNMU scale load, ACC accumulation, pooling, DMA loads and stores, edge IFmap transfers)
// and counts a failure for any that never did. It also checks that a DW tile
// with P = ceil(25/5) = 5 passes delivers its 100 outputs in 100*5 cycles and
// that the MU returns one result row per cycle.
module tb_mvp_controller;
  import mvp_pkg::*;
  localparam int H = 8, W = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic tile_valid, tile_ready, dma_valid, dma_ready;
  tile_cmd_t tile_cmd;
  dma_cmd_t  dma_cmd;
  logic na_cfg_we, na_cfg_dw;
  logic [$clog2(W)-1:0] na_cfg_lane;
  na_cfg_t na_cfg_data;
  logic dram_req, dram_we, dram_gnt, dram_rvalid;
  logic [23:0] dram_addr;
  logic [H*8-1:0] dram_wdata, dram_rdata;
  logic engine_idle, dma_busy;
  logic [31:0] cnt_share_stall, cnt_dw_stall;

  mvp_top #(.H(H), .W(W), .UB_DEP(2048), .ACC_DEP(128), .WF_DEP(H)) dut (.*);
  dram_model #(.WIDTH(H*8), .WORDS(2048)) u_dram (.clk, .req(dram_req), .we(dram_we),
    .addr(dram_addr), .wdata(dram_wdata), .gnt(dram_gnt), .rvalid(dram_rvalid),
    .rdata(dram_rdata));

  // ------------------------------------------------------------ layout
  localparam int D_A = 0, D_B = 100, D_C1 = 200, D_C2 = 249, D_D = 298;
  localparam int D_W1 = 400, D_W2 = 464, D_DW = 528, D_S = 553, D_E = 600, N_IN = 740;
  localparam int O_A = 1000, O_B = 1100, O_C = 1200, O_D = 1300, O_E = 1400, K_E = 1600;
  localparam int N_OUT = 670;

  na_cfg_t cpw [W], cdw [W];
  int wt1 [H][W], wt2 [H][W], dwk [25][W], sc [H];

  function automatic int byte_of(input int addr, input int lane);
    return int'(signed'(u_dram.mem[addr][lane*8 +: 8]));
  endfunction

  function automatic int na(input longint x, input na_cfg_t c);
    longint v;
    v = (longint'(signed'(32'(x))) * longint'(c.scale)) >>> c.shift;
    v = v + longint'(c.bias);
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    if (c.relu && v < 0) v = 0;
    return int'(v);
  endfunction

  function automatic int pnmu_scale(input int x, input int s);
    int v;
    v = (x * s + 32) >>> 6;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction

  // PW-CONV dot product of pixel at DRAM row a, output channel j
  function automatic longint pw(input int a, input int j, input bit w2, input bit se);
    longint s = 0;
    for (int i = 0; i < H; i++) begin
      int x;
      x = byte_of(a, i);
      if (se) x = pnmu_scale(x, sc[i]);
      s += longint'(x) * longint'(w2 ? wt2[i][j] : wt1[i][j]);
    end
    return s;
  endfunction

  // ------------------------------------------------------- mechanisms
  int m_overlap, m_dw_stall, m_share_stall, m_bypass, m_pnmu_scale, m_accum, m_pool,
      m_dma_load, m_dma_store, m_wf_push, m_edge;
  bit pool_tile = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.sd_valid && dut.dw_busy) m_overlap++;
    if (dut.na_valid && !dut.na_dw && dut.ub_we) m_bypass++;
    if (dut.pn_valid && dut.pn_ld_scale) m_pnmu_scale++;
    if (dut.acc_wr_valid && dut.acc_accumulate) m_accum++;
    if (dut.dw_start) pool_tile = dut.dw_cfg.pool;   // mode of the tile in VU-DW
    if (dut.dw_out_valid && pool_tile) m_pool++;
    if (dram_req && dram_gnt && !dram_we) m_dma_load++;
    if (dram_req && dram_gnt && dram_we) m_dma_store++;
    if (dut.wf_push) m_wf_push++;
    if (dut.dw_in_valid && !dut.na_valid) m_edge++;   // edge IFmap from the UB
  end

  // DW output timing of tile A, MU row rate
  int dw_first = -1, dw_last = -1, dw_n = 0, mu_run = 0, mu_run_max = 0;
  bit in_a = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_a && dut.dw_out_valid) begin
      if (dw_first < 0) dw_first = cyc;
      dw_last = cyc;
      dw_n++;
    end
    if (dut.mu_out_valid) begin
      mu_run++;
      if (mu_run > mu_run_max) mu_run_max = mu_run;
    end else mu_run = 0;
  end

  // --------------------------------------------------------- commands
  task automatic dma(input dma_op_e op, input int da, ua, n);
    @(negedge clk);
    dma_valid = 1;
    dma_cmd = '{op: op, dram_addr: 24'(da), ub_addr: 13'(ua), len: 13'(n - 1)};
    @(posedge clk);
    while (!dma_ready) @(posedge clk);
    @(negedge clk); dma_valid = 0;
    @(posedge clk);
    while (dma_busy) @(posedge clk);
  endtask

  task automatic tile(input tile_cmd_t c);
    @(negedge clk);
    tile_valid = 1; tile_cmd = c;
    @(posedge clk);
    while (!tile_ready) @(posedge clk);
    @(negedge clk); tile_valid = 0;
  endtask

  task automatic wait_idle();
    @(posedge clk);
    while (!(engine_idle && tile_ready)) @(posedge clk);
  endtask

  function automatic tile_cmd_t mk(input int in_base, npix, input bit load_w, acc, drain,
                                   se, dw_en, input dw_cfg_t g, input int out_base,
                                   input bit keep = 0, input int edge_base = 0);
    tile_cmd_t c;
    c = '0;
    c.in_base = 13'(in_base); c.npix = 9'(npix - 1); c.load_w = load_w;
    c.accumulate = acc; c.drain = drain; c.pnmu_en = se; c.pnmu_relu = 1'b0;
    c.pnmu_shift = 3'd6; c.scale_row = 13'(D_S); c.dw_en = dw_en;
    c.dw_w_base = 13'(D_DW); c.dw = g; c.out_base = 13'(out_base);
    c.dw_keep = keep; c.keep_base = 13'(K_E); c.dw_edge_base = 13'(edge_base);
    return c;
  endfunction

  initial begin
    dw_cfg_t g10, gpool, gnone, gtop, gbot;
    int t_a0;
    tile_valid = 0; dma_valid = 0; tile_cmd = '0; dma_cmd = '0;
    na_cfg_we = 0; na_cfg_dw = 0; na_cfg_lane = 0; na_cfg_data = '0;
    m_overlap = 0; m_dw_stall = 0; m_share_stall = 0; m_bypass = 0; m_pnmu_scale = 0;
    m_accum = 0; m_pool = 0; m_dma_load = 0; m_dma_store = 0; m_wf_push = 0; m_edge = 0;

    // data in DRAM
    for (int a = 0; a < 2048; a++) u_dram.mem[a] = '0;
    for (int a = 0; a < N_IN; a++)
      if (a < D_W1 || a >= D_E) for (int i = 0; i < H; i++) u_dram.mem[a][i*8 +: 8] = 8'(int'($urandom % 64) - 32);
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) begin
        wt1[i][j] = int'($urandom % 32) - 16;
        wt2[i][j] = int'($urandom % 32) - 16;
        u_dram.mem[D_W1 + i][j*8 +: 8] = 8'(wt1[i][j]);
        u_dram.mem[D_W2 + i][j*8 +: 8] = 8'(wt2[i][j]);
      end
    for (int t = 0; t < 25; t++)
      for (int j = 0; j < W; j++) begin
        dwk[t][j] = int'($urandom % 64) - 32;
        u_dram.mem[D_DW + t][j*8 +: 8] = 8'(dwk[t][j]);
      end
    for (int i = 0; i < H; i++) begin
      sc[i] = int'($urandom % 64);   // sigmoid output in Q1.6
      u_dram.mem[D_S][i*8 +: 8] = 8'(sc[i]);
    end

    repeat (3) @(negedge clk);
    rst_n = 1;

    // VU-NA parameters
    for (int s = 0; s < 2; s++)
      for (int l = 0; l < W; l++) begin
        na_cfg_t c;
        c.scale = 16'(1 + $urandom % 3);
        c.shift = 5'(s ? 9 : 7);
        c.bias  = 16'(int'($urandom % 16) - 8);
        c.relu  = (s == 0);
        if (s) cdw[l] = c; else cpw[l] = c;
        @(negedge clk);
        na_cfg_we = 1; na_cfg_dw = 1'(s); na_cfg_lane = $bits(na_cfg_lane)'(l); na_cfg_data = c;
      end
    @(negedge clk); na_cfg_we = 0;

    g10   = '{ih: 4'd10, iw: 4'd10, oh: 4'd10, ow: 4'd10, kh: 3'd5, kw: 3'd5, st: 2'd1,
              pad: 2'd2, eh: 3'd0, ew: 3'd0, pool: 1'b0};
    gpool = '{ih: 4'd7, iw: 4'd7, oh: 4'd1, ow: 4'd1, kh: 3'd1, kw: 3'd1, st: 2'd1,
              pad: 2'd0, eh: 3'd0, ew: 3'd0, pool: 1'b1};
    // E: a 14x10 map split into two DW tiles of 7 rows; the lower tile takes
    // the last two rows of the upper one as edge IFmaps
    gtop  = '{ih: 4'd7, iw: 4'd10, oh: 4'd6, ow: 4'd10, kh: 3'd3, kw: 3'd3, st: 2'd1,
              pad: 2'd1, eh: 3'd0, ew: 3'd0, pool: 1'b0};
    gbot  = '{ih: 4'd9, iw: 4'd10, oh: 4'd8, ow: 4'd10, kh: 3'd3, kw: 3'd3, st: 2'd1,
              pad: 2'd1, eh: 3'd2, ew: 3'd0, pool: 1'b0};
    gnone = '0;

    dma(DMA_LOAD_UB, 0, 0, N_IN);
    dma(DMA_LOAD_WF, D_W1, 0, H);
    in_a = 1;
    t_a0 = cyc;
    tile(mk(D_A, 100, 1, 0, 1, 0, 1, g10, O_A));
    tile(mk(D_B, 100, 0, 0, 1, 0, 1, g10, O_B));
    @(posedge clk);
    while (dw_n < 100) @(posedge clk);
    in_a = 0;
    wait_idle();
    $display("tiles A+B done after %0d cycles", cyc - t_a0);
    dma(DMA_LOAD_WF, D_W2, 0, H);
    tile(mk(D_C1, 49, 1, 0, 0, 1, 0, gnone, 0));
    wait_idle();
    dma(DMA_LOAD_WF, D_W1, 0, H);
    tile(mk(D_C2, 49, 1, 1, 1, 1, 0, gnone, O_C));
    tile(mk(D_D, 49, 0, 0, 1, 0, 1, gpool, O_D));
    tile(mk(D_E, 70, 0, 0, 1, 0, 1, gtop, O_E, 1));
    tile(mk(D_E + 70, 70, 0, 0, 1, 0, 1, gbot, O_E + 60, 0, K_E + 50));
    wait_idle();
    dma(DMA_STORE_UB, O_A, O_A, N_OUT);
    m_dw_stall = int'(cnt_dw_stall);
    m_share_stall = int'(cnt_share_stall);

    // ------------------------------------------------------- checking
    for (int tl = 0; tl < 2; tl++) begin
      int inb, outb;
      int pwo [100][W];
      inb = tl ? D_B : D_A;
      outb = tl ? O_B : O_A;
      for (int p = 0; p < 100; p++)
        for (int j = 0; j < W; j++) pwo[p][j] = na(pw(inb + p, j, 0, 0), cpw[j]);
      for (int o = 0; o < 100; o++)
        for (int j = 0; j < W; j++) begin
          longint s;
          int e;
          s = 0;
          for (int kc = 0; kc < 5; kc++)
            for (int kr = 0; kr < 5; kr++) begin
              int r, c;
              r = o / 10 - 2 + kr;
              c = o % 10 - 2 + kc;
              if (r >= 0 && c >= 0 && r < 10 && c < 10)
                s += longint'(pwo[r*10 + c][j]) * longint'(dwk[kr + 5*kc][j]);
            end
          e = na(s, cdw[j]);
          checks++;
          if (byte_of(outb + o, j) != e) begin
            failures++;
            if (failures < 10) $display("FAIL tile %0d out %0d ch %0d: %0d exp %0d",
                                        tl, o, j, byte_of(outb + o, j), e);
          end
        end
    end
    for (int p = 0; p < 49; p++)
      for (int j = 0; j < W; j++) begin
        int e;
        e = na(pw(D_C1 + p, j, 1, 1) + pw(D_C2 + p, j, 0, 1), cpw[j]);
        checks++;
        if (byte_of(O_C + p, j) != e) begin
          failures++;
          if (failures < 10) $display("FAIL C pix %0d ch %0d: %0d exp %0d", p, j,
                                      byte_of(O_C + p, j), e);
        end
      end
    for (int j = 0; j < W; j++) begin
      longint s;
      s = 0;
      for (int p = 0; p < 49; p++) s += longint'(na(pw(D_D + p, j, 0, 0), cpw[j]));
      checks++;
      if (byte_of(O_D, j) != na(s, cdw[j])) begin
        failures++;
        $display("FAIL pool ch %0d: %0d exp %0d", j, byte_of(O_D, j), na(s, cdw[j]));
      end
    end

    begin
      int pwe [140][W];
      for (int p = 0; p < 140; p++)
        for (int j = 0; j < W; j++) pwe[p][j] = na(pw(D_E + p, j, 0, 0), cpw[j]);
      for (int p = 0; p < 70; p++)        // PW rows of the upper tile kept in the UB
        for (int j = 0; j < W; j++) begin
          checks++;
          if (byte_of(K_E + p, j) != pwe[p][j]) begin
            failures++;
            if (failures < 10) $display("FAIL kept pix %0d ch %0d", p, j);
          end
        end
      for (int o = 0; o < 140; o++)       // DW-CONV of the whole 14x10 map
        for (int j = 0; j < W; j++) begin
          longint s;
          int e;
          s = 0;
          for (int kc = 0; kc < 3; kc++)
            for (int kr = 0; kr < 3; kr++) begin
              int r, c;
              r = o / 10 - 1 + kr;
              c = o % 10 - 1 + kc;
              if (r >= 0 && c >= 0 && r < 14 && c < 10)
                s += longint'(pwe[r*10 + c][j]) * longint'(dwk[kr + 3*kc][j]);
            end
          e = na(s, cdw[j]);
          checks++;
          if (byte_of(O_E + o, j) != e) begin
            failures++;
            if (failures < 10) $display("FAIL E out %0d ch %0d: %0d exp %0d",
                                        o, j, byte_of(O_E + o, j), e);
          end
        end
    end

    // ---------------------------------------------------------- timing
    checks++;
    if (dw_last - dw_first != 99 * 5) begin
      failures++; $display("FAIL DW rate: 100 outputs over %0d cycles", dw_last - dw_first);
    end
    checks++;
    if (mu_run_max < 100) begin
      failures++; $display("FAIL MU rate: longest run %0d rows", mu_run_max);
    end

    // ------------------------------------------------------ mechanisms
    $display("overlap=%0d dw_stall=%0d share_stall=%0d bypass=%0d pnmu_scale=%0d accum=%0d pool=%0d dma_load=%0d dma_store=%0d wf_push=%0d edge=%0d",
             m_overlap, m_dw_stall, m_share_stall, m_bypass, m_pnmu_scale, m_accum, m_pool,
             m_dma_load, m_dma_store, m_wf_push, m_edge);
    checks += 11;
    if (m_edge == 0)        begin failures++; $display("FAIL no edge IFmap transfer"); end
    if (m_overlap == 0)     begin failures++; $display("FAIL no overlap"); end
    if (m_dw_stall == 0)    begin failures++; $display("FAIL no MU stall for VU-DW"); end
    if (m_share_stall == 0) begin failures++; $display("FAIL no VU-NA sharing stall"); end
    if (m_bypass == 0)      begin failures++; $display("FAIL no bypass"); end
    if (m_pnmu_scale == 0)  begin failures++; $display("FAIL no PNMU scale load"); end
    if (m_accum == 0)       begin failures++; $display("FAIL no accumulation"); end
    if (m_pool == 0)        begin failures++; $display("FAIL no pooling"); end
    if (m_dma_load == 0)    begin failures++; $display("FAIL no DMA load"); end
    if (m_dma_store == 0)   begin failures++; $display("FAIL no DMA store"); end
    if (m_wf_push == 0)     begin failures++; $display("FAIL no weight FIFO push"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
