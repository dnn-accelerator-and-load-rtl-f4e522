// tb_main_memory_controller: with a random-grant DRAM model, loads rows into
// a UB model, pushes rows into a weight FIFO (checking that it never
// overflows) and stores UB rows back to DRAM, and compares all data.
module tb_main_memory_controller;
  import mvp_pkg::*;
  localparam int WD = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic cmd_valid, cmd_ready, busy;
  dma_cmd_t cmd;
  logic dram_req, dram_we, dram_gnt, dram_rvalid;
  logic [23:0] dram_addr;
  logic [WD-1:0] dram_wdata, dram_rdata;
  logic ub_re, ub_we, wf_push;
  logic [12:0] ub_raddr, ub_waddr;
  logic [WD-1:0] ub_rdata, ub_wdata, wf_din;
  logic [3:0] wf_count;
  logic [WD-1:0] ub [8192];
  logic [WD-1:0] wf_q [$];

  main_memory_controller #(.WIDTH(WD), .WF_CW(4)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .busy,
    .dram_req, .dram_we, .dram_addr, .dram_wdata, .dram_gnt, .dram_rvalid, .dram_rdata,
    .ub_re, .ub_raddr, .ub_rdata, .ub_we, .ub_waddr, .ub_wdata,
    .wf_push, .wf_din, .wf_count, .wf_depth(4'd8));
  dram_model #(.WIDTH(WD), .WORDS(1024)) u_dram (.clk, .req(dram_req), .we(dram_we),
    .addr(dram_addr), .wdata(dram_wdata), .gnt(dram_gnt), .rvalid(dram_rvalid), .rdata(dram_rdata));

  always_ff @(posedge clk) begin
    if (ub_re) ub_rdata <= ub[ub_raddr];
    if (ub_we) ub[ub_waddr] <= ub_wdata;
  end
  // weight FIFO model, drained slowly
  always @(posedge clk) begin
    if (wf_push) wf_q.push_back(wf_din);
    if (wf_q.size() > 0 && $urandom % 4 == 0) void'(wf_q.pop_front());
    if (wf_q.size() > 8) begin failures++; $display("FAIL FIFO overflow"); end
  end
  assign wf_count = 4'(wf_q.size());

  task automatic run(input dma_op_e op, input int da, ua, n);
    @(negedge clk);
    cmd_valid = 1; cmd = '{op: op, dram_addr: 24'(da), ub_addr: 13'(ua), len: 13'(n - 1)};
    @(negedge clk); cmd_valid = 0;
    wait (!busy);
    @(negedge clk);
  endtask

  initial begin
    logic [WD-1:0] seen [$];
    cmd_valid = 0; cmd = '0;
    for (int i = 0; i < 1024; i++) u_dram.mem[i] = {$urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(DMA_LOAD_UB, 100, 2000, 37);
    for (int i = 0; i < 37; i++) begin
      checks++;
      if (ub[2000 + i] !== u_dram.mem[100 + i]) begin failures++; $display("FAIL load %0d", i); end
    end
    for (int i = 0; i < 20; i++) ub[3000 + i] = {$urandom, $urandom};
    run(DMA_STORE_UB, 500, 3000, 20);
    for (int i = 0; i < 20; i++) begin
      checks++;
      if (u_dram.mem[500 + i] !== ub[3000 + i]) begin failures++; $display("FAIL store %0d", i); end
    end
    // weight FIFO: record pushes
    fork
      run(DMA_LOAD_WF, 200, 0, 30);
      begin
        while (seen.size() < 30) begin
          @(posedge clk); #1;
          if (wf_push) seen.push_back(wf_din);
        end
      end
    join
    for (int i = 0; i < 30; i++) begin
      checks++;
      if (seen[i] !== u_dram.mem[200 + i]) begin failures++; $display("FAIL wf %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
