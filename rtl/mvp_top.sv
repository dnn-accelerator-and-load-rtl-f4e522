// mvp_top: the MVP CNN accelerator - a systolic matrix unit (MU) extended with
// a depth-wise vector unit (VU-DW) and a processing-near-memory unit (PNMU).
//
// Datapath (one pixel = one UB row of H_MU channels):
//   DRAM <-> main_memory_controller <-> UB ;  DRAM -> weight FIFO -> MU weights
//   UB -> PNMU (SE-Scale / ReLU or pass) -> systolic data setup -> MU -> ACC
//   ACC -> VU-NA (NORM/ACT) -> VU-DW (DW-CONV / POOL) -> VU-NA -> UB
//                           \-> UB (bypass when no DW-CONV follows)
//   UB -> VU-DW (edge IFmaps kept from neighbouring tiles)
// VU-NA is one unit multiplexed between PW and DW results. Tiles are run by
// mvp_controller; the next tile's PW-CONV overlaps the current tile's DW-CONV.
//
// Interfaces: a tile command port (tile_valid/tile_ready/tile_cmd), a DMA
// command port (dma_valid/dma_ready/dma_cmd), a write port for the per-lane
// VU-NA parameters, and the DRAM request/grant port. A DMA command is only
// accepted while the compute engine is idle and a tile command only while the
// DMA is idle, so the two never share the UB ports. engine_idle reports that
// no tile, depth-wise work or VU-NA result is in flight. The structure
// follows the document's MVP organisation; the command ports, the
// arbitration and the DRAM port are this design's.
module mvp_top
  import mvp_pkg::*;
#(
  parameter int unsigned H        = H_MU,
  parameter int unsigned W        = W_MU,
  parameter int unsigned UB_DEP   = UB_DEPTH,
  parameter int unsigned ACC_DEP  = ACC_DEPTH,
  parameter int unsigned WF_DEP   = WFIFO_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // tile commands
  input  logic                     tile_valid,
  output logic                     tile_ready,
  input  tile_cmd_t                tile_cmd,
  // DMA commands
  input  logic                     dma_valid,
  output logic                     dma_ready,
  input  dma_cmd_t                 dma_cmd,
  // VU-NA per-lane parameters
  input  logic                     na_cfg_we,
  input  logic                     na_cfg_dw,
  input  logic [$clog2(W)-1:0]     na_cfg_lane,
  input  na_cfg_t                  na_cfg_data,
  // DRAM
  output logic                     dram_req,
  output logic                     dram_we,
  output logic [23:0]              dram_addr,
  output logic [H*DATA_W-1:0]      dram_wdata,
  input  logic                     dram_gnt,
  input  logic                     dram_rvalid,
  input  logic [H*DATA_W-1:0]      dram_rdata,
  // status
  output logic                     engine_idle,
  output logic                     dma_busy,
  output logic [31:0]              cnt_share_stall,
  output logic [31:0]              cnt_dw_stall
);
  localparam int unsigned UB_AW = $clog2(UB_DEP);
  localparam int unsigned AC_AW = $clog2(ACC_DEP);
  localparam int unsigned WF_CW = $clog2(WF_DEP) + 1;

  // ------------------------------------------------------------- wiring
  logic                     ctl_idle;
  logic                     wf_push, wf_pop, wf_empty, wf_full;
  logic [W*DATA_W-1:0]      wf_din;
  logic [W-1:0][DATA_W-1:0] wf_dout;
  logic [WF_CW-1:0]         wf_count;

  logic                     ub_re, ub_we;
  logic [UB_AW-1:0]         ub_raddr, ub_waddr;
  logic [H*DATA_W-1:0]      ub_rdata, ub_wdata;
  logic                     c_ub_re, c_ub_we, d_ub_re, d_ub_we;
  logic [UB_AW-1:0]         c_ub_raddr, c_ub_waddr, d_ub_raddr, d_ub_waddr;
  logic [H-1:0][DATA_W-1:0] c_ub_wdata;
  logic [H*DATA_W-1:0]      d_ub_wdata;

  logic                     mu_w_we;
  logic [$clog2(H)-1:0]     mu_w_row;
  logic [W-1:0][DATA_W-1:0] mu_w_data;

  logic                     pn_valid, pn_ld_scale, pn_en, pn_relu;
  logic [2:0]               pn_shift;
  logic [H-1:0][DATA_W-1:0] pn_row, pn_out;
  logic                     pn_out_valid;
  logic                     sd_valid;
  logic [H-1:0][DATA_W-1:0] sd_row;
  logic                     mu_out_valid;
  logic [W-1:0][ACC_W-1:0]  mu_ps;

  logic                     acc_wr_valid, acc_accumulate;
  logic [AC_AW-1:0]         acc_wr_addr, acc_rd_addr;
  logic [W-1:0][ACC_W-1:0]  acc_rd_data;

  logic                     pw_valid, pw_ready;
  logic                     na_valid, na_dw;
  logic [W-1:0][DATA_W-1:0] na_data;

  logic                     dw_start, dw_in_valid, dw_w_we, dw_busy, dw_out_valid;
  dw_cfg_t                  dw_cfg;
  logic [W-1:0][DATA_W-1:0] dw_in_data, dw_w_data;
  logic [6:0]               dw_w_addr;
  logic [W-1:0][ACC_W-1:0]  dw_out_data;

  // -------------------------------------------------------- arbitration
  logic d_cmd_ready;
  assign engine_idle = ctl_idle && !dw_busy && !dw_out_valid && !na_valid;
  assign tile_ready  = ctl_idle && !dma_busy;
  assign dma_ready   = d_cmd_ready && engine_idle && !tile_valid;

  assign ub_re    = dma_busy ? d_ub_re    : c_ub_re;
  assign ub_raddr = dma_busy ? d_ub_raddr : c_ub_raddr;
  assign ub_we    = dma_busy ? d_ub_we    : c_ub_we;
  assign ub_waddr = dma_busy ? d_ub_waddr : c_ub_waddr;
  assign ub_wdata = dma_busy ? d_ub_wdata : c_ub_wdata;

  // -------------------------------------------------------------- blocks
  main_memory_controller #(.WIDTH(H*DATA_W), .UB_AW(UB_AW), .WF_CW(WF_CW)) u_mmc (
    .clk, .rst_n,
    .cmd_valid  (dma_valid && engine_idle && !tile_valid),
    .cmd_ready  (d_cmd_ready),
    .cmd        (dma_cmd),
    .busy       (dma_busy),
    .dram_req, .dram_we, .dram_addr, .dram_wdata, .dram_gnt, .dram_rvalid, .dram_rdata,
    .ub_re      (d_ub_re),
    .ub_raddr   (d_ub_raddr),
    .ub_rdata   (ub_rdata),
    .ub_we      (d_ub_we),
    .ub_waddr   (d_ub_waddr),
    .ub_wdata   (d_ub_wdata),
    .wf_push    (wf_push),
    .wf_din     (wf_din),
    .wf_count   (wf_count),
    .wf_depth   (WF_CW'(WF_DEP))
  );

  unified_buffer #(.DEPTH(UB_DEP), .WIDTH(H*DATA_W)) u_ub (
    .clk, .re(ub_re), .raddr(ub_raddr), .rdata(ub_rdata),
    .we(ub_we), .waddr(ub_waddr), .wdata(ub_wdata)
  );

  weight_fifo #(.WIDTH(W*DATA_W), .DEPTH(WF_DEP)) u_wf (
    .clk, .rst_n, .push(wf_push), .din(wf_din), .pop(wf_pop), .dout(wf_dout),
    .empty(wf_empty), .full(wf_full), .count(wf_count)
  );

  pnmu #(.LANES(H)) u_pnmu (
    .clk, .rst_n, .in_valid(pn_valid), .ld_scale(pn_ld_scale), .in_row(pn_row),
    .en(pn_en), .relu(pn_relu), .shift(pn_shift),
    .out_valid(pn_out_valid), .out_row(pn_out)
  );

  systolic_data_setup #(.H(H)) u_sds (
    .clk, .rst_n, .in_valid(pn_out_valid), .in_row(pn_out),
    .out_valid(sd_valid), .out_row(sd_row)
  );

  matrix_unit #(.H(H), .W(W)) u_mu (
    .clk, .rst_n, .w_we(mu_w_we), .w_row(mu_w_row), .w_data(mu_w_data),
    .in_valid(sd_valid), .a_in(sd_row), .out_valid(mu_out_valid), .ps_out(mu_ps)
  );

  accumulator #(.LANES(W), .DEPTH(ACC_DEP)) u_acc (
    .clk, .wr_valid(acc_wr_valid), .accumulate(acc_accumulate), .wr_addr(acc_wr_addr),
    .psum(mu_ps), .rd_addr(acc_rd_addr), .rd_data(acc_rd_data)
  );

  vu_na #(.LANES(W)) u_na (
    .clk, .rst_n,
    .cfg_we(na_cfg_we), .cfg_dw(na_cfg_dw), .cfg_lane(na_cfg_lane), .cfg_data(na_cfg_data),
    .pw_valid, .pw_ready, .pw_data(acc_rd_data),
    .dw_valid(dw_out_valid), .dw_data(dw_out_data),
    .out_valid(na_valid), .out_dw(na_dw), .out_data(na_data)
  );

  vu_dw #(.LANES(W)) u_vudw (
    .clk, .rst_n, .start(dw_start), .cfg(dw_cfg),
    .in_valid(dw_in_valid), .in_data(dw_in_data),
    .w_we(dw_w_we), .w_addr(dw_w_addr), .w_data(dw_w_data),
    .busy(dw_busy), .out_valid(dw_out_valid), .out_data(dw_out_data)
  );

  mvp_controller #(.H(H), .W(W), .UB_AW(UB_AW), .AC_AW(AC_AW)) u_ctl (
    .clk, .rst_n,
    .cmd_valid(tile_valid && !dma_busy), .cmd_ready(), .cmd(tile_cmd), .idle(ctl_idle),
    .wf_empty, .wf_dout, .wf_pop, .mu_w_we, .mu_w_row, .mu_w_data,
    .ub_re(c_ub_re), .ub_raddr(c_ub_raddr), .ub_rdata(ub_rdata),
    .ub_we(c_ub_we), .ub_waddr(c_ub_waddr), .ub_wdata(c_ub_wdata),
    .pn_valid, .pn_ld_scale, .pn_row, .pn_en, .pn_relu, .pn_shift,
    .mu_out_valid, .acc_wr_valid, .acc_accumulate, .acc_wr_addr, .acc_rd_addr,
    .pw_valid, .pw_ready,
    .na_valid, .na_dw, .na_data,
    .dw_start, .dw_cfg, .dw_in_valid, .dw_in_data, .dw_w_we, .dw_w_addr, .dw_w_data,
    .dw_busy, .dw_out_valid,
    .cnt_share_stall, .cnt_dw_stall
  );

  // wf_full is implied by the DMA flow control; it is checked here.
  assert property (@(posedge clk) disable iff (!rst_n) !(wf_push && wf_full))
    else $error("mvp_top: weight FIFO overrun");
endmodule
