// mvp_controller: tile sequencer of the MVP accelerator.
//
// It runs one tile command (tile_cmd_t) at a time through these phases:
//   LOADW   pop H_MU weight rows from the weight FIFO into the MU (load_w);
//   LOADS   read the scale-factor row from the UB into the PNMEs (pnmu_en);
//   STREAM  read npix pixel rows from the UB, one per cycle; each passes the
//           PNMU, the systolic data setup and the MU, and its INT32 result
//           row is written (or added, accumulate) into ACC row 0..npix-1;
//   WAITMU  wait for the last result row to reach the ACC;
//   WAITDW  (drain with dw_en) wait until VU-DW has finished the previous
//           tile - the MU-side stall of overlapped PW/DW execution;
//   LOADDW  start VU-DW with the tile geometry, load KH*KW weight taps from
//           consecutive UB rows (skipped for pooling), then move the tile's
//           edge IFmaps (dw.eh top rows, dw.ew left columns; kept in the UB
//           from earlier tiles) from consecutive UB rows into VU-DW;
//   DRAIN   send ACC rows 0..npix-1 to VU-NA, waiting whenever VU-NA is busy
//           with a DW result (shared VU-NA).
// A command without drain ends after WAITMU (a partial input-channel tile).
// VU-NA results of PW rows go to VU-DW (dw_en) or bypass it and are written to
// the UB from out_base on; with dw_keep they go to VU-DW and are also written
// to the UB from keep_base on, so that later tiles can take their edges.
// DW results are written to the UB from the out_base of their tile.
// Because a command ends when its drain ends, the next tile's weight load and
// streaming overlap the depth-wise work of the previous one. The sequence is this design's: the document describes the
// datapath and the overlap, not an instruction set or a controller.
//
// Counters: cnt_share_stall counts cycles a PW row waited for the shared
// VU-NA, cnt_dw_stall cycles spent in WAITDW.
module mvp_controller
  import mvp_pkg::*;
#(
  parameter int unsigned H     = H_MU,
  parameter int unsigned W     = W_MU,
  parameter int unsigned UB_AW = $clog2(UB_DEPTH),
  parameter int unsigned AC_AW = $clog2(ACC_DEPTH)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        cmd_valid,
  output logic                        cmd_ready,
  input  tile_cmd_t                   cmd,
  output logic                        idle,        // no tile in progress
  // weight FIFO -> MU weights
  input  logic                        wf_empty,
  input  logic [W-1:0][DATA_W-1:0]    wf_dout,
  output logic                        wf_pop,
  output logic                        mu_w_we,
  output logic [$clog2(H)-1:0]        mu_w_row,
  output logic [W-1:0][DATA_W-1:0]    mu_w_data,
  // UB read port
  output logic                        ub_re,
  output logic [UB_AW-1:0]            ub_raddr,
  input  logic [H-1:0][DATA_W-1:0]    ub_rdata,
  // UB write port
  output logic                        ub_we,
  output logic [UB_AW-1:0]            ub_waddr,
  output logic [H-1:0][DATA_W-1:0]    ub_wdata,
  // PNMU
  output logic                        pn_valid,
  output logic                        pn_ld_scale,
  output logic [H-1:0][DATA_W-1:0]    pn_row,
  output logic                        pn_en,
  output logic                        pn_relu,
  output logic [2:0]                  pn_shift,
  // MU result -> ACC
  input  logic                        mu_out_valid,
  output logic                        acc_wr_valid,
  output logic                        acc_accumulate,
  output logic [AC_AW-1:0]            acc_wr_addr,
  output logic [AC_AW-1:0]            acc_rd_addr,
  // ACC -> VU-NA
  output logic                        pw_valid,
  input  logic                        pw_ready,
  // VU-NA result
  input  logic                        na_valid,
  input  logic                        na_dw,
  input  logic [W-1:0][DATA_W-1:0]    na_data,
  // VU-DW
  output logic                        dw_start,
  output dw_cfg_t                     dw_cfg,
  output logic                        dw_in_valid,
  output logic [W-1:0][DATA_W-1:0]    dw_in_data,
  output logic                        dw_w_we,
  output logic [6:0]                  dw_w_addr,
  output logic [W-1:0][DATA_W-1:0]    dw_w_data,
  input  logic                        dw_busy,
  input  logic                        dw_out_valid,
  // counters
  output logic [31:0]                 cnt_share_stall,
  output logic [31:0]                 cnt_dw_stall
);
  typedef enum logic [2:0] {
    S_IDLE, S_LOADW, S_LOADS, S_STREAM, S_WAITMU, S_WAITDW, S_LOADDW, S_DRAIN
  } state_e;
  typedef enum logic [2:0] {RK_NONE, RK_SCALE, RK_PIX, RK_DWW, RK_EDGE} rd_kind_e;

  state_e     st;
  tile_cmd_t  c;
  logic [9:0] k;            // phase counter
  logic [9:0] mu_cnt;       // MU result rows written to ACC
  logic [9:0] npix;
  logic [6:0] ntaps;
  logic [9:0] nedge;        // edge IFmap rows to move from the UB into VU-DW
  logic [9:0] nload;        // LOADDW reads: weight taps, then edge IFmaps
  assign npix  = {1'b0, c.npix} + 10'd1;
  assign ntaps = 7'(c.dw.kh) * 7'(c.dw.kw);
  assign nedge = 10'(c.dw.eh) * 10'(c.dw.iw) + (10'(c.dw.ih) - 10'(c.dw.eh)) * 10'(c.dw.ew);
  assign nload = c.dw.pool ? 10'd0 : 10'(ntaps) + nedge;

  // UB read pipeline: what the row read in the previous cycle is for.
  rd_kind_e   rd_kind_q;
  logic [6:0] rd_idx_q;

  // Where VU-NA results are written.
  logic             pw_to_dw_q;
  logic [UB_AW-1:0] pw_out_addr, dw_out_addr;

  assign cmd_ready = (st == S_IDLE);
  assign idle      = (st == S_IDLE);

  // --------------------------------------------------------- combinational
  rd_kind_e rd_kind_d;
  always_comb begin
    wf_pop      = 1'b0;
    mu_w_we     = 1'b0;
    mu_w_row    = k[$clog2(H)-1:0];
    mu_w_data   = wf_dout;
    ub_re       = 1'b0;
    ub_raddr    = '0;
    rd_kind_d   = RK_NONE;
    pw_valid    = 1'b0;
    dw_start    = 1'b0;
    case (st)
      S_LOADW: if (!wf_empty) begin
        wf_pop  = 1'b1;
        mu_w_we = 1'b1;
      end
      S_LOADS: if (k == 10'd0) begin
        ub_re     = 1'b1;
        ub_raddr  = c.scale_row;
        rd_kind_d = RK_SCALE;
      end
      S_STREAM: begin
        ub_re     = 1'b1;
        ub_raddr  = c.in_base + UB_AW'(k);
        rd_kind_d = RK_PIX;
      end
      S_LOADDW: begin
        dw_start = (k == 10'd0);
        if (!c.dw.pool && k < 10'(ntaps)) begin
          ub_re     = 1'b1;
          ub_raddr  = c.dw_w_base + UB_AW'(k);
          rd_kind_d = RK_DWW;
        end else if (k < nload) begin
          ub_re     = 1'b1;
          ub_raddr  = c.dw_edge_base + UB_AW'(k - 10'(ntaps));
          rd_kind_d = RK_EDGE;
        end
      end
      S_DRAIN: pw_valid = 1'b1;
      default: ;
    endcase
  end

  assign dw_cfg       = c.dw;
  assign pn_valid     = (rd_kind_q == RK_SCALE) || (rd_kind_q == RK_PIX);
  assign pn_ld_scale  = (rd_kind_q == RK_SCALE);
  assign pn_row       = ub_rdata;
  assign pn_en        = c.pnmu_en;
  assign pn_relu      = c.pnmu_relu;
  assign pn_shift     = c.pnmu_shift;
  assign dw_w_we      = (rd_kind_q == RK_DWW);
  assign dw_w_addr    = rd_idx_q;
  assign dw_w_data    = ub_rdata;

  assign acc_wr_valid   = mu_out_valid;
  assign acc_accumulate = c.accumulate;
  assign acc_wr_addr    = AC_AW'(mu_cnt);
  assign acc_rd_addr    = AC_AW'(k);

  // VU-DW input: edge IFmaps read from the UB during LOADDW, then the PW
  // rows leaving VU-NA. The two never overlap: VU-NA is idle in LOADDW.
  logic pw_to_ub;
  assign pw_to_ub    = !pw_to_dw_q || c.dw_keep;
  assign dw_in_valid = (na_valid && !na_dw && pw_to_dw_q) || (rd_kind_q == RK_EDGE);
  assign dw_in_data  = (rd_kind_q == RK_EDGE) ? ub_rdata : na_data;
  assign ub_we       = na_valid && (na_dw || pw_to_ub);
  assign ub_waddr    = na_dw ? dw_out_addr : pw_out_addr;
  assign ub_wdata    = na_data;

  // Nothing of the previous DW tile may still be on its way to the UB.
  logic dw_quiet;
  assign dw_quiet = !dw_busy && !dw_out_valid && !(na_valid && na_dw);

  // ------------------------------------------------------------ sequential
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st              <= S_IDLE;
      c               <= '0;
      k               <= '0;
      mu_cnt          <= '0;
      rd_kind_q       <= RK_NONE;
      rd_idx_q        <= '0;
      pw_to_dw_q      <= 1'b0;
      pw_out_addr     <= '0;
      dw_out_addr     <= '0;
      cnt_share_stall <= '0;
      cnt_dw_stall    <= '0;
    end else begin
      rd_kind_q <= rd_kind_d;
      rd_idx_q  <= k[6:0];
      if (mu_out_valid) mu_cnt <= mu_cnt + 10'd1;
      if (na_valid && na_dw)                 dw_out_addr <= dw_out_addr + 1'b1;
      if (na_valid && !na_dw && pw_to_ub)    pw_out_addr <= pw_out_addr + 1'b1;
      if (pw_valid && !pw_ready) cnt_share_stall <= cnt_share_stall + 32'd1;

      case (st)
        S_IDLE: if (cmd_valid) begin
          c  <= cmd;
          k  <= '0;
          st <= cmd.load_w ? S_LOADW : (cmd.pnmu_en ? S_LOADS : S_STREAM);
        end
        S_LOADW: if (!wf_empty) begin
          k <= k + 10'd1;
          if (k == 10'(H - 1)) begin
            k  <= '0;
            st <= c.pnmu_en ? S_LOADS : S_STREAM;
          end
        end
        S_LOADS: begin
          k <= k + 10'd1;
          if (k == 10'd1) begin   // scale row read and handed to the PNMEs
            k  <= '0;
            st <= S_STREAM;
          end
        end
        S_STREAM: begin
          if (k == 10'd0) mu_cnt <= '0;
          k <= k + 10'd1;
          if (k == npix - 10'd1) begin
            k  <= '0;
            st <= S_WAITMU;
          end
        end
        S_WAITMU: if (mu_cnt == npix && !mu_out_valid) begin
          k  <= '0;
          st <= !c.drain ? S_IDLE : (c.dw_en ? S_WAITDW : S_DRAIN);
          if (c.drain && !c.dw_en) begin
            pw_to_dw_q  <= 1'b0;
            pw_out_addr <= c.out_base;
          end
        end
        S_WAITDW: begin
          if (dw_quiet) st <= S_LOADDW;
          else          cnt_dw_stall <= cnt_dw_stall + 32'd1;
        end
        S_LOADDW: begin
          if (k == 10'd0) begin
            pw_to_dw_q  <= 1'b1;
            dw_out_addr <= c.out_base;
            pw_out_addr <= c.keep_base;
          end
          k <= k + 10'd1;
          if (k == nload) begin
            k  <= '0;
            st <= S_DRAIN;
          end
        end
        S_DRAIN: if (pw_ready) begin
          k <= k + 10'd1;
          if (k == npix - 10'd1) begin
            k  <= '0;
            st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
