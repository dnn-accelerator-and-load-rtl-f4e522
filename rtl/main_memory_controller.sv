// main_memory_controller: DMA engine between the off-chip DRAM and the chip.
//
// One command at a time (cmd_valid/cmd_ready): DMA_LOAD_UB copies len+1
// consecutive 512-bit DRAM words into consecutive UB rows, DMA_LOAD_WF pushes
// them into the weight FIFO, DMA_STORE_UB copies UB rows to DRAM. The DRAM side
// is a request/grant port with in-order read responses (dram_rvalid);
// reads are pipelined, up to the FIFO space for weight loads. A store reads a
// UB row (one cycle), then holds the write request until it is granted. busy
// is high while a command runs. The document names the controller and its
// links to DRAM, UB and weight FIFO only; the command set, the DRAM port and
// the flow control are this design's.
module main_memory_controller
  import mvp_pkg::*;
#(
  parameter int unsigned WIDTH = H_MU * DATA_W,
  parameter int unsigned UB_AW = $clog2(UB_DEPTH),
  parameter int unsigned WF_CW = $clog2(WFIFO_DEPTH) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  dma_cmd_t          cmd,
  output logic              busy,
  // DRAM
  output logic              dram_req,
  output logic              dram_we,
  output logic [23:0]       dram_addr,
  output logic [WIDTH-1:0]  dram_wdata,
  input  logic              dram_gnt,
  input  logic              dram_rvalid,
  input  logic [WIDTH-1:0]  dram_rdata,
  // UB
  output logic              ub_re,
  output logic [UB_AW-1:0]  ub_raddr,
  input  logic [WIDTH-1:0]  ub_rdata,
  output logic              ub_we,
  output logic [UB_AW-1:0]  ub_waddr,
  output logic [WIDTH-1:0]  ub_wdata,
  // weight FIFO
  output logic              wf_push,
  output logic [WIDTH-1:0]  wf_din,
  input  logic [WF_CW-1:0]  wf_count,
  input  logic [WF_CW-1:0]  wf_depth
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_ST_RD, S_ST_WAIT, S_ST_WR} state_e;
  state_e     st;
  dma_cmd_t   c;
  logic [13:0] issued, done;   // requests issued / rows completed
  logic [13:0] total;
  assign total = {1'b0, c.len} + 14'd1;

  assign cmd_ready = (st == S_IDLE);
  assign busy      = (st != S_IDLE);

  // Outstanding reads may not overrun the weight FIFO.
  logic room;
  assign room = (c.op != DMA_LOAD_WF) ||
                (14'(wf_count) + (issued - done) < 14'(wf_depth));

  logic [WIDTH-1:0] wbuf;  // UB row of a store, held until granted

  always_comb begin
    dram_req   = 1'b0;
    dram_we    = 1'b0;
    dram_addr  = c.dram_addr + 24'(issued);
    dram_wdata = wbuf;
    ub_re      = 1'b0;
    ub_raddr   = c.ub_addr + UB_AW'(done);
    ub_we      = 1'b0;
    ub_waddr   = c.ub_addr + UB_AW'(done);
    ub_wdata   = dram_rdata;
    wf_push    = 1'b0;
    wf_din     = dram_rdata;
    case (st)
      S_LOAD: begin
        dram_req = (issued < total) && room;
        if (dram_rvalid) begin
          ub_we   = (c.op == DMA_LOAD_UB);
          wf_push = (c.op == DMA_LOAD_WF);
        end
      end
      S_ST_RD: ub_re = 1'b1;
      S_ST_WR: begin
        dram_req  = 1'b1;
        dram_we   = 1'b1;
        dram_addr = c.dram_addr + 24'(done);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      c      <= '0;
      issued <= '0;
      done   <= '0;
      wbuf   <= '0;
    end else begin
      case (st)
        S_IDLE: if (cmd_valid) begin
          c      <= cmd;
          issued <= '0;
          done   <= '0;
          st     <= (cmd.op == DMA_STORE_UB) ? S_ST_RD : S_LOAD;
        end
        S_LOAD: begin
          if (dram_req && dram_gnt) issued <= issued + 14'd1;
          if (dram_rvalid) begin
            done <= done + 14'd1;
            if (done + 14'd1 == total) st <= S_IDLE;
          end
        end
        S_ST_RD:   st <= S_ST_WAIT;
        S_ST_WAIT: begin
          wbuf <= ub_rdata;
          st   <= S_ST_WR;
        end
        S_ST_WR: if (dram_gnt) begin
          done <= done + 14'd1;
          st   <= (done + 14'd1 == total) ? S_IDLE : S_ST_RD;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
