// dwpe: depth-wise processing element, one per SysAr lane (output channel).
//
// A DWPE receives the INT8 IFmap tile of its channel one element per cycle,
// in row-major order, straight from the vector unit, and computes the
// depth-wise convolution of that tile while it is still arriving.
//
// Input buffer (DWIB): DWMUL slices, each a byte-wide register file of
// DWIB_BYTES/DWMUL entries. Element (r,c) goes to slice (r + c*KH) mod DWMUL,
// so the KH*KW taps of any window, taken in column-major order, are
// consecutive integers modulo DWMUL and fall into DWMUL different slices: up to
// DWMUL taps are read in one cycle. Within a slice, element (r,c) sits at entry
// c*RPC + (r + (c*KH mod DWMUL)) / DWMUL, RPC being the entries one IFmap
// column needs.
//
// Weight buffer (DWWB): DWWB_BYTES/DWMUL words of DWMUL bytes; tap t of the
// kernel (column-major, t = i + j*KH) is byte t mod DWMUL of word t / DWMUL.
// A barrel shifter rotates the word of the current pass by the shift distance
//   base = (ST*(row_o + col_o*KH) - PAD*(1+KH)) mod DWMUL,
// the slice holding the window's first tap, which lines every weight up with
// the slice that holds its IFmap element. (For the worked examples this is the
// document's [ST*(row_o + col_o*KH) +/- PAD] mod DWMUL.)
//
// Datapath: DWMUL multipliers, an adder tree and an accumulation register. A
// window with KH*KW taps takes P = ceil(KH*KW/DWMUL) cycles (passes); a
// multiplier whose tap lies in the zero padding or beyond the last pass gets
// a zero operand. An output (row_o, col_o) is issued as soon as the last IFmap
// element its window needs has been written, so computation overlaps the
// arrival of the tile. Zero padding is applied at the top and left by PAD;
// the output size is given (oh, ow) and taps beyond the IFmap bottom/right are
// zero as well.
//
// Edge IFmaps: a tile that continues a larger IFmap needs the last rows of
// the tile above and the last columns of the tile to its left. With cfg.eh /
// cfg.ew non-zero, the first eh*IW + (IH-eh)*ew elements written are these
// edge IFmaps (row-major over the top eh rows, then the left ew columns of
// the remaining rows); the interior follows in row-major order. An output
// whose window lies in the edge area may start once all edge elements are in.
// A side with edge IFmaps gets no zero padding (cfg.pad applies to the others).
//
// Pooling: with cfg.pool the element sums the whole IFmap tile (global
// average pooling; the division by the tile size is left to the scale of the
// following VU-NA) and emits one result.
//
// Interface: start (one cycle, with cfg) clears the counters for a new tile;
// in_valid/in_data write the next IFmap element; w_we/w_addr/w_data write one
// weight byte; out_valid/out_data give an INT32 result one cycle after its
// last pass. busy is high from start until the last result has been issued.
// The slice mapping, the barrel shifter, DWIB/DWWB sizes and the one-element-
// per-cycle input follow the document; the within-slice addressing, the
// generalised shift distance, the readiness rule and pooling by summation are
// this design's own.
module dwpe
  import mvp_pkg::*;
#(
  parameter int unsigned K          = DWMUL,
  parameter int unsigned IB_BYTES   = DWIB_BYTES,
  parameter int unsigned WB_BYTES   = DWWB_BYTES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  dw_cfg_t                  cfg,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                     w_we,
  input  logic [6:0]               w_addr,
  input  logic signed [DATA_W-1:0] w_data,
  output logic                     busy,
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  out_data
);
  localparam int unsigned IB_DEPTH = IB_BYTES / K;
  localparam int unsigned WB_WORDS = WB_BYTES / K;
  localparam int unsigned IBA_W    = $clog2(IB_DEPTH);
  localparam int unsigned SL_W     = $clog2(K);
  localparam int unsigned WBA_W    = $clog2(WB_WORDS);

  logic signed [DATA_W-1:0] dwib [K][IB_DEPTH];
  logic signed [DATA_W-1:0] dwwb [WB_WORDS][K];

  dw_cfg_t    cfg_q;
  logic       running;
  logic [3:0] wr_r, wr_c;
  logic [7:0] wr_cnt;
  logic [3:0] orow, ocol;
  logic [3:0] pass;
  logic signed [ACC_W-1:0] acc_q;

  // Per-tile constants.
  logic [7:0] rpc;      // DWIB entries per IFmap column
  logic [3:0] npass;    // P
  logic [5:0] ntaps;    // KH*KW
  logic [7:0] nedge;    // edge IFmap elements, written before the interior
  always_comb begin
    ntaps = 6'(cfg_q.kh) * 6'(cfg_q.kw);
    nedge = 8'(cfg_q.eh) * 8'(cfg_q.iw) + (8'(cfg_q.ih) - 8'(cfg_q.eh)) * 8'(cfg_q.ew);
    rpc   = (8'(cfg_q.ih) + 8'(2*K - 2)) / 8'(K);
    npass = 4'((8'(ntaps) + 8'(K - 1)) / 8'(K));
  end

  // Where element (r, c) lives in the DWIB.
  function automatic logic [7:0] slice_of(input logic [7:0] r, input logic [7:0] c,
                                          input logic [2:0] kh);
    return 8'((r + 8'((12'(c) * 12'(kh)) % 12'(K))) % 8'(K));
  endfunction
  function automatic logic [7:0] entry_of(input logic [7:0] r, input logic [7:0] c,
                                          input logic [2:0] kh, input logic [7:0] rpc_i);
    return 8'(12'(c) * 12'(rpc_i)) + (r + 8'((12'(c) * 12'(kh)) % 12'(K))) / 8'(K);
  endfunction

  // ---------------------------------------------------------------- window
  logic signed [7:0] r0, c0;          // window top-left in IFmap coordinates
  logic [7:0]        base;            // shift distance
  logic              ready;
  always_comb begin
    logic signed [7:0]  rl, cl;
    logic signed [11:0] lin;
    // zero padding only on a side that has no edge IFmaps
    r0   = signed'(8'(orow) * 8'(cfg_q.st)) - ((cfg_q.eh != 0) ? 8'sd0 : signed'(8'(cfg_q.pad)));
    c0   = signed'(8'(ocol) * 8'(cfg_q.st)) - ((cfg_q.ew != 0) ? 8'sd0 : signed'(8'(cfg_q.pad)));
    lin  = 12'(r0) + 12'(c0) * 12'(signed'({1'b0, cfg_q.kh})) + 12'(32 * K);
    base = 8'(lin % 12'(K));
    rl   = r0 + 8'(cfg_q.kh) - 8'sd1;
    cl   = c0 + 8'(cfg_q.kw) - 8'sd1;
    if (rl > signed'(8'(cfg_q.ih)) - 8'sd1) rl = signed'(8'(cfg_q.ih)) - 8'sd1;
    if (cl > signed'(8'(cfg_q.iw)) - 8'sd1) cl = signed'(8'(cfg_q.iw)) - 8'sd1;
    if (rl < 0 || cl < 0) ready = 1'b1;
    else if (rl < signed'(8'(cfg_q.eh)) || cl < signed'(8'(cfg_q.ew)))
      ready = wr_cnt >= nedge;                 // window lies in the edge IFmaps
    else
      ready = 12'(wr_cnt) > 12'(nedge) + (12'(rl) - 12'(cfg_q.eh)) * (12'(cfg_q.iw) - 12'(cfg_q.ew))
                            + 12'(cl) - 12'(cfg_q.ew);
  end

  // ------------------------------------------------ barrel shifter, DWMULs
  logic signed [DATA_W-1:0] wrot [K];
  logic signed [15:0]       prod [K];
  logic signed [ACC_W-1:0]  sum;
  always_comb begin
    sum = '0;
    for (int m = 0; m < K; m++) begin
      logic [7:0]        off, t, i, j;
      logic signed [7:0] r, c;
      logic              live;
      off = 8'((8'(m) + 8'(K) - base) % 8'(K));
      t   = 8'(pass) * 8'(K) + off;
      i   = t % 8'(cfg_q.kh);
      j   = t / 8'(cfg_q.kh);
      r   = r0 + signed'(i);
      c   = c0 + signed'(j);
      wrot[m] = dwwb[WBA_W'((8'(pass) < 8'(WB_WORDS)) ? 8'(pass) : 8'd0)][SL_W'(off)];
      live = (t < 8'(ntaps)) && r >= 0 && c >= 0 &&
             r < signed'(8'(cfg_q.ih)) && c < signed'(8'(cfg_q.iw));
      if (live)
        prod[m] = dwib[m][IBA_W'(entry_of(8'(r), 8'(c), cfg_q.kh, rpc))] * wrot[m];
      else
        prod[m] = '0;
      sum += ACC_W'(prod[m]);   // adder tree
    end
  end

  logic issue, last_pass, last_out;
  assign issue     = running && !cfg_q.pool && ready;
  assign last_pass = (pass == npass - 4'd1);
  assign last_out  = (orow == cfg_q.oh - 4'd1) && (ocol == cfg_q.ow - 4'd1);
  assign busy      = running;

  // ---------------------------------------------------------- DWIB / DWWB
  always_ff @(posedge clk) begin
    if (in_valid && !cfg_q.pool)
      dwib[SL_W'(slice_of(8'(wr_r), 8'(wr_c), cfg_q.kh))]
          [IBA_W'(entry_of(8'(wr_r), 8'(wr_c), cfg_q.kh, rpc))] <= in_data;
    if (w_we)
      dwwb[WBA_W'(w_addr / 7'(K))][SL_W'(w_addr % 7'(K))] <= w_data;
  end

  // ------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q     <= '0;
      running   <= 1'b0;
      wr_r      <= '0;
      wr_c      <= '0;
      wr_cnt    <= '0;
      orow      <= '0;
      ocol      <= '0;
      pass      <= '0;
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (start) begin
        cfg_q   <= cfg;
        running <= 1'b1;
        wr_r    <= '0;
        wr_c    <= '0;
        wr_cnt  <= '0;
        orow    <= '0;
        ocol    <= '0;
        pass    <= '0;
        acc_q   <= '0;
      end else begin
        if (in_valid) begin
          wr_cnt <= wr_cnt + 8'd1;
          // Write position: the edge IFmaps in row-major order (top rows,
          // then the left columns of the remaining rows), then the interior.
          if (wr_cnt + 8'd1 == nedge) begin
            wr_r <= 4'(cfg_q.eh);
            wr_c <= 4'(cfg_q.ew);
          end else if (wr_cnt < nedge && wr_r >= 4'(cfg_q.eh) && wr_c == 4'(cfg_q.ew) - 4'd1) begin
            wr_c <= '0;
            wr_r <= wr_r + 4'd1;
          end else if (wr_c == cfg_q.iw - 4'd1) begin
            wr_c <= (wr_cnt < nedge) ? 4'd0 : 4'(cfg_q.ew);
            wr_r <= wr_r + 4'd1;
          end else begin
            wr_c <= wr_c + 4'd1;
          end
          if (cfg_q.pool) begin
            acc_q <= acc_q + ACC_W'(in_data);
            if (wr_cnt == 8'(cfg_q.ih) * 8'(cfg_q.iw) - 8'd1) begin
              out_valid <= 1'b1;
              out_data  <= acc_q + ACC_W'(in_data);
              running   <= 1'b0;
            end
          end
        end
        if (issue) begin
          acc_q <= (pass == 4'd0) ? sum : acc_q + sum;
          if (last_pass) begin
            out_valid <= 1'b1;
            out_data  <= ((pass == 4'd0) ? '0 : acc_q) + sum;
            pass      <= '0;
            if (ocol == cfg_q.ow - 4'd1) begin
              ocol <= '0;
              orow <= orow + 4'd1;
            end else begin
              ocol <= ocol + 4'd1;
            end
            if (last_out) running <= 1'b0;
          end else begin
            pass <= pass + 4'd1;
          end
        end
      end
    end
  end

  // The tile must fit the DWIB and the kernel the DWWB.
  assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (16'(cfg.iw) * ((16'(cfg.ih) + 16'(2*K - 2)) / 16'(K)) <= 16'(IB_DEPTH)))
    else $error("dwpe: IFmap tile does not fit the DWIB");
  assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (8'(cfg.kh) * 8'(cfg.kw) <= 8'(WB_BYTES)))
    else $error("dwpe: kernel does not fit the DWWB");
  assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (4'(cfg.eh) < cfg.ih && 4'(cfg.ew) < cfg.iw && !(cfg.pool && (cfg.eh != 0 || cfg.ew != 0))))
    else $error("dwpe: edge IFmaps must leave an interior, and pooling takes none");
endmodule
