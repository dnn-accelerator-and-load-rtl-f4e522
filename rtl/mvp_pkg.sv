// mvp_pkg: sizes, types and command formats shared by the MVP accelerator.
//
// MVP couples a weight-stationary systolic matrix unit (MU) with a depth-wise
// vector unit (VU-DW) behind the NORM/ACT vector unit (VU-NA), and a
// processing-near-memory unit (PNMU) between the unified buffer (UB) and the
// MU. The defaults below are the evaluated configuration: a 64x64 INT8 MU, a
// 512 KB UB of 8192 rows x 512 bits, a 128 KB accumulator buffer of 512 rows x
// 2048 bits, 64 depth-wise processing elements with five multipliers, a 260 B
// input buffer and a 100 B weight buffer each. Field widths of the commands and
// of the per-layer configuration are this design's own choice.
package mvp_pkg;

  localparam int unsigned H_MU        = 64;    // MU rows  (input channels of a tile)
  localparam int unsigned W_MU        = 64;    // MU columns = SysAr lanes (output channels)
  localparam int unsigned DATA_W      = 8;     // INT8 weights and feature maps
  localparam int unsigned ACC_W       = 32;    // INT32 partial sums
  localparam int unsigned UB_DEPTH    = 8192;  // unified buffer rows of H_MU bytes
  localparam int unsigned ACC_DEPTH   = 512;   // accumulator rows of W_MU x INT32
  localparam int unsigned DWMUL       = 5;     // depth-wise multipliers per DWPE
  localparam int unsigned DWIB_BYTES  = 260;   // depth-wise input buffer per DWPE
  localparam int unsigned DWWB_BYTES  = 100;   // depth-wise weight buffer per DWPE
  localparam int unsigned WFIFO_DEPTH = 64;    // weight FIFO rows (assumed: one MU tile)

  // Geometry of one depth-wise tile (all sizes in elements, at most 15).
  typedef struct packed {
    logic [3:0] ih;    // IFmap tile height
    logic [3:0] iw;    // IFmap tile width
    logic [3:0] oh;    // OFmap tile height
    logic [3:0] ow;    // OFmap tile width
    logic [2:0] kh;    // kernel height
    logic [2:0] kw;    // kernel width
    logic [1:0] st;    // stride (1..3)
    logic [1:0] pad;   // zero padding at the top and left edges
    logic [2:0] eh;    // edge IFmap rows at the top, from the tile above
    logic [2:0] ew;    // edge IFmap columns at the left, from the tile to the left
    logic       pool;  // 1: global pooling (sum of the tile) instead of DW-CONV
  } dw_cfg_t;

  // Requantisation used by VU-NA: y = sat8(((x * scale) >>> shift) + bias), then ReLU.
  typedef struct packed {
    logic signed [15:0] scale;
    logic signed [15:0] bias;
    logic        [4:0]  shift;
    logic               relu;
  } na_cfg_t;

  // One tile operation run by the tile sequencer.
  typedef struct packed {
    logic [12:0] in_base;     // UB row of the first input pixel (one pixel = one row)
    logic [8:0]  npix;        // pixels in the tile, 1..ACC_DEPTH (encoded as npix-1)
    logic        load_w;      // pop H_MU weight rows from the weight FIFO first
    logic        accumulate;  // add into ACC (further IC tiles) instead of overwriting
    logic        drain;       // last IC tile: send ACC rows through VU-NA
    logic        pnmu_en;     // scale inputs in the PNMU (SE-Scale) on the way to the MU
    logic        pnmu_relu;   // ReLU in the PNMU
    logic [2:0]  pnmu_shift;  // right shift after the PNMU multiply
    logic [12:0] scale_row;   // UB row holding one scale factor per input channel
    logic        dw_en;       // drained rows go to VU-DW instead of the UB
    logic [12:0] dw_w_base;   // UB rows holding the DW weights, one kernel tap per row
    logic [12:0] dw_edge_base; // UB rows holding this tile's edge IFmaps, in row-major order
    logic        dw_keep;     // also write the PW rows sent to VU-DW to the UB (future edges)
    logic [12:0] keep_base;   // UB row of the first kept PW row
    dw_cfg_t     dw;          // geometry of the depth-wise tile
    logic [12:0] out_base;    // UB row of the first result
  } tile_cmd_t;

  // DMA command of the main-memory controller.
  typedef enum logic [1:0] {
    DMA_LOAD_UB  = 2'd0,  // DRAM -> UB
    DMA_STORE_UB = 2'd1,  // UB   -> DRAM
    DMA_LOAD_WF  = 2'd2   // DRAM -> weight FIFO
  } dma_op_e;

  typedef struct packed {
    dma_op_e     op;
    logic [23:0] dram_addr;  // DRAM word (512-bit) address
    logic [12:0] ub_addr;
    logic [12:0] len;        // rows to move, minus one
  } dma_cmd_t;

  // Saturate a signed value to INT8.
  function automatic logic signed [7:0] sat8(input logic signed [47:0] v);
    if (v > 48'sd127)       return 8'sd127;
    else if (v < -48'sd128) return -8'sd128;
    else                    return v[7:0];
  endfunction

endpackage
