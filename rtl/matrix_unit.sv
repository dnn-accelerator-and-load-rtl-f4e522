// matrix_unit: H x W weight-stationary systolic array of INT8 MACs (the MU).
//
// Row i takes input channel i of a pixel, column j computes output channel j
// (one "SysAr lane" per column). Inputs must arrive skewed: row i one cycle per
// row later than row 0, as produced by systolic_data_setup; in_valid is aligned
// with row 0. IFmap elements move right one cell per cycle, partial sums move
// down one cell per cycle, and the bottom of column j is delayed by W-1-j
// cycles so that all W sums of a pixel leave together.
//
// Timing: the dot products of the pixel whose row-0 element enters at cycle T
// appear on ps_out with out_valid at cycle T+H+W-1. One pixel per cycle.
// Weights are loaded one row per cycle through w_we/w_row/w_data and must not
// change while pixels are in flight (the controller waits for the array to
// drain). The row-addressed weight load and the output de-skew are this
// design's choices; the array organisation follows the baseline systolic array.
module matrix_unit
  import mvp_pkg::*;
#(
  parameter int unsigned H = H_MU,
  parameter int unsigned W = W_MU
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // weight load: row w_row receives one weight per column
  input  logic                            w_we,
  input  logic [$clog2(H)-1:0]            w_row,
  input  logic [W-1:0][DATA_W-1:0]        w_data,
  // skewed IFmap rows
  input  logic                            in_valid,
  input  logic [H-1:0][DATA_W-1:0]        a_in,
  // de-skewed partial sums, one per column
  output logic                            out_valid,
  output logic [W-1:0][ACC_W-1:0]         ps_out
);
  logic signed [DATA_W-1:0] a_q  [H][W];
  logic signed [ACC_W-1:0]  ps_q [H][W];

  for (genvar i = 0; i < H; i++) begin : g_row
    for (genvar j = 0; j < W; j++) begin : g_col
      logic signed [DATA_W-1:0] a_left;
      logic signed [ACC_W-1:0]  ps_top;
      if (j == 0) begin : g_l
        assign a_left = a_in[i];
      end else begin : g_m
        assign a_left = a_q[i][j-1];
      end
      if (i == 0) begin : g_t
        assign ps_top = '0;
      end else begin : g_n
        assign ps_top = ps_q[i-1][j];
      end
      mac_pe u_pe (
        .clk   (clk),
        .rst_n (rst_n),
        .w_we  (w_we && (w_row == i[$clog2(H)-1:0])),
        .w_in  (w_data[j]),
        .a_in  (a_left),
        .ps_in (ps_top),
        .a_out (a_q[i][j]),
        .ps_out(ps_q[i][j])
      );
    end
  end

  // De-skew: column j leaves the array at T+H+j; delay it by W-1-j more.
  for (genvar j = 0; j < W; j++) begin : g_deskew
    localparam int unsigned D = W - 1 - j;
    if (D == 0) begin : g_none
      assign ps_out[j] = ps_q[H-1][j];
    end else begin : g_dly
      logic [ACC_W-1:0] dl [D];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < D; k++) dl[k] <= '0;
        end else begin
          dl[0] <= ps_q[H-1][j];
          for (int k = 1; k < D; k++) dl[k] <= dl[k-1];
        end
      end
      assign ps_out[j] = dl[D-1];
    end
  end

  // Valid travels alongside: H+W-1 cycles from row-0 entry to the output.
  logic [H+W-2:0] vld_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[H+W-3:0], in_valid};
  end
  assign out_valid = vld_q[H+W-2];
endmodule
