// systolic_data_setup: turns one UB row (one pixel, H input channels) per cycle
// into the diagonal wavefront the matrix unit expects.
//
// Row i is delayed by i cycles through a chain of registers, so row 0 passes
// straight through and row H-1 arrives H-1 cycles later. A row of an invalid
// cycle is replaced by zero. in_valid is forwarded unchanged as out_valid,
// aligned with row 0. The delay-line structure is this design's way of
// realising the wavefront the document describes.
module systolic_data_setup
  import mvp_pkg::*;
#(
  parameter int unsigned H = H_MU
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [H-1:0][DATA_W-1:0] in_row,
  output logic                     out_valid,
  output logic [H-1:0][DATA_W-1:0] out_row
);
  assign out_valid = in_valid;

  for (genvar i = 0; i < H; i++) begin : g_row
    logic [DATA_W-1:0] head;
    assign head = in_valid ? in_row[i] : '0;
    if (i == 0) begin : g_0
      assign out_row[i] = head;
    end else begin : g_d
      logic [DATA_W-1:0] dl [i];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < i; k++) dl[k] <= '0;
        end else begin
          dl[0] <= head;
          for (int k = 1; k < i; k++) dl[k] <= dl[k-1];
        end
      end
      assign out_row[i] = dl[i-1];
    end
  end
endmodule
