// systolic_array: the M x M array of Computation Units of the Feature
// Update module, organised as an output-stationary systolic array.
//
// CU(i,j) accumulates C[i][j] = sum_k A[i][k] * B[k][j]. Row i of A enters
// at the left edge (a_left[i]) skewed by i cycles: A[i][k] at cycle k+i.
// Column j of B enters at the top (b_top[j]) skewed by j cycles: B[k][j] at
// cycle k+j. Operands move one CU right / down per cycle, so A[i][k] and
// B[k][j] meet in CU(i,j) at cycle k+i+j. With K terms, the last MAC is in
// cycle K+2M-3 and acc holds the full M x M tile one cycle later. Outside
// the valid range the edges must be driven with zero. clear zeroes every
// accumulator. The array does M*M MACs per cycle.
// The m x m systolic organisation follows the accelerator; the output-
// stationary dataflow is this design's choice.
module systolic_array
  import gnn_pkg::*;
#(
  parameter int M = 16
) (
  input  logic                 clk,
  input  logic                 clear,
  input  data_t [M-1:0]        a_left,
  input  data_t [M-1:0]        b_top,
  output acc_t  [M-1:0][M-1:0] acc
);

  // a_h[i][j]: A operand entering CU(i,j); b_v[i][j]: B operand entering it.
  data_t a_h [M][M+1];
  data_t b_v [M+1][M];

  for (genvar i = 0; i < M; i++) begin : g_edge
    assign a_h[i][0] = a_left[i];
    assign b_v[0][i] = b_top[i];
  end

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < M; j++) begin : g_col
      fu_cu u_cu (
        .clk, .clear,
        .a_in(a_h[i][j]), .b_in(b_v[i][j]),
        .a_out(a_h[i][j+1]), .b_out(b_v[i+1][j]),
        .acc(acc[i][j])
      );
    end
  end

endmodule
