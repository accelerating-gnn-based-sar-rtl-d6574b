// tb_systolic_array: self-checking test of the M x M systolic array.
// Streams skewed random A (M x K) and B (K x M) into the edges and checks
// every accumulator against a reference matrix product exactly K+2M-2
// cycles after the first operands entered.
module tb_systolic_array;
  import gnn_pkg::*;
  localparam int M = 4, K = 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear = 1'b0;
  data_t [M-1:0] a_left = '0, b_top = '0;
  acc_t [M-1:0][M-1:0] acc;
  systolic_array #(.M(M)) dut (.*);

  data_t A [M][K];
  data_t B [K][M];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < M; i++) for (int k = 0; k < K; k++) A[i][k] = data_t'($urandom_range(3000)) - data_t'(1500);
      for (int k = 0; k < K; k++) for (int j = 0; j < M; j++) B[k][j] = data_t'($urandom_range(3000)) - data_t'(1500);
      @(negedge clk);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      for (int t = 0; t < K + 2 * M - 2; t++) begin
        for (int i = 0; i < M; i++) begin
          a_left[i] = (t - i >= 0 && t - i < K) ? A[i][t - i] : '0;
          b_top[i]  = (t - i >= 0 && t - i < K) ? B[t - i][i] : '0;
        end
        @(negedge clk);
      end
      a_left = '0; b_top = '0;
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          acc_t r;
          r = 0;
          for (int k = 0; k < K; k++) r += fx_mul(A[i][k], B[k][j]);
          checks++;
          if (acc[i][j] !== r) begin failures++; $display("FAIL C[%0d][%0d] %0d exp %0d", i, j, acc[i][j], r); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
