// tb_fu_module: self-checking test of the Feature Update module.
// Loads a tile of M vertex rows with K = 10 features and a K x N weight
// matrix (N = 2 column tiles), runs it with ReLU, sigmoid and no
// activation, and compares the result buffer with a reference
// act(sum_k A[i][k] W[k][j]). The last run streams to the MLP link; the
// stream's element indices and data are checked. Each run's cycle count is
// checked against n_tiles * (K + 2M [+ M when streaming]) + 1.
module tb_fu_module;
  import gnn_pkg::*;
  localparam int M = 4, K_MAX = 16, N_MAX = 8, K = 10, NT = 2;
  localparam int KC = K_MAX / M, NC = N_MAX / M;
  localparam int RW = $clog2(M), KCW = $clog2(KC), NCW = $clog2(NC), KW = $clog2(K_MAX + 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 1'b0, feat_wr_en = 1'b0, wgt_wr_en = 1'b0, start = 1'b0, to_mlp = 1'b0;
  logic busy, done, out_valid;
  logic [RW-1:0] feat_wr_row, res_rd_row = '0;
  logic [KCW-1:0] feat_wr_chunk;
  logic [$clog2(K_MAX)-1:0] wgt_wr_k;
  logic [NCW-1:0] wgt_wr_chunk, res_rd_chunk = '0;
  data_t [M-1:0] feat_wr_data, wgt_wr_data, res_rd_data, out_data;
  logic [KW-1:0] k_len = KW'(K);
  logic [NCW:0] n_tiles = (NCW+1)'(NT);
  act_e act = ACT_RELU;
  logic [15:0] mlp_base = 16'd32, out_index;

  fu_module #(.M(M), .K_MAX(K_MAX), .N_MAX(N_MAX)) dut (.*);

  data_t A [M][K_MAX];
  data_t Wt [K_MAX][N_MAX];
  int n_out_rows;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t expect_val(act_e f, int i, int j);
    acc_t r;
    r = 0;
    for (int k = 0; k < K; k++) r += fx_mul(A[i][k], Wt[k][j]);
    return activate(f, r);
  endfunction

  // monitor of the MLP link
  always @(posedge clk) begin
    if (out_valid) begin
      int r, tl;
      r  = n_out_rows % M;
      tl = n_out_rows / M;
      checks++;
      if (out_index !== 16'(32 + r * NT * M + tl * M)) begin
        failures++; $display("FAIL stream index %0d", out_index);
      end
      for (int j = 0; j < M; j++) begin
        checks++;
        if (out_data[j] !== expect_val(act, r, tl * M + j)) begin
          failures++; $display("FAIL stream data row %0d tile %0d col %0d", r, tl, j);
        end
      end
      n_out_rows++;
    end
  end

  task automatic run(act_e f, bit stream);
    int cyc;
    @(negedge clk);
    act = f; to_mlp = stream; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != NT * (K + 2 * M + (stream ? M : 0)) + 1) begin
      failures++; $display("FAIL cycles %0d", cyc);
    end
    for (int i = 0; i < M; i++)
      for (int c = 0; c < NT; c++) begin
        res_rd_row = RW'(i); res_rd_chunk = NCW'(c);
        @(negedge clk);
        for (int j = 0; j < M; j++) begin
          checks++;
          if (res_rd_data[j] !== expect_val(f, i, c * M + j)) begin
            failures++; $display("FAIL act %0d C[%0d][%0d] = %0d", f, i, c * M + j, res_rd_data[j]);
          end
        end
      end
  endtask

  initial begin
    n_out_rows = 0;
    for (int i = 0; i < M; i++) for (int k = 0; k < K_MAX; k++)
      A[i][k] = (k < K) ? data_t'($urandom_range(1024)) - data_t'(512) : '0;
    for (int k = 0; k < K_MAX; k++) for (int j = 0; j < N_MAX; j++)
      Wt[k][j] = data_t'($urandom_range(512)) - data_t'(256);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < M; i++)
      for (int c = 0; c < KC; c++) begin
        @(negedge clk);
        feat_wr_en = 1'b1; feat_wr_row = RW'(i); feat_wr_chunk = KCW'(c);
        for (int e = 0; e < M; e++) feat_wr_data[e] = A[i][c * M + e];
      end
    @(negedge clk);
    feat_wr_en = 1'b0;
    for (int k = 0; k < K_MAX; k++)
      for (int c = 0; c < NC; c++) begin
        @(negedge clk);
        wgt_wr_en = 1'b1; wgt_wr_k = 4'(k); wgt_wr_chunk = NCW'(c);
        for (int e = 0; e < M; e++) wgt_wr_data[e] = Wt[k][c * M + e];
      end
    @(negedge clk);
    wgt_wr_en = 1'b0;
    run(ACT_RELU, 1'b0);
    run(ACT_SIGMOID, 1'b0);
    run(ACT_NONE, 1'b1);
    checks++;
    if (n_out_rows != NT * M) begin failures++; $display("FAIL %0d stream rows", n_out_rows); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
