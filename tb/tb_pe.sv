// tb_pe: self-checking test of one processing element at reduced sizes.
//  - an image id is assigned: the PE leaves idle;
//  - FA runs a mean-aggregation pass on a 4 x 4 mesh (checked);
//  - FU computes a tile with to_mlp set; the MLP command is issued the
//    cycle after fu_done, so it must not overtake the link data that is
//    still crossing the SLR registers;
//  - the final MLP run yields the label: res_valid carries the assigned id
//    and the label, holds while res_ready is low, and the PE is idle again
//    after the handshake.
module tb_pe;
  import gnn_pkg::*;
  localparam int P = 4, Q = 4, DEPTH = 16, EDGE_ROWS = 64, M = 4, K_MAX = 8, N_MAX = 4;
  localparam int S1 = 4, S2 = 4, IN_MAX = 16, OUT_MAX = 4, ID_W = 16, W = 4, NCLS = 3;
  localparam int AW = $clog2(DEPTH), EAW = $clog2(EDGE_ROWS), NEW = $clog2(EDGE_ROWS * P + 1);
  localparam int RW = $clog2(M), KCW = 1, NCW = 1, KW = $clog2(K_MAX + 1);
  localparam int CW = $clog2(IN_MAX / S2), OW = $clog2(OUT_MAX);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 1'b0, assign_valid = 1'b0, idle, res_valid, res_ready = 1'b0;
  logic [ID_W-1:0] assign_id = '0, res_id;
  logic [OW-1:0] res_label;
  logic fa_feat_wr_en = 0, fa_edge_wr_en = 0, fa_start = 0, fa_busy, fa_done;
  logic [AW-1:0] fa_feat_wr_addr = '0, fa_res_rd_addr = '0;
  data_t [Q-1:0] fa_feat_wr_data = '0, fa_res_rd_data;
  logic [EAW-1:0] fa_edge_wr_addr = '0;
  edge_t [P-1:0] fa_edge_wr_data = '0;
  gather_op_e fa_op = GATHER_SUM;
  logic [NEW-1:0] fa_num_edges = '0;
  logic [31:0] fa_stall_cycles;
  logic fu_feat_wr_en = 0, fu_wgt_wr_en = 0, fu_start = 0, fu_to_mlp = 0, fu_busy, fu_done;
  logic [RW-1:0] fu_feat_wr_row = '0, fu_res_rd_row = '0;
  logic [KCW-1:0] fu_feat_wr_chunk = '0;
  data_t [M-1:0] fu_feat_wr_data = '0, fu_wgt_wr_data = '0, fu_res_rd_data;
  logic [$clog2(K_MAX)-1:0] fu_wgt_wr_k = '0;
  logic [NCW-1:0] fu_wgt_wr_chunk = '0, fu_res_rd_chunk = '0;
  logic [KW-1:0] fu_k_len = '0;
  logic [NCW:0] fu_n_tiles = '0;
  act_e fu_act = ACT_RELU;
  logic [15:0] fu_mlp_base = '0;
  logic mlp_in_wr_en = 0, mlp_w_wr_en = 0, mlp_start = 0, mlp_relu = 0, mlp_final = 0, mlp_busy, mlp_done;
  logic [CW-1:0] mlp_in_wr_chunk = '0, mlp_w_wr_chunk = '0;
  data_t [S2-1:0] mlp_in_wr_data = '0, mlp_w_wr_data = '0;
  logic [OW-1:0] mlp_w_wr_row = '0, mlp_out_rd_addr = '0;
  logic [CW:0] mlp_n_chunks = '0;
  logic [OW:0] mlp_n_out = '0;
  data_t mlp_out_rd_data;

  pe #(.P(P), .Q(Q), .DEPTH(DEPTH), .EDGE_ROWS(EDGE_ROWS), .M(M), .K_MAX(K_MAX), .N_MAX(N_MAX),
       .S1(S1), .S2(S2), .IN_MAX(IN_MAX), .OUT_MAX(OUT_MAX)) dut (.*);

  data_t h [DEPTH][Q];
  data_t A [M][K_MAX];
  data_t Wt [K_MAX][N_MAX];
  data_t WM [NCLS][IN_MAX];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    edge_t el[$];
    acc_t y [NCLS];
    data_t fu_ref [M][N_MAX];
    int best, n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (!idle) begin failures++; $display("FAIL not idle after reset"); end
    assign_valid = 1'b1; assign_id = 16'h55;
    @(negedge clk);
    assign_valid = 1'b0;
    checks++;
    if (idle) begin failures++; $display("FAIL idle after assign"); end

    // ---- FA: mean aggregation on a W x W mesh ----
    for (int v = 0; v < DEPTH; v++) begin
      @(negedge clk);
      fa_feat_wr_en = 1; fa_feat_wr_addr = AW'(v);
      for (int f = 0; f < Q; f++) begin h[v][f] = data_t'($urandom_range(512)) - data_t'(256); fa_feat_wr_data[f] = h[v][f]; end
    end
    for (int v = 0; v < DEPTH; v++)
      for (int dy = -1; dy <= 1; dy++)
        for (int dx = -1; dx <= 1; dx++)
          if (v/W+dy >= 0 && v/W+dy < W && v%W+dx >= 0 && v%W+dx < W)
            el.push_back('{src: VID_W'((v/W+dy)*W + v%W+dx), dst: VID_W'(v), weight: data_t'(64)});
    for (int r = 0; r < (el.size() + P - 1) / P; r++) begin
      @(negedge clk);
      fa_feat_wr_en = 0; fa_edge_wr_en = 1; fa_edge_wr_addr = EAW'(r);
      for (int i = 0; i < P; i++) fa_edge_wr_data[i] = (r*P+i < el.size()) ? el[r*P+i] : '0;
    end
    @(negedge clk);
    fa_edge_wr_en = 0; fa_start = 1; fa_op = GATHER_SUM; fa_num_edges = NEW'(el.size());
    @(negedge clk);
    fa_start = 0;
    while (!fa_done) @(negedge clk);
    for (int v = 0; v < DEPTH; v++) begin
      fa_res_rd_addr = AW'(v);
      @(negedge clk);
      for (int f = 0; f < Q; f++) begin
        acc_t s;
        s = 0;
        foreach (el[e]) if (int'(el[e].dst) == v) s += fx_mul(h[el[e].src][f], data_t'(64));
        checks++;
        if (fa_res_rd_data[f] !== sat(s)) begin failures++; $display("FAIL FA v%0d f%0d", v, f); end
      end
    end

    // ---- FU with the direct link to the MLP ----
    for (int i = 0; i < M; i++) for (int k = 0; k < K_MAX; k++) A[i][k] = data_t'($urandom_range(512)) - data_t'(256);
    for (int k = 0; k < K_MAX; k++) for (int j = 0; j < N_MAX; j++) Wt[k][j] = data_t'($urandom_range(256)) - data_t'(128);
    for (int c = 0; c < NCLS; c++) for (int e = 0; e < IN_MAX; e++) WM[c][e] = data_t'($urandom_range(256)) - data_t'(128);
    for (int i = 0; i < M; i++)
      for (int c = 0; c < K_MAX / M; c++) begin
        @(negedge clk);
        fu_feat_wr_en = 1; fu_feat_wr_row = RW'(i); fu_feat_wr_chunk = KCW'(c);
        for (int j = 0; j < M; j++) fu_feat_wr_data[j] = A[i][c*M+j];
      end
    for (int k = 0; k < K_MAX; k++) begin
      @(negedge clk);
      fu_feat_wr_en = 0; fu_wgt_wr_en = 1; fu_wgt_wr_k = ($clog2(K_MAX))'(k);
      for (int j = 0; j < M; j++) fu_wgt_wr_data[j] = Wt[k][j];
    end
    for (int c = 0; c < NCLS; c++)
      for (int ch = 0; ch < IN_MAX / S2; ch++) begin
        @(negedge clk);
        fu_wgt_wr_en = 0; mlp_w_wr_en = 1; mlp_w_wr_row = OW'(c); mlp_w_wr_chunk = CW'(ch);
        for (int e = 0; e < S2; e++) mlp_w_wr_data[e] = WM[c][ch*S2+e];
      end
    @(negedge clk);
    mlp_w_wr_en = 0;
    fu_start = 1; fu_k_len = KW'(K_MAX); fu_n_tiles = 1; fu_act = ACT_RELU; fu_to_mlp = 1; fu_mlp_base = 0;
    @(negedge clk);
    fu_start = 0;
    while (!fu_done) @(negedge clk);
    // MLP command right behind the last link transfer
    mlp_start = 1; mlp_n_chunks = (CW+1)'(IN_MAX / S2); mlp_n_out = (OW+1)'(NCLS); mlp_final = 1;
    @(negedge clk);
    mlp_start = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N_MAX; j++) begin
        acc_t s;
        s = 0;
        for (int k = 0; k < K_MAX; k++) s += fx_mul(A[i][k], Wt[k][j]);
        fu_ref[i][j] = activate(ACT_RELU, s);
      end
    best = 0;
    for (int c = 0; c < NCLS; c++) begin
      y[c] = 0;
      for (int e = 0; e < IN_MAX; e++) y[c] += fx_mul(WM[c][e], fu_ref[e / N_MAX][e % N_MAX]);
      if (y[c] > y[best]) best = c;
    end
    n = 0;
    while (!res_valid && n < 200) begin @(negedge clk); n++; end
    checks += 2;
    if (res_id !== 16'h55) begin failures++; $display("FAIL res_id %h", res_id); end
    if (int'(res_label) != best) begin failures++; $display("FAIL label %0d exp %0d", res_label, best); end
    for (int c = 0; c < NCLS; c++) begin
      mlp_out_rd_addr = OW'(c);
      @(negedge clk);
      checks++;
      if (mlp_out_rd_data !== sat(y[c])) begin failures++; $display("FAIL score %0d", c); end
    end
    checks += 2;
    if (!res_valid) begin failures++; $display("FAIL res_valid dropped without ready"); end
    if (idle) begin failures++; $display("FAIL idle before result taken"); end
    res_ready = 1;
    @(negedge clk);
    res_ready = 0;
    @(negedge clk);
    checks += 2;
    if (res_valid) begin failures++; $display("FAIL res_valid after handshake"); end
    if (!idle) begin failures++; $display("FAIL not idle after handshake"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
