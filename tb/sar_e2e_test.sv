// sar_e2e_test: end-to-end test of the accelerator, shared by the reduced
// test (tb_sar_gnn_accel) and the default-size test (tb_sar_gnn_accel_full).
//
// The test plays the host and the external-memory data movers. It sends
// NIMG images to the dispatcher; for every image assigned to a PE it runs a
// small GNN on that PE, moving data between the modules as the data
// movers would:
//   GraphSAGE layer 1 on the IMG_W x IMG_W mesh (FA mean aggregation, FU
//   [z h] x [Wn; Ws] with ReLU); 2 x 2 max pooling on FA; an attention
//   layer: FA forms the sum and mean over all vertices in one pass (every
//   vertex sends to two collector vertices), FU turns [mean sum] into the
//   feature scores with a sigmoid, a GraphSAGE layer with a sigmoid gives
//   the vertex scores, and the test applies h (1 + alpha) + h (x) F itself;
//   GraphSAGE layer 2, whose FU output goes straight to the MLP over the
//   direct link; then the MLP classifier giving the label.
// Every intermediate result and the returned label are compared with a
// reference model computed here with the same fixed-point arithmetic.
// Images are sent back to back, so both PEs work at once and later images
// wait for an idle PE. Each mechanism is counted and must happen at least
// once: shuffle stalls, mean and max passes, FU-to-MLP link runs, both PEs
// busy at once, an image waiting for a PE, sigmoid (attention) passes.
//
// With FULL set the accelerator is instantiated with no parameters at all
// (its defaults); the parameters given here must then equal those defaults.
module sar_e2e_test #(
  parameter bit FULL      = 1'b0,
  parameter int NIMG      = 3,
  parameter int IMG_W     = 4,
  parameter int NCLS      = 3,
  parameter int NPE       = 2,
  parameter int P         = 4,
  parameter int Q         = 4,
  parameter int DEPTH     = 16,
  parameter int EDGE_ROWS = 64,
  parameter int M         = 4,
  parameter int K_MAX     = 8,
  parameter int N_MAX     = 4,
  parameter int S1        = 4,
  parameter int S2        = 4,
  parameter int IN_MAX    = 16,
  parameter int OUT_MAX   = 4,
  parameter int WATCHDOG  = 200000
);
  import gnn_pkg::*;

  localparam int ID_W = 16;
  localparam int AW  = $clog2(DEPTH);
  localparam int EAW = $clog2(EDGE_ROWS);
  localparam int NEW = $clog2(EDGE_ROWS * P + 1);
  localparam int RW  = $clog2(M);
  localparam int KCW = (K_MAX / M > 1) ? $clog2(K_MAX / M) : 1;
  localparam int NCW = (N_MAX / M > 1) ? $clog2(N_MAX / M) : 1;
  localparam int KW  = $clog2(K_MAX + 1);
  localparam int CW  = $clog2(IN_MAX / S2);
  localparam int OW  = $clog2(OUT_MAX);
  localparam int C   = Q;          // feature length
  localparam int K   = 2 * C;      // FU depth: [z h]

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- DUT ports ----------------
  logic rst_n = 1'b0;
  logic img_valid = 1'b0, img_ready, out_valid, out_ready = 1'b1;
  logic [ID_W-1:0] img_id = '0, out_id;
  logic [OW-1:0] out_label;
  logic [NPE-1:0] pe_assign, pe_idle;
  logic [NPE-1:0] fa_feat_wr_en = '0, fa_edge_wr_en = '0, fa_start = '0, fa_busy, fa_done;
  logic [NPE-1:0][AW-1:0] fa_feat_wr_addr, fa_res_rd_addr;
  data_t [NPE-1:0][Q-1:0] fa_feat_wr_data, fa_res_rd_data;
  logic [NPE-1:0][EAW-1:0] fa_edge_wr_addr;
  edge_t [NPE-1:0][P-1:0] fa_edge_wr_data;
  gather_op_e [NPE-1:0] fa_op;
  logic [NPE-1:0][NEW-1:0] fa_num_edges;
  logic [NPE-1:0][31:0] fa_stall_cycles;
  logic [NPE-1:0] fu_feat_wr_en = '0, fu_wgt_wr_en = '0, fu_start = '0, fu_to_mlp, fu_busy, fu_done;
  logic [NPE-1:0][RW-1:0] fu_feat_wr_row, fu_res_rd_row;
  logic [NPE-1:0][KCW-1:0] fu_feat_wr_chunk;
  data_t [NPE-1:0][M-1:0] fu_feat_wr_data, fu_wgt_wr_data, fu_res_rd_data;
  logic [NPE-1:0][$clog2(K_MAX)-1:0] fu_wgt_wr_k;
  logic [NPE-1:0][NCW-1:0] fu_wgt_wr_chunk, fu_res_rd_chunk;
  logic [NPE-1:0][KW-1:0] fu_k_len;
  logic [NPE-1:0][NCW:0] fu_n_tiles;
  act_e [NPE-1:0] fu_act;
  logic [NPE-1:0][15:0] fu_mlp_base;
  logic [NPE-1:0] mlp_in_wr_en = '0, mlp_w_wr_en = '0, mlp_start = '0, mlp_relu, mlp_final, mlp_busy, mlp_done;
  logic [NPE-1:0][CW-1:0] mlp_in_wr_chunk, mlp_w_wr_chunk;
  data_t [NPE-1:0][S2-1:0] mlp_in_wr_data, mlp_w_wr_data;
  logic [NPE-1:0][OW-1:0] mlp_w_wr_row, mlp_out_rd_addr;
  logic [NPE-1:0][CW:0] mlp_n_chunks;
  logic [NPE-1:0][OW:0] mlp_n_out;
  data_t [NPE-1:0] mlp_out_rd_data;

  if (FULL) begin : g_full
    sar_gnn_accel dut (.*);
  end else begin : g_red
    sar_gnn_accel #(
      .NPE(NPE), .P(P), .Q(Q), .DEPTH(DEPTH), .EDGE_ROWS(EDGE_ROWS), .M(M), .K_MAX(K_MAX),
      .N_MAX(N_MAX), .S1(S1), .S2(S2), .IN_MAX(IN_MAX), .OUT_MAX(OUT_MAX)
    ) dut (.*);
  end

  // ---------------- model weights ----------------
  data_t W1 [$], W2 [$], WFA [$], WVA [$];   // K x C, row-major
  data_t WM [NCLS][IN_MAX];
  int    exp_label [NIMG];
  int    got [NIMG];
  int    n_done = 0;
  // mechanism counters
  int n_stall_pass = 0, n_mean = 0, n_max = 0, n_link = 0, n_both_busy = 0, n_wait = 0, n_sigmoid = 0;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d images done", n_done, NIMG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  function automatic int deg_of(int w, int v);
    int y, x, d;
    y = v / w; x = v % w; d = 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if (y+dy >= 0 && y+dy < w && x+dx >= 0 && x+dx < w) d++;
    return d;
  endfunction

  // mean aggregation with weight 256/deg, as FA computes it
  function automatic void ref_mean(int w, const ref data_t h[$], ref data_t z[$]);
    z = {};
    for (int v = 0; v < w * w; v++) begin
      int y, x;
      data_t wt;
      y = v / w; x = v % w;
      wt = data_t'(256 / deg_of(w, v));
      for (int f = 0; f < C; f++) begin
        acc_t s;
        s = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (y+dy >= 0 && y+dy < w && x+dx >= 0 && x+dx < w)
              s += fx_mul(h[((y+dy)*w + x+dx) * C + f], wt);
        z.push_back(sat(s));
      end
    end
  endfunction

  function automatic void ref_update(int nv, const ref data_t z[$], const ref data_t h[$],
                                     const ref data_t wq[$], input act_e f, ref data_t o[$]);
    o = {};
    for (int v = 0; v < nv; v++)
      for (int n = 0; n < C; n++) begin
        acc_t s;
        s = 0;
        for (int k = 0; k < K; k++) begin
          data_t a;
          a = (k < C) ? z[v * C + k] : h[v * C + k - C];
          s += fx_mul(a, wq[k * C + n]);
        end
        o.push_back(activate(f, s));
      end
  endfunction

  function automatic void ref_pool(int w, const ref data_t h[$], ref data_t o[$]);
    o = {};
    for (int i = 0; i < w / 2; i++)
      for (int j = 0; j < w / 2; j++)
        for (int f = 0; f < C; f++) begin
          data_t m;
          m = h[((2*i)*w + 2*j) * C + f];
          for (int d = 1; d < 4; d++) begin
            data_t c;
            c = h[((2*i + d/2)*w + 2*j + d%2) * C + f];
            if (c > m) m = c;
          end
          o.push_back(m);
        end
  endfunction

  // ---------------- host / data-mover model ----------------
  // Global sum and mean of all vertex vectors, as one FA pass: every vertex
  // sends to vertex 0 with weight 1 (sum) and to vertex 1 with weight 1/N.
  task automatic fa_global(int pe, int nv, const ref data_t h[$], ref data_t sm[$]);
    edge_t el[$];
    for (int v = 0; v < nv; v++) begin
      el.push_back('{src: VID_W'(v), dst: VID_W'(0), weight: ONE});
      el.push_back('{src: VID_W'(v), dst: VID_W'(1), weight: data_t'(256 / nv)});
    end
    fa_run(pe, nv, h, el, GATHER_SUM);
    sm = {};
    for (int v = 0; v < 2; v++) begin
      fa_res_rd_addr[pe] = AW'(v);
      @(negedge clk);
      for (int f = 0; f < C; f++) sm.push_back(fa_res_rd_data[pe][f]);
    end
  endtask

  task automatic fa_run(int pe, int nv, const ref data_t h[$], const ref edge_t el[$], input gather_op_e o);
    for (int v = 0; v < nv; v++) begin
      @(negedge clk);
      fa_feat_wr_en[pe] = 1'b1;
      fa_feat_wr_addr[pe] = AW'(v);
      for (int f = 0; f < C; f++) fa_feat_wr_data[pe][f] = h[v * C + f];
    end
    for (int r = 0; r < (el.size() + P - 1) / P; r++) begin
      @(negedge clk);
      fa_feat_wr_en[pe] = 1'b0;
      fa_edge_wr_en[pe] = 1'b1;
      fa_edge_wr_addr[pe] = EAW'(r);
      for (int i = 0; i < P; i++)
        fa_edge_wr_data[pe][i] = (r * P + i < el.size()) ? el[r * P + i] : '0;
    end
    @(negedge clk);
    fa_edge_wr_en[pe] = 1'b0;
    fa_start[pe] = 1'b1;
    fa_op[pe] = o;
    fa_num_edges[pe] = NEW'(el.size());
    @(negedge clk);
    fa_start[pe] = 1'b0;
    while (!fa_done[pe]) @(negedge clk);
    if (o == GATHER_SUM) n_mean++; else n_max++;
    if (fa_stall_cycles[pe] != 0) n_stall_pass++;
  endtask

  task automatic fa_pass(int pe, int w, gather_op_e o, const ref data_t h[$], ref data_t z[$]);
    edge_t el[$];
    int nv;
    nv = w * w;
    if (o == GATHER_SUM) begin
      for (int v = 0; v < nv; v++) begin
        int y, x;
        y = v / w; x = v % w;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (y+dy >= 0 && y+dy < w && x+dx >= 0 && x+dx < w)
              el.push_back('{src: VID_W'((y+dy)*w + x+dx), dst: VID_W'(v),
                             weight: data_t'(256 / deg_of(w, v))});
      end
    end else begin
      for (int i = 0; i < w; i += 2)
        for (int j = 0; j < w; j += 2)
          for (int d = 0; d < 4; d++)
            el.push_back('{src: VID_W'((i + d/2)*w + j + d%2), dst: VID_W'(i*w + j), weight: ONE});
    end
    fa_run(pe, nv, h, el, o);
    z = {};
    for (int v = 0; v < nv; v++) begin
      // pooled results live at the top-left vertex of each block
      int src;
      src = (o == GATHER_SUM) ? v : (2 * (v / (w / 2))) * w + 2 * (v % (w / 2));
      if (o == GATHER_MAX && v >= nv / 4) break;
      fa_res_rd_addr[pe] = AW'(src);
      @(negedge clk);
      for (int f = 0; f < C; f++) z.push_back(fa_res_rd_data[pe][f]);
    end
  endtask

  task automatic fu_pass(int pe, int nv, const ref data_t wq[$], input act_e f, input bit second,
                         const ref data_t z[$], const ref data_t h[$], ref data_t o[$]);
    for (int k = 0; k < K; k++) begin
      @(negedge clk);
      fu_wgt_wr_en[pe] = 1'b1;
      fu_wgt_wr_k[pe] = ($clog2(K_MAX))'(k);
      fu_wgt_wr_chunk[pe] = '0;
      for (int j = 0; j < M; j++) fu_wgt_wr_data[pe][j] = (j < C) ? wq[k * C + j] : '0;
    end
    @(negedge clk);
    fu_wgt_wr_en[pe] = 1'b0;
    o = {};
    for (int t = 0; t < (nv + M - 1) / M; t++) begin
      for (int r = 0; r < M; r++)
        for (int c = 0; c < K / M; c++) begin
          @(negedge clk);
          fu_feat_wr_en[pe] = 1'b1;
          fu_feat_wr_row[pe] = RW'(r);
          fu_feat_wr_chunk[pe] = KCW'(c);
          for (int j = 0; j < M; j++) begin
            int k, v;
            k = c * M + j; v = t * M + r;
            fu_feat_wr_data[pe][j] = (v >= nv) ? '0 : (k < C) ? z[v * C + k] : h[v * C + k - C];
          end
        end
      @(negedge clk);
      fu_feat_wr_en[pe] = 1'b0;
      fu_start[pe] = 1'b1;
      fu_k_len[pe] = KW'(K);
      fu_n_tiles[pe] = (NCW+1)'(1);
      fu_act[pe] = f;
      fu_to_mlp[pe] = second;
      fu_mlp_base[pe] = 16'(t * M * C);
      @(negedge clk);
      fu_start[pe] = 1'b0;
      while (!fu_done[pe]) @(negedge clk);
      if (second) n_link++;
      if (f == ACT_SIGMOID) n_sigmoid++;
      for (int r = 0; r < M && t * M + r < nv; r++) begin
        fu_res_rd_row[pe] = RW'(r);
        fu_res_rd_chunk[pe] = '0;
        @(negedge clk);
        for (int j = 0; j < C; j++) o.push_back(fu_res_rd_data[pe][j]);
      end
    end
  endtask

  task automatic compare(string what, int id, const ref data_t a[$], const ref data_t b[$]);
    int bad;
    bad = 0;
    checks++;
    if (a.size() != b.size()) bad = 1;
    else foreach (a[i]) if (a[i] !== b[i]) bad++;
    if (bad != 0) begin
      failures++;
      $display("FAIL image %0d: %s differs in %0d places", id, what, bad);
    end
  endtask

  // Attention output, equation h_out = (1 + alpha) h + h (x) F, done by the
  // host in the same fixed point (no PE module is assigned this step).
  function automatic void combine(int nv, const ref data_t h[$], const ref data_t alpha[$],
                                  const ref data_t fatt[$], ref data_t o[$]);
    o = {};
    for (int v = 0; v < nv; v++)
      for (int f = 0; f < C; f++)
        o.push_back(sat(acc_t'(h[v * C + f]) + fx_mul(alpha[v * C], h[v * C + f])
                        + fx_mul(h[v * C + f], fatt[f])));
  endfunction

  task automatic run_image(int pe, int id);
    data_t h0[$], z1[$], h1[$], h2[$], sm[$], fa_in[$], fatt[$], za[$], alpha[$], h2a[$], z2[$], h3[$];
    data_t rz1[$], rh1[$], rh2[$], rsm[$], rfatt[$], rza[$], ralpha[$], rh2a[$], rz2[$], rh3[$];
    acc_t  y [NCLS];
    int    best, nv2;
    nv2 = (IMG_W / 2) * (IMG_W / 2);
    $display("image %0d starts on PE %0d", id, pe);
    for (int v = 0; v < IMG_W * IMG_W; v++)
      for (int f = 0; f < C; f++) h0.push_back(data_t'($urandom_range(512)) - data_t'(256));
    // reference
    ref_mean(IMG_W, h0, rz1);
    ref_update(IMG_W * IMG_W, rz1, h0, W1, ACT_RELU, rh1);
    ref_pool(IMG_W, rh1, rh2);
    // attention: feature scores from [mean sum], vertex scores from a GraphSAGE layer
    rsm = {};
    for (int f = 0; f < C; f++) begin
      acc_t s;
      s = 0;
      for (int v = 0; v < nv2; v++) s += fx_mul(rh2[v * C + f], ONE);
      rsm.push_back(sat(s));
    end
    for (int f = 0; f < C; f++) begin
      acc_t s;
      s = 0;
      for (int v = 0; v < nv2; v++) s += fx_mul(rh2[v * C + f], data_t'(256 / nv2));
      rsm.push_back(sat(s));
    end
    begin
      data_t mean_q[$], sum_q[$];
      for (int f = 0; f < C; f++) begin sum_q.push_back(rsm[f]); mean_q.push_back(rsm[C + f]); end
      ref_update(1, mean_q, sum_q, WFA, ACT_SIGMOID, rfatt);
    end
    ref_mean(IMG_W / 2, rh2, rza);
    ref_update(nv2, rza, rh2, WVA, ACT_SIGMOID, ralpha);
    combine(nv2, rh2, ralpha, rfatt, rh2a);
    ref_mean(IMG_W / 2, rh2a, rz2);
    ref_update(nv2, rz2, rh2a, W2, ACT_RELU, rh3);
    // accelerator
    fa_pass(pe, IMG_W, GATHER_SUM, h0, z1);             compare("layer-1 aggregate", id, z1, rz1);
    fu_pass(pe, IMG_W * IMG_W, W1, ACT_RELU, 1'b0, z1, h0, h1);
    compare("layer-1 update", id, h1, rh1);
    fa_pass(pe, IMG_W, GATHER_MAX, h1, h2);             compare("pooling", id, h2, rh2);
    fa_global(pe, nv2, h2, sm);                         compare("attention sum/mean", id, sm, rsm);
    begin
      data_t mean_q[$], sum_q[$];
      for (int f = 0; f < C; f++) begin sum_q.push_back(sm[f]); mean_q.push_back(sm[C + f]); end
      fu_pass(pe, 1, WFA, ACT_SIGMOID, 1'b0, mean_q, sum_q, fatt);
    end
    compare("feature attention", id, fatt, rfatt);
    fa_pass(pe, IMG_W / 2, GATHER_SUM, h2, za);         compare("vertex-attention aggregate", id, za, rza);
    fu_pass(pe, nv2, WVA, ACT_SIGMOID, 1'b0, za, h2, alpha);
    compare("vertex attention", id, alpha, ralpha);
    combine(nv2, h2, alpha, fatt, h2a);
    fa_pass(pe, IMG_W / 2, GATHER_SUM, h2a, z2);        compare("layer-2 aggregate", id, z2, rz2);
    fu_pass(pe, nv2, W2, ACT_RELU, 1'b1, z2, h2a, h3);  compare("layer-2 update", id, h3, rh3);
    best = 0;
    for (int c = 0; c < NCLS; c++) begin
      y[c] = 0;
      for (int e = 0; e < rh3.size(); e++) y[c] += fx_mul(WM[c][e], rh3[e]);
      if (y[c] > y[best]) best = c;
    end
    exp_label[id] = best;
    // MLP: input already delivered over the FU-to-MLP link
    for (int c = 0; c < NCLS; c++)
      for (int ch = 0; ch < rh3.size() / S2; ch++) begin
        @(negedge clk);
        mlp_w_wr_en[pe] = 1'b1;
        mlp_w_wr_row[pe] = OW'(c);
        mlp_w_wr_chunk[pe] = CW'(ch);
        for (int e = 0; e < S2; e++) mlp_w_wr_data[pe][e] = WM[c][ch * S2 + e];
      end
    @(negedge clk);
    mlp_w_wr_en[pe] = 1'b0;
    mlp_start[pe] = 1'b1;
    mlp_n_chunks[pe] = (CW+1)'(rh3.size() / S2);
    mlp_n_out[pe] = (OW+1)'(NCLS);
    mlp_relu[pe] = 1'b0;
    mlp_final[pe] = 1'b1;
    @(negedge clk);
    mlp_start[pe] = 1'b0;
    while (!mlp_done[pe]) @(negedge clk);
    for (int c = 0; c < NCLS; c++) begin
      mlp_out_rd_addr[pe] = OW'(c);
      @(negedge clk);
      checks++;
      if (mlp_out_rd_data[pe] !== sat(y[c])) begin
        failures++;
        $display("FAIL image %0d: class score %0d = %0d, expected %0d", id, c, mlp_out_rd_data[pe], sat(y[c]));
      end
    end
    $display("image %0d on PE %0d: computed, expected label %0d", id, pe, best);
  endtask

  // ---------------- label monitor ----------------
  always @(negedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      n_done++;
      got[out_id]++;
      if (int'(out_label) != exp_label[out_id]) begin
        failures++;
        $display("FAIL image %0d: label %0d, expected %0d", out_id, out_label, exp_label[out_id]);
      end
    end
    if (rst_n && pe_idle == '0) n_both_busy++;
    if (rst_n && img_valid && !img_ready) n_wait++;
  end

  // ---------------- main ----------------
  initial begin
    for (int k = 0; k < K; k++)
      for (int n = 0; n < C; n++) begin
        W1.push_back(data_t'($urandom_range(256)) - data_t'(128));
        W2.push_back(data_t'($urandom_range(256)) - data_t'(128));
        WFA.push_back(data_t'($urandom_range(128)) - data_t'(64));
        // vertex attention: one score per vertex, in output column 0
        WVA.push_back((n == 0) ? data_t'($urandom_range(128)) - data_t'(64) : data_t'(0));
      end
    for (int c = 0; c < NCLS; c++)
      for (int e = 0; e < IN_MAX; e++) WM[c][e] = data_t'($urandom_range(256)) - data_t'(128);
    for (int n = 0; n < NPE; n++) begin
      fa_op[n] = GATHER_SUM; fu_act[n] = ACT_NONE; fu_to_mlp[n] = 1'b0; mlp_relu[n] = 1'b0;
      mlp_final[n] = 1'b0; fa_res_rd_addr[n] = '0; fu_res_rd_row[n] = '0; fu_res_rd_chunk[n] = '0;
      mlp_out_rd_addr[n] = '0; mlp_in_wr_chunk[n] = '0; mlp_in_wr_data[n] = '0;
    end
    for (int n = 0; n < NIMG; n++) got[n] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < NIMG; n++) begin
      img_valid = 1'b1;
      img_id = ID_W'(n);
      #1;
      while (!img_ready) begin @(negedge clk); #1; end
      for (int i = 0; i < NPE; i++)
        if (pe_assign[i]) begin
          automatic int pe = i, id = n;
          fork run_image(pe, id); join_none
        end
      @(negedge clk);
    end
    img_valid = 1'b0;
    while (n_done < NIMG) @(negedge clk);
    repeat (5) @(negedge clk);
    for (int n = 0; n < NIMG; n++) begin
      checks++;
      if (got[n] != 1) begin failures++; $display("FAIL image %0d labelled %0d times", n, got[n]); end
    end
    $display("mechanisms: stalled FA passes=%0d mean passes=%0d max-pool passes=%0d FU->MLP link runs=%0d both-PEs-busy cycles=%0d image-wait cycles=%0d sigmoid passes=%0d",
             n_stall_pass, n_mean, n_max, n_link, n_both_busy, n_wait, n_sigmoid);
    checks += 7;
    if (n_sigmoid == 0)    begin failures++; $display("FAIL no sigmoid (attention) pass"); end
    if (n_stall_pass == 0) begin failures++; $display("FAIL no shuffle stall"); end
    if (n_mean == 0)       begin failures++; $display("FAIL no mean pass"); end
    if (n_max == 0)        begin failures++; $display("FAIL no pooling pass"); end
    if (n_link == 0)       begin failures++; $display("FAIL no FU->MLP link use"); end
    if (n_both_busy == 0)  begin failures++; $display("FAIL PEs never busy together"); end
    if (NIMG > NPE && n_wait == 0) begin failures++; $display("FAIL no image waited for a PE"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
