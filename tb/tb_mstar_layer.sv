// tb_mstar_layer: one GraphSAGE layer on a full-size 128 x 128 image mesh
// (the size of an MSTAR image chip) on one processing element with every
// parameter at its default.
//
// FA aggregates the 16-feature input over the 147456 mesh edges (eight
// neighbours and a self loop per vertex, weight 1/deg). The edges are
// ordered by neighbour offset, then by destination, so the four lanes of a
// row mostly target four different pipelines. FU then computes
// ReLU([z h] [Wn; Ws]) for all 1024 tiles of 16 vertices. Outputs are
// compared with a reference on every vertex of a sample of tiles, and the
// cycle counts are reported and checked against the module timing:
// FA done = rows + 5 + stall cycles after start, FU done = K + 2M + 1
// cycles after each start.
module tb_mstar_layer;
  import gnn_pkg::*;
  localparam int IMG = 128, NV = IMG * IMG, C = 16, K = 2 * C, M = 16, P = 4;
  localparam int AW = 14, EAW = 16, NEW = 18, RW = 4, KCW = 3, NCW = 2, KW = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 1'b0, assign_valid = 1'b0, idle, res_valid, res_ready = 1'b0;
  logic [15:0] assign_id = '0, res_id;
  logic [3:0] res_label;
  logic fa_feat_wr_en = 0, fa_edge_wr_en = 0, fa_start = 0, fa_busy, fa_done;
  logic [AW-1:0] fa_feat_wr_addr = '0, fa_res_rd_addr = '0;
  data_t [15:0] fa_feat_wr_data = '0, fa_res_rd_data;
  logic [EAW-1:0] fa_edge_wr_addr = '0;
  edge_t [P-1:0] fa_edge_wr_data = '0;
  gather_op_e fa_op = GATHER_SUM;
  logic [NEW-1:0] fa_num_edges = '0;
  logic [31:0] fa_stall_cycles;
  logic fu_feat_wr_en = 0, fu_wgt_wr_en = 0, fu_start = 0, fu_to_mlp = 0, fu_busy, fu_done;
  logic [RW-1:0] fu_feat_wr_row = '0, fu_res_rd_row = '0;
  logic [KCW-1:0] fu_feat_wr_chunk = '0;
  data_t [M-1:0] fu_feat_wr_data = '0, fu_wgt_wr_data = '0, fu_res_rd_data;
  logic [6:0] fu_wgt_wr_k = '0;
  logic [NCW-1:0] fu_wgt_wr_chunk = '0, fu_res_rd_chunk = '0;
  logic [KW-1:0] fu_k_len = '0;
  logic [NCW:0] fu_n_tiles = '0;
  act_e fu_act = ACT_RELU;
  logic [15:0] fu_mlp_base = '0;
  logic mlp_in_wr_en = 0, mlp_w_wr_en = 0, mlp_start = 0, mlp_relu = 0, mlp_final = 0, mlp_busy, mlp_done;
  logic [5:0] mlp_in_wr_chunk = '0, mlp_w_wr_chunk = '0;
  data_t [15:0] mlp_in_wr_data = '0, mlp_w_wr_data = '0;
  logic [3:0] mlp_w_wr_row = '0, mlp_out_rd_addr = '0;
  logic [6:0] mlp_n_chunks = '0;
  logic [4:0] mlp_n_out = '0;
  data_t mlp_out_rd_data;

  pe dut (.*);

  data_t h [NV][C];
  data_t z [NV][C];
  data_t Wt [K][C];

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int deg_of(int v);
    int d;
    d = 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if (v/IMG+dy >= 0 && v/IMG+dy < IMG && v%IMG+dx >= 0 && v%IMG+dx < IMG) d++;
    return d;
  endfunction

  initial begin
    edge_t row [P];
    int ne, nr, fa_cyc, fu_cyc, lane, bad;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < NV; v++) begin
      @(negedge clk);
      fa_feat_wr_en = 1; fa_feat_wr_addr = AW'(v);
      for (int f = 0; f < C; f++) begin h[v][f] = data_t'($urandom_range(512)) - data_t'(256); fa_feat_wr_data[f] = h[v][f]; end
    end
    @(negedge clk);
    fa_feat_wr_en = 0;
    // edges, grouped by neighbour offset
    ne = 0; nr = 0; lane = 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        for (int v = 0; v < NV; v++)
          if (v/IMG+dy >= 0 && v/IMG+dy < IMG && v%IMG+dx >= 0 && v%IMG+dx < IMG) begin
            row[lane] = '{src: VID_W'((v/IMG+dy)*IMG + v%IMG+dx), dst: VID_W'(v), weight: data_t'(256 / deg_of(v))};
            lane++; ne++;
            if (lane == P) begin
              @(negedge clk);
              fa_edge_wr_en = 1; fa_edge_wr_addr = EAW'(nr);
              for (int i = 0; i < P; i++) fa_edge_wr_data[i] = row[i];
              nr++; lane = 0;
            end
          end
    if (lane != 0) begin
      @(negedge clk);
      fa_edge_wr_en = 1; fa_edge_wr_addr = EAW'(nr);
      for (int i = 0; i < P; i++) fa_edge_wr_data[i] = (i < lane) ? row[i] : '0;
      nr++;
    end
    @(negedge clk);
    fa_edge_wr_en = 0; fa_start = 1; fa_num_edges = NEW'(ne);
    @(negedge clk);
    fa_start = 0;
    fa_cyc = 1;
    while (!fa_done) begin @(negedge clk); fa_cyc++; end
    $display("FA: %0d edges in %0d rows, %0d cycles, %0d stall cycles", ne, nr, fa_cyc, fa_stall_cycles);
    checks++;
    if (fa_cyc != nr + 5 + int'(fa_stall_cycles)) begin failures++; $display("FAIL FA cycle count"); end
    // read back Z, check against reference
    bad = 0;
    for (int v = 0; v < NV; v++) begin
      fa_res_rd_addr = AW'(v);
      @(negedge clk);
      for (int f = 0; f < C; f++) begin
        acc_t s;
        s = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (v/IMG+dy >= 0 && v/IMG+dy < IMG && v%IMG+dx >= 0 && v%IMG+dx < IMG)
              s += fx_mul(h[(v/IMG+dy)*IMG + v%IMG+dx][f], data_t'(256 / deg_of(v)));
        z[v][f] = fa_res_rd_data[f];
        if (z[v][f] !== sat(s)) bad++;
      end
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d aggregated values differ", bad); end
    // FU: weights, then every tile
    for (int k = 0; k < K; k++) begin
      @(negedge clk);
      fu_wgt_wr_en = 1; fu_wgt_wr_k = 7'(k); fu_wgt_wr_chunk = '0;
      for (int j = 0; j < M; j++) begin Wt[k][j] = data_t'($urandom_range(256)) - data_t'(128); fu_wgt_wr_data[j] = Wt[k][j]; end
    end
    @(negedge clk);
    fu_wgt_wr_en = 0;
    fu_cyc = 0; bad = 0;
    for (int t = 0; t < NV / M; t++) begin
      int c;
      for (int r = 0; r < M; r++)
        for (int ch = 0; ch < K / M; ch++) begin
          @(negedge clk);
          fu_feat_wr_en = 1; fu_feat_wr_row = RW'(r); fu_feat_wr_chunk = KCW'(ch);
          for (int j = 0; j < M; j++) begin
            int k;
            k = ch * M + j;
            fu_feat_wr_data[j] = (k < C) ? z[t*M + r][k] : h[t*M + r][k - C];
          end
        end
      @(negedge clk);
      fu_feat_wr_en = 0; fu_start = 1; fu_k_len = KW'(K); fu_n_tiles = 1; fu_act = ACT_RELU;
      @(negedge clk);
      fu_start = 0;
      c = 1;
      while (!fu_done) begin @(negedge clk); c++; end
      fu_cyc += c;
      if (c != K + 2 * M + 1) bad++;
      if (t % 97 == 0 || t == NV / M - 1) begin
        for (int r = 0; r < M; r++) begin
          fu_res_rd_row = RW'(r); fu_res_rd_chunk = '0;
          @(negedge clk);
          for (int j = 0; j < C; j++) begin
            acc_t s;
            s = 0;
            for (int k = 0; k < K; k++) s += fx_mul((k < C) ? z[t*M + r][k] : h[t*M + r][k - C], Wt[k][j]);
            checks++;
            if (fu_res_rd_data[j] !== activate(ACT_RELU, s)) begin failures++; $display("FAIL FU tile %0d row %0d col %0d", t, r, j); end
          end
        end
      end
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d FU tiles took the wrong number of cycles", bad); end
    $display("FU: %0d tiles, %0d compute cycles", NV / M, fu_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
