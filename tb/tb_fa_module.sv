// tb_fa_module: self-checking test of the Feature Aggregation module on an
// 8 x 8 mesh graph (eight neighbours plus a self loop per vertex).
//  1. mean aggregation: every edge into i weighs 1/(|N(i)|+1); the result
//     is compared with a reference sum; edge order is random, so shuffle
//     conflicts (stalls) happen and are counted.
//  2. 2 x 2 max pooling: three vertices of each block send to the block's
//     top-left vertex (plus its self loop).
//  3. a conflict-free edge order: checks the rate of one edge row (P edges)
//     per cycle, done exactly n_rows + 5 cycles after start.
module tb_fa_module;
  import gnn_pkg::*;
  localparam int P = 4, Q = 4, W = 8, DEPTH = 64, EDGE_ROWS = 160;
  localparam int AW = $clog2(DEPTH), EAW = $clog2(EDGE_ROWS), NEW = $clog2(EDGE_ROWS * P + 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 1'b0;
  logic feat_wr_en = 1'b0, edge_wr_en = 1'b0, start = 1'b0, busy, done;
  logic [AW-1:0] feat_wr_addr, res_rd_addr = '0;
  data_t [Q-1:0] feat_wr_data, res_rd_data;
  logic [EAW-1:0] edge_wr_addr;
  edge_t [P-1:0] edge_wr_data;
  gather_op_e op = GATHER_SUM;
  logic [NEW-1:0] num_edges;
  logic [31:0] stall_cycles;

  fa_module #(.P(P), .Q(Q), .DEPTH(DEPTH), .EDGE_ROWS(EDGE_ROWS)) dut (.*);

  data_t feat [DEPTH][Q];
  edge_t edges [$];
  acc_t  ref_acc [DEPTH][Q];
  bit    ref_w   [DEPTH];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_and_run(gather_op_e o, output int cycles);
    int n;
    n = edges.size();
    for (int r = 0; r < (n + P - 1) / P; r++) begin
      @(negedge clk);
      edge_wr_en   = 1'b1;
      edge_wr_addr = EAW'(r);
      for (int i = 0; i < P; i++)
        edge_wr_data[i] = (r * P + i < n) ? edges[r * P + i] : '{src: '0, dst: '0, weight: '0};
    end
    @(negedge clk);
    edge_wr_en = 1'b0;
    start = 1'b1; op = o; num_edges = NEW'(n);
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    // reference
    for (int v = 0; v < DEPTH; v++) ref_w[v] = 0;
    foreach (edges[e]) begin
      int d, s;
      d = int'(edges[e].dst); s = int'(edges[e].src);
      for (int k = 0; k < Q; k++) begin
        acc_t u;
        u = (o == GATHER_MAX) ? acc_t'(feat[s][k]) : fx_mul(feat[s][k], edges[e].weight);
        if (!ref_w[d])            ref_acc[d][k] = u;
        else if (o == GATHER_MAX) ref_acc[d][k] = (u > ref_acc[d][k]) ? u : ref_acc[d][k];
        else                      ref_acc[d][k] = ref_acc[d][k] + u;
      end
      ref_w[d] = 1;
    end
    for (int v = 0; v < DEPTH; v++) begin
      res_rd_addr = AW'(v);
      @(negedge clk);
      for (int k = 0; k < Q; k++) begin
        checks++;
        if (res_rd_data[k] !== (ref_w[v] ? sat(ref_acc[v][k]) : data_t'(0))) begin
          failures++;
          $display("FAIL op %0d v %0d k %0d got %0d", o, v, k, res_rd_data[k]);
        end
      end
    end
  endtask

  initial begin
    int cyc, stalls_seen;
    stalls_seen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < DEPTH; v++) begin
      @(negedge clk);
      feat_wr_en = 1'b1; feat_wr_addr = AW'(v);
      for (int k = 0; k < Q; k++) begin
        feat[v][k] = data_t'($urandom_range(2000)) - data_t'(1000);
        feat_wr_data[k] = feat[v][k];
      end
    end
    @(negedge clk);
    feat_wr_en = 1'b0;

    // 1. mean aggregation over the mesh, random edge order
    edges.delete();
    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++) begin
        int deg;
        deg = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (y+dy >= 0 && y+dy < W && x+dx >= 0 && x+dx < W) deg++;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (y+dy >= 0 && y+dy < W && x+dx >= 0 && x+dx < W)
              edges.push_back('{src: VID_W'((y+dy)*W + x+dx), dst: VID_W'(y*W + x),
                                weight: data_t'(256 / deg)});
      end
    edges.shuffle();
    load_and_run(GATHER_SUM, cyc);
    $display("mean pass: %0d edges, %0d cycles, %0d stall cycles", edges.size(), cyc, stall_cycles);
    stalls_seen += int'(stall_cycles);
    checks++;
    if (cyc != (edges.size() + P - 1) / P + 5 + int'(stall_cycles)) begin
      failures++; $display("FAIL mean pass cycle count %0d", cyc);
    end

    // 2. max pooling
    edges.delete();
    for (int y = 0; y < W; y += 2)
      for (int x = 0; x < W; x += 2)
        for (int dy = 0; dy < 2; dy++)
          for (int dx = 0; dx < 2; dx++)
            edges.push_back('{src: VID_W'((y+dy)*W + x+dx), dst: VID_W'(y*W + x), weight: ONE});
    load_and_run(GATHER_MAX, cyc);
    $display("pool pass: %0d edges, %0d cycles, %0d stall cycles", edges.size(), cyc, stall_cycles);
    stalls_seen += int'(stall_cycles);

    // 3. conflict-free order: one row per cycle
    edges.delete();
    for (int v = 0; v < DEPTH; v++)
      edges.push_back('{src: VID_W'((v * 7) % DEPTH), dst: VID_W'(v), weight: ONE});
    load_and_run(GATHER_SUM, cyc);
    checks++;
    if (cyc != DEPTH / P + 5 || stall_cycles != 0) begin
      failures++; $display("FAIL rate: %0d cycles for %0d rows, %0d stalls", cyc, DEPTH / P, stall_cycles);
    end
    checks++;
    if (stalls_seen == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
