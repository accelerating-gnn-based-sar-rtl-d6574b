// fa_module: Feature Aggregation (FA) module of a processing element.
//
// Runs the aggregate phase of a GraphSAGE layer and the graph pooling layer
// as an edge-centric scatter-gather pass over the edges in the Edge Buffer:
//   for each edge <src, dst, weight>: fetch src.vector from the Feature
//   Buffer, route (src.vector, weight) to pipeline dst % P, where
//   Scatter = multiply by weight and Gather = sum (mean aggregation, with
//   weight 1/(|N(i)|+1) on every edge into i, self loop included) or
//   element-wise max (pooling: the three other vertices of each 2 x 2 block
//   send their vectors to the block's top-left vertex, which has a self loop).
//
// Datapath, P edges per cycle, P*Q MACs per cycle at full rate:
//   cycle 0: read one edge row (P edges) from the Edge Buffer
//   cycle 1: the P src indices read the Feature Buffer (P read ports)
//   cycle 2: the shuffle network sends each lane to pipeline dst % P; lanes
//            that lose a conflict stay pending and the front of the
//            pipeline stalls until the row has been fully delivered
//   cycle 3-4: scatter and gather inside the pipelines.
//
// Interface: load the buffers through feat_wr_* (one vertex slice per
// write) and edge_wr_* (one row of P edges per write), then pulse start with
// op and num_edges (edges are taken in row order, lanes of the last row past
// num_edges are ignored). done pulses when every update has been reduced.
// The result of vertex v is read with res_rd_addr = v, data one cycle later.
// stall_cycles counts cycles lost to shuffle conflicts in the last pass.
//
// Buffers, shuffle network, p pipelines of q MACs and the scatter-gather
// schedule follow the accelerator; the exact pipeline timing, the stall
// scheme and the buffer depths are this design's choices.
module fa_module
  import gnn_pkg::*;
#(
  parameter int P         = 4,
  parameter int Q         = 16,
  parameter int DEPTH     = 16384,
  parameter int EDGE_ROWS = 36864,
  localparam int AW  = $clog2(DEPTH),
  localparam int EAW = $clog2(EDGE_ROWS),
  localparam int NEW = $clog2(EDGE_ROWS * P + 1),
  localparam int LAW = $clog2(DEPTH / P),
  localparam int SW  = (P > 1) ? $clog2(P) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // buffer loading
  input  logic                feat_wr_en,
  input  logic [AW-1:0]       feat_wr_addr,
  input  data_t [Q-1:0]       feat_wr_data,
  input  logic                edge_wr_en,
  input  logic [EAW-1:0]      edge_wr_addr,
  input  edge_t [P-1:0]       edge_wr_data,
  // command
  input  logic                start,
  input  gather_op_e          op,
  input  logic [NEW-1:0]      num_edges,
  output logic                busy,
  output logic                done,
  // result read
  input  logic [AW-1:0]       res_rd_addr,
  output data_t [Q-1:0]       res_rd_data,
  // statistics of the last pass
  output logic [31:0]         stall_cycles
);

  logic           running;
  gather_op_e     op_q;
  logic [NEW-1:0] n_edges_q;
  logic [EAW:0]   row;          // next row to issue
  logic [EAW:0]   n_rows;

  assign n_rows = (EAW+1)'((n_edges_q + NEW'(P - 1)) / NEW'(P));

  // ---- stage 1: edge row ----
  logic           v1;
  logic [EAW:0]   row1;
  edge_t [P-1:0]  edge1;
  // ---- stage 2: feature fetch ----
  logic           v2;
  edge_t [P-1:0]  edge2;
  data_t [P-1:0][Q-1:0] vec2;
  logic [P-1:0]   pending;

  logic [P-1:0]   grant;
  logic           bundle_done, en1, en2, issue;
  logic [P-1:0]   pipe_busy;
  logic           pipes_busy;

  assign bundle_done = ((pending & ~grant) == '0);
  assign en2   = !v2 || bundle_done;
  assign en1   = !v1 || en2;
  assign issue = running && (row < n_rows) && en1;

  fa_edge_buffer #(.P(P), .ROWS(EDGE_ROWS)) u_edges (
    .clk, .wr_en(edge_wr_en), .wr_addr(edge_wr_addr), .wr_data(edge_wr_data),
    .rd_en(en1), .rd_addr(row[EAW-1:0]), .rd_data(edge1)
  );

  logic [P-1:0][AW-1:0] src_addr;
  for (genvar i = 0; i < P; i++) begin : g_src
    assign src_addr[i] = AW'(edge1[i].src);
  end

  fa_feature_buffer #(.P(P), .Q(Q), .DEPTH(DEPTH)) u_feat (
    .clk, .wr_en(feat_wr_en), .wr_addr(feat_wr_addr), .wr_data(feat_wr_data),
    .rd_en(en2), .rd_addr(src_addr), .rd_data(vec2)
  );

  // Lanes of row1 that hold real edges.
  logic [P-1:0] lanes1;
  always_comb begin
    for (int i = 0; i < P; i++)
      lanes1[i] = (NEW'(row1) * NEW'(P) + NEW'(i)) < n_edges_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running      <= 1'b0;
      op_q         <= GATHER_SUM;
      n_edges_q    <= '0;
      row          <= '0;
      v1           <= 1'b0;
      row1         <= '0;
      v2           <= 1'b0;
      edge2        <= '0;
      pending      <= '0;
      done         <= 1'b0;
      stall_cycles <= '0;
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        running      <= 1'b1;
        op_q         <= op;
        n_edges_q    <= num_edges;
        row          <= '0;
        stall_cycles <= '0;
      end else if (running) begin
        if (en1) begin
          v1   <= issue;
          row1 <= row;
          if (issue) row <= row + 1'b1;
        end
        if (en2) begin
          v2      <= v1;
          edge2   <= edge1;
          pending <= v1 ? lanes1 : '0;
        end else begin
          pending <= pending & ~grant;
        end
        if (v2 && !bundle_done) stall_cycles <= stall_cycles + 1'b1;
        if (row == n_rows && !v1 && !v2 && !pipes_busy) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  // ---- shuffle network ----
  logic [P-1:0][VID_W-1:0] in_dst, out_dst;
  data_t [P-1:0]           in_w, out_w;
  data_t [P-1:0][Q-1:0]    out_vec;
  logic [P-1:0]            out_valid;
  for (genvar i = 0; i < P; i++) begin : g_lane
    assign in_dst[i] = edge2[i].dst;
    assign in_w[i]   = edge2[i].weight;
  end

  shuffle_network #(.P(P), .Q(Q)) u_shuffle (
    .in_valid(pending & {P{v2}}), .in_dst, .in_weight(in_w), .in_vec(vec2),
    .out_valid, .out_dst, .out_weight(out_w), .out_vec, .grant
  );

  // ---- pipelines with result banks ----
  data_t [P-1:0][Q-1:0] bank_rd;
  logic [SW-1:0]        rd_sel;

  assign pipes_busy = |pipe_busy;

  for (genvar i = 0; i < P; i++) begin : g_pipe
    fa_pipeline #(.P(P), .Q(Q), .DEPTH(DEPTH)) u_pipe (
      .clk, .rst_n, .clear(start && !running), .op(op_q),
      .in_valid(out_valid[i]), .in_dst(out_dst[i]), .in_weight(out_w[i]), .in_vec(out_vec[i]),
      .rd_addr(LAW'(res_rd_addr / AW'(P))), .rd_data(bank_rd[i]), .busy(pipe_busy[i])
    );
  end

  always_ff @(posedge clk) rd_sel <= (P > 1) ? SW'(res_rd_addr % AW'(P)) : '0;
  assign res_rd_data = bank_rd[rd_sel];

  assign busy = running;

endmodule
