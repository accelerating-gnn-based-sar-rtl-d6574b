// pe: one processing element (PE) of the accelerator; it infers one SAR
// image at a time.
//
// It holds the three hardware modules of a GNN inference:
//   FA  (fa_module)  aggregate phase of GraphSAGE layers and graph pooling,
//   FU  (fu_module)  update phase (systolic matrix product + activation),
//   MLP (mlp_module) the final classifier and the predicted label.
// The modules sit in different SLRs of the FPGA (splitting-kernel layout).
// FA and FU exchange intermediate results only through external memory
// (HBM), so their buffer ports are brought out for the data movers; the FU
// output feeding the MLP goes over a direct link instead, cut by
// slr_pipe_reg stages. The MLP command is sent through the same number of
// stages, so a command issued after fu_done never overtakes the link data.
//
// Image bookkeeping: assign_valid (from the dispatcher) loads assign_id and
// makes the PE busy; the host then runs the layers of the model through the
// fa_*, fu_* and mlp_* ports. An MLP command with mlp_final set ends the
// image: when it is done, (image id, label) is offered on res_* until
// res_ready, after which the PE is idle again.
module pe
  import gnn_pkg::*;
#(
  parameter int P         = 4,
  parameter int Q         = 16,
  parameter int DEPTH     = 16384,
  parameter int EDGE_ROWS = 36864,
  parameter int M         = 16,
  parameter int K_MAX     = 128,
  parameter int N_MAX     = 64,
  parameter int S1        = 4,
  parameter int S2        = 16,
  parameter int IN_MAX    = 1024,
  parameter int OUT_MAX   = 16,
  parameter int SLR_STAGES = 2,
  parameter int ID_W      = 16,
  localparam int AW  = $clog2(DEPTH),
  localparam int EAW = $clog2(EDGE_ROWS),
  localparam int NEW = $clog2(EDGE_ROWS * P + 1),
  localparam int RW  = $clog2(M),
  localparam int KCW = (K_MAX / M > 1) ? $clog2(K_MAX / M) : 1,
  localparam int NCW = (N_MAX / M > 1) ? $clog2(N_MAX / M) : 1,
  localparam int KW  = $clog2(K_MAX + 1),
  localparam int CW  = $clog2(IN_MAX / S2),
  localparam int OW  = $clog2(OUT_MAX)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // image bookkeeping
  input  logic                 assign_valid,
  input  logic [ID_W-1:0]      assign_id,
  output logic                 idle,
  output logic                 res_valid,
  output logic [ID_W-1:0]      res_id,
  output logic [OW-1:0]        res_label,
  input  logic                 res_ready,
  // FA module
  input  logic                 fa_feat_wr_en,
  input  logic [AW-1:0]        fa_feat_wr_addr,
  input  data_t [Q-1:0]        fa_feat_wr_data,
  input  logic                 fa_edge_wr_en,
  input  logic [EAW-1:0]       fa_edge_wr_addr,
  input  edge_t [P-1:0]        fa_edge_wr_data,
  input  logic                 fa_start,
  input  gather_op_e           fa_op,
  input  logic [NEW-1:0]       fa_num_edges,
  output logic                 fa_busy,
  output logic                 fa_done,
  input  logic [AW-1:0]        fa_res_rd_addr,
  output data_t [Q-1:0]        fa_res_rd_data,
  output logic [31:0]          fa_stall_cycles,
  // FU module
  input  logic                 fu_feat_wr_en,
  input  logic [RW-1:0]        fu_feat_wr_row,
  input  logic [KCW-1:0]       fu_feat_wr_chunk,
  input  data_t [M-1:0]        fu_feat_wr_data,
  input  logic                 fu_wgt_wr_en,
  input  logic [$clog2(K_MAX)-1:0] fu_wgt_wr_k,
  input  logic [NCW-1:0]       fu_wgt_wr_chunk,
  input  data_t [M-1:0]        fu_wgt_wr_data,
  input  logic                 fu_start,
  input  logic [KW-1:0]        fu_k_len,
  input  logic [NCW:0]         fu_n_tiles,
  input  act_e                 fu_act,
  input  logic                 fu_to_mlp,
  input  logic [15:0]          fu_mlp_base,
  output logic                 fu_busy,
  output logic                 fu_done,
  input  logic [RW-1:0]        fu_res_rd_row,
  input  logic [NCW-1:0]       fu_res_rd_chunk,
  output data_t [M-1:0]        fu_res_rd_data,
  // MLP module
  input  logic                 mlp_in_wr_en,
  input  logic [CW-1:0]        mlp_in_wr_chunk,
  input  data_t [S2-1:0]       mlp_in_wr_data,
  input  logic                 mlp_w_wr_en,
  input  logic [OW-1:0]        mlp_w_wr_row,
  input  logic [CW-1:0]        mlp_w_wr_chunk,
  input  data_t [S2-1:0]       mlp_w_wr_data,
  input  logic                 mlp_start,
  input  logic [CW:0]          mlp_n_chunks,
  input  logic [OW:0]          mlp_n_out,
  input  logic                 mlp_relu,
  input  logic                 mlp_final,
  output logic                 mlp_busy,
  output logic                 mlp_done,
  input  logic [OW-1:0]        mlp_out_rd_addr,
  output data_t                mlp_out_rd_data
);

  // The direct FU-to-MLP link writes whole MLP input chunks.
  if (M != S2) begin : g_bad_cfg
    $error("pe: the FU-to-MLP link needs M == S2");
  end

  fa_module #(.P(P), .Q(Q), .DEPTH(DEPTH), .EDGE_ROWS(EDGE_ROWS)) u_fa (
    .clk, .rst_n,
    .feat_wr_en(fa_feat_wr_en), .feat_wr_addr(fa_feat_wr_addr), .feat_wr_data(fa_feat_wr_data),
    .edge_wr_en(fa_edge_wr_en), .edge_wr_addr(fa_edge_wr_addr), .edge_wr_data(fa_edge_wr_data),
    .start(fa_start), .op(fa_op), .num_edges(fa_num_edges), .busy(fa_busy), .done(fa_done),
    .res_rd_addr(fa_res_rd_addr), .res_rd_data(fa_res_rd_data), .stall_cycles(fa_stall_cycles)
  );

  logic          link_valid;
  logic [15:0]   link_index;
  data_t [M-1:0] link_data;

  fu_module #(.M(M), .K_MAX(K_MAX), .N_MAX(N_MAX)) u_fu (
    .clk, .rst_n,
    .feat_wr_en(fu_feat_wr_en), .feat_wr_row(fu_feat_wr_row), .feat_wr_chunk(fu_feat_wr_chunk),
    .feat_wr_data(fu_feat_wr_data),
    .wgt_wr_en(fu_wgt_wr_en), .wgt_wr_k(fu_wgt_wr_k), .wgt_wr_chunk(fu_wgt_wr_chunk),
    .wgt_wr_data(fu_wgt_wr_data),
    .start(fu_start), .k_len(fu_k_len), .n_tiles(fu_n_tiles), .act(fu_act), .to_mlp(fu_to_mlp),
    .mlp_base(fu_mlp_base), .busy(fu_busy), .done(fu_done),
    .res_rd_row(fu_res_rd_row), .res_rd_chunk(fu_res_rd_chunk), .res_rd_data(fu_res_rd_data),
    .out_valid(link_valid), .out_index(link_index), .out_data(link_data)
  );

  // ---- SLR crossings: FU -> MLP data link and MLP command ----
  localparam int LW = 16 + M * DATA_W;
  localparam int CMDW = (CW + 1) + (OW + 1) + 2;
  logic          x_valid;
  logic [LW-1:0] x_data;
  logic            c_valid;
  logic [CMDW-1:0] c_data;

  slr_pipe_reg #(.W(LW), .STAGES(SLR_STAGES)) u_link_reg (
    .clk, .rst_n, .in_valid(link_valid), .in_data({link_index, link_data}),
    .out_valid(x_valid), .out_data(x_data)
  );
  slr_pipe_reg #(.W(CMDW), .STAGES(SLR_STAGES)) u_cmd_reg (
    .clk, .rst_n, .in_valid(mlp_start),
    .in_data({mlp_n_chunks, mlp_n_out, mlp_relu, mlp_final}),
    .out_valid(c_valid), .out_data(c_data)
  );

  logic [15:0]    x_index;
  data_t [M-1:0]  x_vec;
  assign {x_index, x_vec} = x_data;

  logic [CW:0]   c_n_chunks;
  logic [OW:0]   c_n_out;
  logic          c_relu, c_final;
  assign {c_n_chunks, c_n_out, c_relu, c_final} = c_data;

  logic          m_done;
  logic [OW-1:0] m_label;
  logic          final_q;

  // The link has priority over host writes of the MLP input buffer.
  mlp_module #(.S1(S1), .S2(S2), .IN_MAX(IN_MAX), .OUT_MAX(OUT_MAX)) u_mlp (
    .clk, .rst_n,
    .in_wr_en(x_valid || mlp_in_wr_en),
    .in_wr_chunk(x_valid ? CW'(x_index / 16'(S2)) : mlp_in_wr_chunk),
    .in_wr_data(x_valid ? x_vec : mlp_in_wr_data),
    .w_wr_en(mlp_w_wr_en), .w_wr_row(mlp_w_wr_row), .w_wr_chunk(mlp_w_wr_chunk),
    .w_wr_data(mlp_w_wr_data),
    .start(c_valid), .n_chunks(c_n_chunks), .n_out(c_n_out), .relu(c_relu),
    .busy(mlp_busy), .done(m_done), .label(m_label),
    .out_rd_addr(mlp_out_rd_addr), .out_rd_data(mlp_out_rd_data)
  );
  assign mlp_done = m_done;

  // ---- image bookkeeping ----
  logic busy_img;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_img  <= 1'b0;
      res_valid <= 1'b0;
      res_id    <= '0;
      res_label <= '0;
      final_q   <= 1'b0;
    end else begin
      if (c_valid) final_q <= c_final;
      if (assign_valid && !busy_img) begin
        busy_img <= 1'b1;
        res_id   <= assign_id;
      end
      if (m_done && final_q && busy_img) begin
        res_valid <= 1'b1;
        res_label <= m_label;
      end
      if (res_valid && res_ready) begin
        res_valid <= 1'b0;
        busy_img  <= 1'b0;
      end
    end
  end
  assign idle = !busy_img;

  a_no_assign_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    assign_valid |-> !busy_img);
  a_res_stable: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid && !res_ready |=> res_valid && $stable(res_id) && $stable(res_label));

endmodule
