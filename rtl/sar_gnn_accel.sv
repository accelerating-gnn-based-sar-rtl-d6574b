// sar_gnn_accel: top level of the GNN-based SAR automatic target
// recognition accelerator.
//
// The accelerator turns each SAR image into a 2-D mesh graph (one vertex per
// pixel, edges to the eight neighbours) and classifies it with a GraphSAGE /
// pooling / attention GNN followed by an MLP. It consists of NPE identical
// processing elements (PEs, two by default), each able to infer one whole
// image, and a dispatcher that gives every incoming image to an idle PE, so
// NPE images are processed in parallel and labels come back in completion
// order.
//
// Each PE's buffers are filled from, and its results returned to, external
// high-bandwidth memory by data movers outside this RTL; their ports are
// brought out here per PE as arrays indexed by PE number (see pe.sv for
// each signal). Images enter through img_* (valid/ready) and labels leave
// through out_* (valid/ready); pe_assign tells the data movers which PE an
// image was given to. The organisation (two PEs of FA, FU and MLP modules
// with p = 4, q = 16, m = 16, s1 = 4, s2 = 16) follows the accelerator;
// buffer depths and all handshakes are this design's choices.
module sar_gnn_accel
  import gnn_pkg::*;
#(
  parameter int NPE       = 2,
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
  // images in, labels out
  input  logic                 img_valid,
  input  logic [ID_W-1:0]      img_id,
  output logic                 img_ready,
  output logic                 out_valid,
  output logic [ID_W-1:0]      out_id,
  output logic [OW-1:0]        out_label,
  input  logic                 out_ready,
  output logic [NPE-1:0]       pe_assign,
  output logic [NPE-1:0]       pe_idle,
  // FA module
  input  logic [NPE-1:0]                fa_feat_wr_en,
  input  logic [NPE-1:0][AW-1:0]        fa_feat_wr_addr,
  input  data_t [NPE-1:0][Q-1:0]        fa_feat_wr_data,
  input  logic [NPE-1:0]                fa_edge_wr_en,
  input  logic [NPE-1:0][EAW-1:0]       fa_edge_wr_addr,
  input  edge_t [NPE-1:0][P-1:0]        fa_edge_wr_data,
  input  logic [NPE-1:0]                fa_start,
  input  gather_op_e [NPE-1:0]          fa_op,
  input  logic [NPE-1:0][NEW-1:0]       fa_num_edges,
  output logic [NPE-1:0]                fa_busy,
  output logic [NPE-1:0]                fa_done,
  input  logic [NPE-1:0][AW-1:0]        fa_res_rd_addr,
  output data_t [NPE-1:0][Q-1:0]        fa_res_rd_data,
  output logic [NPE-1:0][31:0]          fa_stall_cycles,
  // FU module
  input  logic [NPE-1:0]                fu_feat_wr_en,
  input  logic [NPE-1:0][RW-1:0]        fu_feat_wr_row,
  input  logic [NPE-1:0][KCW-1:0]       fu_feat_wr_chunk,
  input  data_t [NPE-1:0][M-1:0]        fu_feat_wr_data,
  input  logic [NPE-1:0]                fu_wgt_wr_en,
  input  logic [NPE-1:0][$clog2(K_MAX)-1:0] fu_wgt_wr_k,
  input  logic [NPE-1:0][NCW-1:0]       fu_wgt_wr_chunk,
  input  data_t [NPE-1:0][M-1:0]        fu_wgt_wr_data,
  input  logic [NPE-1:0]                fu_start,
  input  logic [NPE-1:0][KW-1:0]        fu_k_len,
  input  logic [NPE-1:0][NCW:0]         fu_n_tiles,
  input  act_e [NPE-1:0]                fu_act,
  input  logic [NPE-1:0]                fu_to_mlp,
  input  logic [NPE-1:0][15:0]          fu_mlp_base,
  output logic [NPE-1:0]                fu_busy,
  output logic [NPE-1:0]                fu_done,
  input  logic [NPE-1:0][RW-1:0]        fu_res_rd_row,
  input  logic [NPE-1:0][NCW-1:0]       fu_res_rd_chunk,
  output data_t [NPE-1:0][M-1:0]        fu_res_rd_data,
  // MLP module
  input  logic [NPE-1:0]                mlp_in_wr_en,
  input  logic [NPE-1:0][CW-1:0]        mlp_in_wr_chunk,
  input  data_t [NPE-1:0][S2-1:0]       mlp_in_wr_data,
  input  logic [NPE-1:0]                mlp_w_wr_en,
  input  logic [NPE-1:0][OW-1:0]        mlp_w_wr_row,
  input  logic [NPE-1:0][CW-1:0]        mlp_w_wr_chunk,
  input  data_t [NPE-1:0][S2-1:0]       mlp_w_wr_data,
  input  logic [NPE-1:0]                mlp_start,
  input  logic [NPE-1:0][CW:0]          mlp_n_chunks,
  input  logic [NPE-1:0][OW:0]          mlp_n_out,
  input  logic [NPE-1:0]                mlp_relu,
  input  logic [NPE-1:0]                mlp_final,
  output logic [NPE-1:0]                mlp_busy,
  output logic [NPE-1:0]                mlp_done,
  input  logic [NPE-1:0][OW-1:0]        mlp_out_rd_addr,
  output data_t [NPE-1:0]               mlp_out_rd_data
);

  logic [ID_W-1:0]           assign_id;
  logic [NPE-1:0]            res_valid, res_ready;
  logic [NPE-1:0][ID_W-1:0]  res_id;
  logic [NPE-1:0][OW-1:0]    res_label;

  pe_dispatcher #(.NPE(NPE), .ID_W(ID_W), .LBL_W(OW)) u_dispatch (
    .clk, .rst_n,
    .img_valid, .img_id, .img_ready,
    .pe_idle, .assign_valid(pe_assign), .assign_id,
    .res_valid, .res_id, .res_label, .res_ready,
    .out_valid, .out_id, .out_label, .out_ready
  );

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    pe #(
      .P(P), .Q(Q), .DEPTH(DEPTH), .EDGE_ROWS(EDGE_ROWS), .M(M), .K_MAX(K_MAX),
      .N_MAX(N_MAX), .S1(S1), .S2(S2), .IN_MAX(IN_MAX), .OUT_MAX(OUT_MAX),
      .SLR_STAGES(SLR_STAGES), .ID_W(ID_W)
    ) u_pe (
      .clk, .rst_n,
      .assign_valid(pe_assign[i]), .assign_id, .idle(pe_idle[i]),
      .res_valid(res_valid[i]), .res_id(res_id[i]), .res_label(res_label[i]),
      .res_ready(res_ready[i]),
      .fa_feat_wr_en(fa_feat_wr_en[i]),
      .fa_feat_wr_addr(fa_feat_wr_addr[i]),
      .fa_feat_wr_data(fa_feat_wr_data[i]),
      .fa_edge_wr_en(fa_edge_wr_en[i]),
      .fa_edge_wr_addr(fa_edge_wr_addr[i]),
      .fa_edge_wr_data(fa_edge_wr_data[i]),
      .fa_start(fa_start[i]),
      .fa_op(fa_op[i]),
      .fa_num_edges(fa_num_edges[i]),
      .fa_busy(fa_busy[i]),
      .fa_done(fa_done[i]),
      .fa_res_rd_addr(fa_res_rd_addr[i]),
      .fa_res_rd_data(fa_res_rd_data[i]),
      .fa_stall_cycles(fa_stall_cycles[i]),
      .fu_feat_wr_en(fu_feat_wr_en[i]),
      .fu_feat_wr_row(fu_feat_wr_row[i]),
      .fu_feat_wr_chunk(fu_feat_wr_chunk[i]),
      .fu_feat_wr_data(fu_feat_wr_data[i]),
      .fu_wgt_wr_en(fu_wgt_wr_en[i]),
      .fu_wgt_wr_k(fu_wgt_wr_k[i]),
      .fu_wgt_wr_chunk(fu_wgt_wr_chunk[i]),
      .fu_wgt_wr_data(fu_wgt_wr_data[i]),
      .fu_start(fu_start[i]),
      .fu_k_len(fu_k_len[i]),
      .fu_n_tiles(fu_n_tiles[i]),
      .fu_act(fu_act[i]),
      .fu_to_mlp(fu_to_mlp[i]),
      .fu_mlp_base(fu_mlp_base[i]),
      .fu_busy(fu_busy[i]),
      .fu_done(fu_done[i]),
      .fu_res_rd_row(fu_res_rd_row[i]),
      .fu_res_rd_chunk(fu_res_rd_chunk[i]),
      .fu_res_rd_data(fu_res_rd_data[i]),
      .mlp_in_wr_en(mlp_in_wr_en[i]),
      .mlp_in_wr_chunk(mlp_in_wr_chunk[i]),
      .mlp_in_wr_data(mlp_in_wr_data[i]),
      .mlp_w_wr_en(mlp_w_wr_en[i]),
      .mlp_w_wr_row(mlp_w_wr_row[i]),
      .mlp_w_wr_chunk(mlp_w_wr_chunk[i]),
      .mlp_w_wr_data(mlp_w_wr_data[i]),
      .mlp_start(mlp_start[i]),
      .mlp_n_chunks(mlp_n_chunks[i]),
      .mlp_n_out(mlp_n_out[i]),
      .mlp_relu(mlp_relu[i]),
      .mlp_final(mlp_final[i]),
      .mlp_busy(mlp_busy[i]),
      .mlp_done(mlp_done[i]),
      .mlp_out_rd_addr(mlp_out_rd_addr[i]),
      .mlp_out_rd_data(mlp_out_rd_data[i])
    );
  end

endmodule
