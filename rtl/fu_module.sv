// fu_module: Feature Update (FU) module of a processing element.
//
// Runs the update phase of a GraphSAGE layer,
//   h_i' = act(z_i W_neighbor + h_i W_self) = act([z_i h_i] [W_neighbor; W_self]),
// as one matrix product: the Feature Buffer holds a tile of M vertex rows of
// the concatenated input [z h] (K = k_len columns), the Weight Buffer the
// stacked K x N weight matrix, and the M x M systolic array computes the
// M x N output tile M columns at a time. The same path, with act = sigmoid,
// serves the attention layer's score computations.
//
// Per column tile: 1 cycle clearing the array, K+2M-2 cycles streaming
// skewed operands, 1 cycle writing act(result), rounded to DATA_W, into the
// Result Buffer; with to_mlp set, M more cycles send the tile row by row
// to the MLP module over the direct FU-to-MLP link (out_*), row r of column
// tile t carrying element index mlp_base + r*N + t*M of the MLP input
// vector (row-major, N = n_tiles*M).
//
// Interface: feat_wr_* writes M consecutive elements of one vertex row
// (columns chunk*M ...), wgt_wr_* writes M consecutive elements of one
// weight row; start with k_len (1..K_MAX) and n_tiles (1..N_MAX/M); done
// pulses at the end; res_rd_* reads M elements of a result row one cycle
// later. Buffers, CU array and FU->MLP link follow the accelerator; buffer
// shapes, the schedule and the piecewise-linear sigmoid are this design's
// choices.
module fu_module
  import gnn_pkg::*;
#(
  parameter int M     = 16,
  parameter int K_MAX = 128,
  parameter int N_MAX = 64,
  localparam int KC   = K_MAX / M,   // chunks per feature row
  localparam int NC   = N_MAX / M,   // column tiles
  localparam int RW   = $clog2(M),
  localparam int KCW  = (KC > 1) ? $clog2(KC) : 1,
  localparam int NCW  = (NC > 1) ? $clog2(NC) : 1,
  localparam int KW   = $clog2(K_MAX + 1),
  localparam int TW   = $clog2(K_MAX + 2 * M)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // buffer loading
  input  logic                 feat_wr_en,
  input  logic [RW-1:0]        feat_wr_row,
  input  logic [KCW-1:0]       feat_wr_chunk,
  input  data_t [M-1:0]        feat_wr_data,
  input  logic                 wgt_wr_en,
  input  logic [$clog2(K_MAX)-1:0] wgt_wr_k,
  input  logic [NCW-1:0]       wgt_wr_chunk,
  input  data_t [M-1:0]        wgt_wr_data,
  // command
  input  logic                 start,
  input  logic [KW-1:0]        k_len,
  input  logic [NCW:0]         n_tiles,
  input  act_e                 act,
  input  logic                 to_mlp,
  input  logic [15:0]          mlp_base,
  output logic                 busy,
  output logic                 done,
  // result read
  input  logic [RW-1:0]        res_rd_row,
  input  logic [NCW-1:0]       res_rd_chunk,
  output data_t [M-1:0]        res_rd_data,
  // direct link to the MLP module
  output logic                 out_valid,
  output logic [15:0]          out_index,
  output data_t [M-1:0]        out_data
);

  data_t [M-1:0] feat_mem [M][KC];
  data_t [M-1:0] wgt_mem  [K_MAX][NC];
  data_t [M-1:0] res_mem  [M][NC];

  always_ff @(posedge clk) begin
    if (feat_wr_en) feat_mem[feat_wr_row][feat_wr_chunk] <= feat_wr_data;
    if (wgt_wr_en)  wgt_mem[wgt_wr_k][wgt_wr_chunk]      <= wgt_wr_data;
    res_rd_data <= res_mem[res_rd_row][res_rd_chunk];
  end

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_FEED, S_CAPTURE, S_EMIT} state_e;
  state_e        state;
  logic [KW-1:0] k_q;
  logic [NCW:0]  n_q;
  act_e          act_q;
  logic          to_mlp_q;
  logic [15:0]   base_q;
  logic [NCW:0]  tile;
  logic [TW-1:0] t;
  logic [RW:0]   erow;

  // Skewed operand feed.
  data_t [M-1:0] a_left, b_top;
  acc_t  [M-1:0][M-1:0] acc;
  always_comb begin
    for (int i = 0; i < M; i++) begin
      int kk;
      kk = int'(t) - i;
      a_left[i] = '0;
      b_top[i]  = '0;
      if (state == S_FEED && kk >= 0 && kk < int'(k_q)) begin
        a_left[i] = feat_mem[i][kk / M][kk % M];
        b_top[i]  = wgt_mem[kk][NCW'(tile)][i];
      end
    end
  end

  systolic_array #(.M(M)) u_array (
    .clk, .clear(state == S_CLEAR), .a_left, .b_top, .acc
  );

  always_ff @(posedge clk) begin
    if (state == S_CAPTURE)
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++)
          res_mem[i][NCW'(tile)][j] <= activate(act_q, acc[i][j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      k_q       <= '0;
      n_q       <= '0;
      act_q     <= ACT_NONE;
      to_mlp_q  <= 1'b0;
      base_q    <= '0;
      tile      <= '0;
      t         <= '0;
      erow      <= '0;
      done      <= 1'b0;
      out_valid <= 1'b0;
      out_index <= '0;
      out_data  <= '0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          k_q      <= k_len;
          n_q      <= n_tiles;
          act_q    <= act;
          to_mlp_q <= to_mlp;
          base_q   <= mlp_base;
          tile     <= '0;
          state    <= S_CLEAR;
        end
        S_CLEAR: begin
          t     <= '0;
          state <= S_FEED;
        end
        S_FEED: begin
          if (t == TW'(k_q) + TW'(2 * M - 3)) state <= S_CAPTURE;
          t <= t + 1'b1;
        end
        S_CAPTURE: begin
          erow <= '0;
          if (to_mlp_q) state <= S_EMIT;
          else if (tile + 1'b1 == n_q) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            tile  <= tile + 1'b1;
            state <= S_CLEAR;
          end
        end
        S_EMIT: begin
          out_valid <= 1'b1;
          out_data  <= res_mem[RW'(erow)][NCW'(tile)];
          out_index <= base_q + 16'(erow) * 16'(n_q) * 16'(M) + 16'(tile) * 16'(M);
          erow      <= erow + 1'b1;
          if (erow == (RW+1)'(M - 1)) begin
            if (tile + 1'b1 == n_q) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              tile  <= tile + 1'b1;
              state <= S_CLEAR;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
