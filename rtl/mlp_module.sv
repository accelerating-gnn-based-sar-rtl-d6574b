// mlp_module: Multi-layer Perceptron (MLP) module of a processing element.
//
// Computes one fully connected layer y = act(W x) of the classifier at the
// end of the GNN and the predicted label argmax(W x). S1 adder trees with
// S2 inputs each work on S1 output neurons at once: every cycle tree t
// multiplies S2 weights of row g*S1+t with the matching S2-element chunk of
// x and sums them, so S1*S2 MACs per cycle. A dot product takes n_chunks
// cycles; the tree output is accumulated per tree, and the finished neuron
// value is written to the output buffer log2(S2)+1 cycles after its last
// chunk entered.
//
// Interface: in_wr_* writes one S2-element chunk of x (it is fed by the FU
// module over the direct FU-to-MLP link); w_wr_* writes one S2-element
// chunk of a weight row. start with n_chunks (input length / S2) and n_out
// (1..OUT_MAX) and relu; done pulses when all outputs are written, with
// label (index of the largest pre-activation output, lowest index on ties)
// valid from then on. out_rd_* reads one output, one cycle later.
// The adder-tree organisation (s1 trees, s2 ports) follows the accelerator;
// buffer sizes, the single-layer command and the argmax are this design's
// choices.
module mlp_module
  import gnn_pkg::*;
#(
  parameter int S1      = 4,
  parameter int S2      = 16,
  parameter int IN_MAX  = 1024,
  parameter int OUT_MAX = 16,
  localparam int CH     = IN_MAX / S2,
  localparam int CW     = $clog2(CH),
  localparam int OW     = $clog2(OUT_MAX)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_wr_en,
  input  logic [CW-1:0]    in_wr_chunk,
  input  data_t [S2-1:0]   in_wr_data,
  input  logic             w_wr_en,
  input  logic [OW-1:0]    w_wr_row,
  input  logic [CW-1:0]    w_wr_chunk,
  input  data_t [S2-1:0]   w_wr_data,
  input  logic             start,
  input  logic [CW:0]      n_chunks,
  input  logic [OW:0]      n_out,
  input  logic             relu,
  output logic             busy,
  output logic             done,
  output logic [OW-1:0]    label,
  input  logic [OW-1:0]    out_rd_addr,
  output data_t            out_rd_data
);

  data_t [S2-1:0] in_mem [CH];
  data_t [S2-1:0] w_mem  [OUT_MAX][CH];
  data_t          out_mem [OUT_MAX];

  always_ff @(posedge clk) begin
    if (in_wr_en) in_mem[in_wr_chunk]        <= in_wr_data;
    if (w_wr_en)  w_mem[w_wr_row][w_wr_chunk] <= w_wr_data;
    out_rd_data <= out_mem[out_rd_addr];
  end

  // ---- issue ----
  logic          issuing;
  logic [CW:0]   n_ch_q, chunk;
  logic [OW:0]   n_out_q;
  logic          relu_q;
  logic [OW:0]   group;      // first neuron of the current group
  logic          last_group;

  assign last_group = (group + (OW+1)'(S1) >= n_out_q);

  // tag: {final group, first chunk, last chunk}
  acc_t [S1-1:0][S2-1:0] prod;
  always_comb begin
    for (int t = 0; t < S1; t++)
      for (int e = 0; e < S2; e++)
        prod[t][e] = ((int'(group) + t) < OUT_MAX)
                   ? fx_mul(w_mem[OW'(int'(group) + t)][CW'(chunk)][e], in_mem[CW'(chunk)][e])
                   : acc_t'(0);
  end

  logic [S1-1:0] t_valid;
  logic [2:0]    t_tag [S1];
  acc_t [S1-1:0] t_sum;
  for (genvar t = 0; t < S1; t++) begin : g_tree
    adder_tree #(.N(S2), .TAG_W(3)) u_tree (
      .clk, .rst_n, .in_valid(issuing),
      .in_tag({last_group, chunk == '0, chunk + 1'b1 == n_ch_q}),
      .in_data(prod[t]), .out_valid(t_valid[t]), .out_tag(t_tag[t]), .out_sum(t_sum[t])
    );
  end

  // ---- accumulate and write back ----
  acc_t [S1-1:0] acc;
  acc_t [S1-1:0] dot;
  logic [OW:0]   wb_group;
  acc_t          best;
  always_comb begin
    for (int t = 0; t < S1; t++)
      dot[t] = t_tag[0][1] ? t_sum[t] : acc[t] + t_sum[t];
  end

  always_ff @(posedge clk) begin
    if (t_valid[0] && t_tag[0][0])
      for (int t = 0; t < S1; t++)
        if (int'(wb_group) + t < int'(n_out_q))
          out_mem[OW'(int'(wb_group) + t)] <= activate(relu_q ? ACT_RELU : ACT_NONE, dot[t]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing  <= 1'b0;
      n_ch_q   <= '0;
      n_out_q  <= '0;
      relu_q   <= 1'b0;
      group    <= '0;
      chunk    <= '0;
      acc      <= '0;
      wb_group <= '0;
      best     <= '0;
      label    <= '0;
      done     <= 1'b0;
      busy     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        issuing  <= 1'b1;
        n_ch_q   <= n_chunks;
        n_out_q  <= n_out;
        relu_q   <= relu;
        group    <= '0;
        chunk    <= '0;
        wb_group <= '0;
      end else if (issuing) begin
        if (chunk + 1'b1 == n_ch_q) begin
          chunk <= '0;
          group <= group + (OW+1)'(S1);
          if (last_group) issuing <= 1'b0;
        end else begin
          chunk <= chunk + 1'b1;
        end
      end
      if (t_valid[0]) begin
        acc <= dot;
        if (t_tag[0][0]) begin
          // last chunk: the group's neurons are complete
          wb_group <= wb_group + (OW+1)'(S1);
          if (t_tag[0][2]) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
      if (t_valid[0] && t_tag[0][0]) begin
        // argmax over the completed group, in neuron order
        logic first;
        acc_t b;
        logic [OW-1:0] lb;
        first = (wb_group == '0);
        b  = best;
        lb = label;
        for (int t = 0; t < S1; t++) begin
          if (int'(wb_group) + t < int'(n_out_q) && ((first && t == 0) || dot[t] > b)) begin
            b  = dot[t];
            lb = OW'(int'(wb_group) + t);
          end
        end
        best  <= b;
        label <= lb;
      end
    end
  end

endmodule
