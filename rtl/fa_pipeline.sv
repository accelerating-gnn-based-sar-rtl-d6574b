// fa_pipeline: one computation pipeline of the Feature Aggregation module,
// with its bank of the FA Result Buffer.
//
// Each cycle it can take one update (dst, weight, src.vector) from the
// shuffle network and do Q multiply-accumulates:
//   stage 1, Scatter: u = weight * src.vector (Q multipliers); in GATHER_MAX
//            mode (graph pooling) the vector passes unscaled;
//   stage 2, Gather:  bank[dst/P] = bank[dst/P] + u  (GATHER_SUM), or
//                     bank[dst/P] = max(bank[dst/P], u) (GATHER_MAX),
//            a read-modify-write that finishes in one cycle, so back-to-back
//            updates to the same vertex need no forwarding.
// The pipeline only sees vertices with dst % P equal to its own index, so
// its bank holds DEPTH/P entries at local address dst / P.
//
// clear (one cycle) starts a new pass: a per-entry "written" flag is reset,
// and the first update of a vertex overwrites instead of reducing, so no
// pass over the bank is needed. The result read port is registered (one
// cycle) and returns the entry saturated to DATA_W; an entry no edge
// reached reads as zero. busy is high while an update is in flight.
//
// The scatter/gather split, p pipelines of q lanes and dst % p routing
// follow the accelerator; the two-stage timing, the written flags and the
// accumulator width are this design's choices.
module fa_pipeline
  import gnn_pkg::*;
#(
  parameter int P     = 4,
  parameter int Q     = 16,
  parameter int DEPTH = 16384,
  localparam int LD   = DEPTH / P,
  localparam int LAW  = $clog2(LD)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  gather_op_e       op,
  input  logic             in_valid,
  input  logic [VID_W-1:0] in_dst,
  input  data_t            in_weight,
  input  data_t [Q-1:0]    in_vec,
  input  logic [LAW-1:0]   rd_addr,
  output data_t [Q-1:0]    rd_data,
  output logic             busy
);

  acc_t [Q-1:0] bank [LD];
  logic [LD-1:0] written;

  // Stage 1: scatter.
  logic           s1_valid;
  logic [LAW-1:0] s1_addr;
  acc_t [Q-1:0]   s1_u;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid && !clear;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      s1_addr <= LAW'(in_dst / P);
      for (int k = 0; k < Q; k++)
        s1_u[k] <= (op == GATHER_MAX) ? acc_t'(in_vec[k]) : fx_mul(in_vec[k], in_weight);
    end
  end

  // Stage 2: gather (read-modify-write of the result bank).
  acc_t [Q-1:0] old_v, new_v;
  always_comb begin
    old_v = bank[s1_addr];
    for (int k = 0; k < Q; k++) begin
      if (!written[s1_addr])      new_v[k] = s1_u[k];
      else if (op == GATHER_MAX)  new_v[k] = (s1_u[k] > old_v[k]) ? s1_u[k] : old_v[k];
      else                        new_v[k] = old_v[k] + s1_u[k];
    end
  end

  always_ff @(posedge clk) begin
    if (s1_valid) bank[s1_addr] <= new_v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        written <= '0;
    else if (clear)    written <= '0;
    else if (s1_valid) written[s1_addr] <= 1'b1;
  end

  // Result read port.
  always_ff @(posedge clk) begin
    for (int k = 0; k < Q; k++)
      rd_data[k] <= written[rd_addr] ? sat(bank[rd_addr][k]) : data_t'(0);
  end

  assign busy = s1_valid;

endmodule
