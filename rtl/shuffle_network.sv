// shuffle_network: routes fetched edge data to the FA computation pipelines.
//
// Input lane i carries one edge already joined with its source feature
// vector: (dst, weight, src.vector). The network sends it to pipeline
// dst % P, the pipeline that owns the destination vertex's bank of the
// result buffer, so that updates to one vertex are always reduced by the
// same pipeline and never race. When several lanes target the same
// pipeline in a cycle, the lowest-numbered lane wins and the others are not
// granted; the caller keeps them and offers them again next cycle (a
// stall). grant[i] says that input lane i was delivered this cycle.
//
// Purely combinational: a P x P crossbar with a fixed-priority arbiter per
// output. The routing rule (dst % P) follows the accelerator; the
// fixed-priority conflict resolution is this design's choice. P must be a
// power of two.
module shuffle_network
  import gnn_pkg::*;
#(
  parameter int P = 4,
  parameter int Q = 16,
  localparam int SW = (P > 1) ? $clog2(P) : 1
) (
  input  logic [P-1:0]            in_valid,
  input  logic [P-1:0][VID_W-1:0] in_dst,
  input  data_t [P-1:0]           in_weight,
  input  data_t [P-1:0][Q-1:0]    in_vec,
  output logic [P-1:0]            out_valid,
  output logic [P-1:0][VID_W-1:0] out_dst,
  output data_t [P-1:0]           out_weight,
  output data_t [P-1:0][Q-1:0]    out_vec,
  output logic [P-1:0]            grant
);

  // Target pipeline of each input lane.
  function automatic logic [SW-1:0] target(logic [VID_W-1:0] dst);
    return (P > 1) ? SW'(dst % P) : '0;
  endfunction

  always_comb begin
    out_valid  = '0;
    out_dst    = '0;
    out_weight = '0;
    out_vec    = '0;
    grant      = '0;
    for (int o = 0; o < P; o++) begin
      for (int i = P - 1; i >= 0; i--) begin
        // Scanning downwards, the last match is the lowest lane.
        if (in_valid[i] && target(in_dst[i]) == SW'(o)) begin
          out_valid[o]  = 1'b1;
          out_dst[o]    = in_dst[i];
          out_weight[o] = in_weight[i];
          out_vec[o]    = in_vec[i];
        end
      end
    end
    // An input is granted when it is the lowest valid lane for its target.
    for (int i = 0; i < P; i++) begin
      grant[i] = in_valid[i];
      for (int j = 0; j < i; j++)
        if (in_valid[j] && target(in_dst[j]) == target(in_dst[i])) grant[i] = 1'b0;
    end
  end

endmodule
