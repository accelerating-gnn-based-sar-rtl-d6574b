// adder_tree: pipelined binary adder tree of the MLP module.
//
// Adds N accumulator-width inputs (N a power of two) in log2(N) levels, one
// register level per adder level, so it accepts one set of inputs every
// cycle and returns their sum log2(N) cycles later. A TAG_W-bit tag travels
// with each set (the MLP uses it to mark first/last chunks of a dot
// product). The adder-tree structure follows the accelerator; the register
// placement and the tag are this design's choices.
module adder_tree
  import gnn_pkg::*;
#(
  parameter int N     = 16,
  parameter int TAG_W = 2,
  localparam int L    = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  acc_t [N-1:0]     in_data,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output acc_t             out_sum
);

  // lvl[l] holds N >> l partial sums; lvl[0] is the input.
  acc_t [N-1:0]     lvl   [L+1];
  logic [L:0]       vld;
  logic [TAG_W-1:0] tag   [L+1];

  assign lvl[0] = in_data;
  assign vld[0] = in_valid;
  assign tag[0] = in_tag;

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    always_ff @(posedge clk) begin
      lvl[l] <= '0;
      for (int k = 0; k < (N >> l); k++)
        lvl[l][k] <= lvl[l-1][2*k] + lvl[l-1][2*k+1];
      tag[l] <= tag[l-1];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld[l] <= 1'b0;
      else        vld[l] <= vld[l-1];
    end
  end

  assign out_valid = vld[L];
  assign out_tag   = tag[L];
  assign out_sum   = lvl[L][0];

endmodule
