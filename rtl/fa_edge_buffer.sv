// fa_edge_buffer: Edge Buffer of the Feature Aggregation (FA) module.
//
// Stores the edge list <src, dst, weight> of the current aggregation pass.
// Each row holds P edges, so one row read per cycle feeds all P
// computation pipelines. Edges are loaded row by row from external memory
// (sequential access). The read port is registered with an enable: the
// data of the address given with rd_en high appears on the next cycle and
// holds while rd_en is low.
//
// The row organisation (P edges per row) and ROWS are this design's
// choices; ROWS = 36864 holds 147456 edges, the 9 edges per vertex (eight
// mesh neighbours plus the self loop) of a 128 x 128 image.
module fa_edge_buffer
  import gnn_pkg::*;
#(
  parameter int P    = 4,
  parameter int ROWS = 36864,
  localparam int AW  = $clog2(ROWS)
) (
  input  logic                clk,
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  edge_t [P-1:0]       wr_data,
  input  logic                rd_en,
  input  logic [AW-1:0]       rd_addr,
  output edge_t [P-1:0]       rd_data
);

  edge_t [P-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
