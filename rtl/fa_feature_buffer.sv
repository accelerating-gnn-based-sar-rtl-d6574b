// fa_feature_buffer: Feature Buffer of the Feature Aggregation (FA) module.
//
// Holds one Q-element feature slice per vertex (the input feature matrix of
// the current aggregation pass, loaded sequentially from external memory).
// It has one write port and P read ports, so that the P edges issued in a
// cycle can each fetch the feature vector of their source vertex in the same
// cycle. The read ports are registered: addresses presented with rd_en high
// give data on the next cycle; with rd_en low the read registers hold, which
// lets the FA pipeline stall without losing fetched data.
//
// P and Q follow the accelerator's configuration (p = 4 pipelines,
// q = 16 lanes). DEPTH (16384 = a 128 x 128 image mesh) is this design's
// choice. The P read ports are written as one array read P times; an FPGA
// build would replicate it into P copies.
module fa_feature_buffer
  import gnn_pkg::*;
#(
  parameter int P     = 4,
  parameter int Q     = 16,
  parameter int DEPTH = 16384,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  data_t [Q-1:0]        wr_data,
  input  logic                 rd_en,
  input  logic [P-1:0][AW-1:0] rd_addr,
  output data_t [P-1:0][Q-1:0] rd_data
);

  data_t [Q-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  for (genvar i = 0; i < P; i++) begin : g_rd
    always_ff @(posedge clk) begin
      if (rd_en) rd_data[i] <= mem[rd_addr[i]];
    end
  end

endmodule
