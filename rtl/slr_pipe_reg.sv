// slr_pipe_reg: register stages for a connection that crosses a Super
// Logic Region (SLR) boundary of a multi-die FPGA.
//
// A valid/data pair is delayed by STAGES clock cycles through a chain of
// registers, so that the long wire between two dies is cut into short,
// registered hops and does not limit the clock frequency. There is no
// back-pressure: the consumer must accept one transfer per cycle. The idea
// (registers on cross-SLR links) follows the accelerator's splitting-kernel
// layout; STAGES = 2 is this design's choice.
module slr_pipe_reg #(
  parameter int W      = 32,
  parameter int STAGES = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  logic [STAGES:0]     v;
  logic [W-1:0]        d [STAGES+1];

  assign v[0] = in_valid;
  assign d[0] = in_data;

  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v[s] <= 1'b0;
      else        v[s] <= v[s-1];
    end
    always_ff @(posedge clk) d[s] <= d[s-1];
  end

  assign out_valid = v[STAGES];
  assign out_data  = d[STAGES];

endmodule
