// fu_cu: Computation Unit (CU) of the Feature Update systolic array.
//
// A multiply-accumulate cell: every cycle acc += a_in * b_in (fixed point,
// see gnn_pkg::fx_mul), and a_in / b_in are passed on, one cycle later, to
// the right and lower neighbours. clear zeroes the accumulator instead of
// accumulating. The accumulator is ACC_W bits wide and read directly.
// The cell's role (one MAC per cycle in an m x m systolic array) follows the
// accelerator; its exact timing is this design's choice.
module fu_cu
  import gnn_pkg::*;
(
  input  logic  clk,
  input  logic  clear,
  input  data_t a_in,
  input  data_t b_in,
  output data_t a_out,
  output data_t b_out,
  output acc_t  acc
);

  always_ff @(posedge clk) begin
    a_out <= a_in;
    b_out <= b_in;
    acc   <= clear ? acc_t'(0) : acc + fx_mul(a_in, b_in);
  end

endmodule
