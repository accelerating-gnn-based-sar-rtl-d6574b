// gnn_pkg: types, constants and fixed-point helpers shared by the GNN SAR
// target-recognition accelerator.
//
// Numbers are signed fixed point: DATA_W bits with FRAC_W fraction bits
// (Q8.8 by default), accumulated in ACC_W-bit registers. Products are taken
// at full width and shifted right by FRAC_W, so a product is again in the
// accumulator's Q.FRAC_W scale. Results written back to buffers are
// saturated to DATA_W bits. The number format is this design's choice; the
// accelerator it follows does not state one.
package gnn_pkg;

  localparam int DATA_W = 16;
  localparam int FRAC_W = 8;
  localparam int ACC_W  = 32;
  // Vertex index width: 2^14 = 16384 vertices, a 128 x 128 image mesh.
  localparam int VID_W  = 14;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  localparam data_t ONE     = data_t'(1 << FRAC_W);
  localparam data_t DATA_MAX = {1'b0, {(DATA_W-1){1'b1}}};
  localparam data_t DATA_MIN = {1'b1, {(DATA_W-1){1'b0}}};

  // Gather (reduce) function of a feature-aggregation pass.
  typedef enum logic {
    GATHER_SUM = 1'b0,  // weighted sum: mean aggregation with weight 1/(deg+1)
    GATHER_MAX = 1'b1   // element-wise max: graph pooling
  } gather_op_e;

  // Activation applied when the feature-update result is written back.
  typedef enum logic [1:0] {
    ACT_NONE    = 2'd0,
    ACT_RELU    = 2'd1,
    ACT_SIGMOID = 2'd2  // piecewise-linear (hard) sigmoid
  } act_e;

  // One graph edge as held by the edge buffer.
  typedef struct packed {
    logic [VID_W-1:0] src;
    logic [VID_W-1:0] dst;
    data_t            weight;
  } edge_t;

  // Fixed-point multiply: data x data -> accumulator scale.
  function automatic acc_t fx_mul(data_t a, data_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return acc_t'(p >>> FRAC_W);
  endfunction

  // Saturate an accumulator value to the data width.
  function automatic data_t sat(acc_t v);
    if (v > acc_t'(DATA_MAX)) return DATA_MAX;
    if (v < acc_t'(DATA_MIN)) return DATA_MIN;
    return data_t'(v);
  endfunction

  // Activation function, applied to an accumulator value.
  function automatic data_t activate(act_e f, acc_t v);
    acc_t h;
    case (f)
      ACT_RELU:    return (v < 0) ? data_t'(0) : sat(v);
      ACT_SIGMOID: begin
        // y = clamp(x/4 + 1/2, 0, 1)
        h = (v >>> 2) + (acc_t'(ONE) >>> 1);
        if (h < 0) return data_t'(0);
        if (h > acc_t'(ONE)) return ONE;
        return data_t'(h);
      end
      default:     return sat(v);
    endcase
  endfunction

endpackage
