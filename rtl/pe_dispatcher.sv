// pe_dispatcher: hands SAR images to idle processing elements (PEs) and
// collects their predicted labels.
//
// Each PE infers one image at a time, from start to predicted label. An
// incoming image (img_valid/img_ready handshake, img_id) is given to the
// lowest-numbered idle PE with a one-cycle assign pulse; when no PE is idle
// img_ready is low and the image waits. Finished PEs offer (id, label) on
// their res_* handshakes; a round-robin arbiter forwards one per cycle to
// the single out_* stream, so images can complete out of order. This is the
// "assign each image to an idle PE" scheme of the accelerator; the
// handshakes and the arbitration are this design's choices.
module pe_dispatcher #(
  parameter int NPE   = 2,
  parameter int ID_W  = 16,
  parameter int LBL_W = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // images from the host
  input  logic                       img_valid,
  input  logic [ID_W-1:0]            img_id,
  output logic                       img_ready,
  // PE side
  input  logic [NPE-1:0]             pe_idle,
  output logic [NPE-1:0]             assign_valid,
  output logic [ID_W-1:0]            assign_id,
  input  logic [NPE-1:0]             res_valid,
  input  logic [NPE-1:0][ID_W-1:0]   res_id,
  input  logic [NPE-1:0][LBL_W-1:0]  res_label,
  output logic [NPE-1:0]             res_ready,
  // labels to the host
  output logic                       out_valid,
  output logic [ID_W-1:0]            out_id,
  output logic [LBL_W-1:0]           out_label,
  input  logic                       out_ready
);

  localparam int PW = (NPE > 1) ? $clog2(NPE) : 1;

  // ---- assignment: lowest idle PE ----
  always_comb begin
    assign_valid = '0;
    for (int i = NPE - 1; i >= 0; i--)
      if (pe_idle[i]) begin
        assign_valid    = '0;
        assign_valid[i] = img_valid;
      end
  end
  assign img_ready = |pe_idle;
  assign assign_id = img_id;

  // ---- result collection: round robin ----
  logic [PW-1:0] rr;       // PE with highest priority
  logic [PW-1:0] sel;
  logic          any;
  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int k = NPE - 1; k >= 0; k--) begin
      if (res_valid[(int'(rr) + k) % NPE]) begin
        sel = PW'((int'(rr) + k) % NPE);
        any = 1'b1;
      end
    end
  end

  assign out_valid = any;
  assign out_id    = res_id[sel];
  assign out_label = res_label[sel];
  always_comb begin
    res_ready = '0;
    res_ready[sel] = any && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 rr <= '0;
    else if (any && out_ready)  rr <= (sel == PW'(NPE - 1)) ? '0 : sel + 1'b1;
  end

  // An image goes to exactly one PE, and only to an idle one.
  a_assign_idle: assert property (@(posedge clk) disable iff (!rst_n)
    ((assign_valid & (assign_valid - 1'b1)) == '0) && ((assign_valid & ~pe_idle) == '0));

endmodule
