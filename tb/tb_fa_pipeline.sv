// tb_fa_pipeline: self-checking test of one FA computation pipeline.
// Sends random updates (dst with dst % P equal to the pipeline, random
// weight and vector), including back-to-back updates to the same vertex,
// in sum mode and then in max mode, and compares the result bank with a
// reference model. Checks the two-cycle update latency and the clear.
module tb_fa_pipeline;
  import gnn_pkg::*;
  localparam int P = 4, Q = 4, DEPTH = 64, LD = DEPTH / P;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0, busy;
  gather_op_e op = GATHER_SUM;
  logic [VID_W-1:0] in_dst;
  data_t in_weight;
  data_t [Q-1:0] in_vec, rd_data;
  logic [$clog2(LD)-1:0] rd_addr = '0;

  fa_pipeline #(.P(P), .Q(Q), .DEPTH(DEPTH)) dut (.*);

  acc_t ref_acc [LD][Q];
  bit   ref_w   [LD];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_pass(gather_op_e o, int n);
    @(negedge clk);
    op = o; clear = 1'b1;
    for (int v = 0; v < LD; v++) ref_w[v] = 0;
    @(negedge clk);
    clear = 1'b0;
    for (int e = 0; e < n; e++) begin
      int v;
      acc_t u;
      v = (e % 3 == 0 && e > 0) ? int'(in_dst) / P : $urandom_range(LD / 2 - 1); // repeats
      in_valid  = 1'b1;
      in_dst    = VID_W'(v * P + 1);       // this pipeline owns dst % P == 1
      in_weight = data_t'($urandom_range(512)) - data_t'(256);
      for (int k = 0; k < Q; k++) begin
        in_vec[k] = data_t'($urandom_range(4000)) - data_t'(2000);
        u = (o == GATHER_MAX) ? acc_t'(in_vec[k]) : fx_mul(in_vec[k], in_weight);
        if (!ref_w[v])                ref_acc[v][k] = u;
        else if (o == GATHER_MAX)     ref_acc[v][k] = (u > ref_acc[v][k]) ? u : ref_acc[v][k];
        else                          ref_acc[v][k] = ref_acc[v][k] + u;
      end
      ref_w[v] = 1;
      @(negedge clk);
      if (e == 0) begin
        checks++;
        if (!busy) begin failures++; $display("FAIL busy"); end
      end
    end
    in_valid = 1'b0;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after drain"); end
    for (int v = 0; v < LD; v++) begin
      rd_addr = ($clog2(LD))'(v);
      @(negedge clk);
      for (int k = 0; k < Q; k++) begin
        checks++;
        if (rd_data[k] !== (ref_w[v] ? sat(ref_acc[v][k]) : data_t'(0))) begin
          failures++;
          $display("FAIL op %0d v %0d k %0d got %0d", o, v, k, rd_data[k]);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_pass(GATHER_SUM, 60);
    run_pass(GATHER_MAX, 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
