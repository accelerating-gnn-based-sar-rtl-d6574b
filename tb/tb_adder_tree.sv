// tb_adder_tree: self-checking test of the pipelined adder tree. Feeds a
// new random input set every cycle (with gaps) and checks each sum and tag
// exactly log2(N) cycles later.
module tb_adder_tree;
  import gnn_pkg::*;
  localparam int N = 16, TAG_W = 3, L = $clog2(N);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [TAG_W-1:0] in_tag = '0, out_tag;
  acc_t [N-1:0] in_data = '0;
  acc_t out_sum;
  adder_tree #(.N(N), .TAG_W(TAG_W)) dut (.*);

  acc_t exp_sum [$];
  logic [TAG_W-1:0] exp_tag [$];
  int   exp_cyc [$];
  int   cyc = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_sum.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        acc_t s; logic [TAG_W-1:0] t; int c;
        s = exp_sum.pop_front(); t = exp_tag.pop_front(); c = exp_cyc.pop_front();
        if (out_sum !== s || out_tag !== t || cyc - c != L) begin
          failures++; $display("FAIL sum %0d exp %0d latency %0d", out_sum, s, cyc - c);
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      acc_t s;
      in_valid = ($urandom_range(3) != 0);
      in_tag   = TAG_W'($urandom);
      s = 0;
      for (int i = 0; i < N; i++) begin in_data[i] = acc_t'($urandom); s += in_data[i]; end
      if (in_valid) begin exp_sum.push_back(s); exp_tag.push_back(in_tag); exp_cyc.push_back(cyc); end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (L + 2) @(negedge clk);
    checks++;
    if (exp_sum.size() != 0) begin failures++; $display("FAIL %0d sums missing", exp_sum.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
