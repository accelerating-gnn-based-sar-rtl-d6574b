// tb_fu_cu: self-checking test of the systolic-array MAC cell: random
// operand streams, reference accumulation, one-cycle operand forwarding
// and clear.
module tb_fu_cu;
  import gnn_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear = 1'b1;
  data_t a_in = '0, b_in = '0, a_out, b_out;
  acc_t acc;
  fu_cu dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc_t r;
    data_t pa, pb;
    @(negedge clk);
    clear = 1'b0;
    r = 0;
    for (int n = 0; n < 300; n++) begin
      pa = data_t'($urandom); pb = data_t'($urandom);
      a_in = pa; b_in = pb;
      r = r + acc_t'((32'(signed'(pa)) * 32'(signed'(pb))) >>> FRAC_W);
      @(negedge clk);
      checks += 3;
      if (acc !== r)   begin failures++; $display("FAIL acc %0d exp %0d", acc, r); end
      if (a_out !== pa) begin failures++; $display("FAIL a_out"); end
      if (b_out !== pb) begin failures++; $display("FAIL b_out"); end
    end
    clear = 1'b1;
    @(negedge clk);
    checks++;
    if (acc !== 0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
