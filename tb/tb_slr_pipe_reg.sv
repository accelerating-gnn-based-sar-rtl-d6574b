// tb_slr_pipe_reg: self-checking test of the SLR-crossing register chain:
// every transfer comes out unchanged exactly STAGES cycles later, gaps
// included.
module tb_slr_pipe_reg;
  localparam int W = 24, STAGES = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [W-1:0] in_data = '0, out_data;
  slr_pipe_reg #(.W(W), .STAGES(STAGES)) dut (.*);

  logic         hv [$];
  logic [W-1:0] hd [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      in_valid = 1'($urandom);
      in_data  = W'($urandom);
      hv.push_back(in_valid); hd.push_back(in_data);
      @(negedge clk);
      if (hv.size() >= STAGES) begin
        logic v; logic [W-1:0] d;
        v = hv.pop_front(); d = hd.pop_front();
        checks++;
        if (out_valid !== v || (v && out_data !== d)) begin
          failures++; $display("FAIL at %0d", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
