// tb_fa_feature_buffer: self-checking test of the FA Feature Buffer.
// Fills a small buffer with random slices, then reads four random vertices
// per cycle through the P read ports and compares with a reference copy one
// cycle later; also checks that the read registers hold while rd_en is low.
module tb_fa_feature_buffer;
  import gnn_pkg::*;
  localparam int P = 4, Q = 4, DEPTH = 64, AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                 wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0]        wr_addr;
  data_t [Q-1:0]        wr_data;
  logic [P-1:0][AW-1:0] rd_addr;
  data_t [P-1:0][Q-1:0] rd_data;
  data_t [Q-1:0]        ref_mem [DEPTH];

  fa_feature_buffer #(.P(P), .Q(Q), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [P-1:0][AW-1:0] a;
    data_t [P-1:0][Q-1:0] held;
    for (int v = 0; v < DEPTH; v++) begin
      @(negedge clk);
      wr_en   = 1'b1;
      wr_addr = AW'(v);
      for (int k = 0; k < Q; k++) wr_data[k] = data_t'($urandom);
      ref_mem[v] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < P; i++) a[i] = AW'($urandom_range(DEPTH - 1));
      rd_addr = a;
      rd_en   = 1'b1;
      @(negedge clk);
      for (int i = 0; i < P; i++) begin
        checks++;
        if (rd_data[i] !== ref_mem[a[i]]) begin
          failures++;
          $display("FAIL port %0d addr %0d", i, a[i]);
        end
      end
    end
    // hold while rd_en is low
    held  = rd_data;
    rd_en = 1'b0;
    for (int i = 0; i < P; i++) rd_addr[i] = AW'($urandom_range(DEPTH - 1));
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (rd_data !== held) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
