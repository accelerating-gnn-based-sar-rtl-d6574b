// tb_fa_edge_buffer: self-checking test of the FA Edge Buffer. Writes
// random edge rows, reads them back in random order (one-cycle read
// latency) and checks that the output holds while rd_en is low.
module tb_fa_edge_buffer;
  import gnn_pkg::*;
  localparam int P = 4, ROWS = 32, AW = $clog2(ROWS);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_addr, rd_addr;
  edge_t [P-1:0] wr_data, rd_data;
  edge_t [P-1:0] ref_mem [ROWS];

  fa_edge_buffer #(.P(P), .ROWS(ROWS)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    edge_t [P-1:0] held;
    logic [AW-1:0] a;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wr_en   = 1'b1;
      wr_addr = AW'(r);
      for (int i = 0; i < P; i++)
        wr_data[i] = '{src: VID_W'($urandom), dst: VID_W'($urandom), weight: data_t'($urandom)};
      ref_mem[r] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int n = 0; n < 100; n++) begin
      a       = AW'($urandom_range(ROWS - 1));
      rd_addr = a;
      rd_en   = 1'b1;
      @(negedge clk);
      checks++;
      if (rd_data !== ref_mem[a]) begin failures++; $display("FAIL row %0d", a); end
    end
    held    = rd_data;
    rd_en   = 1'b0;
    rd_addr = rd_addr + 1'b1;
    @(negedge clk);
    checks++;
    if (rd_data !== held) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
