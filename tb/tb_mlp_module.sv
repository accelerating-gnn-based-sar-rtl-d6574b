// tb_mlp_module: self-checking test of the MLP module. Loads a random
// input vector (5 chunks of S2) and a 6 x 20 weight matrix, runs the layer
// with and without ReLU, and compares every output and the argmax label
// with a reference. With 6 outputs and S1 = 4 trees the second neuron
// group is partial. Checks the latency: groups * n_chunks issue cycles plus
// the adder-tree depth plus one.
module tb_mlp_module;
  import gnn_pkg::*;
  localparam int S1 = 4, S2 = 4, IN_MAX = 32, OUT_MAX = 8, NCH = 5, NOUT = 6;
  localparam int CW = $clog2(IN_MAX / S2), OW = $clog2(OUT_MAX);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 1'b0, in_wr_en = 1'b0, w_wr_en = 1'b0, start = 1'b0, relu = 1'b0, busy, done;
  logic [CW-1:0] in_wr_chunk, w_wr_chunk;
  logic [OW-1:0] w_wr_row, label, out_rd_addr = '0;
  data_t [S2-1:0] in_wr_data, w_wr_data;
  logic [CW:0] n_chunks = (CW+1)'(NCH);
  logic [OW:0] n_out = (OW+1)'(NOUT);
  data_t out_rd_data;

  mlp_module #(.S1(S1), .S2(S2), .IN_MAX(IN_MAX), .OUT_MAX(OUT_MAX)) dut (.*);

  data_t x [NCH * S2];
  data_t Wm [NOUT][NCH * S2];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit r);
    int cyc, best_i;
    acc_t y [NOUT];
    @(negedge clk);
    relu = r; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2 * NCH + $clog2(S2) + 1) begin failures++; $display("FAIL cycles %0d", cyc); end
    best_i = 0;
    for (int o = 0; o < NOUT; o++) begin
      y[o] = 0;
      for (int e = 0; e < NCH * S2; e++) y[o] += fx_mul(Wm[o][e], x[e]);
      if (y[o] > y[best_i]) best_i = o;
    end
    checks++;
    if (label !== OW'(best_i)) begin failures++; $display("FAIL label %0d exp %0d", label, best_i); end
    for (int o = 0; o < NOUT; o++) begin
      out_rd_addr = OW'(o);
      @(negedge clk);
      checks++;
      if (out_rd_data !== activate(r ? ACT_RELU : ACT_NONE, y[o])) begin
        failures++; $display("FAIL y[%0d] = %0d exp %0d", o, out_rd_data, activate(r ? ACT_RELU : ACT_NONE, y[o]));
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int e = 0; e < NCH * S2; e++) x[e] = data_t'($urandom_range(1024)) - data_t'(512);
      for (int o = 0; o < NOUT; o++) for (int e = 0; e < NCH * S2; e++)
        Wm[o][e] = data_t'($urandom_range(512)) - data_t'(256);
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk);
        in_wr_en = 1'b1; in_wr_chunk = CW'(c);
        for (int e = 0; e < S2; e++) in_wr_data[e] = x[c * S2 + e];
      end
      @(negedge clk);
      in_wr_en = 1'b0;
      for (int o = 0; o < NOUT; o++)
        for (int c = 0; c < NCH; c++) begin
          @(negedge clk);
          w_wr_en = 1'b1; w_wr_row = OW'(o); w_wr_chunk = CW'(c);
          for (int e = 0; e < S2; e++) w_wr_data[e] = Wm[o][c * S2 + e];
        end
      @(negedge clk);
      w_wr_en = 1'b0;
      run(rep[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
