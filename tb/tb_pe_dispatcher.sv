// tb_pe_dispatcher: self-checking test of the image dispatcher with three
// PEs modelled in the testbench. Each model PE takes a random time per
// image and then offers a label derived from the image id. Checks that
// images go only to idle PEs (lowest first), that every image's label comes
// back exactly once with the right value, that out-of-order completion
// happens, and that images wait while all PEs are busy. Image ids are
// spread over the whole id width (n*37+5 modulo 2^ID_W, distinct because
// 37 is odd), so every id bit is exercised.
module tb_pe_dispatcher;
  localparam int NPE = 3, ID_W = 8, LBL_W = 4, NIMG = 40;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 1'b0, img_valid = 1'b0, img_ready, out_valid, out_ready = 1'b1;
  logic [ID_W-1:0] img_id = '0, assign_id, out_id;
  logic [NPE-1:0] pe_idle, assign_valid, res_valid, res_ready;
  logic [NPE-1:0][ID_W-1:0] res_id;
  logic [NPE-1:0][LBL_W-1:0] res_label;
  logic [LBL_W-1:0] out_label;

  pe_dispatcher #(.NPE(NPE), .ID_W(ID_W), .LBL_W(LBL_W)) dut (.*);

  // model PEs
  int busy_cnt [NPE];
  bit busy [NPE];
  int seen [NIMG];
  int idx_of [int];                 // image id -> image number
  int n_out = 0, out_of_order = 0, waits = 0, last_id = -1;

  always_comb for (int i = 0; i < NPE; i++) pe_idle[i] = !busy[i];

  always @(posedge clk) begin
    for (int i = 0; i < NPE; i++) begin
      if (assign_valid[i]) begin
        checks++;
        if (busy[i]) begin failures++; $display("FAIL assign to busy PE %0d", i); end
        for (int j = 0; j < i; j++)
          if (!busy[j]) begin failures++; $display("FAIL skipped idle PE %0d", j); end
        busy[i] <= 1;
        busy_cnt[i] <= $urandom_range(30, 3);
        res_id[i] <= assign_id;
        res_valid[i] <= 0;
      end else if (busy[i]) begin
        if (busy_cnt[i] > 0) busy_cnt[i] <= busy_cnt[i] - 1;
        else if (!res_valid[i]) begin
          res_valid[i] <= 1;
          res_label[i] <= LBL_W'(res_id[i] * 7);
        end else if (res_ready[i]) begin
          res_valid[i] <= 0;
          busy[i] <= 0;
        end
      end
    end
    if (img_valid && !img_ready) waits++;
    if (out_valid && out_ready) begin
      checks++;
      n_out++;
      if (!idx_of.exists(int'(out_id))) begin
        failures++; $display("FAIL unknown id %0d", out_id);
      end else begin
        if (idx_of[int'(out_id)] < last_id) out_of_order++;
        last_id = idx_of[int'(out_id)];
        seen[idx_of[int'(out_id)]]++;
      end
      if (out_label !== LBL_W'(out_id * 7)) begin failures++; $display("FAIL label of %0d", out_id); end
    end
    out_ready <= ($urandom_range(3) != 0);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NPE; i++) begin busy[i] = 0; res_valid[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NIMG; n++) begin
      img_valid = 1'b1;
      img_id = ID_W'(n * 37 + 5);
      idx_of[int'(img_id)] = n;
      @(posedge clk);
      while (!img_ready) @(posedge clk);
      @(negedge clk);
    end
    img_valid = 1'b0;
    while (n_out < NIMG) @(negedge clk);
    for (int n = 0; n < NIMG; n++) begin
      checks++;
      if (seen[n] != 1) begin failures++; $display("FAIL image %0d seen %0d times", n, seen[n]); end
    end
    checks += 2;
    if (out_of_order == 0) begin failures++; $display("FAIL no out-of-order completion"); end
    if (waits == 0) begin failures++; $display("FAIL never waited for a PE"); end
    $display("out_of_order=%0d waits=%0d", out_of_order, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
