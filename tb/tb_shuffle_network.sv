// tb_shuffle_network: self-checking test of the shuffle network. Random
// lane sets are applied; the expected routing (each lane to pipeline
// dst % P, lowest lane first on a conflict) is computed independently and
// compared, including the grant vector. Counts conflict cases seen.
module tb_shuffle_network;
  import gnn_pkg::*;
  localparam int P = 4, Q = 2;

  int checks = 0, failures = 0, conflicts = 0;

  logic [P-1:0]            in_valid, out_valid, grant;
  logic [P-1:0][VID_W-1:0] in_dst, out_dst;
  data_t [P-1:0]           in_weight, out_weight;
  data_t [P-1:0][Q-1:0]    in_vec, out_vec;

  shuffle_network #(.P(P), .Q(Q)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [P-1:0] exp_grant;
      logic [P-1:0] taken;
      in_valid = P'($urandom);
      for (int i = 0; i < P; i++) begin
        in_dst[i]    = VID_W'($urandom);
        in_weight[i] = data_t'($urandom);
        for (int k = 0; k < Q; k++) in_vec[i][k] = data_t'($urandom);
      end
      #1;
      // reference: walk lanes in order, first lane per target wins
      taken = '0;
      exp_grant = '0;
      for (int i = 0; i < P; i++) begin
        int tgt;
        tgt = int'(in_dst[i]) % P;
        if (in_valid[i]) begin
          if (!taken[tgt]) begin
            taken[tgt]   = 1'b1;
            exp_grant[i] = 1'b1;
            checks++;
            if (!out_valid[tgt] || out_dst[tgt] !== in_dst[i] ||
                out_weight[tgt] !== in_weight[i] || out_vec[tgt] !== in_vec[i]) begin
              failures++;
              $display("FAIL lane %0d -> pipe %0d", i, tgt);
            end
          end else conflicts++;
        end
      end
      checks++;
      if (grant !== exp_grant || out_valid !== taken) begin
        failures++;
        $display("FAIL grant %b exp %b valid %b exp %b", grant, exp_grant, out_valid, taken);
      end
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no conflict exercised"); end
    $display("conflicts=%0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
