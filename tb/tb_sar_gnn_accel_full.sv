// tb_sar_gnn_accel_full: end-to-end test of the accelerator with every
// parameter at its default (p = 4, q = 16, m = 16, s1 = 4, s2 = 16, two
// PEs): three 16 x 16 images, 16 features per vertex, ten classes, the
// final 8 x 8 x 16 feature map filling the MLP's 1024-element input.
// See sar_e2e_test for what is run and checked.
module tb_sar_gnn_accel_full;
  sar_e2e_test #(
    .FULL(1'b1), .NIMG(3), .IMG_W(16), .NCLS(10), .NPE(2), .P(4), .Q(16), .DEPTH(16384),
    .EDGE_ROWS(36864), .M(16), .K_MAX(128), .N_MAX(64), .S1(4), .S2(16), .IN_MAX(1024),
    .OUT_MAX(16), .WATCHDOG(400000)
  ) u_test ();
endmodule
