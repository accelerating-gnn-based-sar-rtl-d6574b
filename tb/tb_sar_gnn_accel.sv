// tb_sar_gnn_accel: end-to-end test of the accelerator at reduced sizes
// (q = m = s2 = 4, 4 x 4 images, 3 classes), three images on two PEs.
// See sar_e2e_test for what is run and checked.
module tb_sar_gnn_accel;
  sar_e2e_test #(.FULL(1'b0), .NIMG(3), .IMG_W(4), .NCLS(3)) u_test ();
endmodule
