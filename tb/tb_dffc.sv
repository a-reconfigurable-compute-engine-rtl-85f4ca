// tb_dffc: end-to-end test of the DFFC array at a reduced size
// (2 x 2 FPOAs per board, 2 boards: a 2 x 2 x 4 mesh of CDPs). The test
// itself is in dffc_e2e.
module tb_dffc;
  dffc_e2e #(.NX(2), .NY(2), .NB(2), .FULL(0), .WORDS(300)) u_test ();
endmodule
