// tb_dffc_full: the same end-to-end test as tb_dffc on the array at its
// default size, 8 x 8 x 8 FPOAs (1024 CDPs), configured through the full
// daisy-chained scanpath.
module tb_dffc_full;
  dffc_e2e #(.NX(8), .NY(8), .NB(8), .FULL(1), .WORDS(100)) u_test ();
endmodule
