// tb_sym2d_filters_full: one complete image through the top at its default
// parameters (N = 3, padded width M = 256): 256 rows of 253 random pixels and
// 3 zero padding samples, fed one sample per clock, every output of all five
// filters checked against the bit-exact reference.
module tb_sym2d_filters_full;
  sym2d_top_harness #(.MT(0), .ROWS(256), .STALLS(1'b0)) u_h ();
endmodule
