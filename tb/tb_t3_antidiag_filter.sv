// tb_t3_antidiag_filter: checks t3_antidiag_filter against the bit-exact
// stream reference (random coefficients, random samples, enable gaps,
// latency and valid) through sym2d_filter_harness, with a short row M = 7.
module tb_t3_antidiag_filter;
  sym2d_filter_harness #(.KIND(3), .MT(7), .NS(600)) u_h ();
endmodule
