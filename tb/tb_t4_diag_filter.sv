// tb_t4_diag_filter: checks t4_diag_filter against the bit-exact stream
// reference (random coefficients, random samples, enable gaps, latency and
// valid) through sym2d_filter_harness, with a short row length M = 7.
module tb_t4_diag_filter;
  sym2d_filter_harness #(.KIND(1), .MT(7), .NS(600)) u_h ();
endmodule
