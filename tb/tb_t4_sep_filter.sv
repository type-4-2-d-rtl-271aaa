// tb_t4_sep_filter: checks t4_sep_filter against the bit-exact stream
// reference (random coefficients, random samples, enable gaps, latency and
// valid) through sym2d_filter_harness, with a short row length M = 7.
module tb_t4_sep_filter;
  sym2d_filter_harness #(.KIND(0), .MT(7), .NS(600)) u_h ();
endmodule
