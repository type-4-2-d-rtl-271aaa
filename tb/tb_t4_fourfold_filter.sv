// tb_t4_fourfold_filter: checks t4_fourfold_filter against the bit-exact stream
// reference (random coefficients, random samples, enable gaps, latency and
// valid) through sym2d_filter_harness, with a short row length M = 7.
module tb_t4_fourfold_filter;
  sym2d_filter_harness #(.KIND(4), .MT(7), .NS(600)) u_h ();
endmodule
