// tb_sym2d_filters_top: end-to-end test of all five filters through
// sym2d_top_harness with a short padded row (M = 12), 12 rows and enable
// gaps.
module tb_sym2d_filters_top;
  sym2d_top_harness #(.MT(12), .ROWS(12), .STALLS(1'b1)) u_h ();
endmodule
