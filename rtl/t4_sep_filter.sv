// t4_sep_filter: Type-4 2-D separable-denominator IIR filter (Fig. 1, Eq. 2-5),
//
//   H(z1,z2) = sum_{i,j} a_ij z1^-i z2^-j
//              / ((1 - sum_i b_i0 z1^-i) (1 - sum_j b_0j z2^-j)),
//
// the general (no symmetry) member of the family and the base of the others.
// Block 2 (t4_block2, SYM_NONE) forms Y4 from the (N+1)^2 numerator products
// and the row-direction recursion with b_0j; Block 1 (sym2d_iir1d, D = M)
// forms Y = Y4 + sum_i b_i0 z1^-i Y. The image is fed in row-scan order, one
// sample per enable, M samples per zero-padded row, so z2^-1 is one sample
// and z1^-1 is M samples. Multipliers: (N+1)^2 + 2N = 22 for N = 3.
//
// Interface: a_i[i*(N+1)+j] = a_ij; b_row_i[i] = b_i0 (Block 1);
// b_col_i[j] = b_0j (Block 2). Word lengths are set in sym2d_pkg.
// Timing: three samples of latency (numerator product register, Y4
// register, Y register). The rising clk edge that takes sample n (x_i with
// en high) loads y_o with Y of sample n-2; y_valid_o rises with the third
// enable after reset, when y_o first holds Y of sample 0. With en low
// nothing moves.
module t4_sep_filter
  import sym2d_pkg::*;
#(
  parameter int unsigned N   = N_DEF,
  parameter int unsigned M   = M_DEF,
  localparam int unsigned NA = (N + 1) * (N + 1)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t x_i,
  input  coef_t   a_i [NA],
  input  coef_t   b_row_i [1:N],
  input  coef_t   b_col_i [1:N],
  output state_t  y_o,
  output logic    y_valid_o
);
  state_t y4;
  logic [2:0] fill;

  t4_block2 #(.SYM(SYM_NONE), .N(N), .M(M)) u_block2 (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .x_i  (x_i),
    .a_i  (a_i),
    .b_i  (b_col_i),
    .y4_o (y4)
  );

  sym2d_iir1d #(.N(N), .D(M)) u_block1 (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .yin_i(y4),
    .b_i  (b_row_i),
    .y_o  (y_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  fill <= '0;
    else if (en) fill <= {fill[1:0], 1'b1};
  end
  assign y_valid_o = fill[2];
endmodule
