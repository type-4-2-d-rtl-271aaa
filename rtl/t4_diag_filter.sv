// t4_diag_filter: Type-4 2-D IIR filter with diagonal symmetry of the magnitude response, |H(z1,z2)| = |H(z2,z1)|, obtained from the numerator constraint a_ij = a_ji together with b_k0 = b_0k (Fig. 2, Eq. 6a/6b).
//
// The filter is the Type-4 cascade of two sections (Eq. 3): Block 2
// (t4_block2) forms Y4 from the 2-D numerator and the row-direction (z2)
// recursion, Block 1 (sym2d_iir1d with D = M) forms the output Y from Y4 by
// the column-direction (z1) recursion Y = Y4 + sum_k b_k z1^-k Y. The image is
// fed in row-scan order, one sample per enable, M samples per padded row, so
// z2^-1 is one sample and z1^-1 is M samples. Diagonal symmetry lets (N+1)(N+2)/2 numerator multipliers (10 for N = 3) serve all (N+1)^2 positions: 16 multipliers in all with the 2N denominator ones.
//
// Interface: x_i is the input sample; a_i[k] is the numerator coefficient of
// orbit k in the order given in sym2d_pkg; b_i[k] = b_k0 = b_0k, the separable
// denominator being the same in both directions (Eq. 6a/6b), and it feeds the N
// multipliers of each block. Word lengths are set in sym2d_pkg.
// Timing: three samples of latency (numerator product register, Y4
// register, Y register). The rising clk edge that takes sample n (x_i with
// en high) loads y_o with Y of sample n-2; y_valid_o rises with the third
// enable after reset, when y_o first holds Y of sample 0. With en low
// nothing moves.
module t4_diag_filter
  import sym2d_pkg::*;
#(
  parameter int unsigned N   = N_DEF,
  parameter int unsigned M   = M_DEF,
  localparam int unsigned NA = num_coef(SYM_DIAG, N)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t x_i,
  input  coef_t   a_i [NA],
  input  coef_t   b_i [1:N],
  output state_t  y_o,
  output logic    y_valid_o
);
  state_t y4;
  logic [2:0] fill;

  t4_block2 #(.SYM(SYM_DIAG), .N(N), .M(M)) u_block2 (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .x_i  (x_i),
    .a_i  (a_i),
    .b_i  (b_i),
    .y4_o (y4)
  );

  sym2d_iir1d #(.N(N), .D(M)) u_block1 (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .yin_i(y4),
    .b_i  (b_i),
    .y_o  (y_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  fill <= '0;
    else if (en) fill <= {fill[1:0], 1'b1};
  end
  assign y_valid_o = fill[2];
endmodule
