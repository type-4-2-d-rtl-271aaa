// t3_antidiag_filter: Type-3 2-D IIR filter with diagonal symmetry of the
// magnitude response from the numerator constraint a_ij = a_(N-j)(N-i) and
// b_k0 = b_0k (Fig. 4, Eq. 8).
//
// The Type-3 cascade takes the two recursions in the opposite order to
// Type-4: the first section (t3_block_y3) forms Y3 from the numerator and the
// column-direction (z1) recursion, whose feedback shares the numerator's N
// line delays, and the second section (sym2d_iir1d with D = 1) forms the
// output Y = Y3 + sum_j b_0j z2^-j Y along the row. Because the z1 recursion
// needs no line delays of its own, this filter stores about half as many
// words as the Type-4 ones (N line delays instead of 2N). Multipliers: 10
// numerator + 2N denominator = 16 for N = 3. The second section's equation is
// this design's reading of how the Type-3 output is completed.
//
// Interface: x_i input sample in row-scan order (M samples per padded row),
// a_i[k] coefficient of anti-diagonal orbit k (see sym2d_pkg), b_i[k] = b_k0
// = b_0k. Timing: three samples of latency (numerator product register, Y3
// register, Y register). The rising clk edge that takes sample n loads y_o
// with Y of sample n-2; y_valid_o rises with the third enable after reset. With en low nothing moves.
module t3_antidiag_filter
  import sym2d_pkg::*;
#(
  parameter int unsigned N   = N_DEF,
  parameter int unsigned M   = M_DEF,
  localparam int unsigned NA = num_coef(SYM_ANTIDIAG, N)
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
  state_t y3;
  logic [2:0] fill;

  t3_block_y3 #(.SYM(SYM_ANTIDIAG), .N(N), .M(M)) u_y3 (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .x_i  (x_i),
    .a_i  (a_i),
    .b_i  (b_i),
    .y3_o (y3)
  );

  sym2d_iir1d #(.N(N), .D(1)) u_z2 (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .yin_i(y3),
    .b_i  (b_i),
    .y_o  (y_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  fill <= '0;
    else if (en) fill <= {fill[1:0], 1'b1};
  end
  assign y_valid_o = fill[2];
endmodule
