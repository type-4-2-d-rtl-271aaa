// t3_block_y3: first section of the Type-3 diagonal-symmetry filter of Fig. 4,
// Eq. (8):
//
//   Y3 = sum_{i,j} a_ij z1^-i z2^-j X + sum_{j=1..N} b_0j z1^-j Y3,
//   with a_ij = a_(N-j)(N-i)
//
// Unlike Type-4 Block 2 the recursion here runs down the columns (z1, one
// row = M samples), so the feedback products b_0j * Y3 are added into the z1
// line-delay chain of the numerator at row j and the numerator and the
// recursion share the same N line delays. The anti-diagonal symmetry lets
// (N+1)(N+2)/2 multipliers (10 for N = 3) serve the (N+1)^2 numerator
// positions; SYM can select another sharing, but Fig. 4 uses SYM_ANTIDIAG.
// The row-direction recursion is done afterwards by sym2d_iir1d with D = 1.
//
// Arithmetic as in t4_block2: exact sums in ACC_W bits, Y3 = floor(sum /
// 2^FRAC) in STATE_W bits. Transposed form and word lengths are this design's
// choices. Timing: the orbit products are registered before the network (a
// pure one-sample delay of the numerator) and y3_o is registered: the rising
// clk edge that takes sample n (x_i with en high) loads y3_o with Y3 of
// sample n-1.
module t3_block_y3
  import sym2d_pkg::*;
#(
  parameter sym_e        SYM = SYM_ANTIDIAG,
  parameter int unsigned N   = N_DEF,
  parameter int unsigned M   = M_DEF,
  localparam int unsigned NA = num_coef(SYM, N)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t x_i,
  input  coef_t   a_i [NA],
  input  coef_t   b_i [1:N],   // b_0j = b_j0
  output state_t  y3_o
);
  acc_t   prod_u [NA];      // registered orbit products
  acc_t   prod   [N+1][N+1];
  acc_t   fb_col [1:N];
  acc_t   fb_row [1:N];
  acc_t   sum;
  state_t y3_c;

  for (genvar k = 0; k < NA; k++) begin : g_mul
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  prod_u[k] <= '0;
      else if (en) prod_u[k] <= acc_t'(a_i[k]) * acc_t'(x_i);
    end
  end

  for (genvar i = 0; i <= N; i++) begin : g_i
    for (genvar j = 0; j <= N; j++) begin : g_j
      localparam int SLOT = coef_slot(SYM, N, i, j);
      assign prod[i][j] = prod_u[SLOT];
    end
  end

  // z1 recursion, fed into the line-delay chain at row j.
  for (genvar j = 1; j <= N; j++) begin : g_fb
    assign fb_row[j] = acc_t'(b_i[j]) * acc_t'(y3_c);
    assign fb_col[j] = '0;
  end

  sym2d_fir_accum #(.N(N), .M(M)) u_net (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (en),
    .prod_i  (prod),
    .fb_col_i(fb_col),
    .fb_row_i(fb_row),
    .sum_o   (sum)
  );

  assign y3_c = state_t'(sum >>> FRAC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y3_o <= '0;
    else if (en) y3_o <= y3_c;
  end
endmodule
