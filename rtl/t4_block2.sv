// t4_block2: Block 2 of the Type-4 separable-denominator filter, Eq. (5):
//
//   Y4 = sum_{i,j=0..N} a_ij z1^-i z2^-j X + sum_{j=1..N} b_0j z2^-j Y4
//
// The numerator is the 2-D part and the recursion runs only along the row
// (z2 = one sample), so the z1 direction is handled later by Block 1.
// SYM selects which Figure's coefficient sharing is built: SYM_NONE is the
// general Block 2 of Fig. 1 ((N+1)^2 multipliers), SYM_DIAG the a_ij = a_ji
// Block 2 of Fig. 2 / Eq. (6b), SYM_ANTIDIAG the a_ij = a_(N-j)(N-i) Block 2
// of Fig. 3 / Eq. (7) and SYM_FOURFOLD the a_ij = a_j(N-i) Block 2 of Fig. 5 /
// Eq. (9b). For N = 3 these use 16, 10, 10 and 4 numerator multipliers, plus
// N for b_0j.
//
// How it works: each unique coefficient multiplies the current sample once;
// the product is routed to every (i,j) of its orbit in the transposed delay
// network (sym2d_fir_accum), which delays it by i rows and j samples. The
// z2 feedback b_0j * Y4 is added into the row-0 unit-delay chain at column j,
// so the recursion shares the numerator's z2 registers. Y4 is the exact
// network sum shifted right (floor) by FRAC, kept in STATE_W bits. The
// transposed arrangement and the word lengths are this design's choices.
//
// Interface: a_i[k] is the coefficient of orbit k (see sym2d_pkg), b_i[j] is
// b_0j. Timing: the orbit products are registered before the network (a
// pure one-sample delay of the numerator, which keeps the second multiplier
// out of the recursion loop), and y4_o is registered: the rising clk edge
// that takes sample n (x_i with en high) loads y4_o with Y4 of sample n-1.
module t4_block2
  import sym2d_pkg::*;
#(
  parameter sym_e        SYM = SYM_NONE,
  parameter int unsigned N   = N_DEF,
  parameter int unsigned M   = M_DEF,
  localparam int unsigned NA = num_coef(SYM, N)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t x_i,
  input  coef_t   a_i [NA],
  input  coef_t   b_i [1:N],
  output state_t  y4_o
);
  acc_t   prod_u [NA];      // registered orbit products
  acc_t   prod   [N+1][N+1];
  acc_t   fb_col [1:N];
  acc_t   fb_row [1:N];
  acc_t   sum;
  state_t y4_c;

  // One multiplier per orbit.
  for (genvar k = 0; k < NA; k++) begin : g_mul
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  prod_u[k] <= '0;
      else if (en) prod_u[k] <= acc_t'(a_i[k]) * acc_t'(x_i);
    end
  end

  // Route each orbit product to all of its positions.
  for (genvar i = 0; i <= N; i++) begin : g_i
    for (genvar j = 0; j <= N; j++) begin : g_j
      localparam int SLOT = coef_slot(SYM, N, i, j);
      assign prod[i][j] = prod_u[SLOT];
    end
  end

  // z2 recursion (b_0j), fed back into the row-0 chain.
  for (genvar j = 1; j <= N; j++) begin : g_fb
    assign fb_col[j] = acc_t'(b_i[j]) * acc_t'(y4_c);
    assign fb_row[j] = '0;
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

  assign y4_c = state_t'(sum >>> FRAC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y4_o <= '0;
    else if (en) y4_o <= y4_c;
  end
endmodule
