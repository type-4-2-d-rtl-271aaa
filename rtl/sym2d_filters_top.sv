// sym2d_filters_top: the five 2-D separable-denominator IIR filter structures
// of this family side by side, each with its own sample stream, enable,
// coefficients and output:
//
//   sep   Type-4, no symmetry                       (22 multipliers, N = 3)
//   diag  Type-4, diagonal symmetry a_ij = a_ji      (16 multipliers)
//   adiag Type-4, diagonal symmetry a_ij = a_(N-j)(N-i) (16 multipliers)
//   t3    Type-3, diagonal symmetry a_ij = a_(N-j)(N-i) (16 multipliers)
//   four  Type-4, four-fold rotational symmetry a_ij = a_j(N-i) (10 multipliers)
//
// They are alternatives for the same job (filtering a zero-padded image of
// width M fed in row-scan order, one sample per enable), not stages of one
// pipeline, so nothing is shared between them but the clock and reset.
// Each output follows its input by three samples; see the filter modules for
// the arithmetic and timing.
module sym2d_filters_top
  import sym2d_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  parameter int unsigned M = M_DEF,
  localparam int unsigned NA_SEP  = (N + 1) * (N + 1),
  localparam int unsigned NA_DIAG = num_coef(SYM_DIAG, N),
  localparam int unsigned NA_ADG  = num_coef(SYM_ANTIDIAG, N),
  localparam int unsigned NA_FOUR = num_coef(SYM_FOURFOLD, N)
) (
  input  logic    clk,
  input  logic    rst_n,
  // Type-4 separable denominator (Fig. 1)
  input  logic    sep_en_i,
  input  sample_t sep_x_i,
  input  coef_t   sep_a_i [NA_SEP],
  input  coef_t   sep_b_row_i [1:N],
  input  coef_t   sep_b_col_i [1:N],
  output state_t  sep_y_o,
  output logic    sep_valid_o,
  // Type-4 diagonal, a_ij = a_ji (Fig. 2)
  input  logic    diag_en_i,
  input  sample_t diag_x_i,
  input  coef_t   diag_a_i [NA_DIAG],
  input  coef_t   diag_b_i [1:N],
  output state_t  diag_y_o,
  output logic    diag_valid_o,
  // Type-4 diagonal, a_ij = a_(N-j)(N-i) (Fig. 3)
  input  logic    adiag_en_i,
  input  sample_t adiag_x_i,
  input  coef_t   adiag_a_i [NA_ADG],
  input  coef_t   adiag_b_i [1:N],
  output state_t  adiag_y_o,
  output logic    adiag_valid_o,
  // Type-3 diagonal, a_ij = a_(N-j)(N-i) (Fig. 4)
  input  logic    t3_en_i,
  input  sample_t t3_x_i,
  input  coef_t   t3_a_i [NA_ADG],
  input  coef_t   t3_b_i [1:N],
  output state_t  t3_y_o,
  output logic    t3_valid_o,
  // Type-4 four-fold rotational (Fig. 5)
  input  logic    four_en_i,
  input  sample_t four_x_i,
  input  coef_t   four_a_i [NA_FOUR],
  input  coef_t   four_b_i [1:N],
  output state_t  four_y_o,
  output logic    four_valid_o
);
  t4_sep_filter #(.N(N), .M(M)) u_sep (
    .clk(clk), .rst_n(rst_n), .en(sep_en_i), .x_i(sep_x_i), .a_i(sep_a_i),
    .b_row_i(sep_b_row_i), .b_col_i(sep_b_col_i),
    .y_o(sep_y_o), .y_valid_o(sep_valid_o)
  );

  t4_diag_filter #(.N(N), .M(M)) u_diag (
    .clk(clk), .rst_n(rst_n), .en(diag_en_i), .x_i(diag_x_i), .a_i(diag_a_i),
    .b_i(diag_b_i), .y_o(diag_y_o), .y_valid_o(diag_valid_o)
  );

  t4_antidiag_filter #(.N(N), .M(M)) u_adiag (
    .clk(clk), .rst_n(rst_n), .en(adiag_en_i), .x_i(adiag_x_i), .a_i(adiag_a_i),
    .b_i(adiag_b_i), .y_o(adiag_y_o), .y_valid_o(adiag_valid_o)
  );

  t3_antidiag_filter #(.N(N), .M(M)) u_t3 (
    .clk(clk), .rst_n(rst_n), .en(t3_en_i), .x_i(t3_x_i), .a_i(t3_a_i),
    .b_i(t3_b_i), .y_o(t3_y_o), .y_valid_o(t3_valid_o)
  );

  t4_fourfold_filter #(.N(N), .M(M)) u_four (
    .clk(clk), .rst_n(rst_n), .en(four_en_i), .x_i(four_x_i), .a_i(four_a_i),
    .b_i(four_b_i), .y_o(four_y_o), .y_valid_o(four_valid_o)
  );
endmodule
