// tb_sym2d_symmetry: checks the property the symmetric structures exist for,
// on the magnitude response measured from the RTL itself. Each filter gets a
// single impulse (x = 16384 at sample 0 of a padded 64 x 64 image) and its
// output is read back as a 2-D impulse response h[n1][n2] (n1 = row, n2 =
// column). The magnitude response |H(t1,t2)|, t = 2*pi*k/8, is then computed
// by a direct 2-D DFT and compared:
//   diagonal filters (a_ij = a_ji, a_ij = a_(N-j)(N-i), Type-4 and Type-3):
//       |H(t1,t2)| = |H(t2,t1)|
//   four-fold rotational filter (a_ij = a_j(N-i)):
//       |H(t1,t2)| = |H(-t2,t1)|  (and hence the other two rotations)
// within 1% of the largest magnitude. The denominators are kept well inside
// the unit circle (sum |b_k| <= 1/2) so that the response has died out
// before it wraps from one row into the next. As a control, the general
// Type-4 filter with an unconstrained random numerator must violate the
// diagonal check by more than 5%.
module tb_sym2d_symmetry;
  import sym2d_pkg::*;
  import sym2d_ref_pkg::*;
  localparam int unsigned N = N_DEF, M = 64, R = 64, K = 8;
  localparam int NA_S = (N + 1) * (N + 1);
  localparam int NA_D = num_coef(SYM_DIAG, N);
  localparam int NA_A = num_coef(SYM_ANTIDIAG, N);
  localparam int NA_F = num_coef(SYM_FOURFOLD, N);
  localparam real PI = 3.14159265358979;

  logic    clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  sample_t x = '0;
  coef_t   a_s [NA_S];
  coef_t   a_d [NA_D];
  coef_t   a_a [NA_A];
  coef_t   a_3 [NA_A];
  coef_t   a_f [NA_F];
  coef_t   bs_r [1:N];
  coef_t   bs_c [1:N];
  coef_t   b_d [1:N];
  coef_t   b_a [1:N];
  coef_t   b_3 [1:N];
  coef_t   b_f [1:N];
  state_t  y [5];
  logic    v [5];
  int checks = 0, failures = 0;
  real h [5][R][M];
  real mag [5][K][K];

  always #5 clk = ~clk;

  t4_sep_filter      #(.M(M)) u_s (.clk, .rst_n, .en, .x_i(x), .a_i(a_s), .b_row_i(bs_r),
                                   .b_col_i(bs_c), .y_o(y[0]), .y_valid_o(v[0]));
  t4_diag_filter     #(.M(M)) u_d (.clk, .rst_n, .en, .x_i(x), .a_i(a_d), .b_i(b_d),
                                   .y_o(y[1]), .y_valid_o(v[1]));
  t4_antidiag_filter #(.M(M)) u_a (.clk, .rst_n, .en, .x_i(x), .a_i(a_a), .b_i(b_a),
                                   .y_o(y[2]), .y_valid_o(v[2]));
  t3_antidiag_filter #(.M(M)) u_3 (.clk, .rst_n, .en, .x_i(x), .a_i(a_3), .b_i(b_3),
                                   .y_o(y[3]), .y_valid_o(v[3]));
  t4_fourfold_filter #(.M(M)) u_f (.clk, .rst_n, .en, .x_i(x), .a_i(a_f), .b_i(b_f),
                                   .y_o(y[4]), .y_valid_o(v[4]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic void small_den(output longint b[]);
    b = new[N + 1];
    b[0] = 0;
    for (int l = 1; l <= N; l++) b[l] = rcoef(8192 / N);
  endfunction

  initial begin
    repeat (R * M + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint u[], bb[];
    real peak, worst, ctrl;
    foreach (a_s[k]) a_s[k] = coef_t'(rcoef(6000));
    foreach (a_d[k]) a_d[k] = coef_t'(rcoef(6000));
    foreach (a_a[k]) a_a[k] = coef_t'(rcoef(6000));
    foreach (a_3[k]) a_3[k] = coef_t'(rcoef(6000));
    foreach (a_f[k]) a_f[k] = coef_t'(rcoef(6000));
    small_den(bb); for (int l = 1; l <= N; l++) bs_r[l] = coef_t'(bb[l]);
    small_den(bb); for (int l = 1; l <= N; l++) bs_c[l] = coef_t'(bb[l]);
    small_den(bb); for (int l = 1; l <= N; l++) b_d[l] = coef_t'(bb[l]);
    small_den(bb); for (int l = 1; l <= N; l++) b_a[l] = coef_t'(bb[l]);
    small_den(bb); for (int l = 1; l <= N; l++) b_3[l] = coef_t'(bb[l]);
    small_den(bb); for (int l = 1; l <= N; l++) b_f[l] = coef_t'(bb[l]);

    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // impulse, then zeros; outputs lag the input by two samples
    for (int k = 0; k < R * M + 2; k++) begin
      @(negedge clk);
      en = 1'b1;
      x  = (k == 0) ? sample_t'(16384) : '0;
      @(posedge clk);
      #1;
      if (k >= 2)
        for (int s = 0; s < 5; s++) h[s][(k - 2) / M][(k - 2) % M] = real'(y[s]);
    end
    @(negedge clk) en = 1'b0;

    // magnitude response on a K x K grid
    for (int s = 0; s < 5; s++)
      for (int k1 = 0; k1 < K; k1++)
        for (int k2 = 0; k2 < K; k2++) begin
          real re, im, ph;
          re = 0.0; im = 0.0;
          for (int n1 = 0; n1 < R; n1++)
            for (int n2 = 0; n2 < M; n2++) begin
              ph = 2.0 * PI * real'((k1 * n1 + k2 * n2) % K) / real'(K);
              re += h[s][n1][n2] * $cos(ph);
              im -= h[s][n1][n2] * $sin(ph);
            end
          mag[s][k1][k2] = $sqrt(re * re + im * im);
        end

    for (int s = 0; s < 5; s++) begin
      peak = 0.0; worst = 0.0;
      for (int k1 = 0; k1 < K; k1++)
        for (int k2 = 0; k2 < K; k2++) begin
          real d;
          if (mag[s][k1][k2] > peak) peak = mag[s][k1][k2];
          if (s == 4) d = mag[s][k1][k2] - mag[s][(K - k2) % K][k1];
          else        d = mag[s][k1][k2] - mag[s][k2][k1];
          if (d < 0.0) d = -d;
          if (d > worst) worst = d;
        end
      ctrl = worst / peak;
      $display("filter %0d: peak |H| = %0.1f, largest symmetry mismatch = %0.4f of peak", s, peak, ctrl);
      check(peak > 1000.0, $sformatf("filter %0d response too small", s));
      if (s == 0) check(ctrl > 0.05, "control filter shows no asymmetry");
      else        check(ctrl < 0.01, $sformatf("filter %0d symmetry mismatch %0.4f", s, ctrl));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
