// sym2d_top_harness: end-to-end check of sym2d_filters_top. One zero-padded
// image (ROWS rows of M samples, the last N samples of every row zero) is fed
// in row-scan order to all five filters at once, with enable gaps when
// STALLS is set. Each filter gets its own random coefficients, except that
// the separable Type-4 filter is loaded with the full matrix expanded from
// the four-fold filter's four coefficients and the same denominator, so the
// two must agree sample for sample (the shared-multiplier structure computes
// the same filter as the general one). Every output is compared with the
// bit-exact reference of sym2d_ref_pkg (three samples of latency), and the
// mechanisms of the design are counted; each must occur at least once:
// enable stalls, zero-padding samples, the row-direction (z2) recursion
// changing a Y4 / Y value, the column-direction (z1) recursion changing a
// Y / Y3 value, and the line delays wrapping (samples beyond N rows).
// MT = 0 instantiates the top with its default parameters.
module sym2d_top_harness
  import sym2d_pkg::*;
  import sym2d_ref_pkg::*;
#(
  parameter int unsigned MT     = 0,
  parameter int unsigned ROWS   = 16,
  parameter bit          STALLS = 1'b1
) ();
  localparam int unsigned N  = N_DEF;
  localparam int unsigned M  = (MT == 0) ? M_DEF : MT;
  localparam int unsigned NS = M * ROWS;
  localparam int NA_SEP  = (N + 1) * (N + 1);
  localparam int NA_DIAG = num_coef(SYM_DIAG, N);
  localparam int NA_ADG  = num_coef(SYM_ANTIDIAG, N);
  localparam int NA_FOUR = num_coef(SYM_FOURFOLD, N);

  logic    clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  sample_t x = '0;
  coef_t   a_sep [NA_SEP];
  coef_t   a_diag [NA_DIAG];
  coef_t   a_adg [NA_ADG];
  coef_t   a_t3 [NA_ADG];
  coef_t   a_four [NA_FOUR];
  coef_t   b_diag [1:N];
  coef_t   b_adg [1:N];
  coef_t   b_t3 [1:N];
  coef_t   b_four [1:N];
  state_t  y [5];
  logic    v [5];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  if (MT == 0) begin : g_def
    sym2d_filters_top dut (
      .clk, .rst_n,
      .sep_en_i(en), .sep_x_i(x), .sep_a_i(a_sep), .sep_b_row_i(b_four), .sep_b_col_i(b_four),
      .sep_y_o(y[0]), .sep_valid_o(v[0]),
      .diag_en_i(en), .diag_x_i(x), .diag_a_i(a_diag), .diag_b_i(b_diag),
      .diag_y_o(y[1]), .diag_valid_o(v[1]),
      .adiag_en_i(en), .adiag_x_i(x), .adiag_a_i(a_adg), .adiag_b_i(b_adg),
      .adiag_y_o(y[2]), .adiag_valid_o(v[2]),
      .t3_en_i(en), .t3_x_i(x), .t3_a_i(a_t3), .t3_b_i(b_t3),
      .t3_y_o(y[3]), .t3_valid_o(v[3]),
      .four_en_i(en), .four_x_i(x), .four_a_i(a_four), .four_b_i(b_four),
      .four_y_o(y[4]), .four_valid_o(v[4])
    );
  end else begin : g_small
    sym2d_filters_top #(.M(MT)) dut (
      .clk, .rst_n,
      .sep_en_i(en), .sep_x_i(x), .sep_a_i(a_sep), .sep_b_row_i(b_four), .sep_b_col_i(b_four),
      .sep_y_o(y[0]), .sep_valid_o(v[0]),
      .diag_en_i(en), .diag_x_i(x), .diag_a_i(a_diag), .diag_b_i(b_diag),
      .diag_y_o(y[1]), .diag_valid_o(v[1]),
      .adiag_en_i(en), .adiag_x_i(x), .adiag_a_i(a_adg), .adiag_b_i(b_adg),
      .adiag_y_o(y[2]), .adiag_valid_o(v[2]),
      .t3_en_i(en), .t3_x_i(x), .t3_a_i(a_t3), .t3_b_i(b_t3),
      .t3_y_o(y[3]), .t3_valid_o(v[3]),
      .four_en_i(en), .four_x_i(x), .four_a_i(a_four), .four_b_i(b_four),
      .four_y_o(y[4]), .four_valid_o(v[4])
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2 * NS + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint u[5][], a[5][], b[5][], xs[], f[], s1[], yr[5][], s1r[5][], ys[5][];
    bit     vs[5][];
    int used;
    int n_stall, n_pad, n_z2, n_z1, n_wrap, n_equal;
    n_stall = 0; n_pad = 0; n_z2 = 0; n_z1 = 0; n_wrap = 0; n_equal = 0;

    // coefficients: filter 0 (general) reuses filter 4 (four-fold)
    for (int s = 1; s < 5; s++) begin
      int na;
      na = (s == 1) ? NA_DIAG : (s == 4) ? NA_FOUR : NA_ADG;
      u[s] = new[na];
      foreach (u[s][k]) u[s][k] = rcoef(5000);
      expand((s == 1) ? 1 : (s == 4) ? 3 : 2, N, u[s], a[s], used);
      check(used == na, "orbit count");
      rden(N, b[s]);
    end
    a[0] = a[4];
    b[0] = b[4];
    foreach (a_sep[k])  a_sep[k]  = coef_t'(a[0][k]);
    foreach (a_diag[k]) a_diag[k] = coef_t'(u[1][k]);
    foreach (a_adg[k])  a_adg[k]  = coef_t'(u[2][k]);
    foreach (a_t3[k])   a_t3[k]   = coef_t'(u[3][k]);
    foreach (a_four[k]) a_four[k] = coef_t'(u[4][k]);
    for (int l = 1; l <= N; l++) begin
      b_diag[l] = coef_t'(b[1][l]);
      b_adg[l]  = coef_t'(b[2][l]);
      b_t3[l]   = coef_t'(b[3][l]);
      b_four[l] = coef_t'(b[4][l]);
    end

    xs = new[NS];
    for (int s = 0; s < 5; s++) begin ys[s] = new[NS]; vs[s] = new[NS]; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < NS;) begin
      @(negedge clk);
      en = STALLS ? ($urandom_range(7, 0) != 0) : 1'b1;
      if (en) begin
        if ((k % M) >= M - N) begin
          x = '0;
          n_pad++;
        end else begin
          x = sample_t'($urandom);
        end
        xs[k] = longint'(x);
      end
      @(posedge clk);
      #1;
      if (en) begin
        for (int s = 0; s < 5; s++) begin ys[s][k] = longint'(y[s]); vs[s][k] = v[s]; end
        if (k >= N * M) n_wrap++;
        k++;
      end else begin
        n_stall++;
      end
    end
    @(negedge clk) en = 1'b0;

    // reference
    for (int s = 0; s < 5; s++) begin
      fir(xs, a[s], N, M, f);
      if (s == 3) begin
        rec_full(f, b[s], N, M, s1);
        rec_state(s1, b[s], N, 1, yr[s]);
      end else begin
        rec_full(f, b[s], N, 1, s1);
        rec_state(s1, b[s], N, M, yr[s]);
      end
      s1r[s] = s1;
      for (int k = 0; k < NS; k++) begin
        if (s1[k] != (f[k] >>> FRAC)) begin
          if (s == 3) n_z1++; else n_z2++;
        end
        if (yr[s][k] != s1[k]) begin
          if (s == 3) n_z2++; else n_z1++;
        end
      end
      for (int k = 0; k < NS; k++) begin
        check(vs[s][k] == (k >= 2), $sformatf("filter %0d valid at %0d", s, k));
        if (k >= 2)
          check(ys[s][k] == yr[s][k - 2],
                $sformatf("filter %0d sample %0d: %0d expected %0d", s, k - 2, ys[s][k], yr[s][k - 2]));
      end
    end
    for (int k = 1; k < NS; k++) begin
      check(ys[0][k] == ys[4][k], $sformatf("general vs four-fold at %0d", k));
      if (ys[0][k] == ys[4][k] && ys[0][k] != 0) n_equal++;
    end

    $display("mechanisms: stalls=%0d padding=%0d z2_recursion=%0d z1_recursion=%0d line_wrap=%0d shared_equal=%0d",
             n_stall, n_pad, n_z2, n_z1, n_wrap, n_equal);
    check(!STALLS || n_stall > 0, "no stall happened");
    check(n_pad > 0, "no padding sample");
    check(n_z2 > 0, "z2 recursion never changed a value");
    check(n_z1 > 0, "z1 recursion never changed a value");
    check(n_wrap > 0, "line delays never wrapped");
    check(n_equal > 0, "shared-multiplier equivalence never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
