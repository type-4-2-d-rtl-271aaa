// sym2d_filter_harness: self-checking stimulus for one filter of the family,
// shared by the per-filter testbenches. KIND picks the filter: 0 Type-4
// separable, 1 Type-4 diagonal (a_ij = a_ji), 2 Type-4 diagonal
// (a_ij = a_(N-j)(N-i)), 3 Type-3 diagonal (a_ij = a_(N-j)(N-i)), 4 Type-4
// four-fold rotational. It draws random coefficients (a stable denominator),
// feeds NS random samples with random enable gaps, records y_o after every
// enabled edge and compares it with the reference model of sym2d_ref_pkg:
// after the edge that takes sample k, y_o must equal Y[k-2] and y_valid_o
// must be high exactly from k = 2 on (three samples of latency). It also checks
// that a cycle with en low changes nothing, and prints the TB_RESULT line.
module sym2d_filter_harness
  import sym2d_pkg::*;
  import sym2d_ref_pkg::*;
#(
  parameter int KIND          = 0,
  parameter int unsigned MT   = 7,
  parameter int unsigned NS   = 600,
  parameter int unsigned ROUNDS = 3
) ();
  localparam int unsigned N  = N_DEF;
  localparam int SK = (KIND == 0) ? 0 : (KIND == 1) ? 1 : (KIND == 4) ? 3 : 2;
  localparam int unsigned NA = (KIND == 0) ? (N + 1) * (N + 1) : num_coef(sym_e'(SK), N);

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    en = 1'b0;
  sample_t x = '0;
  coef_t   a_u [NA];
  coef_t   b_r [1:N];
  coef_t   b_c [1:N];
  state_t  y;
  logic    yv;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  if (KIND == 0) begin : g_sep
    t4_sep_filter #(.M(MT)) dut (.clk, .rst_n, .en, .x_i(x), .a_i(a_u),
                                 .b_row_i(b_r), .b_col_i(b_c), .y_o(y), .y_valid_o(yv));
  end else if (KIND == 1) begin : g_diag
    t4_diag_filter #(.M(MT)) dut (.clk, .rst_n, .en, .x_i(x), .a_i(a_u), .b_i(b_r),
                                  .y_o(y), .y_valid_o(yv));
  end else if (KIND == 2) begin : g_adiag
    t4_antidiag_filter #(.M(MT)) dut (.clk, .rst_n, .en, .x_i(x), .a_i(a_u), .b_i(b_r),
                                      .y_o(y), .y_valid_o(yv));
  end else if (KIND == 3) begin : g_t3
    t3_antidiag_filter #(.M(MT)) dut (.clk, .rst_n, .en, .x_i(x), .a_i(a_u), .b_i(b_r),
                                      .y_o(y), .y_valid_o(yv));
  end else begin : g_four
    t4_fourfold_filter #(.M(MT)) dut (.clk, .rst_n, .en, .x_i(x), .a_i(a_u), .b_i(b_r),
                                      .y_o(y), .y_valid_o(yv));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (ROUNDS * (2 * NS + 40) + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint u[], a[], br[], bc[], xs[], f[], s1[], yr[], ys[];
    bit     vs[];
    int     used, stalls;
    stalls = 0;
    for (int r = 0; r < ROUNDS; r++) begin
      // coefficients: round 0 small, later rounds larger numerators
      u = new[NA];
      foreach (u[k]) u[k] = rcoef((r == 0) ? 4096 : 8192);
      expand((KIND == 0) ? 0 : SK, N, u, a, used);
      check(used == NA, "coefficient count");
      rden(N, br);
      if (KIND == 0) rden(N, bc); else bc = br;
      foreach (a_u[k]) a_u[k] = coef_t'(u[k]);
      for (int l = 1; l <= N; l++) begin
        b_r[l] = coef_t'(br[l]);
        b_c[l] = coef_t'(bc[l]);
      end
      // reset
      en = 1'b0;
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1'b1;
      xs = new[NS];
      ys = new[NS];
      vs = new[NS];
      for (int k = 0; k < NS;) begin
        state_t yb;
        @(negedge clk);
        yb = y;
        en = ($urandom_range(4, 0) != 0);
        if (en) begin
          x = sample_t'($urandom);
          if ($urandom_range(7, 0) == 0) x = '0;
          xs[k] = longint'(x);
        end
        @(posedge clk);
        #1;
        if (en) begin
          ys[k] = longint'(y);
          vs[k] = yv;
          k++;
        end else begin
          stalls++;
          check(y == yb, "output moved while en low");
        end
      end
      @(negedge clk) en = 1'b0;
      // reference
      fir(xs, a, N, MT, f);
      if (KIND == 3) begin
        rec_full(f, br, N, MT, s1);
        rec_state(s1, bc, N, 1, yr);
      end else begin
        rec_full(f, bc, N, 1, s1);
        rec_state(s1, br, N, MT, yr);
      end
      for (int k = 0; k < NS; k++) begin
        check(vs[k] == (k >= 2), $sformatf("valid at sample %0d", k));
        if (k >= 2)
          check(ys[k] == yr[k - 2],
                $sformatf("round %0d sample %0d: y=%0d expected %0d", r, k - 2, ys[k], yr[k - 2]));
      end
    end
    check(stalls > 0, "stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
