// tb_t4_block2: runs Block 2 in all four coefficient-sharing forms at once
// (no symmetry, a_ij = a_ji, a_ij = a_(N-j)(N-i), a_ij = a_j(N-i)) with a
// short row M = 6, random coefficients, random samples and enable gaps, and
// checks y4_o after each enabled edge (one sample of latency) against
// Y4[k] = floor((sum a_ij x[k-i*M-j] + sum_j b_0j Y4[k-j]) / 2^FRAC)
// from sym2d_ref_pkg, the full matrix a being expanded from each instance's
// unique coefficients by the symmetry rule. It also checks the multiplier
// count of each form for N = 3 (16, 10, 10, 4).
module tb_t4_block2;
  import sym2d_pkg::*;
  import sym2d_ref_pkg::*;
  localparam int unsigned N = 3, M = 6, NS = 500;
  localparam int NA0 = num_coef(SYM_NONE, N);
  localparam int NA1 = num_coef(SYM_DIAG, N);
  localparam int NA2 = num_coef(SYM_ANTIDIAG, N);
  localparam int NA3 = num_coef(SYM_FOURFOLD, N);
  logic    clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  sample_t x = '0;
  coef_t   a0 [NA0];
  coef_t   a1 [NA1];
  coef_t   a2 [NA2];
  coef_t   a3 [NA3];
  coef_t   b  [1:N];
  state_t  y4 [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  t4_block2 #(.SYM(SYM_NONE),     .N(N), .M(M)) d0 (.clk, .rst_n, .en, .x_i(x), .a_i(a0), .b_i(b), .y4_o(y4[0]));
  t4_block2 #(.SYM(SYM_DIAG),     .N(N), .M(M)) d1 (.clk, .rst_n, .en, .x_i(x), .a_i(a1), .b_i(b), .y4_o(y4[1]));
  t4_block2 #(.SYM(SYM_ANTIDIAG), .N(N), .M(M)) d2 (.clk, .rst_n, .en, .x_i(x), .a_i(a2), .b_i(b), .y4_o(y4[2]));
  t4_block2 #(.SYM(SYM_FOURFOLD), .N(N), .M(M)) d3 (.clk, .rst_n, .en, .x_i(x), .a_i(a3), .b_i(b), .y4_o(y4[3]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (4 * NS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint u[4][], a[4][], bb[], xs[], f[], r[], o[4][];
    int used;
    check(NA0 == 16 && NA1 == 10 && NA2 == 10 && NA3 == 4, "multiplier counts");
    rden(N, bb);
    for (int l = 1; l <= N; l++) b[l] = coef_t'(bb[l]);
    for (int s = 0; s < 4; s++) begin
      int na;
      na = (s == 0) ? NA0 : (s == 1) ? NA1 : (s == 2) ? NA2 : NA3;
      u[s] = new[na];
      foreach (u[s][k]) u[s][k] = rcoef(6000);
      expand(s, N, u[s], a[s], used);
      check(used == na, "orbit count");
      o[s] = new[NS];
    end
    foreach (a0[k]) a0[k] = coef_t'(u[0][k]);
    foreach (a1[k]) a1[k] = coef_t'(u[1][k]);
    foreach (a2[k]) a2[k] = coef_t'(u[2][k]);
    foreach (a3[k]) a3[k] = coef_t'(u[3][k]);
    xs = new[NS];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < NS;) begin
      @(negedge clk);
      en = ($urandom_range(3, 0) != 0);
      x  = sample_t'($urandom);
      @(posedge clk);
      #1;
      if (en) begin
        xs[k] = longint'(x);
        for (int s = 0; s < 4; s++) o[s][k] = longint'(y4[s]);
        k++;
      end
    end
    for (int s = 0; s < 4; s++) begin
      fir(xs, a[s], N, M, f);
      rec_full(f, bb, N, 1, r);
      for (int k = 1; k < NS; k++)
        if (k >= 1)
          check(o[s][k] == r[k - 1], $sformatf("form %0d sample %0d: %0d expected %0d", s, k - 1, o[s][k], r[k - 1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
