// tb_t3_block_y3: runs the Type-3 first section (anti-diagonal sharing,
// Fig. 4) with a short row M = 6, random coefficients, random samples and
// enable gaps, and checks y3_o after each enabled edge (one sample of
// latency) against
// Y3[k] = floor((sum a_ij x[k-i*M-j] + sum_i b_i0 Y3[k-i*M]) / 2^FRAC)
// from sym2d_ref_pkg.
module tb_t3_block_y3;
  import sym2d_pkg::*;
  import sym2d_ref_pkg::*;
  localparam int unsigned N = 3, M = 6, NS = 600;
  localparam int NA = num_coef(SYM_ANTIDIAG, N);
  logic    clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  sample_t x = '0;
  coef_t   a_u [NA];
  coef_t   b   [1:N];
  state_t  y3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  t3_block_y3 #(.N(N), .M(M)) dut (.clk, .rst_n, .en, .x_i(x), .a_i(a_u), .b_i(b), .y3_o(y3));

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
    longint u[], a[], bb[], xs[], f[], r[], o[];
    int used;
    rden(N, bb);
    for (int l = 1; l <= N; l++) b[l] = coef_t'(bb[l]);
    u = new[NA];
    foreach (u[k]) u[k] = rcoef(6000);
    expand(2, N, u, a, used);
    check(used == NA && NA == 10, "orbit count");
    foreach (a_u[k]) a_u[k] = coef_t'(u[k]);
    xs = new[NS];
    o  = new[NS];
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
        o[k]  = longint'(y3);
        k++;
      end
    end
    fir(xs, a, N, M, f);
    rec_full(f, bb, N, M, r);
    for (int k = 0; k < NS; k++)
      if (k >= 1)
        check(o[k] == r[k - 1], $sformatf("sample %0d: %0d expected %0d", k - 1, o[k], r[k - 1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
