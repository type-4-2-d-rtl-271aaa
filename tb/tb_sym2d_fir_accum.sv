// tb_sym2d_fir_accum: feeds the delay-and-add network (N = 3, M = 6) with
// independent random products and feedback words every sample, with random
// enable gaps, and checks before every enabled edge that
//   sum_o[n] = sum_{i,j} prod_ij[n-i*M-j] + sum_j fb_col_j[n-j] + sum_i fb_row_i[n-i*M]
// computed from the recorded history.
module tb_sym2d_fir_accum;
  import sym2d_pkg::*;
  localparam int unsigned N = 3, M = 6, NS = 500;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  acc_t prod [N+1][N+1];
  acc_t fbc  [1:N];
  acc_t fbr  [1:N];
  acc_t sum;
  longint hp [NS][N+1][N+1];
  longint hc [NS][N+1];
  longint hr [NS][N+1];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sym2d_fir_accum #(.N(N), .M(M)) dut (.clk, .rst_n, .en, .prod_i(prod),
                                       .fb_col_i(fbc), .fb_row_i(fbr), .sum_o(sum));

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
    foreach (prod[i, j]) prod[i][j] = '0;
    foreach (fbc[j]) begin fbc[j] = '0; fbr[j] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < NS;) begin
      longint e;
      @(negedge clk);
      en = ($urandom_range(3, 0) != 0);
      for (int i = 0; i <= N; i++) begin
        for (int j = 0; j <= N; j++) begin
          hp[n][i][j] = longint'($signed($urandom)) >>> 4;
          prod[i][j]  = acc_t'(hp[n][i][j]);
        end
        hc[n][i] = (i == 0) ? 0 : longint'($signed($urandom)) >>> 4;
        hr[n][i] = (i == 0) ? 0 : longint'($signed($urandom)) >>> 4;
        if (i > 0) begin fbc[i] = acc_t'(hc[n][i]); fbr[i] = acc_t'(hr[n][i]); end
      end
      #1;
      e = 0;
      for (int i = 0; i <= N; i++)
        for (int j = 0; j <= N; j++)
          if (n - int'(i * M) - j >= 0) e += hp[n - i * M - j][i][j];
      for (int j = 1; j <= N; j++) if (n - j >= 0) e += hc[n - j][j];
      for (int i = 1; i <= N; i++) if (n - int'(i * M) >= 0) e += hr[n - i * M][i];
      check(longint'(sum) == e, $sformatf("sum at sample %0d: %0d expected %0d", n, sum, e));
      if (en) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
