// tb_sym2d_iir1d: drives the 1-D all-pole section with random input words and
// random enable gaps, as Block 1 (D = 5) and as the Type-3 row section
// (D = 1) at once, and compares y_o after each enabled edge with
// Y[k] = floor((Yin[k]*2^FRAC + sum b_l Y[k-l*D]) / 2^FRAC) from
// sym2d_ref_pkg (one sample of latency).
module tb_sym2d_iir1d;
  import sym2d_pkg::*;
  import sym2d_ref_pkg::*;
  localparam int unsigned N = 3, D = 5, NS = 500;
  logic   clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  state_t yin = '0, y5, y1;
  coef_t  b5 [1:N];
  coef_t  b1 [1:N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sym2d_iir1d #(.N(N), .D(D)) dut5 (.clk, .rst_n, .en, .yin_i(yin), .b_i(b5), .y_o(y5));
  sym2d_iir1d #(.N(N), .D(1)) dut1 (.clk, .rst_n, .en, .yin_i(yin), .b_i(b1), .y_o(y1));

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
    longint bb5[], bb1[], u[], r5[], r1[], o5[], o1[];
    rden(N, bb5);
    rden(N, bb1);
    for (int l = 1; l <= N; l++) begin b5[l] = coef_t'(bb5[l]); b1[l] = coef_t'(bb1[l]); end
    u  = new[NS];
    o5 = new[NS];
    o1 = new[NS];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < NS;) begin
      @(negedge clk);
      en = ($urandom_range(3, 0) != 0);
      yin = state_t'($signed($urandom) >>> 8);
      @(posedge clk);
      #1;
      if (en) begin
        u[k]  = longint'(yin);
        o5[k] = longint'(y5);
        o1[k] = longint'(y1);
        k++;
      end
    end
    rec_state(u, bb5, N, D, r5);
    rec_state(u, bb1, N, 1, r1);
    for (int k = 0; k < NS; k++) begin
      check(o5[k] == r5[k], $sformatf("D=5 sample %0d: %0d expected %0d", k, o5[k], r5[k]));
      check(o1[k] == r1[k], $sformatf("D=1 sample %0d: %0d expected %0d", k, o1[k], r1[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
