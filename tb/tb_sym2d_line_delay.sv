// tb_sym2d_line_delay: drives a 5-sample line delay with random words and a
// random enable and checks that q_o is always the word written exactly five
// enables earlier (zero before five writes), and that a cycle with en low
// changes nothing. Also checks D = 1.
module tb_sym2d_line_delay;
  localparam int unsigned D = 5;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [15:0] d = '0, q, q1;
  int checks = 0, failures = 0;
  logic [15:0] hist[$];

  always #5 clk = ~clk;

  sym2d_line_delay #(.W(16), .D(D)) dut (.clk, .rst_n, .en, .d_i(d), .q_o(q));
  sym2d_line_delay #(.W(16), .D(1)) dut1 (.clk, .rst_n, .en, .d_i(d), .q_o(q1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      // expected outputs before this edge
      check(q == ((hist.size() >= D) ? hist[hist.size() - D] : 16'h0), $sformatf("q at cycle %0d", c));
      check(q1 == ((hist.size() >= 1) ? hist[hist.size() - 1] : 16'h0), $sformatf("q1 at cycle %0d", c));
      en = ($urandom_range(3, 0) != 0);
      d  = 16'($urandom);
      if (en) hist.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
