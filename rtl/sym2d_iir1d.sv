// sym2d_iir1d: one-dimensional all-pole section of a separable denominator,
//
//   Y[n] = Yin[n] + sum_{k=1..N} b_k * Y[n - k*D]
//
// With D = M (one image row) it is Block 1 of the Type-4 filters, the z1
// recursion Y = Y4 + sum b_i0 z1^-i Y of Eq. (4), (6a) and (9a). With D = 1
// it is the z2 recursion Y = Y3 + sum b_0j z2^-j Y that completes the Type-3
// filter. The recursion equation is the filter description's; the form is
// this design's choice: a transposed chain in which each b_k * Y[n] product is
// added into a chain of N delays of D samples (line delays for D > 1), so
// there are N multipliers and N*D delay words.
//
// Arithmetic: Y is formed as floor(((Yin << FRAC) + feedback) / 2^FRAC) and
// kept in STATE_W bits; products and the chain are exact in ACC_W bits.
// Timing: y_o is registered, updated on a rising clk edge with en high to
// the Y of the sample on yin_i (one sample of latency).
module sym2d_iir1d
  import sym2d_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  parameter int unsigned D = M_DEF
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  state_t yin_i,
  input  coef_t  b_i [1:N],    // b_1 .. b_N (Q2.14)
  output state_t y_o
);
  acc_t   zin  [1:N];
  acc_t   zout [1:N];
  acc_t   full;
  state_t y_c;

  assign full = (acc_t'(yin_i) <<< FRAC) + zout[1];
  assign y_c  = state_t'(full >>> FRAC);

  for (genvar k = 1; k <= N; k++) begin : g_tap
    acc_t prod;
    assign prod = acc_t'(b_i[k]) * acc_t'(y_c);
    if (k < N) begin : g_mid
      assign zin[k] = prod + zout[k+1];
    end else begin : g_last
      assign zin[k] = prod;
    end
    sym2d_line_delay #(.W(ACC_W), .D(D)) u_dl (
      .clk (clk),
      .rst_n(rst_n),
      .en  (en),
      .d_i (zin[k]),
      .q_o (zout[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y_o <= '0;
    else if (en) y_o <= y_c;
  end
endmodule
