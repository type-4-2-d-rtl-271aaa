// sym2d_fir_accum: the delay-and-add network shared by every filter of the
// family. It receives, each sample, the products c_ij * X[n] already formed
// by the multipliers and returns
//
//   sum_o[n] = sum_{i,j} prod_ij[n - i*M - j]
//            + sum_{j>=1} fb_col_j[n - j] + sum_{i>=1} fb_row_i[n - i*M]
//
// i.e. the 2-D numerator sum_{i,j} c_ij z1^-i z2^-j X in row-scan form
// (z2^-1 = one sample, z1^-1 = M samples), plus two feedback inputs.
//
// Structure (transposed form, this design's choice for how products are
// delayed): every row i has a chain of N unit-delay registers in which the
// products of columns N..1 are added one after another (the z2 chain), and
// the row sums are combined by a chain of N line delays of M samples (the z1
// chain). Since each product is formed once from the current sample and then
// delayed, one multiplier can feed several (i,j) positions, which is how the
// symmetric filters save multipliers. fb_col_j enters the z2 chain of row 0 at
// column j (Type-4 z2 recursion of Block 2, Eq. 5), fb_row_i enters the z1
// chain at row i (Type-3 z1 recursion, Eq. 8). All sums are exact in ACC_W
// bits.
//
// Timing: sum_o is combinational in prod_i[.][0] of the current sample and
// registered state; every register and line delay advances on a rising clk
// edge with en high. Reset clears the unit-delay registers; the line delays
// read zero until first filled.
module sym2d_fir_accum
  import sym2d_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  parameter int unsigned M = M_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  acc_t prod_i   [N+1][N+1],  // [i][j]: product for z1^-i z2^-j
  input  acc_t fb_col_i [1:N],       // added at z2^-j of row 0
  input  acc_t fb_row_i [1:N],       // added at z1^-i
  output acc_t sum_o
);
  acc_t zreg [N+1][1:N];   // z2 chain registers, zreg[i][j] = pending z2^-j
  acc_t row  [N+1];        // row sums sum_j c_ij z2^-j X
  acc_t zin  [1:N];        // line delay inputs
  acc_t zout [1:N];        // line delay outputs

  for (genvar i = 0; i <= N; i++) begin : g_row
    for (genvar j = 1; j <= N; j++) begin : g_col
      acc_t nxt;
      always_comb begin
        nxt = prod_i[i][j];
        if (i == 0) nxt = nxt + fb_col_i[j];
        if (j < N)  nxt = nxt + zreg[i][(j < N) ? j + 1 : j];
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)  zreg[i][j] <= '0;
        else if (en) zreg[i][j] <= nxt;
      end
    end
    assign row[i] = prod_i[i][0] + zreg[i][1];
  end

  for (genvar i = 1; i <= N; i++) begin : g_line
    if (i < N) begin : g_mid
      assign zin[i] = row[i] + fb_row_i[i] + zout[i+1];
    end else begin : g_last
      assign zin[i] = row[i] + fb_row_i[i];
    end
    sym2d_line_delay #(.W(ACC_W), .D(M)) u_ld (
      .clk (clk),
      .rst_n(rst_n),
      .en  (en),
      .d_i (zin[i]),
      .q_o (zout[i])
    );
  end

  assign sum_o = row[0] + zout[1];
endmodule
