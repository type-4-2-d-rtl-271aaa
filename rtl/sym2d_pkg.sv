// sym2d_pkg: shared word types, default sizes and the coefficient-symmetry
// helpers of the 2-D quarter-plane IIR filter family (Type-3 and Type-4
// separable-denominator structures with diagonal and four-fold rotational
// symmetry).
//
// The filter order N = 3 is the order used throughout the filter description.
// The padded image width M and every word length below are this design's own
// choices: input samples are 16-bit two's complement integers, coefficients
// are 16-bit two's complement with 14 fraction bits (range [-2, 2)), filter
// states (Y4, Y3, Y) are 32-bit integers, and all products and partial sums
// are kept exactly in 56 bits so that the only rounding is the single
// arithmetic right shift (floor) by FRAC where a state word is formed.
//
// Symmetry and coefficient sharing. A symmetry groups the (N+1)x(N+1)
// numerator positions (i,j) into orbits whose coefficients are equal:
//   SYM_NONE      every position is its own orbit            (Fig. 1 type)
//   SYM_DIAG      a_ij = a_ji                                 (Eq. 6b)
//   SYM_ANTIDIAG  a_ij = a_(N-j)(N-i)                         (Eq. 7, 8)
//   SYM_FOURFOLD  a_ij = a_j(N-i), orbits of four rotations   (Eq. 9b)
// One multiplier serves each orbit. Orbits are numbered in the order their
// first member appears in a row-major scan of (i,j); a filter's unique
// coefficient port a_i[k] holds the coefficient of orbit k. For N = 3 the
// first members are exactly the index ranges of Eq. (6b), (7) and (9b).
package sym2d_pkg;

  parameter int unsigned N_DEF   = 3;    // filter order N1 = N2 = N
  parameter int unsigned M_DEF   = 256;  // padded image width (row length)
  parameter int unsigned DATA_W  = 16;   // input sample width
  parameter int unsigned COEF_W  = 16;   // coefficient width
  parameter int unsigned FRAC    = 14;   // coefficient fraction bits
  parameter int unsigned STATE_W = 32;   // Y4 / Y3 / Y word width
  parameter int unsigned ACC_W   = 56;   // exact product / partial-sum width

  typedef logic signed [DATA_W-1:0]  sample_t;
  typedef logic signed [COEF_W-1:0]  coef_t;
  typedef logic signed [STATE_W-1:0] state_t;
  typedef logic signed [ACC_W-1:0]   acc_t;

  typedef enum logic [1:0] {
    SYM_NONE     = 2'd0,
    SYM_DIAG     = 2'd1,
    SYM_ANTIDIAG = 2'd2,
    SYM_FOURFOLD = 2'd3
  } sym_e;

  // Row-major linear index of the orbit member that comes first in a scan.
  function automatic int orbit_first(sym_e s, int n, int i, int j);
    int best, p, q, t;
    best = i * (n + 1) + j;
    case (s)
      SYM_DIAG:     best = (j * (n + 1) + i < best) ? j * (n + 1) + i : best;
      SYM_ANTIDIAG: begin
        t = (n - j) * (n + 1) + (n - i);
        best = (t < best) ? t : best;
      end
      SYM_FOURFOLD: begin
        p = i; q = j;
        for (int r = 0; r < 3; r++) begin
          t = p;      // (p,q) -> (q, N-p)
          p = q;
          q = n - t;
          best = (p * (n + 1) + q < best) ? p * (n + 1) + q : best;
        end
      end
      default: ;
    endcase
    return best;
  endfunction

  // Number of distinct coefficients (= numerator multipliers).
  function automatic int num_coef(sym_e s, int n);
    int cnt;
    cnt = 0;
    for (int i = 0; i <= n; i++)
      for (int j = 0; j <= n; j++)
        if (orbit_first(s, n, i, j) == i * (n + 1) + j) cnt++;
    return cnt;
  endfunction

  // Unique-coefficient slot that position (i,j) uses.
  function automatic int coef_slot(sym_e s, int n, int i, int j);
    int first, cnt;
    first = orbit_first(s, n, i, j);
    cnt = 0;
    for (int k = 0; k < first; k++)
      if (orbit_first(s, n, k / (n + 1), k % (n + 1)) == k) cnt++;
    return cnt;
  endfunction

endpackage
