// sym2d_ref_pkg: bit-exact reference model of the row-scanned 2-D
// separable-denominator IIR filters, written directly from the difference
// equations on the sample stream (z2^-1 = 1 sample, z1^-1 = M samples):
//
//   numerator   F[k]  = sum_{i,j} a_ij x[k - i*M - j]
//   Type-4      Y4[k] = wrap(floor((F[k] + sum_j b_0j Y4[k-j]) / 2^FRAC))
//               Y[k]  = wrap(floor((Y4[k]*2^FRAC + sum_i b_i0 Y[k-i*M]) / 2^FRAC))
//   Type-3      Y3[k] = wrap(floor((F[k] + sum_i b_i0 Y3[k-i*M]) / 2^FRAC))
//               Y[k]  = wrap(floor((Y3[k]*2^FRAC + sum_j b_0j Y[k-j]) / 2^FRAC))
//
// with samples before the first one equal to zero and wrap() keeping the low
// STATE_W bits as a signed number. It also expands a list of unique
// coefficients into the full (N+1)x(N+1) matrix for each symmetry by walking
// the positions in row-major order and giving each new orbit the next
// coefficient, filling all its members from the symmetry rule itself.
package sym2d_ref_pkg;
  import sym2d_pkg::*;

  function automatic longint wrap_s(longint v);
    state_t t;
    t = state_t'(v);
    return longint'(t);
  endfunction

  // F[k]; a is row-major (N+1)x(N+1)
  function automatic void fir(input longint x[], input longint a[], input int n,
                              input int m, output longint f[]);
    f = new[x.size()];
    foreach (x[k]) begin
      longint s;
      s = 0;
      for (int i = 0; i <= n; i++)
        for (int j = 0; j <= n; j++)
          if (k - i * m - j >= 0) s += a[i * (n + 1) + j] * x[k - i * m - j];
      f[k] = s;
    end
  endfunction

  // y[k] = wrap((f[k] + sum_l b[l] y[k - l*d]) >>> FRAC)   (b[0] unused)
  function automatic void rec_full(input longint f[], input longint b[], input int n,
                                   input int d, output longint y[]);
    y = new[f.size()];
    foreach (f[k]) begin
      longint s;
      s = f[k];
      for (int l = 1; l <= n; l++)
        if (k - l * d >= 0) s += b[l] * y[k - l * d];
      y[k] = wrap_s(s >>> FRAC);
    end
  endfunction

  // y[k] = wrap(((u[k] << FRAC) + sum_l b[l] y[k - l*d]) >>> FRAC)
  function automatic void rec_state(input longint u[], input longint b[], input int n,
                                    input int d, output longint y[]);
    longint f[];
    f = new[u.size()];
    foreach (u[k]) f[k] = u[k] * (longint'(1) << FRAC);
    rec_full(f, b, n, d, y);
  endfunction

  // kind: 0 none, 1 a_ij = a_ji, 2 a_ij = a_(N-j)(N-i), 3 a_ij = a_j(N-i)
  function automatic void expand(input int kind, input int n, input longint u[],
                                 output longint a[], output int used);
    bit done[];
    int k;
    a    = new[(n + 1) * (n + 1)];
    done = new[(n + 1) * (n + 1)];
    foreach (done[p]) done[p] = 1'b0;
    k = 0;
    for (int i = 0; i <= n; i++)
      for (int j = 0; j <= n; j++)
        if (!done[i * (n + 1) + j]) begin
          int pi[4];
          int pj[4];
          int cnt;
          pi[0] = i; pj[0] = j; cnt = 1;
          case (kind)
            1: begin pi[1] = j; pj[1] = i; cnt = 2; end
            2: begin pi[1] = n - j; pj[1] = n - i; cnt = 2; end
            3: begin
              pi[1] = j;     pj[1] = n - i;
              pi[2] = n - i; pj[2] = n - j;
              pi[3] = n - j; pj[3] = i;
              cnt = 4;
            end
            default: ;
          endcase
          for (int c = 0; c < cnt; c++) begin
            a[pi[c] * (n + 1) + pj[c]]    = u[k];
            done[pi[c] * (n + 1) + pj[c]] = 1'b1;
          end
          k++;
        end
    used = k;
  endfunction

  // Random coefficient in [-lim, lim] (Q2.14 integer).
  function automatic longint rcoef(int lim);
    return longint'($urandom_range(2 * lim, 0)) - longint'(lim);
  endfunction

  // Random denominator b[1..n] with sum |b_k| <= 3/4 (stable section).
  function automatic void rden(input int n, output longint b[]);
    b = new[n + 1];
    b[0] = 0;
    for (int l = 1; l <= n; l++) b[l] = rcoef(12288 / n);
  endfunction
endpackage
