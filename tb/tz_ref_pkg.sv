// tz_ref_pkg: reference model for the Toeplitz solver testbenches.
//
// Written independently of the RTL, as plain sequential code:
//   ref_mul / ref_div  the Q15.16 fixed-point product and quotient that the
//                      hardware is specified to use (product floored,
//                      quotient truncated toward zero and saturated);
//   ref_solve          the Schur-type factorization T = U^t D^-1 U of a
//                      symmetric Toeplitz matrix, the forward step
//                      g = D (U^t)^-1 y and the back substitution U x = g,
//                      one recursion after another, in that fixed-point
//                      arithmetic, so that results can be compared bit for
//                      bit;
//   real_solve         Gaussian elimination in double precision, to check
//                      that the fixed-point answer solves T x = y.
package tz_ref_pkg;

  localparam int F    = 16;
  localparam int MAXN = 64;                 // largest matrix order supported

  typedef int  vec_t  [MAXN];
  typedef int  mat_t  [MAXN][MAXN];
  typedef real rvec_t [MAXN];

  function automatic int ref_mul(int a, int b);
    longint p;
    p = longint'(a) * longint'(b);
    return int'(p >>> F);
  endfunction

  function automatic int ref_div(int a, int b);
    longint q;
    if (b == 0) return (a < 0) ? 32'sh8000_0000 : 32'sh7fff_ffff;
    q = (longint'(a) * 65536) / longint'(b);
    if (q > 64'sd2147483647)  return 32'sh7fff_ffff;
    if (q < -64'sd2147483648) return 32'sh8000_0000;
    return int'(q);
  endfunction

  function automatic int to_fx(real r);
    return int'($rtoi(r * 65536.0 + ((r < 0.0) ? -0.5 : 0.5)));
  endfunction

  function automatic real to_real(int v);
    return real'(v) / 65536.0;
  endfunction

  // n = N (matrix order N+1). t[0..n], y[0..n] hold t0..tN and y(1)..y(N+1).
  // Results use 1-based row/column numbers: u[i][j], g[i], x[i], c[i] is the
  // coefficient of recursion i.
  task automatic ref_solve(input int n, input vec_t t, input vec_t y,
                           output mat_t u, output vec_t g, output vec_t x,
                           output vec_t c);
    vec_t a, b, yy, na, nb, ny;
    int   r, s;
    for (int i = 0; i < MAXN; i++) begin
      a[i] = 0; b[i] = 0; yy[i] = 0; g[i] = 0; x[i] = 0; c[i] = 0;
      for (int j = 0; j < MAXN; j++) u[i][j] = 0;
    end
    for (int k = 0; k <= n; k++) begin
      a[k]  = (k < n) ? t[k+1] : 0;
      b[k]  = t[k];
      yy[k] = y[k];
    end
    for (int i = 1; i <= n + 1; i++) begin
      for (int k = 0; k <= n + 1 - i; k++) u[i][i+k] = b[k];
      g[i] = yy[0];
      r    = ref_div(yy[0], b[0]);
      c[i] = ref_div(a[0], b[0]);
      na = a; nb = b; ny = yy;
      nb[0] = b[0] - ref_mul(c[i], a[0]);
      for (int k = 1; k <= n; k++) begin
        na[k-1] = a[k]  - ref_mul(c[i], b[k]);
        nb[k]   = b[k]  - ref_mul(c[i], a[k]);
        ny[k-1] = yy[k] - ref_mul(r, b[k]);
      end
      a = na; b = nb; yy = ny;
    end
    for (int i = n + 1; i >= 1; i--) begin
      s = 0;
      for (int j = i + 1; j <= n + 1; j++) s += ref_mul(u[i][j], x[j]);
      x[i] = ref_div(g[i] - s, u[i][i]);
    end
  endtask

  // Double-precision solution of the symmetric Toeplitz system; x[0..n].
  task automatic real_solve(input int n, input vec_t t, input vec_t y,
                            output rvec_t x);
    real m [MAXN][MAXN+1];
    real f;
    for (int i = 0; i <= n; i++) begin
      for (int j = 0; j <= n; j++) m[i][j] = to_real(t[(i > j) ? i - j : j - i]);
      m[i][n+1] = to_real(y[i]);
    end
    for (int p = 0; p <= n; p++) begin
      for (int i = p + 1; i <= n; i++) begin
        f = m[i][p] / m[p][p];
        for (int j = p; j <= n + 1; j++) m[i][j] -= f * m[p][j];
      end
    end
    for (int i = n; i >= 0; i--) begin
      f = m[i][n+1];
      for (int j = i + 1; j <= n; j++) f -= m[i][j] * x[j];
      x[i] = f / m[i][i];
    end
  endtask

  // Test matrices: kind 0 = AR(1) autocorrelation rho^k, kind 1 = random
  // entries small enough that T is diagonally dominant (hence definite).
  task automatic make_case(input int n, input int kind, output vec_t t,
                           output vec_t y);
    real rho, p, lim;
    for (int i = 0; i < MAXN; i++) begin t[i] = 0; y[i] = 0; end
    t[0] = 65536;
    if (kind == 0) begin
      rho = (real'($urandom_range(1400)) - 700.0) / 1000.0;
      p = 1.0;
      for (int k = 1; k <= n; k++) begin p = p * rho; t[k] = to_fx(p); end
    end else begin
      lim = 0.45 / real'(n);
      for (int k = 1; k <= n; k++)
        t[k] = to_fx(lim * (real'($urandom_range(2000)) - 1000.0) / 1000.0);
    end
    for (int k = 0; k <= n; k++)
      y[k] = to_fx((real'($urandom_range(2000)) - 1000.0) / 1000.0);
  endtask

endpackage
