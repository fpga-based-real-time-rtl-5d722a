// milling_ref_pkg: floating-point reference arithmetic for the testbenches.
//
// Everything here uses real (double) numbers, so the fixed-point hardware is
// checked against an independent calculation: fixed-point conversion,
// Gaussian elimination with partial pivoting, and one Newmark-Beta step.
package milling_ref_pkg;
  import milling_pkg::*;

  localparam int MAXN = 8;
  typedef real rvec_t [MAXN];
  typedef real rmat_t [MAXN][MAXN];

  function automatic real fx2r(input fix_t v);
    return real'(v) / real'(2.0 ** FX_FRAC);
  endfunction

  function automatic fix_t r2fx(input real v);
    return fix_t'(longint'(v * (2.0 ** FX_FRAC)));
  endfunction

  // Solve A x = b (order n) with partial pivoting.
  function automatic rvec_t ref_solve(input int n, input rmat_t a_in, input rvec_t b_in);
    rmat_t a;
    rvec_t b, x;
    a = a_in; b = b_in;
    for (int k = 0; k < n; k++) begin
      int p;
      real t;
      p = k;
      for (int i = k + 1; i < n; i++) if ((a[i][k] < 0 ? -a[i][k] : a[i][k]) >
                                           (a[p][k] < 0 ? -a[p][k] : a[p][k])) p = i;
      for (int c = 0; c < n; c++) begin t = a[k][c]; a[k][c] = a[p][c]; a[p][c] = t; end
      t = b[k]; b[k] = b[p]; b[p] = t;
      for (int i = k + 1; i < n; i++) begin
        real m;
        m = a[i][k] / a[k][k];
        for (int c = k; c < n; c++) a[i][c] -= m * a[k][c];
        b[i] -= m * b[k];
      end
    end
    for (int i = n - 1; i >= 0; i--) begin
      real s;
      s = b[i];
      for (int c = i + 1; c < n; c++) s -= a[i][c] * x[c];
      x[i] = s / a[i][i];
    end
    for (int i = n; i < MAXN; i++) x[i] = 0.0;
    return x;
  endfunction

  // One Newmark-Beta step with constants cf[0..7]; updates x, v, acc.
  task automatic newmark(input int n, input rmat_t m, input rmat_t c, input rmat_t k,
                         input real cf[8], input rvec_t f,
                         inout rvec_t x, inout rvec_t v, inout rvec_t acc);
    rmat_t ke;
    rvec_t r, u, w, xn;
    for (int i = 0; i < n; i++) begin
      u[i] = cf[0] * x[i] + cf[2] * v[i] + cf[3] * acc[i];
      w[i] = cf[1] * x[i] + cf[4] * v[i] + cf[5] * acc[i];
    end
    for (int i = 0; i < n; i++) begin
      r[i] = f[i];
      for (int j = 0; j < n; j++) begin
        ke[i][j] = k[i][j] + cf[0] * m[i][j] + cf[1] * c[i][j];
        r[i] += m[i][j] * u[j] + c[i][j] * w[j];
      end
    end
    xn = ref_solve(n, ke, r);
    for (int i = 0; i < n; i++) begin
      real an;
      an = cf[0] * (xn[i] - x[i]) - cf[2] * v[i] - cf[3] * acc[i];
      v[i] = v[i] + cf[6] * acc[i] + cf[7] * an;
      acc[i] = an;
      x[i] = xn[i];
    end
  endtask

  // Newmark constants for beta, gamma and time step dt.
  function automatic void newmark_coefs(input real beta, input real gamma, input real dt,
                                        output real cf[8]);
    cf[0] = 1.0 / (beta * dt * dt);
    cf[1] = gamma / (beta * dt);
    cf[2] = 1.0 / (beta * dt);
    cf[3] = 1.0 / (2.0 * beta) - 1.0;
    cf[4] = gamma / beta - 1.0;
    cf[5] = dt / 2.0 * (gamma / beta - 2.0);
    cf[6] = dt * (1.0 - gamma);
    cf[7] = gamma * dt;
  endfunction
endpackage
