// mvdr_ref_pkg: floating-point reference for the beamformer testbenches.
//
// It computes the MVDR beam output directly from its definition,
//   e(n) = s^H Phi^-1(n) u(n) / (s^H Phi^-1(n) s),
//   Phi(n) = lambda Phi(n-1) + u(n) u^H(n),  Phi(0) = delta I,
// by solving the two linear systems with Gaussian elimination, so it shares
// nothing with the rotation-based datapath it checks. It also provides the
// steering vector of a half-wavelength uniform linear array, a Gaussian
// noise source and fixed-point conversions.
package mvdr_ref_pkg;
  import mvdr_pkg::*;

  localparam int MAXK = 8;
  localparam real PI = 3.14159265358979;

  typedef struct {
    real re;
    real im;
  } rc_t;

  typedef rc_t rvec_t [MAXK];
  typedef rc_t rmat_t [MAXK][MAXK];

  function automatic rc_t c_mul(input rc_t a, input rc_t b);
    rc_t y;
    y.re = a.re * b.re - a.im * b.im;
    y.im = a.re * b.im + a.im * b.re;
    return y;
  endfunction

  function automatic rc_t c_conj(input rc_t a);
    rc_t y;
    y.re = a.re;
    y.im = -a.im;
    return y;
  endfunction

  function automatic rc_t c_div(input rc_t a, input rc_t b);
    rc_t y;
    real d;
    d = b.re * b.re + b.im * b.im;
    y.re = (a.re * b.re + a.im * b.im) / d;
    y.im = (a.im * b.re - a.re * b.im) / d;
    return y;
  endfunction

  function automatic real c_abs(input rc_t a);
    return $sqrt(a.re * a.re + a.im * a.im);
  endfunction

  // Solve A x = b (K x K) by Gaussian elimination with partial pivoting.
  function automatic rvec_t c_solve(input rmat_t a_in, input rvec_t b_in, input int k);
    rmat_t a;
    rvec_t b, x;
    a = a_in;
    b = b_in;
    for (int col = 0; col < k; col++) begin
      int  piv;
      rc_t t;
      piv = col;
      for (int r = col + 1; r < k; r++)
        if (c_abs(a[r][col]) > c_abs(a[piv][col])) piv = r;
      if (piv != col) begin
        for (int cc = 0; cc < k; cc++) begin
          t = a[col][cc]; a[col][cc] = a[piv][cc]; a[piv][cc] = t;
        end
        t = b[col]; b[col] = b[piv]; b[piv] = t;
      end
      for (int r = col + 1; r < k; r++) begin
        rc_t f;
        f = c_div(a[r][col], a[col][col]);
        for (int cc = col; cc < k; cc++) begin
          t = c_mul(f, a[col][cc]);
          a[r][cc].re -= t.re;
          a[r][cc].im -= t.im;
        end
        t = c_mul(f, b[col]);
        b[r].re -= t.re;
        b[r].im -= t.im;
      end
    end
    for (int r = k - 1; r >= 0; r--) begin
      rc_t acc;
      acc = b[r];
      for (int cc = r + 1; cc < k; cc++) begin
        rc_t t;
        t = c_mul(a[r][cc], x[cc]);
        acc.re -= t.re;
        acc.im -= t.im;
      end
      x[r] = c_div(acc, a[r][r]);
    end
    return x;
  endfunction

  // Phi := lambda*Phi + u u^H
  function automatic void phi_update(inout rmat_t phi, input rvec_t u, input real lambda, input int k);
    for (int i = 0; i < k; i++)
      for (int j = 0; j < k; j++) begin
        rc_t t;
        t = c_mul(u[i], c_conj(u[j]));
        phi[i][j].re = lambda * phi[i][j].re + t.re;
        phi[i][j].im = lambda * phi[i][j].im + t.im;
      end
  endfunction

  // e = s^H Phi^-1 u / (s^H Phi^-1 s)
  function automatic rc_t mvdr_output(input rmat_t phi, input rvec_t s, input rvec_t u, input int k);
    rvec_t y, z;
    rc_t   num, den, t;
    y = c_solve(phi, u, k);
    z = c_solve(phi, s, k);
    num = '{0.0, 0.0};
    den = '{0.0, 0.0};
    for (int i = 0; i < k; i++) begin
      t = c_mul(c_conj(s[i]), y[i]); num.re += t.re; num.im += t.im;
      t = c_mul(c_conj(s[i]), z[i]); den.re += t.re; den.im += t.im;
    end
    return c_div(num, den);
  endfunction

  // Steering vector of a half-wavelength ULA towards angle theta (degrees).
  function automatic rvec_t steering(input real theta_deg, input int k);
    rvec_t s;
    real   ph;
    for (int i = 0; i < k; i++) begin
      ph = -PI * i * $sin(theta_deg * PI / 180.0);
      s[i].re = $cos(ph);
      s[i].im = $sin(ph);
    end
    return s;
  endfunction

  function automatic real urand01();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction

  // Standard normal sample (Box-Muller).
  function automatic real gauss();
    return $sqrt(-2.0 * $ln(urand01())) * $cos(2.0 * PI * urand01());
  endfunction

  function automatic fx_t to_fx(input real v);
    return fx_t'(longint'(v * (2.0 ** FW)));
  endfunction

  function automatic real from_fx(input fx_t v);
    return real'(v) / (2.0 ** FW);
  endfunction

  // Rotation parameters c and s use RW fraction bits.
  function automatic fx_t to_rot(input real v);
    return fx_t'(longint'(v * (2.0 ** RW)));
  endfunction

  function automatic real from_rot(input fx_t v);
    return real'(v) / (2.0 ** RW);
  endfunction

endpackage
