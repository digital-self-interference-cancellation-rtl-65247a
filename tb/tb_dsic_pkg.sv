// tb_dsic_pkg: helpers shared by the DSIC testbenches.
//
// Provides a small complex type on `real`, conversions between real values
// and the sfi(16,14) / sfi(32,30) fixed-point words, QPSK symbol generation
// and floating-point reference models of the three adaptive filters (LMS,
// NLMS, RLS). The reference models are written directly from the filter
// equations in double precision; the only fixed-point step they copy is the
// rounding and saturation of the output sample d_hat to sfi(16,14), which is
// part of the filters' interface and is fed back into the update.
package tb_dsic_pkg;
  import dsic_pkg::*;

  typedef struct {
    real re;
    real im;
  } cr_t;

  function automatic cr_t cr(real re, real im);
    cr_t r;
    r.re = re;
    r.im = im;
    return r;
  endfunction

  function automatic cr_t cr_add(cr_t a, cr_t b);
    return cr(a.re + b.re, a.im + b.im);
  endfunction

  function automatic cr_t cr_sub(cr_t a, cr_t b);
    return cr(a.re - b.re, a.im - b.im);
  endfunction

  function automatic cr_t cr_mul(cr_t a, cr_t b);
    return cr(a.re * b.re - a.im * b.im, a.re * b.im + a.im * b.re);
  endfunction

  function automatic cr_t cr_conj(cr_t a);
    return cr(a.re, -a.im);
  endfunction

  function automatic cr_t cr_scale(real s, cr_t a);
    return cr(s * a.re, s * a.im);
  endfunction

  function automatic real cr_abs2(cr_t a);
    return a.re * a.re + a.im * a.im;
  endfunction

  function automatic real sig2r(sig_t v);
    return real'(v) / 16384.0;
  endfunction

  function automatic real coef2r(coef_t v);
    return real'(v) / 1073741824.0;
  endfunction

  // Round to nearest (ties up) and saturate to sfi(16,14).
  function automatic sig_t r2sig(real v);
    real s;
    s = $floor(v * 16384.0 + 0.5);
    if (s > 32767.0) s = 32767.0;
    if (s < -32768.0) s = -32768.0;
    return sig_t'($rtoi(s));
  endfunction

  function automatic coef_t r2coef(real v);
    real s;
    s = $floor(v * 1073741824.0 + 0.5);
    if (s > 2147483647.0) s = 2147483647.0;
    if (s < -2147483648.0) s = -2147483648.0;
    return coef_t'(longint'(s));
  endfunction

  function automatic csig_t c2sig(cr_t a);
    csig_t r;
    r.i = r2sig(a.re);
    r.q = r2sig(a.im);
    return r;
  endfunction

  function automatic cr_t sig2c(csig_t a);
    return cr(sig2r(a.i), sig2r(a.q));
  endfunction

  function automatic cr_t coef2c(ccoef_t a);
    return cr(coef2r(a.i), coef2r(a.q));
  endfunction

  // One QPSK symbol of amplitude amp per component.
  function automatic cr_t qpsk(real amp);
    bit [1:0] b;
    b = 2'($urandom_range(3));
    return cr(b[0] ? amp : -amp, b[1] ? amp : -amp);
  endfunction

  // Uniform noise in [-a, a] per component.
  function automatic cr_t unoise(real a);
    real u, v;
    u = (real'($urandom_range(20000)) / 10000.0 - 1.0) * a;
    v = (real'($urandom_range(20000)) / 10000.0 - 1.0) * a;
    return cr(u, v);
  endfunction

  // Floating-point reference of one adaptive filter of length 3.
  class ref_filter;
    filter_e kind;
    real     mu, c_safe, lam;
    cr_t     w [3];
    cr_t     p [3];
    cr_t     tap [3];

    function new(filter_e kind, real mu, real c_safe, real lam, real p_init);
      this.kind   = kind;
      this.mu     = mu;
      this.c_safe = c_safe;
      this.lam    = lam;
      for (int k = 0; k < 3; k++) begin
        w[k]   = cr(0.0, 0.0);
        p[k]   = cr(p_init, 0.0);
        tap[k] = cr(0.0, 0.0);
      end
    endfunction

    // Process one sample pair, return the quantised d_hat.
    function csig_t step(csig_t x_in, csig_t r_in);
      cr_t   xh, dh, e;
      csig_t dq;
      real   pwr;
      tap[2] = tap[1];
      tap[1] = tap[0];
      tap[0] = sig2c(x_in);
      xh = cr(0.0, 0.0);
      for (int k = 0; k < 3; k++) begin
        if (kind == FILT_RLS) xh = cr_add(xh, cr_mul(w[k], tap[k]));
        else                  xh = cr_add(xh, cr_mul(cr_conj(w[k]), tap[k]));
      end
      dq = c2sig(cr_sub(sig2c(r_in), xh));
      dh = sig2c(dq);
      case (kind)
        FILT_LMS: begin
          e = cr_scale(mu, cr_conj(dh));
          for (int k = 0; k < 3; k++) w[k] = cr_add(w[k], cr_mul(e, tap[k]));
        end
        FILT_NLMS: begin
          pwr = c_safe;
          for (int k = 0; k < 3; k++) pwr += cr_abs2(tap[k]);
          e = cr_scale(mu / pwr, cr_conj(dh));
          for (int k = 0; k < 3; k++) w[k] = cr_add(w[k], cr_mul(e, tap[k]));
        end
        default: begin
          for (int k = 0; k < 3; k++) begin
            cr_t num, g;
            real den;
            num = cr_scale(1.0 / lam, cr_mul(p[k], tap[k]));
            den = 1.0 + cr_mul(num, cr_conj(tap[k])).re;
            g   = cr_scale(1.0 / den, num);
            w[k] = cr_add(w[k], cr_mul(dh, cr_conj(g)));
            p[k] = cr_mul(cr_scale(1.0 / lam, p[k]),
                          cr_sub(cr(1.0, 0.0), cr_mul(g, cr_conj(tap[k]))));
          end
        end
      endcase
      return dq;
    endfunction
  endclass

endpackage
