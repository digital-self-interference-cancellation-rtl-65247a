// dsic_pkg: number formats, data types and fixed-point helpers shared by the
// digital self-interference cancellation (DSIC) filters.
//
// Every sample (TX x[n], RX r[n], cancelled RX d_hat[n]) is complex and each
// of its I and Q parts is a signed fixed-point number sfi(16,14): 16 bits, one
// sign bit, one integer bit, 14 fractional bits, range [-2, 2). Filter weights,
// the step size mu, the forgetting factor lambda and the RLS inverse-covariance
// values P_k are sfi(32,30), range [-2, 2). These two formats and the 64-bit
// input / 32-bit output frame layout (Q in the upper half, I in the lower half
// of each 32-bit complex word, x[n] in the upper word of the input frame) are
// the ones the filter cores were specified with.
//
// Intermediate products are kept at full precision in a wide signed type
// (acc_t) and rounded only where a value is stored or leaves a core. Rounding
// is to nearest (ties towards +infinity) followed by saturation to the target
// range; both are this implementation's choice, the saturation matches the
// specified behaviour of the sfi(16,14) constellation space.
package dsic_pkg;

  localparam int unsigned SIG_W     = 16;  // sfi(16,14) word length
  localparam int unsigned SIG_FRAC  = 14;  // sfi(16,14) fractional bits
  localparam int unsigned COEF_W    = 32;  // sfi(32,30) word length
  localparam int unsigned COEF_FRAC = 30;  // sfi(32,30) fractional bits
  localparam int unsigned ACC_W     = 128; // width of full-precision intermediates
  localparam int unsigned G_FRAC    = 40;  // fractional bits of the RLS gain path

  typedef logic signed [SIG_W-1:0]  sig_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Complex sample, 32 bits: Q in [31:16], I in [15:0].
  typedef struct packed {
    sig_t q;
    sig_t i;
  } csig_t;

  // Complex weight / P value, 64 bits: Q in [63:32], I in [31:0].
  typedef struct packed {
    coef_t q;
    coef_t i;
  } ccoef_t;

  // Complex full-precision intermediate.
  typedef struct packed {
    acc_t q;
    acc_t i;
  } cacc_t;

  // 64-bit input frame: x[n] in [63:32], r[n] in [31:0].
  typedef struct packed {
    csig_t x;
    csig_t r;
  } in_frame_t;

  typedef enum logic [1:0] {
    FILT_LMS  = 2'd0,
    FILT_NLMS = 2'd1,
    FILT_RLS  = 2'd2
  } filter_e;

  // Constants in sfi(32,30).
  localparam coef_t COEF_ONE      = coef_t'(32'sd1 <<< COEF_FRAC);
  localparam coef_t MU_DEFAULT     = coef_t'(32'sd1073742);    // 0.001
  localparam coef_t LAMBDA_DEFAULT = coef_t'(32'sd1072668082); // 0.999

  // Arithmetic shift right by sh bits with round-to-nearest.
  function automatic acc_t rshift_round(acc_t v, int unsigned sh);
    acc_t half;
    if (sh == 0) return v;
    half = acc_t'(1) <<< (sh - 1);
    return (v + half) >>> sh;
  endfunction

  // Saturate v to a signed w-bit range (result still acc_t).
  function automatic acc_t saturate(acc_t v, int unsigned w);
    acc_t maxv, minv;
    maxv = (acc_t'(1) <<< (w - 1)) - acc_t'(1);
    minv = -(acc_t'(1) <<< (w - 1));
    if (v > maxv) return maxv;
    if (v < minv) return minv;
    return v;
  endfunction

  // Full-precision value with frac_in fractional bits -> sfi(16,14).
  function automatic sig_t to_sig(acc_t v, int unsigned frac_in);
    return sig_t'(saturate(rshift_round(v, frac_in - SIG_FRAC), SIG_W));
  endfunction

  // Full-precision value with frac_in fractional bits -> sfi(32,30).
  function automatic coef_t to_coef(acc_t v, int unsigned frac_in);
    return coef_t'(saturate(rshift_round(v, frac_in - COEF_FRAC), COEF_W));
  endfunction

  function automatic cacc_t csig_ext(csig_t a);
    cacc_t r;
    r.i = acc_t'(a.i);
    r.q = acc_t'(a.q);
    return r;
  endfunction

  function automatic cacc_t ccoef_ext(ccoef_t a);
    cacc_t r;
    r.i = acc_t'(a.i);
    r.q = acc_t'(a.q);
    return r;
  endfunction

  function automatic cacc_t cconj(cacc_t a);
    cacc_t r;
    r.i = a.i;
    r.q = -a.q;
    return r;
  endfunction

  // Complex multiply; the result has the sum of the operands' fractional bits.
  function automatic cacc_t cmul(cacc_t a, cacc_t b);
    cacc_t r;
    r.i = a.i * b.i - a.q * b.q;
    r.q = a.i * b.q + a.q * b.i;
    return r;
  endfunction

  // Real (scalar) times complex.
  function automatic cacc_t rmul(acc_t s, cacc_t b);
    cacc_t r;
    r.i = s * b.i;
    r.q = s * b.q;
    return r;
  endfunction

  function automatic cacc_t cadd(cacc_t a, cacc_t b);
    cacc_t r;
    r.i = a.i + b.i;
    r.q = a.q + b.q;
    return r;
  endfunction

  function automatic cacc_t csub(cacc_t a, cacc_t b);
    cacc_t r;
    r.i = a.i - b.i;
    r.q = a.q - b.q;
    return r;
  endfunction

  function automatic cacc_t cshl(cacc_t a, int unsigned sh);
    cacc_t r;
    r.i = a.i <<< sh;
    r.q = a.q <<< sh;
    return r;
  endfunction

  function automatic csig_t cto_sig(cacc_t a, int unsigned frac_in);
    csig_t r;
    r.i = to_sig(a.i, frac_in);
    r.q = to_sig(a.q, frac_in);
    return r;
  endfunction

  function automatic ccoef_t cto_coef(cacc_t a, int unsigned frac_in);
    ccoef_t r;
    r.i = to_coef(a.i, frac_in);
    r.q = to_coef(a.q, frac_in);
    return r;
  endfunction

  // lambda^-1 in sfi(32,30), rounded, from lambda in sfi(32,30).
  function automatic coef_t lambda_inv(coef_t lam);
    acc_t num;
    num = acc_t'(1) <<< (2 * COEF_FRAC);
    return coef_t'(saturate((num + (acc_t'(lam) >>> 1)) / acc_t'(lam), COEF_W));
  endfunction

endpackage
