// rls_gain_updater: the per-tap gain of the RLS filter,
//     g_k = lambda^-1 * P_k * x[n-k] / (1 + lambda^-1 * P_k * x[n-k] * conj(x[n-k]))
//
// The numerator lambda^-1 * P_k * x[n-k] is complex; it is multiplied by
// conj(x[n-k]) and 1 is added to form the denominator, and the complex divider
// divides the numerator by the denominator. The divider takes a real
// denominator, so the real part of the denominator is used (for the real P_k
// values the recursion produces, its imaginary part is zero apart from
// rounding). Numerator and denominator are rounded to G_FRAC (40) fractional
// bits before the division and the gain comes out with G_FRAC fractional
// bits; these internal precisions are this implementation's choice.
//
// Interface: P_k (sfi(32,30) complex), x[n-k] (sfi(16,14) complex), gain out.
// Purely combinational; the gain is not stored.
module rls_gain_updater
  import dsic_pkg::*;
#(
  parameter coef_t LAMBDA = LAMBDA_DEFAULT
) (
  input  ccoef_t p_i,
  input  csig_t  x_i,
  output cacc_t  g_o   // G_FRAC fractional bits
);

  localparam coef_t       LAMBDA_INV = lambda_inv(LAMBDA);
  localparam int unsigned A_FRAC     = 2 * COEF_FRAC;        // lambda^-1 * P
  localparam int unsigned N_FRAC     = A_FRAC + SIG_FRAC;    // * x
  localparam int unsigned S_FRAC     = G_FRAC + SIG_FRAC;    // num * conj(x)

  cacc_t num;   // G_FRAC fractional bits
  acc_t  den;   // G_FRAC fractional bits

  always_comb begin
    cacc_t a, n_full;
    acc_t  s_re;
    a        = rmul(acc_t'(LAMBDA_INV), ccoef_ext(p_i));
    n_full   = cmul(a, csig_ext(x_i));
    num.i    = rshift_round(n_full.i, N_FRAC - G_FRAC);
    num.q    = rshift_round(n_full.q, N_FRAC - G_FRAC);
    // Re(num * conj(x)) = num.i * x.i + num.q * x.q
    s_re     = num.i * acc_t'(x_i.i) + num.q * acc_t'(x_i.q);
    den      = (acc_t'(1) <<< G_FRAC) + rshift_round(s_re, S_FRAC - G_FRAC);
  end

  complex_divide #(.SHIFT(G_FRAC)) u_div (
    .num_i (num),
    .den_i (den),
    .quo_o (g_o)
  );

endmodule
