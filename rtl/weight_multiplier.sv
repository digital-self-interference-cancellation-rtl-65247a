// weight_multiplier: the L complex multipliers and the adder of the adaptive
// FIR filter, producing the estimated self-interference
//     x_hat_SI[n] = sum_k  w'_k[n] * x[n-k],   k = 0..L-1
// where w'_k is the conjugate of w_k for the LMS and NLMS filters (CONJ_W=1)
// and w_k itself for the RLS filter (CONJ_W=0), as in the filters' defining
// equations.
//
// Weights are sfi(32,30), taps sfi(16,14); the products and their sum are kept
// at full precision (44 fractional bits) so that the only rounding happens
// when the cancelled RX sample is formed. Purely combinational.
module weight_multiplier
  import dsic_pkg::*;
#(
  parameter int unsigned L      = 3,
  parameter bit          CONJ_W = 1'b1
) (
  input  csig_t  taps_i [L],
  input  ccoef_t w_i    [L],
  output cacc_t  xhat_o        // SIG_FRAC + COEF_FRAC fractional bits
);

  always_comb begin
    cacc_t acc;
    cacc_t wk;
    acc = '0;
    for (int k = 0; k < L; k++) begin
      wk  = CONJ_W ? cconj(ccoef_ext(w_i[k])) : ccoef_ext(w_i[k]);
      acc = cadd(acc, cmul(wk, csig_ext(taps_i[k])));
    end
    xhat_o = acc;
  end

endmodule
