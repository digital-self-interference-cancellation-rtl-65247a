// nlms_weight_updater: weight registers and NLMS adaptation policy.
//
// Same structure as the LMS updater, but the step is normalised by the power
// held in the tap line:
//     w_k[n+1] = w_k[n] + mu * conj(d_hat[n]) * x[n-k] / (c + sum_j |x[n-j]|^2)
// The common factor mu * conj(d_hat[n]) is divided once by the real
// normalisation term in a complex divider, and the quotient is multiplied by
// each tap x[n-k]. The safety constant c (C_SAFE, sfi(32,30)) keeps the
// denominator above zero; its value is this implementation's choice.
//
// Timing: combinational update path, new weights visible the cycle after `en`.
module nlms_weight_updater
  import dsic_pkg::*;
#(
  parameter int unsigned L      = 3,
  parameter coef_t       MU     = MU_DEFAULT,
  parameter coef_t       C_SAFE = coef_t'(32'sd1048576)  // 2^-10
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  csig_t  taps_i [L],
  input  csig_t  dhat_i,
  output ccoef_t w_o    [L]
);

  localparam int unsigned E_FRAC   = COEF_FRAC + SIG_FRAC;  // mu * d_hat
  localparam int unsigned PWR_FRAC = 2 * SIG_FRAC;          // |x|^2
  localparam int unsigned INC_FRAC = E_FRAC + SIG_FRAC;     // quotient * x

  ccoef_t w_q    [L];
  ccoef_t w_next [L];
  cacc_t  num;
  acc_t   den;
  cacc_t  quo;  // E_FRAC fractional bits

  always_comb begin
    acc_t pwr;
    pwr = '0;
    for (int k = 0; k < L; k++) begin
      pwr = pwr + acc_t'(taps_i[k].i) * acc_t'(taps_i[k].i)
                + acc_t'(taps_i[k].q) * acc_t'(taps_i[k].q);
    end
    // Denominator in COEF_FRAC fractional bits.
    den = acc_t'(C_SAFE) + (pwr <<< (COEF_FRAC - PWR_FRAC));
    num = rmul(acc_t'(MU), cconj(csig_ext(dhat_i)));
  end

  complex_divide #(.SHIFT(COEF_FRAC)) u_div (
    .num_i (num),
    .den_i (den),
    .quo_o (quo)
  );

  always_comb begin
    for (int k = 0; k < L; k++) begin
      w_next[k] = cto_coef(cadd(cshl(ccoef_ext(w_q[k]), INC_FRAC - COEF_FRAC),
                                cmul(quo, csig_ext(taps_i[k]))), INC_FRAC);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < L; k++) w_q[k] <= '0;
    end else if (en) begin
      for (int k = 0; k < L; k++) w_q[k] <= w_next[k];
    end
  end

  assign w_o = w_q;

endmodule
