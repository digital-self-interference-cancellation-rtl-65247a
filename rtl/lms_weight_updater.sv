// lms_weight_updater: weight registers and LMS adaptation policy.
//
// Holds the L complex weights w_k (sfi(32,30), reset to zero) and, on every
// enabled clock edge (one accepted sample), applies
//     w_k[n+1] = w_k[n] + mu * conj(d_hat[n]) * x[n-k]
// using the cancelled RX sample d_hat[n] of the same cycle (the feedback
// signal). mu * conj(d_hat) is formed once and shared by all taps; each
// increment is kept at full precision and rounded once, with saturation, when
// the new weight is stored. The step size MU is an sfi(32,30) constant fixed
// at instantiation.
//
// Timing: new weights are visible the cycle after `en`.
module lms_weight_updater
  import dsic_pkg::*;
#(
  parameter int unsigned L  = 3,
  parameter coef_t       MU = MU_DEFAULT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  csig_t  taps_i [L],
  input  csig_t  dhat_i,
  output ccoef_t w_o    [L]
);

  localparam int unsigned E_FRAC   = COEF_FRAC + SIG_FRAC;  // mu * d_hat
  localparam int unsigned INC_FRAC = E_FRAC + SIG_FRAC;     // * x[n-k]

  ccoef_t w_q    [L];
  ccoef_t w_next [L];

  always_comb begin
    cacc_t e;
    e = rmul(acc_t'(MU), cconj(csig_ext(dhat_i)));
    for (int k = 0; k < L; k++) begin
      w_next[k] = cto_coef(cadd(cshl(ccoef_ext(w_q[k]), INC_FRAC - COEF_FRAC),
                                cmul(e, csig_ext(taps_i[k]))), INC_FRAC);
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
