// rls_weight_updater: weight registers and RLS adaptation policy.
//
// For each of the L taps a gain updater computes g_k from the tap's
// inverse-covariance value P_k and the tap sample x[n-k]; on every enabled
// clock edge the weight and P_k are updated from the same-cycle gain:
//     w_k[n+1] = w_k[n] + d_hat[n] * conj(g_k)
//     P_k[n+1] = lambda^-1 * P_k[n] * (1 - g_k * conj(x[n-k]))
// Each tap has its own scalar P_k (a per-tap recursion, not a full LxL
// inverse-covariance matrix), as the filter was specified. Weights reset to
// zero, P_k to P_INIT.
//
// Timing: one full update per enabled clock edge; the gain is not stored.
module rls_weight_updater
  import dsic_pkg::*;
#(
  parameter int unsigned L      = 3,
  parameter coef_t       LAMBDA = LAMBDA_DEFAULT,
  parameter coef_t       P_INIT = COEF_ONE
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  csig_t  taps_i [L],
  input  csig_t  dhat_i,
  output ccoef_t w_o    [L],
  output ccoef_t p_o    [L]
);

  localparam int unsigned INC_FRAC = SIG_FRAC + G_FRAC;  // d_hat * conj(g)

  ccoef_t w_q    [L];
  ccoef_t w_next [L];
  cacc_t  g      [L];

  for (genvar k = 0; k < L; k++) begin : g_tap
    rls_gain_updater #(.LAMBDA(LAMBDA)) u_gain (
      .p_i (p_o[k]),
      .x_i (taps_i[k]),
      .g_o (g[k])
    );
    rls_p_updater #(.LAMBDA(LAMBDA), .P_INIT(P_INIT)) u_p (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .g_i   (g[k]),
      .x_i   (taps_i[k]),
      .p_o   (p_o[k])
    );
  end

  always_comb begin
    for (int k = 0; k < L; k++) begin
      w_next[k] = cto_coef(cadd(cshl(ccoef_ext(w_q[k]), INC_FRAC - COEF_FRAC),
                                cmul(csig_ext(dhat_i), cconj(g[k]))), INC_FRAC);
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
