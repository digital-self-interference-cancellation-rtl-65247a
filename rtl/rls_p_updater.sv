// rls_p_updater: the inverse-covariance register of one RLS tap,
//     P_k[n+1] = lambda^-1 * P_k[n] * (1 - g_k[n] * conj(x[n-k])),  P_k[0] = 1/sigma^2
//
// P_k is a complex sfi(32,30) register. lambda^-1 * P_k and
// (1 - g_k * conj(x[n-k])) are formed at full precision, multiplied, and the
// product is rounded and saturated to sfi(32,30) when it is stored. The reset
// value P_INIT stands for 1/sigma^2; its default 1.0 (sigma^2 = 1) is this
// implementation's choice. lambda is given as sfi(32,30) and lambda^-1 is
// computed from it at elaboration.
//
// Timing: updated on each enabled clock edge; the output is the register.
module rls_p_updater
  import dsic_pkg::*;
#(
  parameter coef_t LAMBDA = LAMBDA_DEFAULT,
  parameter coef_t P_INIT = COEF_ONE
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  cacc_t  g_i,   // G_FRAC fractional bits
  input  csig_t  x_i,
  output ccoef_t p_o
);

  localparam coef_t       LAMBDA_INV = lambda_inv(LAMBDA);
  localparam int unsigned A_FRAC     = 2 * COEF_FRAC;       // lambda^-1 * P
  localparam int unsigned T_FRAC     = G_FRAC + SIG_FRAC;   // 1 - g * conj(x)

  ccoef_t p_q;
  ccoef_t p_next;

  always_comb begin
    cacc_t a, t, one;
    a      = rmul(acc_t'(LAMBDA_INV), ccoef_ext(p_q));
    one.i  = acc_t'(1) <<< T_FRAC;
    one.q  = '0;
    t      = csub(one, cmul(g_i, cconj(csig_ext(x_i))));
    p_next = cto_coef(cmul(a, t), A_FRAC + T_FRAC);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_q.i <= P_INIT;
      p_q.q <= '0;
    end else if (en) begin
      p_q <= p_next;
    end
  end

  assign p_o = p_q;

endmodule
