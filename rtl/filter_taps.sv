// filter_taps: the tapped delay line of the adaptive FIR filter.
//
// The TX sample x[n] passes through L-1 delay elements (z^-1), giving the L
// tap values x[n], x[n-1], ..., x[n-L+1] that the weight multiplier and the
// weight updater use. Tap 0 is the current input itself (combinational), taps
// 1..L-1 are registers. The line advances by one sample on every clock edge
// where `en` is high, i.e. once per accepted input sample; this gating and the
// synchronous active-low reset to zero are this implementation's choices.
//
// Interface: x_i (sfi(16,14) complex), taps_o[L] (tap k = x[n-k]).
// Timing: tap k shows the sample accepted k enables earlier.
module filter_taps
  import dsic_pkg::*;
#(
  parameter int unsigned L = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  csig_t x_i,
  output csig_t taps_o [L]
);

  csig_t dly_q [L];  // dly_q[0] unused, dly_q[k] holds x[n-k]

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k < L; k++) dly_q[k] <= '0;
    end else if (en) begin
      dly_q[1] <= x_i;
      for (int k = 2; k < L; k++) dly_q[k] <= dly_q[k-1];
    end
  end

  always_comb begin
    taps_o[0] = x_i;
    for (int k = 1; k < L; k++) taps_o[k] = dly_q[k];
  end

  // dly_q[0] is never written; tie it to keep the array fully defined.
  assign dly_q[0] = '0;

endmodule
