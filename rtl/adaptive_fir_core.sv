// adaptive_fir_core: adaptive FIR filter core for digital self-interference
// cancellation, with AXI4-Stream input and output.
//
// Each input frame carries one TX sample x[n] and the RX sample r[n] that was
// received at the same time, so the two sequences can never slip against each
// other. The core keeps x[n] in an L-tap delay line, estimates the
// self-interference x_hat_SI[n] = sum_k w'_k x[n-k] with the current weights,
// subtracts it from r[n] and sends the cancelled RX sample
//     d_hat[n] = r[n] - x_hat_SI[n]
// out, rounded and saturated to sfi(16,14). The same d_hat[n] is fed back to
// the weight updater, which adapts the weights once per sample with the policy
// chosen by FILTER:
//   FILT_LMS   w_k += mu * conj(d_hat) * x[n-k]               (w' = conj(w))
//   FILT_NLMS  as LMS, normalised by c + sum |x[n-j]|^2      (w' = conj(w))
//   FILT_RLS   per-tap gain / inverse-covariance recursion    (w' = w)
// Weights start at zero after reset. L, the sfi formats, the frame layout and
// the one-iteration-per-sample structure follow the filter specification;
// the AXI4-Stream handshake below is this implementation's choice.
//
// Interface:
//   s_axis_*  64-bit frame: x[n] in [63:32], r[n] in [31:0], each complex
//             word Q in the upper 16 bits, I in the lower 16 bits.
//   m_axis_*  32-bit d_hat[n]: Q in [31:16], I in [15:0].
//   weights_o current weights w_0..w_{L-1}, sfi(32,30) complex (monitoring).
// Timing: a frame is accepted on a clock edge where s_axis_tvalid and
// s_axis_tready are high; its d_hat appears on m_axis one cycle later and the
// weights it produced are visible from that cycle on. One sample per clock is
// sustained while m_axis_tready is high; with m_axis_tready low the output is
// held and s_axis_tready drops (no sample is lost or adapted twice). The whole
// filter-and-update path is a single combinational step between registers.
module adaptive_fir_core
  import dsic_pkg::*;
#(
  parameter filter_e     FILTER = FILT_LMS,
  parameter int unsigned L      = 3,
  parameter coef_t       MU     = MU_DEFAULT,               // LMS / NLMS step size
  parameter coef_t       C_SAFE = coef_t'(32'sd1048576),    // NLMS safety constant, 2^-10
  parameter coef_t       LAMBDA = LAMBDA_DEFAULT,           // RLS forgetting factor
  parameter coef_t       P_INIT = COEF_ONE                  // RLS 1/sigma^2
) (
  input  logic      clk,
  input  logic      rst_n,
  // AXI4-Stream slave: {x[n], r[n]}
  input  in_frame_t s_axis_tdata,
  input  logic      s_axis_tvalid,
  output logic      s_axis_tready,
  // AXI4-Stream master: d_hat[n]
  output csig_t     m_axis_tdata,
  output logic      m_axis_tvalid,
  input  logic      m_axis_tready,
  // weight monitor
  output ccoef_t    weights_o [L]
);

  localparam int unsigned XHAT_FRAC = COEF_FRAC + SIG_FRAC;

  logic   accept;
  csig_t  taps [L];
  cacc_t  xhat;
  csig_t  dhat;

  assign s_axis_tready = !m_axis_tvalid || m_axis_tready;
  assign accept        = s_axis_tvalid && s_axis_tready;

  filter_taps #(.L(L)) u_taps (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (accept),
    .x_i    (s_axis_tdata.x),
    .taps_o (taps)
  );

  weight_multiplier #(.L(L), .CONJ_W(FILTER != FILT_RLS)) u_mult (
    .taps_i (taps),
    .w_i    (weights_o),
    .xhat_o (xhat)
  );

  // Cancellation: d_hat = r - x_hat_SI, rounded and saturated to sfi(16,14).
  assign dhat = cto_sig(csub(cshl(csig_ext(s_axis_tdata.r), COEF_FRAC), xhat), XHAT_FRAC);

  if (FILTER == FILT_LMS) begin : g_lms
    lms_weight_updater #(.L(L), .MU(MU)) u_upd (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (accept),
      .taps_i (taps),
      .dhat_i (dhat),
      .w_o    (weights_o)
    );
  end else if (FILTER == FILT_NLMS) begin : g_nlms
    nlms_weight_updater #(.L(L), .MU(MU), .C_SAFE(C_SAFE)) u_upd (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (accept),
      .taps_i (taps),
      .dhat_i (dhat),
      .w_o    (weights_o)
    );
  end else begin : g_rls
    ccoef_t p_mon [L];
    rls_weight_updater #(.L(L), .LAMBDA(LAMBDA), .P_INIT(P_INIT)) u_upd (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (accept),
      .taps_i (taps),
      .dhat_i (dhat),
      .w_o    (weights_o),
      .p_o    (p_mon)
    );
  end

  // Output register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_axis_tvalid <= 1'b0;
      m_axis_tdata  <= '0;
    end else if (s_axis_tready) begin
      m_axis_tvalid <= s_axis_tvalid;
      if (s_axis_tvalid) m_axis_tdata <= dhat;
    end
  end

  // AXI4-Stream rule: a presented output stays presented and unchanged until
  // it is taken.
  a_axis_hold : assert property (@(posedge clk) disable iff (!rst_n)
      m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata))
    else $error("m_axis output changed while stalled");

endmodule
