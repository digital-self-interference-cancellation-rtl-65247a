// dsic_top: digital self-interference cancellation subsystem with the three
// adaptive FIR filter cores - LMS, NLMS and RLS - side by side.
//
// The three cores are independent alternatives for the same job: each takes
// its own stream of {x[n], r[n]} frames and returns its own stream of
// cancelled RX samples d_hat[n], so they can be fed the same signal and
// compared, or used one at a time. All three have filter length L = 3 and the
// step size / forgetting factor used in the reference evaluation
// (mu = 0.001, lambda = 0.999), given as sfi(32,30) parameters.
//
// Ports per core (prefix lms_, nlms_, rls_): an AXI4-Stream slave with the
// 64-bit input frame (x[n] in [63:32], r[n] in [31:0]), an AXI4-Stream
// master with the 32-bit d_hat[n] (Q in [31:16], I in [15:0]) and the current
// weights for monitoring. One clock and one synchronous active-low reset are
// shared. Each core accepts one frame per clock and answers one cycle later.
// The DMA buffer and processor system that fill and drain these streams, and
// the memory and DAC downlink path after them, are outside this module.
module dsic_top
  import dsic_pkg::*;
#(
  parameter int unsigned L       = 3,
  parameter coef_t       MU_LMS  = MU_DEFAULT,
  parameter coef_t       MU_NLMS = MU_DEFAULT,
  parameter coef_t       C_SAFE  = coef_t'(32'sd1048576),
  parameter coef_t       LAMBDA  = LAMBDA_DEFAULT,
  parameter coef_t       P_INIT  = COEF_ONE
) (
  input  logic      clk,
  input  logic      rst_n,

  input  in_frame_t lms_s_axis_tdata,
  input  logic      lms_s_axis_tvalid,
  output logic      lms_s_axis_tready,
  output csig_t     lms_m_axis_tdata,
  output logic      lms_m_axis_tvalid,
  input  logic      lms_m_axis_tready,
  output ccoef_t    lms_weights_o [L],

  input  in_frame_t nlms_s_axis_tdata,
  input  logic      nlms_s_axis_tvalid,
  output logic      nlms_s_axis_tready,
  output csig_t     nlms_m_axis_tdata,
  output logic      nlms_m_axis_tvalid,
  input  logic      nlms_m_axis_tready,
  output ccoef_t    nlms_weights_o [L],

  input  in_frame_t rls_s_axis_tdata,
  input  logic      rls_s_axis_tvalid,
  output logic      rls_s_axis_tready,
  output csig_t     rls_m_axis_tdata,
  output logic      rls_m_axis_tvalid,
  input  logic      rls_m_axis_tready,
  output ccoef_t    rls_weights_o [L]
);

  adaptive_fir_core #(.FILTER(FILT_LMS), .L(L), .MU(MU_LMS)) u_lms (
    .clk           (clk),
    .rst_n         (rst_n),
    .s_axis_tdata  (lms_s_axis_tdata),
    .s_axis_tvalid (lms_s_axis_tvalid),
    .s_axis_tready (lms_s_axis_tready),
    .m_axis_tdata  (lms_m_axis_tdata),
    .m_axis_tvalid (lms_m_axis_tvalid),
    .m_axis_tready (lms_m_axis_tready),
    .weights_o     (lms_weights_o)
  );

  adaptive_fir_core #(.FILTER(FILT_NLMS), .L(L), .MU(MU_NLMS), .C_SAFE(C_SAFE)) u_nlms (
    .clk           (clk),
    .rst_n         (rst_n),
    .s_axis_tdata  (nlms_s_axis_tdata),
    .s_axis_tvalid (nlms_s_axis_tvalid),
    .s_axis_tready (nlms_s_axis_tready),
    .m_axis_tdata  (nlms_m_axis_tdata),
    .m_axis_tvalid (nlms_m_axis_tvalid),
    .m_axis_tready (nlms_m_axis_tready),
    .weights_o     (nlms_weights_o)
  );

  adaptive_fir_core #(.FILTER(FILT_RLS), .L(L), .LAMBDA(LAMBDA), .P_INIT(P_INIT)) u_rls (
    .clk           (clk),
    .rst_n         (rst_n),
    .s_axis_tdata  (rls_s_axis_tdata),
    .s_axis_tvalid (rls_s_axis_tvalid),
    .s_axis_tready (rls_s_axis_tready),
    .m_axis_tdata  (rls_m_axis_tdata),
    .m_axis_tvalid (rls_m_axis_tvalid),
    .m_axis_tready (rls_m_axis_tready),
    .weights_o     (rls_weights_o)
  );

endmodule
