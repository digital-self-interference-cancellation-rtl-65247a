// tb_adaptive_fir_core: self-checking test of the adaptive FIR filter core in
// all three configurations (LMS, NLMS, RLS).
//
// A stream of QPSK TX symbols x[n] is passed through a fixed three-tap complex
// self-interference channel and added to an independent QPSK "desired" signal
// d[n] plus small noise to form r[n]. Each core receives the same frames with
// random input bubbles and random output back-pressure. The testbench checks:
//   - every d_hat against a double-precision model of the filter equations
//     (within 3 LSB of sfi(16,14));
//   - rate: the first 500 frames, offered back to back with the output always
//     ready, are taken one per clock (500 cycles, s_axis_tready never low);
//   - one-cycle latency: m_axis_tvalid is high the cycle after each accepted
//     frame, and s_axis_tready is low while an output is stalled;
//   - cancellation: over the last 1000 samples the residual |d_hat - d|^2 is
//     below 5 % of the self-interference power |r - d|^2.
// The step size is raised to 0.004 to shorten the run.
module tb_adaptive_fir_core;
  import dsic_pkg::*;
  import tb_dsic_pkg::*;

  localparam int N      = 6000;
  localparam int TOL    = 3;
  localparam int BURST  = 500;
  localparam real MU_R  = 0.004;
  localparam real LAM_R = 0.999;
  localparam coef_t MU_Q = coef_t'(32'sd4294967);  // 0.004 in sfi(32,30)

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  in_frame_t frames [N];
  cr_t       dsym   [N];

  in_frame_t s_data  [3];
  logic      s_valid [3];
  logic      s_ready [3];
  csig_t     m_data  [3];
  logic      m_valid [3];
  logic      m_ready [3];
  ccoef_t    w_lms [3], w_nlms [3], w_rls [3];

  adaptive_fir_core #(.FILTER(FILT_LMS), .MU(MU_Q)) dut_lms (
    .clk(clk), .rst_n(rst_n),
    .s_axis_tdata(s_data[0]), .s_axis_tvalid(s_valid[0]), .s_axis_tready(s_ready[0]),
    .m_axis_tdata(m_data[0]), .m_axis_tvalid(m_valid[0]), .m_axis_tready(m_ready[0]),
    .weights_o(w_lms));
  adaptive_fir_core #(.FILTER(FILT_NLMS), .MU(MU_Q)) dut_nlms (
    .clk(clk), .rst_n(rst_n),
    .s_axis_tdata(s_data[1]), .s_axis_tvalid(s_valid[1]), .s_axis_tready(s_ready[1]),
    .m_axis_tdata(m_data[1]), .m_axis_tvalid(m_valid[1]), .m_axis_tready(m_ready[1]),
    .weights_o(w_nlms));
  adaptive_fir_core #(.FILTER(FILT_RLS)) dut_rls (
    .clk(clk), .rst_n(rst_n),
    .s_axis_tdata(s_data[2]), .s_axis_tvalid(s_valid[2]), .s_axis_tready(s_ready[2]),
    .m_axis_tdata(m_data[2]), .m_axis_tvalid(m_valid[2]), .m_axis_tready(m_ready[2]),
    .weights_o(w_rls));

  ref_filter mdl [3];
  csig_t     expq [3][$];
  int        idx [3];
  int        nout [3];
  logic      took [3];
  logic      exp_valid [3];
  real       res_pwr [3];
  real       si_pwr  [3];
  int        stalls  [3];
  int        burst_cycles [3];

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  // Stimulus generation.
  initial begin
    cr_t h [3];
    cr_t xs [N];
    h[0] = cr(0.6, 0.3);
    h[1] = cr(-0.25, 0.1);
    h[2] = cr(0.1, -0.05);
    for (int n = 0; n < N; n++) begin
      cr_t si;
      xs[n]   = qpsk(0.5);
      dsym[n] = qpsk(0.25);
      si = cr(0.0, 0.0);
      for (int k = 0; k < 3; k++)
        if (n - k >= 0) si = cr_add(si, cr_mul(h[k], xs[n-k]));
      frames[n].x = c2sig(xs[n]);
      frames[n].r = c2sig(cr_add(cr_add(si, dsym[n]), unoise(0.01)));
    end
    mdl[0] = new(FILT_LMS,  MU_R, coef2r(coef_t'(32'sd1048576)), LAM_R, 1.0);
    mdl[1] = new(FILT_NLMS, MU_R, coef2r(coef_t'(32'sd1048576)), LAM_R, 1.0);
    mdl[2] = new(FILT_RLS,  MU_R, 0.0, coef2r(LAMBDA_DEFAULT), 1.0);
    for (int c = 0; c < 3; c++) begin
      idx[c] = 0; nout[c] = 0; took[c] = 0; exp_valid[c] = 0;
      res_pwr[c] = 0.0; si_pwr[c] = 0.0; stalls[c] = 0; burst_cycles[c] = 0;
      s_valid[c] = 0; s_data[c] = '0; m_ready[c] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  // Drive on the falling edge, obeying the AXI4-Stream valid rule.
  always @(negedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < 3; c++) begin
        if (took[c]) idx[c]++;
        // The first BURST frames are streamed back to back with no
        // back-pressure to check the rate of one sample per clock.
        if (!(s_valid[c] && !took[c]))
          s_valid[c] = (idx[c] < N) && (idx[c] < BURST || $urandom_range(7) != 0);
        if (idx[c] < N) s_data[c] = frames[idx[c]];
        m_ready[c] = (idx[c] < BURST) || ($urandom_range(4) != 0);
      end
    end
  end

  // Monitor on the rising edge (sees the values the edge acts on).
  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < 3; c++) begin
        if (exp_valid[c])
          check(m_valid[c] == 1'b1, $sformatf("core %0d: no output one cycle after accept", c));
        if (idx[c] < BURST && s_valid[c])
          check(s_ready[c] == 1'b1, $sformatf("core %0d: not ready during back-to-back burst", c));
        if (idx[c] == BURST && took[c])
          check(burst_cycles[c] == BURST, $sformatf("core %0d: burst of %0d frames took %0d cycles", c, BURST, burst_cycles[c]));
        if (idx[c] < BURST && s_valid[c]) burst_cycles[c]++;
        if (m_valid[c] && !m_ready[c]) begin
          stalls[c]++;
          check(s_ready[c] == 1'b0, $sformatf("core %0d: input ready while output stalled", c));
        end
        if (m_valid[c] && m_ready[c]) begin
          csig_t e;
          int di, dq;
          e  = expq[c].pop_front();
          di = int'(m_data[c].i) - int'(e.i);
          dq = int'(m_data[c].q) - int'(e.q);
          check(di <= TOL && di >= -TOL && dq <= TOL && dq >= -TOL,
                $sformatf("core %0d sample %0d: got %0d/%0d expected %0d/%0d", c, nout[c],
                          int'(m_data[c].i), int'(m_data[c].q), int'(e.i), int'(e.q)));
          if (nout[c] >= N - 1000) begin
            res_pwr[c] += cr_abs2(cr_sub(sig2c(m_data[c]), dsym[nout[c]]));
            si_pwr[c]  += cr_abs2(cr_sub(sig2c(frames[nout[c]].r), dsym[nout[c]]));
          end
          nout[c]++;
        end
        took[c]      = s_valid[c] && s_ready[c];
        exp_valid[c] = took[c];
        if (took[c]) expq[c].push_back(mdl[c].step(frames[idx[c]].x, frames[idx[c]].r));
      end
    end
  end

  initial begin
    wait (rst_n);
    wait (nout[0] == N && nout[1] == N && nout[2] == N);
    for (int c = 0; c < 3; c++) begin
      $display("core %0d: residual/SI power = %f, stalls = %0d", c, res_pwr[c] / si_pwr[c], stalls[c]);
      check(res_pwr[c] < 0.05 * si_pwr[c], $sformatf("core %0d did not cancel the SI", c));
      check(stalls[c] > 0, $sformatf("core %0d never stalled", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * N) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
