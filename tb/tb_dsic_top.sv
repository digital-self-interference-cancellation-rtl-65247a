// tb_dsic_top: end-to-end run of the DSIC subsystem with all parameters at
// their defaults (L = 3, mu = 0.001 for LMS and NLMS, lambda = 0.999 for RLS).
//
// The same signal is streamed through the LMS, NLMS and RLS cores. x[n] and
// the desired signal d[n] are independent QPSK sequences; r[n] is d[n] plus
// additive noise (about 20 dB SNR) plus x[n] through a three-tap complex
// self-interference channel whose gain follows three segments:
//   1. SI gain -5 dB  (initial convergence from zero weights)
//   2. SI gain  0 dB  (de-convergence and re-convergence after a gain step)
//   3. channel sign flipped at +5 dB (the filters' estimate is wrong by far
//      more than the sfi(16,14) range, so d_hat saturates until they adapt)
// Each core sees random input bubbles and random output back-pressure.
// Checked: every d_hat against a floating-point model of the filter
// equations (8 LSB), one-cycle latency, no input taken while the output is
// stalled, cancellation depth at the end of segments 1 and 2, and that each
// mechanism (stall, bubble, convergence, de-convergence, re-convergence,
// output saturation) happened for every core. The measured initial and
// re-convergence times and the RMS EVM figures are printed.
module tb_dsic_top;
  import dsic_pkg::*;
  import tb_dsic_pkg::*;

  localparam int SEG1 = 12000;
  localparam int SEG2 = 12000;
  localparam int SEG3 = 3000;
  localparam int N    = SEG1 + SEG2 + SEG3;
  localparam int TOL  = 8;   // rounding of P and w accumulates over 27k RLS updates
  localparam int WIN  = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  in_frame_t frames [N];
  cr_t       dsym   [N];
  cr_t       dawgn  [N];

  in_frame_t s_data  [3];
  logic      s_valid [3];
  logic      s_ready [3];
  csig_t     m_data  [3];
  logic      m_valid [3];
  logic      m_ready [3];
  ccoef_t    w_lms [3], w_nlms [3], w_rls [3];

  dsic_top dut (
    .clk(clk), .rst_n(rst_n),
    .lms_s_axis_tdata(s_data[0]), .lms_s_axis_tvalid(s_valid[0]), .lms_s_axis_tready(s_ready[0]),
    .lms_m_axis_tdata(m_data[0]), .lms_m_axis_tvalid(m_valid[0]), .lms_m_axis_tready(m_ready[0]),
    .lms_weights_o(w_lms),
    .nlms_s_axis_tdata(s_data[1]), .nlms_s_axis_tvalid(s_valid[1]), .nlms_s_axis_tready(s_ready[1]),
    .nlms_m_axis_tdata(m_data[1]), .nlms_m_axis_tvalid(m_valid[1]), .nlms_m_axis_tready(m_ready[1]),
    .nlms_weights_o(w_nlms),
    .rls_s_axis_tdata(s_data[2]), .rls_s_axis_tvalid(s_valid[2]), .rls_s_axis_tready(s_ready[2]),
    .rls_m_axis_tdata(m_data[2]), .rls_m_axis_tvalid(m_valid[2]), .rls_m_axis_tready(m_ready[2]),
    .rls_weights_o(w_rls));

  ref_filter mdl [3];
  csig_t     expq [3][$];
  int        idx [3];
  int        nout [3];
  logic      took [3];
  logic      exp_valid [3];
  real       res [3][N];     // |d_hat - d|^2 per sample
  int        stalls [3], bubbles [3], sats [3];
  string     name [3] = '{"LMS", "NLMS", "RLS"};

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  function automatic real mean_res(int c, int from, int to);
    real s;
    s = 0.0;
    for (int n = from; n < to; n++) s += res[c][n];
    return s / real'(to - from);
  endfunction

  // First sample after `from` at which the windowed residual falls below lim.
  function automatic int settle(int c, int from, int to, real lim);
    for (int n = from; n + WIN <= to; n += 10)
      if (mean_res(c, n, n + WIN) < lim) return n + WIN - from;
    return -1;
  endfunction

  initial begin
    cr_t h0 [3];
    cr_t xs [N];
    h0[0] = cr(0.8, 0.3);
    h0[1] = cr(-0.25, 0.1);
    h0[2] = cr(0.1, -0.05);
    for (int n = 0; n < N; n++) begin
      cr_t si;
      real gain;
      gain = (n < SEG1) ? 0.5623 : (n < SEG1 + SEG2) ? 1.0 : -1.7783;
      xs[n]    = qpsk(0.5);
      dsym[n]  = qpsk(0.25);
      dawgn[n] = cr_add(dsym[n], unoise(0.043));
      si = cr(0.0, 0.0);
      for (int k = 0; k < 3; k++)
        if (n - k >= 0) si = cr_add(si, cr_scale(gain, cr_mul(h0[k], xs[n-k])));
      frames[n].x = c2sig(xs[n]);
      frames[n].r = c2sig(cr_add(si, dawgn[n]));
    end
    mdl[0] = new(FILT_LMS,  coef2r(MU_DEFAULT), 1.0 / 1024.0, 0.0, 1.0);
    mdl[1] = new(FILT_NLMS, coef2r(MU_DEFAULT), 1.0 / 1024.0, 0.0, 1.0);
    mdl[2] = new(FILT_RLS,  0.0, 0.0, coef2r(LAMBDA_DEFAULT), 1.0);
    for (int c = 0; c < 3; c++) begin
      idx[c] = 0; nout[c] = 0; took[c] = 0; exp_valid[c] = 0;
      stalls[c] = 0; bubbles[c] = 0; sats[c] = 0;
      s_valid[c] = 0; s_data[c] = '0; m_ready[c] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < 3; c++) begin
        if (took[c]) idx[c]++;
        if (!(s_valid[c] && !took[c]))
          s_valid[c] = (idx[c] < N) && ($urandom_range(9) != 0);
        if (idx[c] < N) s_data[c] = frames[idx[c]];
        m_ready[c] = ($urandom_range(7) != 0);
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < 3; c++) begin
        if (exp_valid[c])
          check(m_valid[c] == 1'b1, $sformatf("%s: no output one cycle after accept", name[c]));
        if (m_valid[c] && !m_ready[c]) begin
          stalls[c]++;
          check(s_ready[c] == 1'b0, $sformatf("%s: input ready while output stalled", name[c]));
        end
        if (!s_valid[c] && s_ready[c] && idx[c] < N) bubbles[c]++;
        if (m_valid[c] && m_ready[c]) begin
          csig_t e;
          int di, dq;
          e  = expq[c].pop_front();
          di = int'(m_data[c].i) - int'(e.i);
          dq = int'(m_data[c].q) - int'(e.q);
          check(di <= TOL && di >= -TOL && dq <= TOL && dq >= -TOL,
                $sformatf("%s sample %0d: got %0d/%0d expected %0d/%0d", name[c], nout[c],
                          int'(m_data[c].i), int'(m_data[c].q), int'(e.i), int'(e.q)));
          if (m_data[c].i == 16'sh7fff || m_data[c].i == -16'sh8000 ||
              m_data[c].q == 16'sh7fff || m_data[c].q == -16'sh8000) sats[c]++;
          res[c][nout[c]] = cr_abs2(cr_sub(sig2c(m_data[c]), dsym[nout[c]]));
          nout[c]++;
        end
        took[c]      = s_valid[c] && s_ready[c];
        exp_valid[c] = took[c];
        if (took[c]) expq[c].push_back(mdl[c].step(frames[idx[c]].x, frames[idx[c]].r));
      end
    end
  end

  initial begin
    real d_pwr, awgn_pwr, r_pwr;
    wait (rst_n);
    wait (nout[0] == N && nout[1] == N && nout[2] == N);
    d_pwr = 0.0; awgn_pwr = 0.0; r_pwr = 0.0;
    for (int n = SEG1 - 1000; n < SEG1; n++) begin
      d_pwr    += cr_abs2(dsym[n]);
      awgn_pwr += cr_abs2(cr_sub(dawgn[n], dsym[n]));
      r_pwr    += cr_abs2(cr_sub(sig2c(frames[n].r), dsym[n]));
    end
    $display("segment 1 RMS EVM: r %5.2f %%, d+AWGN %5.2f %%", 100.0 * $sqrt(r_pwr / d_pwr),
             100.0 * $sqrt(awgn_pwr / d_pwr));
    for (int c = 0; c < 3; c++) begin
      real ss1, ss2, pre, peak, floor1, floor2;
      int  tic, trc;
      int  conv, deconv, reconv;
      ss1   = mean_res(c, SEG1 - 1000, SEG1);
      ss2   = mean_res(c, SEG1 + SEG2 - 1000, SEG1 + SEG2);
      peak  = mean_res(c, SEG1, SEG1 + 100);
      floor1 = awgn_pwr / 1000.0;
      tic   = settle(c, 0, SEG1, 2.0 * ss1);
      trc   = settle(c, SEG1, SEG1 + SEG2, 2.0 * ss2);
      conv   = (ss1 < 0.1 * r_pwr / 1000.0) ? 1 : 0;
      deconv = (peak > 4.0 * ss1) ? 1 : 0;
      reconv = (ss2 < 4.0 * floor1 && trc > 0) ? 1 : 0;
      $display("%-4s: EVM d_hat seg1 %5.2f %%  seg2 %5.2f %%  t_ic %0d  t_rc %0d  stalls %0d  bubbles %0d  saturated outputs %0d",
               name[c], 100.0 * $sqrt(ss1 / (d_pwr / 1000.0)), 100.0 * $sqrt(ss2 / (d_pwr / 1000.0)),
               tic, trc, stalls[c], bubbles[c], sats[c]);
      check(conv == 1,       $sformatf("%s: no initial convergence", name[c]));
      check(deconv == 1,     $sformatf("%s: SI gain step caused no de-convergence", name[c]));
      check(reconv == 1,     $sformatf("%s: no re-convergence", name[c]));
      check(stalls[c] > 0,   $sformatf("%s: output never stalled", name[c]));
      check(bubbles[c] > 0,  $sformatf("%s: input never idle", name[c]));
      check(sats[c] > 0,     $sformatf("%s: output never saturated", name[c]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
