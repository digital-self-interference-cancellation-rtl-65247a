// tb_workload_sweep: step-size / forgetting-factor sweep and saturation study.
//
// Part A streams one signal (SI gain -5 dB for 12000 samples, then 0 dB for
// 12000 samples; QPSK x and d, ~20 dB SNR) through twelve cores at once:
//   LMS and NLMS with mu     = 0.001, 0.0025, 0.005, 0.0095
//   RLS          with lambda = 0.99, 0.995, 0.999, 0.9995
// and measures for each the initial convergence time t_ic, the
// re-convergence time t_rc after the gain step and the steady-state RMS EVM
// of d_hat. It checks the expected trade-off: a larger mu (smaller lambda)
// converges and re-converges faster but settles at a worse EVM, and RLS at
// lambda = 0.999 converges faster than LMS at mu = 0.001.
// Part B feeds an LMS core (mu = 0.001) with the SI channel scaled by 2.4
// (+7.6 dB): the receive samples now exceed the sfi(16,14) range and clip,
// while the weights the channel needs (at most 0.8 * 2.4 = 1.92 per
// component) still fit in sfi(32,30). It checks that r[n] clips and that the
// cleaned signal is measurably worse than at -5 dB. (At +10 dB this channel
// would need weights beyond the +-2 range of sfi(32,30) as well.)
module tb_workload_sweep;
  import dsic_pkg::*;
  import tb_dsic_pkg::*;

  localparam int SEG  = 12000;
  localparam int N    = 2 * SEG;
  localparam int NB   = 8000;
  localparam int WIN  = 200;
  localparam int NI   = 12;
  localparam coef_t PV [NI] = '{
    coef_t'(32'sd1073742), coef_t'(32'sd2684355), coef_t'(32'sd5368709), coef_t'(32'sd10200547),
    coef_t'(32'sd1073742), coef_t'(32'sd2684355), coef_t'(32'sd5368709), coef_t'(32'sd10200547),
    coef_t'(32'sd1063004406), coef_t'(32'sd1068373115), coef_t'(32'sd1072668082), coef_t'(32'sd1073204953)};
  localparam filter_e FV [NI] = '{FILT_LMS, FILT_LMS, FILT_LMS, FILT_LMS,
                                  FILT_NLMS, FILT_NLMS, FILT_NLMS, FILT_NLMS,
                                  FILT_RLS, FILT_RLS, FILT_RLS, FILT_RLS};
  localparam string LBL [NI] = '{"LMS  mu=0.001 ", "LMS  mu=0.0025", "LMS  mu=0.005 ", "LMS  mu=0.0095",
                                 "NLMS mu=0.001 ", "NLMS mu=0.0025", "NLMS mu=0.005 ", "NLMS mu=0.0095",
                                 "RLS  l=0.99   ", "RLS  l=0.995  ", "RLS  l=0.999  ", "RLS  l=0.9995 "};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  in_frame_t frames [N];
  cr_t       dsym   [N];
  in_frame_t frames_b [NB];
  cr_t       dsym_b   [NB];

  in_frame_t s_data, s_data_b;
  logic      s_valid = 1'b0;
  logic      s_valid_b = 1'b0;
  csig_t     m_data  [NI];
  logic      m_valid [NI];
  logic      rdy     [NI];
  csig_t     m_data_b;
  logic      m_valid_b, rdy_b;

  for (genvar i = 0; i < NI; i++) begin : g_dut
    ccoef_t w [3];
    adaptive_fir_core #(.FILTER(FV[i]), .MU(PV[i]), .LAMBDA(PV[i])) dut (
      .clk(clk), .rst_n(rst_n),
      .s_axis_tdata(s_data), .s_axis_tvalid(s_valid), .s_axis_tready(rdy[i]),
      .m_axis_tdata(m_data[i]), .m_axis_tvalid(m_valid[i]), .m_axis_tready(1'b1),
      .weights_o(w));
  end

  ccoef_t w_b [3];
  adaptive_fir_core #(.FILTER(FILT_LMS)) dut_sat (
    .clk(clk), .rst_n(rst_n),
    .s_axis_tdata(s_data_b), .s_axis_tvalid(s_valid_b), .s_axis_tready(rdy_b),
    .m_axis_tdata(m_data_b), .m_axis_tvalid(m_valid_b), .m_axis_tready(1'b1),
    .weights_o(w_b));

  real res   [NI][N];
  real res_b [NB];
  int  nout, nout_b;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  function automatic real mean_res(int i, int from, int to);
    real s;
    s = 0.0;
    for (int n = from; n < to; n++) s += res[i][n];
    return s / real'(to - from);
  endfunction

  function automatic int settle(int i, int from, int to, real lim);
    for (int n = from; n + WIN <= to; n += 10)
      if (mean_res(i, n, n + WIN) < lim) return n + WIN - from;
    return to - from;
  endfunction

  function automatic cr_t channel(cr_t xs [], int n, real gain);
    cr_t h [3];
    cr_t si;
    h[0] = cr(0.8, 0.3);
    h[1] = cr(-0.25, 0.1);
    h[2] = cr(0.1, -0.05);
    si = cr(0.0, 0.0);
    for (int k = 0; k < 3; k++)
      if (n - k >= 0) si = cr_add(si, cr_scale(gain, cr_mul(h[k], xs[n-k])));
    return si;
  endfunction

  initial begin
    cr_t xs [];
    xs = new[N];
    for (int n = 0; n < N; n++) begin
      xs[n]   = qpsk(0.5);
      dsym[n] = qpsk(0.25);
    end
    for (int n = 0; n < N; n++)
      frames[n] = '{x: c2sig(xs[n]),
                    r: c2sig(cr_add(cr_add(channel(xs, n, (n < SEG) ? 0.5623 : 1.0), dsym[n]), unoise(0.043)))};
    for (int n = 0; n < NB; n++) begin
      xs[n]     = qpsk(0.5);
      dsym_b[n] = qpsk(0.25);
    end
    for (int n = 0; n < NB; n++)
      frames_b[n] = '{x: c2sig(xs[n]),
                      r: c2sig(cr_add(cr_add(channel(xs, n, 2.4), dsym_b[n]), unoise(0.043)))};
    nout = 0;
    nout_b = 0;
    s_data = '0;
    s_data_b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Back-to-back streams, one frame per clock, outputs always ready.
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      s_valid   = 1'b1;
      s_data    = frames[n];
      s_valid_b = (n < NB);
      if (n < NB) s_data_b = frames_b[n];
    end
    @(negedge clk);
    s_valid   = 1'b0;
    s_valid_b = 1'b0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (m_valid[0]) begin
        for (int i = 0; i < NI; i++) begin
          if (nout < N) res[i][nout] = cr_abs2(cr_sub(sig2c(m_data[i]), dsym[nout]));
        end
        nout++;
      end
      if (m_valid_b) begin
        if (nout_b < NB) res_b[nout_b] = cr_abs2(cr_sub(sig2c(m_data_b), dsym_b[nout_b]));
        nout_b++;
      end
    end
  end

  initial begin
    int  tic [NI];
    int  trc [NI];
    real evm [NI];
    real d_pwr, evm_b, nclip;
    wait (rst_n);
    wait (nout == N);
    d_pwr = 0.125;  // |d|^2 of the QPSK desired signal (0.25 per component)
    for (int i = 0; i < NI; i++) begin
      real ss1, ss2;
      ss1 = mean_res(i, SEG - 2000, SEG);
      ss2 = mean_res(i, N - 2000, N);
      tic[i] = settle(i, 0, SEG, 2.0 * ss1);
      trc[i] = settle(i, SEG, N, 2.0 * ss2);
      evm[i] = 100.0 * $sqrt(ss2 / d_pwr);
      $display("%s  t_ic %5d  t_rc %5d  EVM_ss %6.2f %%", LBL[i], tic[i], trc[i], evm[i]);
    end
    for (int b = 0; b < NI; b += 4) begin
      // LMS / NLMS: index b is the smallest mu; RLS: index b is the smallest lambda
      if (FV[b] != FILT_RLS) begin
        check(tic[b] > tic[b+3], $sformatf("%s: larger mu did not converge faster", LBL[b]));
        check(trc[b] > trc[b+3], $sformatf("%s: larger mu did not re-converge faster", LBL[b]));
        check(evm[b] < evm[b+3], $sformatf("%s: larger mu did not settle worse", LBL[b]));
      end else begin
        check(trc[b] < trc[b+3], $sformatf("%s: smaller lambda did not re-converge faster", LBL[b]));
        check(evm[b] > evm[b+3], $sformatf("%s: smaller lambda did not settle worse", LBL[b]));
      end
    end
    check(tic[10] < tic[0], "RLS (lambda 0.999) did not converge faster than LMS (mu 0.001)");
    check(tic[10] < 500, "RLS (lambda 0.999) needed 500 or more iterations to converge");
    // Part B: +7.6 dB SI, clipping of r[n].
    wait (nout_b >= NB);
    nclip = 0.0;
    for (int n = 0; n < NB; n++)
      if (frames_b[n].r.i == 16'sh7fff || frames_b[n].r.i == -16'sh8000 ||
          frames_b[n].r.q == 16'sh7fff || frames_b[n].r.q == -16'sh8000) nclip += 1.0;
    evm_b = 0.0;
    for (int n = NB - 2000; n < NB; n++) evm_b += res_b[n];
    evm_b = 100.0 * $sqrt(evm_b / 2000.0 / d_pwr);
    $display("SI +7.6 dB: %0.0f of %0d r samples clipped, LMS EVM_ss %6.2f %% (at -5 dB: %6.2f %%)",
             nclip, NB, evm_b, 100.0 * $sqrt(mean_res(0, SEG - 2000, SEG) / d_pwr));
    check(nclip > 0.0, "r[n] never clipped at +7.6 dB SI");
    check(evm_b > 1.5 * 100.0 * $sqrt(mean_res(0, SEG - 2000, SEG) / d_pwr),
          "clipping at +7.6 dB did not degrade the cleaned signal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
