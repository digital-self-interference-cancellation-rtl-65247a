// tb_rls_gain_updater: compares the RLS tap gain with a floating-point
// evaluation of g = lambda^-1 P x / (1 + Re(lambda^-1 P x conj(x))) for random
// P values (real and complex, from the small steady-state range up to 1.5)
// and random tap samples, at the default forgetting factor 0.999.
module tb_rls_gain_updater;
  import dsic_pkg::*;
  import tb_dsic_pkg::*;

  ccoef_t p;
  csig_t  x;
  cacc_t  g;
  int checks = 0, failures = 0;

  rls_gain_updater dut (.p_i(p), .x_i(x), .g_o(g));

  function automatic real g2r(acc_t v);
    return real'(v) / (2.0 ** 40);
  endfunction

  initial begin
    real lam;
    lam = coef2r(LAMBDA_DEFAULT);
    for (int t = 0; t < 2000; t++) begin
      cr_t pr, xr, num, ge;
      real den;
      pr = cr(real'($urandom_range(15000)) / 10000.0 + 0.0001,
              (t % 2 == 1) ? (real'($urandom_range(2000)) / 10000.0 - 0.1) : 0.0);
      if (t % 4 == 2) pr.re = pr.re / 1000.0;
      p.i = r2coef(pr.re);
      p.q = r2coef(pr.im);
      x   = c2sig(unoise(1.2));
      pr  = coef2c(p);
      xr  = sig2c(x);
      num = cr_scale(1.0 / lam, cr_mul(pr, xr));
      den = 1.0 + cr_mul(num, cr_conj(xr)).re;
      ge  = cr_scale(1.0 / den, num);
      #1;
      checks++;
      if (cr_abs2(cr_sub(cr(g2r(g.i), g2r(g.q)), ge)) > 1e-18) begin
        failures++;
        if (failures < 10) $display("FAIL: t=%0d g=%f,%f expected %f,%f", t, g2r(g.i), g2r(g.q), ge.re, ge.im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
