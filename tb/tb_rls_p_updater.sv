// tb_rls_p_updater: checks the inverse-covariance register of one RLS tap.
// After reset P must equal P_INIT (1.0). Then random gains g and tap samples x
// are applied with a random enable, and after every edge P is compared with a
// floating-point evaluation of P = lambda^-1 P (1 - g conj(x)).
module tb_rls_p_updater;
  import dsic_pkg::*;
  import tb_dsic_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  cacc_t  g;
  csig_t  x;
  ccoef_t p;
  cr_t    pm;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rls_p_updater dut (.clk(clk), .rst_n(rst_n), .en(en), .g_i(g), .x_i(x), .p_o(p));

  initial begin
    real lam;
    lam = coef2r(LAMBDA_DEFAULT);
    g = '0;
    x = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    pm = cr(1.0, 0.0);
    checks++;
    if (p.i != COEF_ONE || p.q != '0) begin
      failures++;
      $display("FAIL: P after reset = %f", coef2r(p.i));
    end
    for (int n = 0; n < 300; n++) begin
      cr_t gr;
      x    = c2sig(unoise(0.8));
      gr   = cr(real'($urandom_range(4000)) / 10000.0 - 0.2, real'($urandom_range(4000)) / 10000.0 - 0.2);
      g.i  = acc_t'(longint'($floor(gr.re * (2.0 ** 40))));
      g.q  = acc_t'(longint'($floor(gr.im * (2.0 ** 40))));
      gr   = cr(real'(longint'(g.i)) / (2.0 ** 40), real'(longint'(g.q)) / (2.0 ** 40));
      en   = ($urandom_range(3) != 0);
      @(posedge clk);
      if (en) pm = cr_mul(cr_scale(1.0 / lam, pm), cr_sub(cr(1.0, 0.0), cr_mul(gr, cr_conj(sig2c(x)))));
      #1;
      checks++;
      if (cr_abs2(cr_sub(coef2c(p), pm)) > 1e-14) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d P=%f,%f expected %f,%f", n, coef2r(p.i), coef2r(p.q), pm.re, pm.im);
      end
      // restart every ten samples so P stays near 1 and far above rounding
      if (n % 10 == 9) begin
        rst_n = 1'b0;
        @(posedge clk);
        #1 rst_n = 1'b1;
        pm = cr(1.0, 0.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
