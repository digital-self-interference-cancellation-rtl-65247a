// tb_rls_weight_updater: drives random taps and cancelled-RX samples with a
// random enable and compares the three weights and the three P values after
// every edge with a floating-point run of the per-tap RLS recursion
//     g = lambda^-1 P x / (1 + Re(lambda^-1 P x conj(x)))
//     w += d_hat conj(g),   P = lambda^-1 P (1 - g conj(x)),
// starting from w = 0, P = 1, lambda = 0.999.
module tb_rls_weight_updater;
  import dsic_pkg::*;
  import tb_dsic_pkg::*;

  localparam int L = 3;
  logic   clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  csig_t  taps [L];
  csig_t  dhat;
  ccoef_t w [L];
  ccoef_t p [L];
  cr_t    wm [L];
  cr_t    pm [L];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rls_weight_updater #(.L(L)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .taps_i(taps), .dhat_i(dhat), .w_o(w), .p_o(p));

  initial begin
    real lam;
    lam = coef2r(LAMBDA_DEFAULT);
    for (int k = 0; k < L; k++) begin wm[k] = cr(0.0, 0.0); pm[k] = cr(1.0, 0.0); taps[k] = '0; end
    dhat = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < L; k++) taps[k] = c2sig(unoise(0.7));
      dhat = c2sig(unoise(0.1));
      en   = ($urandom_range(3) != 0);
      @(posedge clk);
      if (en) begin
        for (int k = 0; k < L; k++) begin
          cr_t xr, num, gk;
          real den;
          xr  = sig2c(taps[k]);
          num = cr_scale(1.0 / lam, cr_mul(pm[k], xr));
          den = 1.0 + cr_mul(num, cr_conj(xr)).re;
          gk  = cr_scale(1.0 / den, num);
          wm[k] = cr_add(wm[k], cr_mul(sig2c(dhat), cr_conj(gk)));
          pm[k] = cr_mul(cr_scale(1.0 / lam, pm[k]), cr_sub(cr(1.0, 0.0), cr_mul(gk, cr_conj(xr))));
        end
      end
      #1;
      for (int k = 0; k < L; k++) begin
        checks += 2;
        if (cr_abs2(cr_sub(coef2c(w[k]), wm[k])) > 1e-12) begin
          failures++;
          if (failures < 10) $display("FAIL: n=%0d w%0d=%f,%f expected %f,%f", n, k,
                                      coef2r(w[k].i), coef2r(w[k].q), wm[k].re, wm[k].im);
        end
        if (cr_abs2(cr_sub(coef2c(p[k]), pm[k])) > 1e-12) begin
          failures++;
          if (failures < 10) $display("FAIL: n=%0d P%0d=%f expected %f", n, k, coef2r(p[k].i), pm[k].re);
        end
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
