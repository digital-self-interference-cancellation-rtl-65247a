// tb_lms_weight_updater: drives random taps and cancelled-RX samples with a
// random enable and compares the weights after every edge with a
// floating-point evaluation of w_k += mu * conj(d_hat) * x[n-k]. The step
// size is raised to 0.05 so every update is far above the rounding tolerance.
module tb_lms_weight_updater;
  import dsic_pkg::*;
  import tb_dsic_pkg::*;

  localparam int L = 3;
  localparam coef_t MU_Q = coef_t'(32'sd53687091);  // 0.05
  logic   clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  csig_t  taps [L];
  csig_t  dhat;
  ccoef_t w [L];
  cr_t    wm [L];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lms_weight_updater #(.L(L), .MU(MU_Q)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .taps_i(taps), .dhat_i(dhat), .w_o(w));

  initial begin
    real mu;
    mu = coef2r(MU_Q);
    for (int k = 0; k < L; k++) begin wm[k] = cr(0.0, 0.0); taps[k] = '0; end
    dhat = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      for (int k = 0; k < L; k++) taps[k] = c2sig(unoise(0.7));
      dhat = c2sig(unoise(0.2));
      en   = ($urandom_range(3) != 0);
      @(posedge clk);
      if (en) begin
        cr_t e;
        e = cr_scale(mu, cr_conj(sig2c(dhat)));
        for (int k = 0; k < L; k++) wm[k] = cr_add(wm[k], cr_mul(e, sig2c(taps[k])));
      end
      #1;
      for (int k = 0; k < L; k++) begin
        cr_t d;
        d = cr_sub(coef2c(w[k]), wm[k]);
        checks++;
        if (cr_abs2(d) > 1e-12) begin
          failures++;
          if (failures < 10) $display("FAIL: n=%0d w%0d = %f,%f expected %f,%f", n, k,
                                      coef2r(w[k].i), coef2r(w[k].q), wm[k].re, wm[k].im);
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
