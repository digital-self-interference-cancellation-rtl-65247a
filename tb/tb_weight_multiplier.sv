// tb_weight_multiplier: checks the estimated self-interference sum of the
// weight multiplier, with and without conjugated weights, against a
// floating-point evaluation of sum_k w'_k x[n-k] for random weights and taps.
module tb_weight_multiplier;
  import dsic_pkg::*;
  import tb_dsic_pkg::*;

  localparam int L = 3;
  csig_t  taps [L];
  ccoef_t w    [L];
  cacc_t  xh_c, xh_n;
  int checks = 0, failures = 0;

  weight_multiplier #(.L(L), .CONJ_W(1'b1)) dut_conj (.taps_i(taps), .w_i(w), .xhat_o(xh_c));
  weight_multiplier #(.L(L), .CONJ_W(1'b0)) dut_plain (.taps_i(taps), .w_i(w), .xhat_o(xh_n));

  function automatic real acc2r(acc_t v);
    return real'(v) / (2.0 ** 44);
  endfunction

  function automatic void cmp(real got, real exp, string what);
    checks++;
    if (got - exp > 1e-9 || exp - got > 1e-9) begin
      failures++;
      if (failures < 10) $display("FAIL: %s got %f expected %f", what, got, exp);
    end
  endfunction

  initial begin
    for (int t = 0; t < 1000; t++) begin
      cr_t ec, en;
      ec = cr(0.0, 0.0);
      en = cr(0.0, 0.0);
      for (int k = 0; k < L; k++) begin
        taps[k] = csig_t'($urandom);
        w[k]    = ccoef_t'({$urandom, $urandom});
        ec = cr_add(ec, cr_mul(cr_conj(coef2c(w[k])), sig2c(taps[k])));
        en = cr_add(en, cr_mul(coef2c(w[k]), sig2c(taps[k])));
      end
      #1;
      cmp(acc2r(xh_c.i), ec.re, "conj re");
      cmp(acc2r(xh_c.q), ec.im, "conj im");
      cmp(acc2r(xh_n.i), en.re, "plain re");
      cmp(acc2r(xh_n.q), en.im, "plain im");
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
