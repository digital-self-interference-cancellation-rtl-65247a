// tb_complex_divide: checks the complex-by-real divider against a
// floating-point quotient, truncated towards zero, for random numerators of
// both signs and random positive and negative denominators, and checks that a
// zero denominator gives zero.
module tb_complex_divide;
  import dsic_pkg::*;

  localparam int unsigned SHIFT = 30;
  cacc_t num;
  acc_t  den;
  cacc_t quo;
  int checks = 0, failures = 0;

  complex_divide #(.SHIFT(SHIFT)) dut (.num_i(num), .den_i(den), .quo_o(quo));

  function automatic longint trunc_div(real n, real d);
    real q;
    q = n / d;
    return (q >= 0.0) ? longint'($floor(q)) : -longint'($floor(-q));
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      longint ni, nq, d;
      longint ei, eq;
      ni = longint'($urandom_range(1 << 20)) - (1 << 19);
      nq = longint'($urandom_range(1 << 20)) - (1 << 19);
      d  = longint'($urandom_range(1 << 30)) + 1;
      if (t % 2 == 1) d = -d;
      if (t % 3 == 0) begin ni = ni * 1000; nq = nq * 7; end
      num.i = acc_t'(ni);
      num.q = acc_t'(nq);
      den   = acc_t'(d);
      #1;
      ei = trunc_div(real'(ni) * 1073741824.0, real'(d));
      eq = trunc_div(real'(nq) * 1073741824.0, real'(d));
      checks += 2;
      // allow one unit for double rounding near an integer quotient
      if (longint'(quo.i) - ei > 1 || ei - longint'(quo.i) > 1) begin
        failures++;
        if (failures < 10) $display("FAIL: re %0d/%0d got %0d exp %0d", ni, d, longint'(quo.i), ei);
      end
      if (longint'(quo.q) - eq > 1 || eq - longint'(quo.q) > 1) begin
        failures++;
        if (failures < 10) $display("FAIL: im %0d/%0d got %0d exp %0d", nq, d, longint'(quo.q), eq);
      end
    end
    num.i = 123; num.q = -5; den = '0;
    #1;
    checks++;
    if (quo != '0) failures++;
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
