// complex_divide: divides a complex numerator by a real denominator.
//
// The numerator is split into its real and imaginary parts, each part is
// divided by the same real denominator, and the two quotients are put back
// together as a complex result. This is the divider used by the NLMS weight
// updater (normalisation by the TX power) and by the RLS gain updater.
//
// Arithmetic: both parts are pre-shifted left by SHIFT bits before an integer
// division, so the quotient has (numerator fraction + SHIFT - denominator
// fraction) fractional bits. The division truncates towards zero. A zero
// denominator gives a zero quotient. The pre-shift, the truncation and the
// zero guard are this implementation's choices.
//
// Interface and timing: purely combinational, one result per input.
module complex_divide
  import dsic_pkg::*;
#(
  parameter int unsigned SHIFT = 30
) (
  input  cacc_t num_i,  // complex numerator
  input  acc_t  den_i,  // real denominator
  output cacc_t quo_o   // complex quotient
);

  acc_t num_re, num_im;

  always_comb begin
    num_re = num_i.i <<< SHIFT;
    num_im = num_i.q <<< SHIFT;
    if (den_i == '0) begin
      quo_o = '0;
    end else begin
      quo_o.i = num_re / den_i;
      quo_o.q = num_im / den_i;
    end
  end

endmodule
