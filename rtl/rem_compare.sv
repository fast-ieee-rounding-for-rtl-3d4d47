// Fast magnitude comparison of the dividend a with the back product Y = b*Q''.
//
// Y is formed truncated toward zero at the LSB of a. Because |a - b*Q''| is below one
// ulp of a, the truncated Y equals either a or a - 1 ulp, and the two cases differ in the
// LSB. So, without any subtraction:
//   sign   = a_lsb XNOR y_lsb      (1: b*Q'' >= a)
//   b*Q'' == a  when sign AND NOT sticky
//   b*Q''  > a  when sign AND sticky
//   b*Q''  < a  when NOT sign
// where sticky is the OR of the product bits below the LSB, supplied by the multiplier.
// Purely combinational. The equations follow the published rounding method.
module rem_compare
  import fir_div_pkg::*;
(
  input  logic a_lsb,
  input  logic y_lsb,
  input  logic sticky,
  output rem_e rem
);

  logic sign;

  always_comb begin
    sign = ~(a_lsb ^ y_lsb);
    if (!sign)       rem = REM_POS;
    else if (sticky) rem = REM_NEG;
    else             rem = REM_ZERO;
  end

endmodule
