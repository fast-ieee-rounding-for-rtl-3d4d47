// Rounding action table for a quotient estimate with M_GUARD guard bits.
//
// Q'' = T + g*2^-(n+m) lies within 2^-(n+m) of the true quotient Q, where T holds the n
// result bits and g the m guard bits. All modes act on the magnitude; RP and RM use the
// result sign to pick "round up" or "round toward zero". With half = 2^(m-1):
//   RN : g < half -> trunc, g > half -> inc, g == half -> ask the remainder
//        (positive: inc, negative: trunc; zero cannot occur, a quotient of two n-bit
//        significands is never a tie)
//   toward zero (RZ, RP negative, RM positive):
//        g != 0 -> trunc; g == 0 -> ask the remainder (negative: dec, else trunc)
//   away from zero (RP positive, RM negative):
//        g != 0 -> inc;   g == 0 -> ask the remainder (positive: inc, else trunc)
// For m = 1 this is the basic two-row action table, for m = 2 the four-row table with two
// guard bits; in every mode only one of the 2^m guard patterns needs the remainder.
// need_rem is valid from guard/rmode/q_sign alone; act is valid for any rem once need_rem
// is low, and for the actual rem otherwise. Purely combinational.
// The table contents follow the published rounding method; its generalisation to any m is derived
// from the same error bound.
module round_table
  import fir_div_pkg::*;
#(
  parameter int unsigned M_GUARD = 2
) (
  input  logic [M_GUARD-1:0] guard,
  input  rmode_e             rmode,
  input  logic               q_sign,
  input  rem_e               rem,
  output logic               need_rem,
  output round_act_e         act
);

  localparam logic [M_GUARD-1:0] HALF = M_GUARD'(1) << (M_GUARD - 1);

  logic away;  // directed rounding away from zero in magnitude

  always_comb begin
    away     = (rmode == RM_RP && !q_sign) || (rmode == RM_RM && q_sign);
    need_rem = 1'b0;
    act      = ACT_TRUNC;
    if (rmode == RM_RN) begin
      if (guard[M_GUARD-1] && guard != HALF) act = ACT_INC;   // g > half
      else if (guard == HALF) begin
        need_rem = 1'b1;
        act      = (rem == REM_POS) ? ACT_INC : ACT_TRUNC;
      end
    end else if (away) begin
      if (guard != '0)        act = ACT_INC;
      else begin
        need_rem = 1'b1;
        act      = (rem == REM_POS) ? ACT_INC : ACT_TRUNC;
      end
    end else begin
      if (guard == '0) begin
        need_rem = 1'b1;
        act      = (rem == REM_NEG) ? ACT_DEC : ACT_TRUNC;
      end
    end
  end

endmodule
