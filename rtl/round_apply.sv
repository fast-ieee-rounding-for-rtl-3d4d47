// Final rounding step: applies the chosen action to the N_BITS truncated quotient.
//
// t is the quotient without its guard bits, a fraction with its MSB set (value in
// [0.5,1)). ACT_INC adds one ulp at the LSB, ACT_DEC subtracts one, ACT_TRUNC keeps t.
// Neither can leave [0.5,1): once the dividend is pre-shifted so that a' < b, the true
// quotient lies in [0.5, 1 - 2^-N_BITS/b], so rounding up never reaches 1.0, and a
// decrement is only chosen when the true quotient is below Q'' yet at least 0.5.
// Purely combinational. The conditional increment or decrement of the LSB follows the
// design's source.
module round_apply
  import fir_div_pkg::*;
#(
  parameter int unsigned N_BITS = 53
) (
  input  logic [N_BITS-1:0] t,
  input  round_act_e        act,
  output logic [N_BITS-1:0] q
);

  always_comb begin
    unique case (act)
      ACT_INC: q = t + N_BITS'(1);
      ACT_DEC: q = t - N_BITS'(1);
      default: q = t;
    endcase
  end

endmodule
