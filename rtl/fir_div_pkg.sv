// Shared types of the functional-iteration divider.
//
// rmode_e     IEEE rounding mode (round to nearest even, toward zero, toward +inf, toward -inf).
// round_act_e action applied to the last kept quotient bit: keep, +1 ulp, -1 ulp.
// rem_e       relation of the true quotient to the adjusted estimate Q'', read from the
//             sign and zero test of the remainder a - b*Q''.
// op_e        product issued to the shared multiplier; it travels with the product as its tag.
// The encodings are this design's own choice.
package fir_div_pkg;

  typedef enum logic [1:0] {
    RM_RN = 2'd0,
    RM_RZ = 2'd1,
    RM_RP = 2'd2,
    RM_RM = 2'd3
  } rmode_e;

  typedef enum logic [1:0] {
    ACT_TRUNC = 2'd0,
    ACT_INC   = 2'd1,
    ACT_DEC   = 2'd2
  } round_act_e;

  typedef enum logic [1:0] {
    REM_ZERO = 2'd0,  // b*Q'' == a
    REM_POS  = 2'd1,  // b*Q'' <  a : true quotient above Q''
    REM_NEG  = 2'd2   // b*Q'' >  a : true quotient below Q''
  } rem_e;

  typedef enum logic [2:0] {
    OP_NONE  = 3'd0,
    OP_PRE_N = 3'd1,  // N0 = a' * R0
    OP_PRE_D = 3'd2,  // D0 = b  * R0
    OP_IT_N  = 3'd3,  // N(i+1) = N(i) * R(i)
    OP_IT_D  = 3'd4,  // D(i+1) = D(i) * R(i)
    OP_BACK  = 3'd5   // b * Q'', truncated at the quotient LSB, with sticky
  } op_e;

endpackage
