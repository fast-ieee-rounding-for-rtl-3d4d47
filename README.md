# Variable-latency IEEE rounding for a Goldschmidt divider

Dividers built on multiplication (Newton-Raphson, Goldschmidt) double the number of correct
quotient bits each step, but they never produce a remainder. Without one, an exactly rounded
IEEE result normally needs a back multiplication `b*Q`, a full-width subtraction `a - b*Q`,
and a zero test on every division. This divider avoids most of that:

* It computes the quotient to **m guard bits** beyond the result precision. It adjusts the
  estimate so that its error is below one unit of the guard-bit grid. In every rounding mode
  the guard bits then decide the rounding alone, except for one of their 2^m patterns. So only
  2^-m of divisions (1/4 with the default m = 2) need the remainder. The others finish early.
* When the remainder is needed, its **sign and zero test come from three bits**: the LSB of
  the dividend, the LSB of the truncated back product, and the back product's sticky bit.
  There is no subtraction.

The unit works on normalised significands (53 bits by default, IEEE double precision) and
supports all four IEEE modes: RN (nearest-even), RZ, RP (toward +inf) and RM (toward -inf).
It has two latencies: 17 cycles, or 19 when the back multiplication is needed.

## Number formats

Operands `a_sig` and `b_sig` are N-bit fractions with the MSB set, so their values are in
[0.5, 1). An IEEE significand `1.f` uses the same bits, so scale by two to convert. The
quotient of two such numbers lies in (0.5, 2). To give every quotient the same precision,
the divider halves the dividend when `a >= b`:

    a' = a      if a <  b            Q = a'/b  in [0.5, 1)
    a' = a / 2  if a >= b            exp_adj = 1

The final rounded magnitude is `q_sig * 2^exp_adj`. Rounding never carries out of [0.5, 1),
because the largest possible quotient, 1 - 2^-N/b, still rounds to at most 1 - 2^-N.
So there is no renormalisation after rounding.

The datapath is unsigned fixed point with one integer bit and `F = N + M + EXTRA_BITS`
fraction bits. The default is 1.63, so registers are 64 bits wide.

## The iteration

1. `recip_seed` gives R0 ~ 1/b from the 8 divisor bits below the leading one. Each entry is
   `round(2^10 / midpoint of its interval)`, and |1 - b*R0| < 2^-8.9 holds across the table.
2. Prescale: `N0 = a'*R0`, `D0 = b*R0 = 1 - y`, with |y| < 2^-8.9.
3. Three Goldschmidt steps. Each one forms `R = 2 - D` (the two's complement of D in this
   format), `N = N*R` and `D = D*R`. D tends to 1 and N tends to Q. The error shrinks from
   y to y^2, y^4 and y^8 (< 2^-71). The last step computes only N.

Every product is truncated to F fraction bits. The final N, called **Q'**, may therefore lie
slightly above or below Q. The design only needs |Q - Q'| < 2^-(N+M+1). EXTRA_BITS = 8 gives
a wide margin: the truncation errors are a few units of 2^-63, against the 2^-56 allowed.
This is the only place where the required accuracy enters. More guard bits or a wider
result need a larger F, a better seed or more steps.

## From Q' to Q'' and its guard bits

`q_adjust` adds 2^-(N+M+1) and truncates to N+M fraction bits. The result **Q''** satisfies

    |Q - Q''| < 2^-(N+M)          (less than one unit of the guard-bit grid)

Q'' splits into T (the N result bits) and g (the M guard bits). The true quotient lies
strictly within one guard unit of `T + g*2^-(N+M)`. Write `rem` for the sign of the
remainder `a' - b*Q''`. This sign is also the sign of Q - Q''.

## Which guard patterns decide (round_table)

All modes act on the magnitude. RP and RM turn into "toward zero" or "away from zero" by the
quotient sign `q_sign`.

| mode (magnitude sense) | g = 0 | 0 < g < half | g = half | g > half |
|---|---|---|---|---|
| RN | trunc | trunc | **rem > 0: inc, else trunc** | inc |
| toward zero (RZ, RP neg., RM pos.) | **rem < 0: dec, else trunc** | trunc | trunc | trunc |
| away from zero (RP pos., RM neg.) | **rem > 0: inc, else trunc** | inc | inc | inc |

`half` is 2^(M-1), and the bold cells need the remainder. RN asks the remainder only when
the quotient is close to the midpoint between two representable numbers. The directed modes
ask only when it is close to a representable number itself. The remainder is never zero in
the RN case, because a quotient of two N-bit significands cannot be exactly halfway. With
M = 1 the table reduces to the classic two-row table, and with M = 2 to the four-row one.
The testbench checks both against the tables written out cell by cell. A decrement occurs
only in toward-zero rounding, when Q'' has landed just above a representable number that Q
lies just below.

## Remainder sign without subtraction (rem_compare)

The back product `b*Q''` is formed by the same multiplier, truncated toward zero at the LSB
of a' (weight 2^-(N+1)). The bits below are ORed into a sticky bit. Because
|a' - b*Q''| < b*2^-(N+M) < 2^-(N+1), the truncated product is either a' itself or a' minus
one LSB. Those two cases differ in the LSB:

    sign  = a_lsb XNOR y_lsb          1: b*Q'' >= a'
    b*Q'' == a'  : sign AND NOT sticky    remainder zero
    b*Q''  > a'  : sign AND sticky        remainder negative
    b*Q''  < a'  : NOT sign               remainder positive

The comparison is made at a''s grid (2^-(N+1)) rather than at a's. That is why the
pre-shifted dividend costs nothing here: the bound above holds for any M >= 1.

## Schedule and latency

One pipelined multiplier (latency `MUL_LAT` = 2, one issue per cycle) is shared by all
products. The N and D products of a step are independent, so they go in back to back.
Cycles are counted from the cycle in which `in_valid && in_ready`:

| cycle | issued | note |
|---|---|---|
| 1, 2 | a'*R0, b*R0 | prescale |
| 5, 6 | N*R, D*R | step 1, after D0 returned in cycle 4 |
| 9, 10 | N*R, D*R | step 2 |
| 13 | N*R | step 3; Q' returns in cycle 15 |
| 16 | b*Q'' if needed | decide: Q'' and guard bits examined |
| 17 | | `out_valid` if the guard bits decided (fast) |
| 19 | | `out_valid` after the back product (slow) |

In general the fast latency is `1 + (MUL_LAT+2)*ITER + MUL_LAT + 2`, and the slow latency
adds MUL_LAT. `used_backmul` reports which one an operation took. A new operation is
accepted in the cycle after `out_valid`. The sequencing lives in `div_ctrl`. Each product
carries a tag (`op_e`) through the multiplier, so the datapath knows which register to load.

## Interface (fir_divider)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; synchronous active-low reset |
| in_valid / in_ready | in / out | 1 | operands offered / divider idle; accepted when both high |
| a_sig, b_sig | in | N_BITS | dividend, divisor; MSB must be 1 (asserted) |
| q_sign | in | 1 | sign of the quotient (XOR of the operand signs); used by RP and RM |
| rmode | in | 2 | 0 RN, 1 RZ, 2 RP, 3 RM (`fir_div_pkg::rmode_e`) |
| out_valid | out | 1 | one-cycle pulse |
| q_sig | out | N_BITS | rounded quotient magnitude, MSB set |
| exp_adj | out | 1 | 1 if the dividend was halved: result = q_sig * 2^exp_adj |
| used_backmul | out | 1 | the operation needed the remainder (slow latency) |

The outputs hold their values until the next operation is accepted. Exponent subtraction,
bias, special operands (zero, infinity, NaN, denormals) and exception flags are not part
of this unit. They have to be added around it.

## Parameters

| parameter | default | role |
|---|---|---|
| N_BITS | 53 | significand width (24 for single precision) |
| M_GUARD | 2 | guard bits; the remainder is needed in 2^-M of cases |
| EXTRA_BITS | 8 | datapath bits beyond N+M, which absorb truncation error |
| SEED_IDX_BITS / SEED_FRAC | 8 / 10 | seed table index bits / entry fraction bits |
| ITER | 3 | Goldschmidt steps after prescaling |
| MUL_LAT | 2 | multiplier pipeline depth |

Tested combinations: the defaults; N=24 with ITER=2; M=1; M=3; and a 14-bit seed
(SEED_IDX_BITS=14, SEED_FRAC=16) with ITER=2. If you change N, M or the seed, keep
the seed accuracy, raised to the power 2^ITER, below 2^-(N+M+1) with some margin.

## Files

| file | content |
|---|---|
| rtl/fir_div_pkg.sv | rounding-mode, action, remainder and operation enums |
| rtl/fir_divider.sv | top: operand registers, pre-shift, N/D registers, two's complement, multiplier operand mux |
| rtl/recip_seed.sv | reciprocal seed ROM, computed at elaboration |
| rtl/mul_sticky.sv | pipelined multiplier with RZ truncation at two selectable points and a sticky bit |
| rtl/q_adjust.sv | add half a guard unit, truncate to N+M bits |
| rtl/round_table.sv | guard-bit action table, need-remainder decision |
| rtl/rem_compare.sv | remainder sign and zero test from two LSBs and sticky |
| rtl/round_apply.sv | increment or decrement at the result LSB |
| rtl/div_ctrl.sv | sequencer, variable latency |
| tb/tb_*.sv | one self-checking testbench per module, plus tb_fir_divider_configs |
| tb/div_config_run.sv | per-configuration random test used by tb_fir_divider_configs |

## Verification

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself with a watchdog.

* `tb_fir_divider` runs the top at its default parameters. It tests 4000 random operations
  plus directed ones: exact quotients, a = b, a one LSB from b, and the extremes of the seed
  table. Each result is checked against exact long division in 128-bit integers, and every
  operation's cycle count against the schedule. The test requires that each mechanism
  occurred: fast and slow completion, remainder positive, negative and zero, increment,
  decrement, pre-shift or not, and all four modes. It also checks that 2^-M of operations
  (within ±40%) took the slow path. The measured share is 0.26–0.27 in each mode.
* `tb_fir_divider_configs` repeats this for the alternative configurations listed above.
  The measured slow shares are 0.24 (N=24), 0.50 (M=1), 0.13 (M=3) and 0.26 (14-bit seed).
* The block testbenches check the seed table exhaustively, the multiplier against exact
  128-bit products (including latency, tags and exact and inexact sticky cases), the action
  table cell by cell, and the comparison with numbers whose error is known.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -y tb rtl/fir_div_pkg.sv tb/tb_fir_divider.sv \
              --top-module tb_fir_divider -o sim && ./obj_dir/sim

Replace `tb_fir_divider` with any other testbench name. All of them finish in well under
a second of run time.

## Limits and departures

* **Estimate error.** Truncated products put Q' on either side of Q. The unit keeps enough
  extra bits to tolerate that, instead of assuming a one-sided estimate (0 <= Q - Q').
  The accuracy argument is analytic plus random testing. There is no formal proof for every
  operand pair.
* **Dedicated adder.** Half a guard unit is added by a separate adder. It could instead be
  folded into the last multiplication as a multiply-add. That would save the adder delay,
  not a cycle, in this schedule.
* **Full-precision iterations.** All steps run at full width. The early steps could run at
  reduced precision, since they produce few correct bits, but that is not implemented.
* **Non-speculative back multiplication.** The back product starts only after the guard bits
  ask for it. It is not issued speculatively.
* **Single-precision builds only.** One instance handles one significand width, so single
  precision needs a separate N_BITS=24 build.
* **Simple sequencer.** The unit handles one division at a time. To benefit from the two
  latencies, the surrounding pipeline must accept out-of-order or variable-latency
  completion.
