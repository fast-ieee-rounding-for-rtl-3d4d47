// Variable-latency divider of normalised significands by functional iteration, with fast
// IEEE rounding.
//
// Operation. The significands a and b (MSB set, values in [0.5,1)) are loaded; if a >= b
// the dividend is halved (a' = a/2, exp_adj = 1) so that the quotient Q = a'/b lies in
// [0.5,1) and every quotient has the same N_BITS grid. A seed table gives R0 ~ 1/b, the
// shared multiplier prescales N0 = a'*R0 and D0 = b*R0, and ITER Goldschmidt steps follow:
// R = 2 - D (the two's complement of D), N = N*R, D = D*R, the N and D products issued back
// to back. All products are truncated at F = N_BITS+M_GUARD+EXTRA_BITS fraction bits, so
// the final N, the estimate Q', is within 2^-(N_BITS+M_GUARD+1) of Q on either side.
// q_adjust turns Q' into Q'' (N_BITS bits plus M_GUARD guard bits, |Q - Q''| <
// 2^-(N_BITS+M_GUARD)). round_table looks at the guard bits: in all but one of the 2^m guard
// patterns of each mode they decide the rounding, and the result leaves at once. Otherwise
// the multiplier forms b*Q'' truncated at the dividend's LSB with a sticky bit, rem_compare
// reads the remainder's sign and zero test from two LSBs and the sticky bit, and the
// result follows one multiplier latency later.
// Interface: in_valid/in_ready accept {a_sig, b_sig, q_sign, rmode}; q_sign is the sign of
// the quotient, used by the directed modes. out_valid pulses for one cycle with q_sig
// (MSB set) and exp_adj, such that |a/b| rounded = q_sig * 2^exp_adj (exp_adj is 1 when
// the dividend was halved; rounding itself never carries out of [0.5,1)); used_backmul tells
// which latency the operation took. Outputs hold until the next operation is accepted.
// Timing with the defaults (MUL_LAT = 2, ITER = 3): out_valid 17 cycles after acceptance,
// or 19 when the back product is needed. Reset is synchronous, active low.
// Taken from the published rounding method: the Goldschmidt datapath on one shared multiplier, the
// seed accuracy and iteration count, the add-and-truncate adjustment, the action table,
// the back multiplication in RZ with the multiplier's sticky bit, the LSB comparison and the
// variable latency. This design's own choices: the dividend pre-shift, the extra iteration
// bits, the seed table contents, the multiplier latency, the handshake and the exponent
// adjustment output. Exponent arithmetic, special values and flags are outside this block.
module fir_divider
  import fir_div_pkg::*;
#(
  parameter int unsigned N_BITS        = 53,
  parameter int unsigned M_GUARD       = 2,
  parameter int unsigned EXTRA_BITS    = 8,
  parameter int unsigned SEED_IDX_BITS = 8,
  parameter int unsigned SEED_FRAC     = 10,
  parameter int unsigned ITER          = 3,
  parameter int unsigned MUL_LAT       = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [N_BITS-1:0] a_sig,
  input  logic [N_BITS-1:0] b_sig,
  input  logic              q_sign,
  input  logic [1:0]        rmode,
  output logic              out_valid,
  output logic [N_BITS-1:0] q_sig,
  output logic              exp_adj,
  output logic              used_backmul
);

  localparam int unsigned K        = N_BITS + M_GUARD;   // bits of Q''
  localparam int unsigned F        = K + EXTRA_BITS;     // datapath fraction bits
  localparam int unsigned W        = F + 1;              // one integer bit
  localparam int unsigned RES_FRAC = N_BITS + 1;         // LSB of a' (a or a/2)

  // ---------------- operand registers ----------------
  logic [W-1:0]        a_fix, b_fix;    // a' and b, 1.F fixed point
  logic [SEED_IDX_BITS-1:0] seed_idx;  // b bits below the leading one
  logic                sign_r, pre_shift;
  rmode_e              rmode_r;
  logic                load, issue;
  op_e                 op;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_fix     <= '0;
      b_fix     <= '0;
      seed_idx  <= '0;
      sign_r    <= 1'b0;
      pre_shift <= 1'b0;
      rmode_r   <= RM_RN;
    end else if (load) begin
      pre_shift <= (a_sig >= b_sig);
      a_fix     <= (a_sig >= b_sig) ? W'(a_sig) << (F - N_BITS - 1) : W'(a_sig) << (F - N_BITS);
      b_fix     <= W'(b_sig) << (F - N_BITS);
      seed_idx  <= b_sig[N_BITS-2 -: SEED_IDX_BITS];
      sign_r    <= q_sign;
      rmode_r   <= rmode_e'(rmode);
    end
  end

  // ---------------- seed ----------------
  logic [SEED_FRAC:0] r0;
  logic [W-1:0]       r0_fix;

  recip_seed #(.IDX_BITS(SEED_IDX_BITS), .OUT_FRAC(SEED_FRAC)) u_seed (
    .idx (seed_idx),
    .r0  (r0)
  );
  assign r0_fix = W'(r0) << (F - SEED_FRAC);

  // ---------------- iteration registers ----------------
  logic [W-1:0] n_r, d_r, r_fix;
  logic [K-1:0] qpp;
  logic [W-1:0] qpp_fix;

  assign r_fix   = ~d_r + W'(1);            // R = 2 - D, two's complement in 1.F
  assign qpp_fix = W'(qpp) << (F - K);

  // ---------------- shared multiplier ----------------
  logic [W-1:0] mx, my, mp;
  logic         m_sticky, m_ovalid;
  logic [2:0]   m_otag;

  always_comb begin
    unique case (op)
      OP_PRE_N: begin mx = a_fix; my = r0_fix;  end
      OP_PRE_D: begin mx = b_fix; my = r0_fix;  end
      OP_IT_N:  begin mx = n_r;   my = r_fix;   end
      OP_IT_D:  begin mx = d_r;   my = r_fix;   end
      OP_BACK:  begin mx = b_fix; my = qpp_fix; end
      default:  begin mx = '0;    my = '0;      end
    endcase
  end

  mul_sticky #(.W(W), .F(F), .RES_FRAC(RES_FRAC), .LAT(MUL_LAT), .TAG_W(3)) u_mul (
    .clk, .rst_n,
    .in_valid (issue),
    .in_tag   (op),
    .sel_res  (op == OP_BACK),
    .x        (mx),
    .y        (my),
    .out_valid(m_ovalid),
    .out_tag  (m_otag),
    .p        (mp),
    .sticky   (m_sticky)
  );

  logic y_lsb_r, sticky_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_r      <= '0;
      d_r      <= '0;
      y_lsb_r  <= 1'b0;
      sticky_r <= 1'b0;
    end else if (m_ovalid) begin
      unique case (op_e'(m_otag))
        OP_PRE_N, OP_IT_N: n_r <= mp;
        OP_PRE_D, OP_IT_D: d_r <= mp;
        OP_BACK: begin
          y_lsb_r  <= mp[F - RES_FRAC];
          sticky_r <= m_sticky;
        end
        default: ;
      endcase
    end
  end

  // ---------------- rounding ----------------
  rem_e       rem;
  logic       need_rem;
  round_act_e act;

  q_adjust #(.N_BITS(N_BITS), .M_GUARD(M_GUARD)) u_adj (
    .qp_hi(n_r[F-1 -: K+1]),
    .qpp  (qpp)
  );

  rem_compare u_cmp (
    .a_lsb (a_fix[F - RES_FRAC]),
    .y_lsb (y_lsb_r),
    .sticky(sticky_r),
    .rem   (rem)
  );

  round_table #(.M_GUARD(M_GUARD)) u_tab (
    .guard   (qpp[M_GUARD-1:0]),
    .rmode   (rmode_r),
    .q_sign  (sign_r),
    .rem     (rem),
    .need_rem(need_rem),
    .act     (act)
  );

  round_apply #(.N_BITS(N_BITS)) u_rnd (
    .t    (qpp[K-1:M_GUARD]),
    .act  (act),
    .q    (q_sig)
  );

  assign exp_adj = pre_shift;

  // ---------------- control ----------------
  div_ctrl #(.ITER(ITER)) u_ctrl (
    .clk, .rst_n,
    .in_valid,
    .in_ready,
    .mul_out_valid(m_ovalid),
    .mul_out_tag  (op_e'(m_otag)),
    .need_rem,
    .load,
    .issue,
    .op,
    .out_valid,
    .slow         (used_backmul)
  );

  a_normalised : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && in_ready |-> a_sig[N_BITS-1] && b_sig[N_BITS-1])
    else $error("fir_divider: operands must be normalised");

endmodule
