// Sequencer of the variable-latency divider.
//
// It drives one shared pipelined multiplier. After the operands are loaded it issues the
// two prescale products N0 = a'*R0 and D0 = b*R0 on consecutive cycles, waits for D0, then
// runs ITER Goldschmidt steps, each issuing N*R and D*R back to back (R = 2 - D is formed
// combinationally by the datapath) and waiting for the D product; the last step issues only
// N*R, whose result is the estimate Q'. In DECIDE the datapath has adjusted Q' to Q'' and
// looked at its guard bits: if they decide the rounding the result is presented at once,
// otherwise the back product b*Q'' is issued in the same cycle and the result follows when
// it returns. Completion therefore takes one of two latencies, the slow one being the
// fast one plus the multiplier latency.
// Interface: in_valid/in_ready handshake (accepted when both are high); load pulses with the
// acceptance; issue/op tell the datapath which product to send; mul_out_valid/mul_out_tag
// report returning products; out_valid is a one-cycle pulse, with slow set when the back
// product was needed. Reset is synchronous and active low.
// The order of operations follows the published rounding method; states and timing are this
// design's own.
module div_ctrl
  import fir_div_pkg::*;
#(
  parameter int unsigned ITER = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic mul_out_valid,
  input  op_e  mul_out_tag,
  input  logic need_rem,
  output logic load,
  output logic issue,
  output op_e  op,
  output logic out_valid,
  output logic slow
);

  typedef enum logic [3:0] {
    S_IDLE, S_PRE_N, S_PRE_D, S_WAIT_PRE, S_IT_N, S_IT_D, S_WAIT_IT, S_WAIT_Q,
    S_DECIDE, S_WAIT_BACK, S_DONE
  } state_e;

  state_e                  state, state_n;
  logic [$clog2(ITER+1):0] it, it_n;
  logic                    slow_n;

  function automatic logic got(input logic v, input op_e tag, input op_e want);
    return v && (tag == want);
  endfunction

  always_comb begin
    state_n   = state;
    it_n      = it;
    slow_n    = slow;
    in_ready  = (state == S_IDLE);
    load      = 1'b0;
    issue     = 1'b0;
    op        = OP_NONE;
    out_valid = (state == S_DONE);
    unique case (state)
      S_IDLE: if (in_valid) begin
        load    = 1'b1;
        slow_n  = 1'b0;
        it_n    = '0;
        state_n = S_PRE_N;
      end
      S_PRE_N: begin
        issue = 1'b1; op = OP_PRE_N; state_n = S_PRE_D;
      end
      S_PRE_D: begin
        issue = 1'b1; op = OP_PRE_D; state_n = S_WAIT_PRE;
      end
      S_WAIT_PRE: if (got(mul_out_valid, mul_out_tag, OP_PRE_D)) state_n = S_IT_N;
      S_IT_N: begin
        issue = 1'b1; op = OP_IT_N;
        state_n = (32'(it) == ITER - 1) ? S_WAIT_Q : S_IT_D;
      end
      S_IT_D: begin
        issue = 1'b1; op = OP_IT_D; state_n = S_WAIT_IT;
      end
      S_WAIT_IT: if (got(mul_out_valid, mul_out_tag, OP_IT_D)) begin
        it_n    = it + 1'b1;
        state_n = S_IT_N;
      end
      S_WAIT_Q: if (got(mul_out_valid, mul_out_tag, OP_IT_N)) state_n = S_DECIDE;
      S_DECIDE: begin
        if (need_rem) begin
          issue   = 1'b1;
          op      = OP_BACK;
          slow_n  = 1'b1;
          state_n = S_WAIT_BACK;
        end else begin
          state_n = S_DONE;
        end
      end
      S_WAIT_BACK: if (got(mul_out_valid, mul_out_tag, OP_BACK)) state_n = S_DONE;
      S_DONE: state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      it    <= '0;
      slow  <= 1'b0;
    end else begin
      state <= state_n;
      it    <= it_n;
      slow  <= slow_n;
    end
  end

  a_issue_known : assert property (@(posedge clk) disable iff (!rst_n)
    issue |-> op != OP_NONE);

endmodule
