// Test of div_ctrl (ITER = 3) against a model multiplier of latency 2 that echoes tags.
// For each operation it records the products issued and their cycles after acceptance and
// compares them with the schedule: N0, D0 on cycles 1 and 2, then each step N*R and D*R
// starting one cycle after the previous D product returned, the last step N only, and the
// back product on the decide cycle when need_rem is high. out_valid must come at cycle 17
// (fast) or 19 (slow), with slow set accordingly, and in_ready only while idle.
module tb_div_ctrl;
  import fir_div_pkg::*;
  localparam int LAT = 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, need_rem = 0, load, issue, out_valid, slow;
  op_e  op, mtag;
  logic mvalid;
  int checks = 0, failures = 0, n_fast = 0, n_slow = 0;
  longint cycle = 0;

  logic [LAT-1:0] vpipe = '0;
  op_e            tpipe [LAT];

  div_ctrl dut (.clk, .rst_n, .in_valid, .in_ready, .mul_out_valid(mvalid), .mul_out_tag(mtag),
                .need_rem, .load, .issue, .op, .out_valid, .slow);

  // model multiplier: tag pipeline
  always_ff @(posedge clk) begin
    vpipe    <= {vpipe[LAT-2:0], issue};
    tpipe[0] <= op;
    for (int i = 1; i < LAT; i++) tpipe[i] <= tpipe[i-1];
  end
  assign mvalid = vpipe[LAT-1];
  assign mtag   = tpipe[LAT-1];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input bit want_slow);
    op_e    ops[$];
    int     when[$];
    op_e    exp_ops[$];
    int     exp_when[$];
    longint t0;
    int     done_at;
    exp_ops  = '{OP_PRE_N, OP_PRE_D, OP_IT_N, OP_IT_D, OP_IT_N, OP_IT_D, OP_IT_N};
    exp_when = '{1, 2, 5, 6, 9, 10, 13};
    if (want_slow) begin exp_ops.push_back(OP_BACK); exp_when.push_back(16); end
    @(negedge clk);
    in_valid = 1;
    #1;
    checks++;
    if (!in_ready || !load) failures++;
    t0 = cycle;
    @(negedge clk);
    in_valid = 0;
    done_at = -1;
    for (int c = 1; c < 30; c++) begin
      need_rem = want_slow;          // the guard bits' verdict, read only when deciding
      if (c > 1 && in_ready) begin
        checks++;
        if (done_at < 0) failures++;
        break;
      end
      if (issue) begin ops.push_back(op); when.push_back(c); end
      if (out_valid) begin
        done_at = c;
        checks++;
        if (slow != want_slow) failures++;
      end
      @(negedge clk);
    end
    checks++;
    if (ops != exp_ops || when != exp_when) begin
      failures++;
      $display("schedule mismatch (slow=%0d): %p at %p", want_slow, ops, when);
    end
    checks++;
    if (done_at != (want_slow ? 19 : 17)) begin
      failures++;
      $display("done at %0d (slow=%0d)", done_at, want_slow);
    end
    if (want_slow) n_slow++; else n_fast++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) one(1'($urandom));
    checks++;
    if (n_fast == 0 || n_slow == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
