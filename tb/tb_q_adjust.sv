// Test of q_adjust at its defaults (53 result bits, 2 guard bits). For random estimates
// and for the carry-chain corner cases it checks that Q'' is Q' rounded half-up to 55
// fraction bits (the input's last bit decides whether the truncated value is bumped), and
// the bound |Q'' - Q'| <= 2^-56 that the rounding analysis builds on.
module tb_q_adjust;
  localparam int N = 53, M = 2, K = N + M;

  logic [K:0]   qp_hi;
  logic [K-1:0] qpp;
  int checks = 0, failures = 0;

  q_adjust dut (.qp_hi, .qpp);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [K:0] v);
    logic [K-1:0] e;
    logic [K+1:0] diff;
    qp_hi = v;
    #1;
    e = v[K:1];
    if (v[0]) e = e + 1'b1;
    checks++;
    if (qpp !== e) begin
      failures++;
      if (failures < 10) $display("qp_hi=%h qpp=%h expected %h", v, qpp, e);
    end
    // |2*qpp - qp_hi| <= 1 in units of 2^-(K+1)
    diff = {qpp, 1'b0} - {1'b0, v};
    checks++;
    if (!(diff == 0 || diff == 1 || diff == {(K+2){1'b1}})) failures++;
  endtask

  initial begin
    logic [63:0] r;
    check('0);
    check((K+1)'(1));
    check({2'b01, {(K-1){1'b1}}});
    check({1'b0, {K{1'b1}}});
    check({1'b1, {(K-1){1'b0}}, 1'b1});
    for (int i = 0; i < 20000; i++) begin
      r = {$urandom, $urandom};
      check({1'b1, r[K-1:0]} >> ($urandom % 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
