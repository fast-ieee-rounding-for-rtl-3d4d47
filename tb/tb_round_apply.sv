// Test of round_apply at its default width (53 bits): random normalised significands and
// the carry and borrow corners, each with all three actions; the result must be the
// significand plus one, minus one or unchanged, computed here with integer arithmetic.
module tb_round_apply;
  import fir_div_pkg::*;
  localparam int N = 53;

  logic [N-1:0] t, q;
  round_act_e   act;
  int checks = 0, failures = 0;

  round_apply dut (.t, .act, .q);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] v);
    longint unsigned want;
    for (int a = 0; a < 3; a++) begin
      t = v; act = round_act_e'(a);
      #1;
      want = longint'(v);
      if (a == 1) want = want + 1;
      if (a == 2) want = want - 1;
      checks++;
      if (longint'(q) != want) begin
        failures++;
        if (failures < 10) $display("t=%h act=%0d q=%h expected %h", v, a, q, want);
      end
    end
  endtask

  initial begin
    logic [63:0] r;
    check({1'b1, (N-1)'(0)} + 1'b1);
    check({1'b1, {(N-2){1'b1}}, 1'b0});
    check({2'b10, {(N-2){1'b1}}});
    check({2'b11, {(N-2){1'b0}}});
    for (int i = 0; i < 5000; i++) begin
      r = {$urandom, $urandom};
      check({1'b1, r[N-2:1], 1'b1});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
