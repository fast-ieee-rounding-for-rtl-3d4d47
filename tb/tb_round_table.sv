// Exhaustive test of round_table against the printed action tables: the four-row table for
// two guard bits (default instance) and the two-row table of the basic method (an instance
// with one guard bit). Each table cell is written out below as a string per rounding
// column: "t" trunc, "i" inc, "d" dec, "-" impossible (halfway case); columns RP and RM
// hold the positive/negative pair. need_rem must be set exactly for the guard pattern whose
// cells depend on the remainder.
module tb_round_table;
  import fir_div_pkg::*;

  logic [1:0] g2;
  logic       g1;
  rmode_e     rmode;
  logic       sgn;
  rem_e       rem;
  logic       need2, need1;
  round_act_e act2, act1;
  int checks = 0, failures = 0;

  round_table #(.M_GUARD(2)) dut2 (.guard(g2), .rmode, .q_sign(sgn), .rem, .need_rem(need2), .act(act2));
  round_table #(.M_GUARD(1)) dut1 (.guard(g1), .rmode, .q_sign(sgn), .rem, .need_rem(need1), .act(act1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // row key: guard bits and remainder ("0", "-", "+"); value: RN, RP+, RP-, RM+, RM-, RZ
  function automatic string row2(input int g, input rem_e r);
    case (g)
      0: case (r) REM_ZERO: return "tttttt"; REM_NEG: return "ttddtd"; default: return "tittit"; endcase
      1: return "tittit";
      2: case (r) REM_ZERO: return "------"; REM_NEG: return "tittit"; default: return "iittit"; endcase
      default: return "iittit";
    endcase
  endfunction

  function automatic round_act_e code(input byte c);
    case (c)
      "i":     return ACT_INC;
      "d":     return ACT_DEC;
      default: return ACT_TRUNC;
    endcase
  endfunction

  function automatic int col(input rmode_e m, input logic s);
    case (m)
      RM_RN:   return 0;
      RM_RP:   return s ? 2 : 1;
      RM_RM:   return s ? 4 : 3;
      default: return 5;
    endcase
  endfunction

  initial begin
    string  cells;
    byte    c;
    logic   want_need;
    for (int g = 0; g < 4; g++)
      for (int m = 0; m < 4; m++)
        for (int s = 0; s < 2; s++)
          for (int r = 0; r < 3; r++) begin
            g2 = 2'(g); g1 = g[1]; rmode = rmode_e'(m); sgn = 1'(s); rem = rem_e'(r);
            #1;
            // remainder needed where the table's cells for this guard pattern differ
            want_need = (row2(g, REM_NEG)[col(rmode, sgn)] != row2(g, REM_POS)[col(rmode, sgn)]) ||
                        (row2(g, REM_ZERO)[col(rmode, sgn)] != row2(g, REM_POS)[col(rmode, sgn)] &&
                         row2(g, REM_ZERO)[col(rmode, sgn)] != "-");
            c = row2(g, rem)[col(rmode, sgn)];
            checks++;
            if (need2 !== want_need) begin
              failures++; $display("m=2 g=%0d mode=%0d s=%0d: need_rem %0d", g, m, s, need2);
            end
            if (c != "-") begin
              checks++;
              if (act2 !== code(c)) begin
                failures++; $display("m=2 g=%0d mode=%0d s=%0d rem=%0d: act %0d", g, m, s, r, act2);
              end
            end
            // the basic one-guard-bit table has the rows of guard patterns 00 and 10
            if (g == 0 || g == 2) begin
              checks++;
              if (need1 !== want_need) begin
                failures++; $display("m=1 G=%0d mode=%0d s=%0d: need_rem %0d", g1, m, s, need1);
              end
              if (c != "-") begin
                checks++;
                if (act1 !== code(c)) begin
                  failures++; $display("m=1 G=%0d mode=%0d s=%0d rem=%0d: act %0d", g1, m, s, r, act1);
                end
              end
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
