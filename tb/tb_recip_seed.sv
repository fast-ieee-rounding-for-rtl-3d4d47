// Exhaustive test of recip_seed at its defaults (8 index bits, 10 fraction bits).
// For every index the entry must equal the reciprocal of the interval midpoint rounded to
// 10 fraction bits (computed here in floating point), and b*r0 must lie within 2^-8 of 1
// at both ends of the interval, the accuracy the divider's three iterations rely on.
module tb_recip_seed;
  localparam int IDX  = 8;
  localparam int FRAC = 10;

  logic [IDX-1:0]  idx;
  logic [FRAC:0]   r0;
  int checks = 0, failures = 0;

  recip_seed dut (.idx, .r0);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real lo, hi, mid, r, e_lo, e_hi, worst;
    int  expv;
    worst = 0.0;
    for (int i = 0; i < 2**IDX; i++) begin
      idx = IDX'(i);
      #1;
      lo   = 0.5 + real'(i) / real'(2**(IDX+1));
      hi   = lo + 1.0 / real'(2**(IDX+1));
      mid  = (lo + hi) / 2.0;
      expv = int'($floor(real'(2**FRAC) / mid + 0.5));
      r    = real'(r0) / real'(2**FRAC);
      checks++;
      if (int'(r0) != expv) begin
        failures++;
        $display("idx %0d: r0=%0d expected %0d", i, r0, expv);
      end
      e_lo = 1.0 - lo * r;
      e_hi = 1.0 - hi * r;
      if (e_lo < 0) e_lo = -e_lo;
      if (e_hi < 0) e_hi = -e_hi;
      if (e_lo > worst) worst = e_lo;
      if (e_hi > worst) worst = e_hi;
      checks++;
      if (e_lo >= 1.0 / 256.0 || e_hi >= 1.0 / 256.0) begin
        failures++;
        $display("idx %0d: seed error %g / %g", i, e_lo, e_hi);
      end
    end
    $display("worst |1 - b*r0| = %g (2^%0.2f)", worst, $ln(worst) / $ln(2.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
