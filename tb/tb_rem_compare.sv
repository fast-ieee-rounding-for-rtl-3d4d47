// Test of rem_compare with numbers: a random integer dividend X and a back product
// Y = X*2^k + e with |e| < 2^k (the product is off by less than one unit of X's LSB). The
// truncated product's LSB and the sticky bit of the bits below are fed to the block, whose
// verdict must match the sign of e: e > 0 means b*Q'' > a (remainder negative), e < 0 means
// remainder positive, e = 0 remainder zero.
module tb_rem_compare;
  import fir_div_pkg::*;
  localparam int K = 20;

  logic a_lsb, y_lsb, sticky;
  rem_e rem;
  int checks = 0, failures = 0;
  int n[3] = '{default: 0};

  rem_compare dut (.a_lsb, .y_lsb, .sticky, .rem);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint x, e, y;
    rem_e   want;
    for (int i = 0; i < 5000; i++) begin
      x = longint'({12'd0, 20'($urandom)}) + 64'h100000;
      case ($urandom % 3)
        0:       e = 0;
        1:       e =  longint'({(65-K)'(0), (K-1)'($urandom)}) + 1;
        default: e = -longint'({(65-K)'(0), (K-1)'($urandom)}) - 1;
      endcase
      y      = (x << K) + e;
      a_lsb  = x[0];
      y_lsb  = y[K];
      sticky = y[K-1:0] != 0;
      want   = (e == 0) ? REM_ZERO : (e > 0) ? REM_NEG : REM_POS;
      n[want]++;
      #1;
      checks++;
      if (rem !== want) begin
        failures++;
        if (failures < 10) $display("x=%0d e=%0d: rem=%0d expected %0d", x, e, rem, want);
      end
    end
    checks++;
    if (n[0] == 0 || n[1] == 0 || n[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
