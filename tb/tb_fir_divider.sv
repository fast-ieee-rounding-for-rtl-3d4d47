// End-to-end test of fir_divider at its default parameters (53-bit significands, two guard
// bits, three iterations from an 8-bit seed, multiplier latency 2).
//
// Operands are random normalised significands plus directed sets: exact quotients (a is the
// product of two short significands), divisor at the ends of the seed table, dividend equal
// to or one ulp from the divisor. Each result is compared with a reference taken from exact
// integer long division: with A = a'*2^(N+1) and B = b*2^N the quotient bits are
// floor(A*2^(N-1)/B) and the remainder decides the rounding. The cycle count of every
// operation must be the fast or the slow latency of the schedule, matching used_backmul.
// It also counts how often each mechanism occurred (fast and slow completion, remainder
// positive, negative and zero, increment, decrement, dividend pre-shift, all four modes)
// and fails if one never did, and checks that in every mode roughly 2^-m of random
// operations need the back multiplication.
module tb_fir_divider;
  import fir_div_pkg::*;

  localparam int N       = 53;
  localparam int M       = 2;
  localparam int ITER    = 3;
  localparam int LAT     = 2;
  // schedule: load, prescale (2 issues + latency), ITER-1 full steps, last N step, decide, done
  localparam int FAST    = 1 + (LAT + 2) * ITER + LAT + 2;
  localparam int SLOW    = FAST + LAT;
  localparam int N_RAND  = 4000;

  logic         clk = 0, rst_n = 0;
  logic         in_valid = 0, in_ready, out_valid, used_backmul, exp_adj;
  logic [N-1:0] a_sig = '0, b_sig = '0, q_sig;
  logic         q_sign = 0;
  logic [1:0]   rmode = 0;

  int checks = 0, failures = 0;
  int n_fast = 0, n_slow = 0, n_rpos = 0, n_rneg = 0, n_rzero = 0, n_inc = 0, n_dec = 0;
  int n_shift = 0, n_noshift = 0;
  int mode_ops [4] = '{default: 0};
  int mode_slow[4] = '{default: 0};
  longint cycle = 0;

  fir_divider dut (
    .clk, .rst_n, .in_valid, .in_ready, .a_sig, .b_sig, .q_sign, .rmode,
    .out_valid, .q_sig, .exp_adj, .used_backmul
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled when a result leaves
  always @(posedge clk) if (rst_n && out_valid) begin
    if (used_backmul) begin
      n_slow++;
      case (dut.rem)
        REM_POS:  n_rpos++;
        REM_NEG:  n_rneg++;
        default:  n_rzero++;
      endcase
    end else n_fast++;
    if (dut.act == ACT_INC) n_inc++;
    if (dut.act == ACT_DEC) n_dec++;
    if (exp_adj) n_shift++; else n_noshift++;
  end

  function automatic logic [N-1:0] rnd_sig();
    logic [63:0] r;
    r = {$urandom, $urandom};
    return {1'b1, r[N-2:0]};
  endfunction

  // reference: returns rounded significand and exponent adjustment
  task automatic reference(input logic [N-1:0] a, input logic [N-1:0] b, input logic sgn,
                           input logic [1:0] mode, output logic [N-1:0] q, output logic e);
    logic [127:0] A, num, T, R;
    logic up;
    e   = (a >= b);
    A   = e ? 128'(a) : 128'(a) << 1;
    num = A << (N - 1);
    T   = num / 128'(b);
    R   = num % 128'(b);
    case (mode)
      2'd0:    up = (2 * R > 128'(b)) || (2 * R == 128'(b) && T[0]);
      2'd1:    up = 1'b0;
      2'd2:    up = !sgn && (R != 0);
      default: up =  sgn && (R != 0);
    endcase
    T = T + 128'(up);
    q = T[N-1:0];
  endtask

  task automatic run(input logic [N-1:0] a, input logic [N-1:0] b, input logic sgn,
                     input logic [1:0] mode, input bit count_mode);
    logic [N-1:0] q_ref;
    logic         e_ref;
    longint       t0;
    int           lat;
    reference(a, b, sgn, mode, q_ref, e_ref);
    @(negedge clk);
    a_sig = a; b_sig = b; q_sign = sgn; rmode = mode; in_valid = 1;
    while (!in_ready) @(negedge clk);
    t0 = cycle;
    @(negedge clk);
    in_valid = 0;
    while (!out_valid) @(negedge clk);
    lat = int'(cycle - t0);
    checks++;
    if (q_sig !== q_ref || exp_adj !== e_ref) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH a=%h b=%h s=%0d mode=%0d : got %h/%0d expected %h/%0d",
                 a, b, sgn, mode, q_sig, exp_adj, q_ref, e_ref);
    end
    checks++;
    if (lat != (used_backmul ? SLOW : FAST)) begin
      failures++;
      if (failures < 10) $display("LATENCY %0d (backmul=%0d)", lat, used_backmul);
    end
    if (count_mode) begin
      mode_ops[mode]++;
      if (used_backmul) mode_slow[mode]++;
    end
  endtask

  initial begin
    logic [N-1:0] a, b, s1, s2;
    logic [2*N-1:0] prod;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // directed: exact quotients in every mode (remainder zero)
    for (int i = 0; i < 200; i++) begin
      s1 = {1'b1, 20'($urandom), (N-21)'(0)};
      s2 = {1'b1, 20'($urandom), (N-21)'(0)};
      prod = s1 * s2;                       // value in [0.25,1), 2N fraction bits
      if (prod[2*N-1]) a = prod[2*N-1 -: N];
      else             a = prod[2*N-2 -: N];
      run(a, s1, 1'($urandom), 2'(i), 0);
    end
    // directed: a == b, a one ulp off b, seed-table ends
    for (int md = 0; md < 4; md++) begin
      for (int sg = 0; sg < 2; sg++) begin
        b = rnd_sig();
        run(b, b, 1'(sg), 2'(md), 0);
        run(b - 1'b1, b, 1'(sg), 2'(md), 0);
        run({1'b1, (N-1)'(0)}, {N{1'b1}}, 1'(sg), 2'(md), 0);
        run({N{1'b1}}, {1'b1, (N-1)'(0)}, 1'(sg), 2'(md), 0);
        run({N{1'b1}}, {N{1'b1}} - 1'b1, 1'(sg), 2'(md), 0);
        run({1'b1, (N-1)'(1)}, {N{1'b1}}, 1'(sg), 2'(md), 0);
      end
    end
    // random
    for (int i = 0; i < N_RAND; i++)
      run(rnd_sig(), rnd_sig(), 1'($urandom), 2'($urandom), 1);

    // about 2^-M of random operations need the remainder, in every mode
    for (int md = 0; md < 4; md++) begin
      real f;
      f = real'(mode_slow[md]) / real'(mode_ops[md]);
      $display("mode %0d: %0d of %0d operations used the back multiplication (%f)",
               md, mode_slow[md], mode_ops[md], f);
      checks++;
      if (f < 0.6 / (1 << M) || f > 1.4 / (1 << M)) failures++;
    end
    $display("fast=%0d slow=%0d rem+=%0d rem-=%0d rem0=%0d inc=%0d dec=%0d shift=%0d noshift=%0d",
             n_fast, n_slow, n_rpos, n_rneg, n_rzero, n_inc, n_dec, n_shift, n_noshift);
    foreach (mode_ops[md]) begin checks++; if (mode_ops[md] == 0) failures++; end
    checks++; if (n_fast == 0)    failures++;
    checks++; if (n_slow == 0)    failures++;
    checks++; if (n_rpos == 0)    failures++;
    checks++; if (n_rneg == 0)    failures++;
    checks++; if (n_rzero == 0)   failures++;
    checks++; if (n_inc == 0)     failures++;
    checks++; if (n_dec == 0)     failures++;
    checks++; if (n_shift == 0)   failures++;
    checks++; if (n_noshift == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
