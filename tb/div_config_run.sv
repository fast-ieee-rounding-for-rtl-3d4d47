// Self-contained random test of one fir_divider configuration, used by
// tb_fir_divider_configs. It drives its divider with random normalised significands in all
// four rounding modes, compares each result with exact integer long division (quotient bits
// floor(A*2^(N-1)/B) for A = a'*2^(N+1), B = b*2^N, rounded by the remainder), checks the
// fast or slow latency of the schedule, and checks that the share of operations needing
// the back multiplication is near 2^-M. When finished it raises done with its counts.
module div_config_run #(
  parameter int N      = 53,
  parameter int M      = 2,
  parameter int ITER   = 3,
  parameter int IDX    = 8,
  parameter int FRAC   = 10,
  parameter int N_OPS  = 2000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int LAT  = 2;
  localparam int FAST = 1 + (LAT + 2) * ITER + LAT + 2;
  localparam int SLOW = FAST + LAT;

  logic         rst_n = 0, in_valid = 0, in_ready, out_valid, used_backmul, exp_adj;
  logic [N-1:0] a_sig = '0, b_sig = '0, q_sig;
  logic         q_sign = 0;
  logic [1:0]   rmode = 0;
  longint       cycle = 0;
  int           n_slow = 0;

  fir_divider #(.N_BITS(N), .M_GUARD(M), .ITER(ITER), .SEED_IDX_BITS(IDX), .SEED_FRAC(FRAC)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .a_sig, .b_sig, .q_sign, .rmode,
    .out_valid, .q_sig, .exp_adj, .used_backmul
  );

  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [N-1:0] rnd_sig();
    logic [63:0] r;
    r = {$urandom, $urandom};
    return {1'b1, r[N-2:0]};
  endfunction

  initial begin
    logic [N-1:0] a, b, q_ref;
    logic [127:0] A, num, T, R;
    logic         sgn, up, e_ref;
    logic [1:0]   mode;
    longint       t0;
    int           lat;
    real          f;
    done = 0; checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N_OPS; i++) begin
      a = rnd_sig(); b = rnd_sig(); sgn = 1'($urandom); mode = 2'($urandom);
      e_ref = (a >= b);
      A   = e_ref ? 128'(a) : 128'(a) << 1;
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
      q_ref = T[N-1:0];
      @(negedge clk);
      a_sig = a; b_sig = b; q_sign = sgn; rmode = mode; in_valid = 1;
      while (!in_ready) @(negedge clk);
      t0 = cycle;
      @(negedge clk);
      in_valid = 0;
      while (!out_valid) @(negedge clk);
      lat = int'(cycle - t0);
      checks += 2;
      if (q_sig !== q_ref || exp_adj !== e_ref) begin
        failures++;
        if (failures < 5)
          $display("N=%0d M=%0d: a=%h b=%h s=%0d mode=%0d got %h expected %h",
                   N, M, a, b, sgn, mode, q_sig, q_ref);
      end
      if (lat != (used_backmul ? SLOW : FAST)) failures++;
      if (used_backmul) n_slow++;
    end
    f = real'(n_slow) / real'(N_OPS);
    $display("N=%0d M=%0d ITER=%0d seed %0d bits: back multiplication in %0d of %0d (%f, 2^-M = %f)",
             N, M, ITER, IDX, n_slow, N_OPS, f, 1.0 / (1 << M));
    checks++;
    if (f < 0.6 / (1 << M) || f > 1.4 / (1 << M)) failures++;
    done = 1;
  end
endmodule
