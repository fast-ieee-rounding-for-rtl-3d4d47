// Test of mul_sticky at its defaults (64-bit 1.63 operands, back-multiplication LSB at
// 2^-54, latency 2). Random operands below sqrt(2) are issued on random cycles, half of them
// with sel_res set. Every result must come out exactly LAT cycles after its issue, with its
// tag, and equal the reference: the 128-bit exact product shifted down to the kept LSB
// (truncation toward zero) and the OR of the bits shifted out as sticky. Exact products
// (operands with many low bits clear) check that sticky can be zero and that it covers
// exactly the bits below the selected LSB.
module tb_mul_sticky;
  localparam int W = 64, F = 63, RES = 54, LAT = 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, sel_res = 0, out_valid, sticky;
  logic [2:0] in_tag = 0, out_tag;
  logic [W-1:0] x = 0, y = 0, p;
  int checks = 0, failures = 0, n_res = 0, n_st0 = 0;
  longint cycle = 0;

  typedef struct {
    longint      t;
    logic [2:0]  tag;
    logic [W-1:0] p;
    logic        st;
  } exp_t;
  exp_t q[$];

  mul_sticky dut (.clk, .rst_n, .in_valid, .in_tag, .sel_res, .x, .y, .out_valid, .out_tag, .p, .sticky);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd_op(input bit sparse);
    logic [W-1:0] v;
    v = {$urandom, $urandom};
    v[W-1] = 1'b0;                       // below 1 ...
    v[W-2] = 1'b1;                       // ... and at least 0.5, or
    if ($urandom % 4 == 0) v = {3'b100, v[W-4:0]};  // in [1,1.25)
    // sparse operands: low 12, 32 or 40 bits clear, so the product is exact at either
    // truncation point, or has bits only between the two
    if (sparse) v = v & ~((W'(1) << (W - 12)) - 1'b1);
    else if ($urandom % 3 == 0) v = v & ~((W'(1) << ((($urandom & 1) != 0) ? 32 : 40)) - 1'b1);
    return v;
  endfunction

  // checker
  always @(negedge clk) if (rst_n) begin
    if (q.size() > 0 && q[0].t == cycle) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (!out_valid || out_tag != e.tag || p != e.p || sticky != e.st) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: got v=%0d tag=%0d p=%h st=%0d exp tag=%0d p=%h st=%0d",
                   cycle, out_valid, out_tag, p, sticky, e.tag, e.p, e.st);
      end
    end else begin
      checks++;
      if (out_valid) begin failures++; $display("unexpected out_valid at %0d", cycle); end
    end
  end

  initial begin
    logic [2*W-1:0] full;
    int sh;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      sel_res  = 1'($urandom);
      in_tag   = 3'($urandom);
      x = rnd_op(($urandom % 5) == 0);
      y = rnd_op(($urandom % 5) == 0);
      if (in_valid) begin
        exp_t e;
        full = (2*W)'(x) * (2*W)'(y);
        sh   = sel_res ? 2 * F - RES : F;
        e.t   = cycle + longint'(LAT);
        e.tag = in_tag;
        e.p   = W'((full >> sh) << (sh - F));
        e.st  = (full & (((2*W)'(1) << sh) - 1'b1)) != 0;
        if (sel_res) n_res++;
        if (!e.st) n_st0++;
        q.push_back(e);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_res == 0 || n_st0 == 0) failures++;
    $display("back-multiplication format: %0d, exact products: %0d", n_res, n_st0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
