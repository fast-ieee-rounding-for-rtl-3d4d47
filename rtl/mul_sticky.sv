// Shared pipelined multiplier with RZ truncation and a sticky bit.
//
// Operands and product are unsigned fixed point with one integer bit and F fraction bits
// (value in [0,2)). The full 2W-bit product is formed and truncated toward zero: to F
// fraction bits for the iteration products, or, when sel_res is set, to RES_FRAC fraction
// bits, the LSB of the quotient grid, for the back multiplication b*Q''. The sticky bit is
// the OR of every product bit below the kept LSB, as in the rounding logic of an FP
// multiplier; with the product's LSB it tells whether b*Q'' equals the dividend exactly.
// The product's integer bits above 2^0 are dropped: every product issued by the divider
// is below 2 (an assertion checks this).
// Timing: one operation may be issued per cycle; the result, with the tag given at issue,
// appears LAT cycles later on out_valid. The sharing of one pipelined multiplier between
// the numerator and denominator products and the sticky bit follow the published rounding method;
// the latency, the width and the truncation select are this design's choices.
module mul_sticky #(
  parameter int unsigned W        = 64,
  parameter int unsigned F        = 63,
  parameter int unsigned RES_FRAC = 54,
  parameter int unsigned LAT      = 2,
  parameter int unsigned TAG_W    = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  logic             sel_res,
  input  logic [W-1:0]     x,
  input  logic [W-1:0]     y,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output logic [W-1:0]     p,
  output logic             sticky
);

  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
    logic [W-1:0]     p;
    logic             sticky;
  } stage_t;

  logic [2*W-1:0] full;
  logic [W-1:0]   p_f, low_mask;
  logic [2*W-1:0] drop_mask;
  stage_t         s_in;
  stage_t         pipe [LAT];

  assign full = x * y;
  // bits of the 1.F product below the kept LSB
  assign low_mask  = sel_res ? (W'(1) << (F - RES_FRAC)) - W'(1) : '0;
  assign drop_mask = (2*W)'(1) << (sel_res ? (2*F - RES_FRAC) : F);
  assign p_f       = full[F +: W] & ~low_mask;

  always_comb begin
    s_in.valid  = in_valid;
    s_in.tag    = in_tag;
    s_in.p      = p_f;
    s_in.sticky = |(full & (drop_mask - (2*W)'(1)));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= s_in;
      for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign out_valid = pipe[LAT-1].valid;
  assign out_tag   = pipe[LAT-1].tag;
  assign p         = pipe[LAT-1].p;
  assign sticky    = pipe[LAT-1].sticky;

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> full[2*W-1 : F+W] == '0)
    else $error("mul_sticky: product not below 2");

endmodule
