// Quotient adjustment ahead of rounding.
//
// The iterations deliver an estimate Q' (one integer bit, F fraction bits) that lies within
// 2^-(N_BITS+M_GUARD+1) of the true quotient, on either side. This block adds
// 2^-(N_BITS+M_GUARD+1) and truncates to N_BITS+M_GUARD fraction bits, giving Q'' with
// |Q - Q''| < 2^-(N_BITS+M_GUARD): the N_BITS result bits followed by M_GUARD guard bits.
// Only the fraction bits of Q' down to weight 2^-(N_BITS+M_GUARD+1) can change Q'', so
// the block takes those: qp_hi holds Q' bits 2^-1 .. 2^-(N_BITS+M_GUARD+1). Q' is below 1
// (Q'' < 1 as Q < 1 - 2^-(N_BITS+1)), so its integer bit is not needed either.
// Purely combinational. The add-then-truncate step and the resulting bound follow the
// design's source; the extra iteration bits that give the input bound are this design's
// choice (set in the divider).
module q_adjust #(
  parameter int unsigned N_BITS  = 53,
  parameter int unsigned M_GUARD = 2
) (
  input  logic [N_BITS+M_GUARD:0]   qp_hi,
  output logic [N_BITS+M_GUARD-1:0] qpp
);

  localparam int unsigned K = N_BITS + M_GUARD;  // kept fraction bits

  assign qpp = K'((qp_hi + (K+1)'(1)) >> 1);

endmodule
