// Starting approximation R0 ~ 1/b for the Goldschmidt iterations.
//
// The divisor b lies in [0.5,1). Its IDX_BITS bits below the leading one select one of
// 2^IDX_BITS equal intervals; the entry is the reciprocal of the interval midpoint rounded
// to OUT_FRAC fraction bits:
//   r0[i] = round( 2^OUT_FRAC / (0.5 + (i + 0.5) * 2^-(IDX_BITS+1)) )
//         = round( 2^(OUT_FRAC+IDX_BITS+2) / (2^(IDX_BITS+1) + 2i + 1) ).
// With the defaults (8 index bits, 10 fraction bits) |1 - b*r0| < 2^-8, the 8-bit start
// for which three iterations reach double precision. The table is a constant ROM
// computed at elaboration; the lookup is purely combinational.
// Interface: idx = b bits below the leading one; r0 = 1.OUT_FRAC fixed point, value in (1,2).
// The 8-bit accuracy follows the published rounding method; midpoint entries and OUT_FRAC are this
// design's choice.
module recip_seed #(
  parameter int unsigned IDX_BITS = 8,
  parameter int unsigned OUT_FRAC = 10
) (
  input  logic [IDX_BITS-1:0] idx,
  output logic [OUT_FRAC:0]   r0
);

  function automatic logic [OUT_FRAC:0] seed_entry(input int unsigned i);
    longint unsigned num, den;
    num = 64'd1 << (OUT_FRAC + IDX_BITS + 2);
    den = (64'd1 << (IDX_BITS + 1)) + 2 * longint'(i) + 1;
    return (OUT_FRAC+1)'((2 * num + den) / (2 * den));
  endfunction

  logic [OUT_FRAC:0] rom [2**IDX_BITS];

  for (genvar i = 0; i < 2**IDX_BITS; i++) begin : g_rom
    assign rom[i] = seed_entry(i);
  end

  assign r0 = rom[idx];

endmodule
