// coeff_rom: coefficient memory of one accumulation section.
//
// Holds the D words 2h[k] of section SECTION (1..8) in the order in which the
// section consumes them: address i holds 2h[D*SECTION-1-i], so address 0 of section
// 1 is 2h[15] and address 15 is 2h[0] (the reverse storage order of the original design).
// The ROM is asynchronous: `coef` follows `addr` combinationally. `coef` is the
// stored b_l-bit word; `sign` is its sign bit, the word's MSB for sections that
// hold coefficients of both signs and a constant 0 for the all-positive sections
// 1, 2, 5 and 8, as in the original design. The word values, widths and storage order are
// the original design's; reading them from a package constant is this design's choice.
`timescale 1ns/1ps

module coeff_rom
  import decim_pkg::*;
#(
  parameter int unsigned SECTION = 1,
  parameter int unsigned D       = DECIM,
  parameter int unsigned AW      = $clog2(D),
  parameter int unsigned CW      = COEF_W[SECTION-1]
) (
  input  logic [AW-1:0] addr,
  output logic [CW-1:0] coef,
  output logic          sign
);

  localparam bit SIGNED_WORDS = COEF_SIGNED[SECTION-1];

  logic [CW-1:0] mem [D];

  always_comb begin
    for (int unsigned i = 0; i < D; i++)
      mem[i] = COEF_2H[D * SECTION - 1 - i][CW-1:0];
  end

  assign coef = mem[addr];
  assign sign = SIGNED_WORDS ? coef[CW-1] : 1'b0;

  initial assert (SECTION >= 1 && SECTION * D <= NCOEF)
    else $error("coeff_rom: SECTION out of range");

endmodule
