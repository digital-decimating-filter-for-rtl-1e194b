// sign_inverter: multiplier-free product of a coefficient and two input bits.
//
// For a symmetric pair of taps the filter needs w = XNOR(x0, x1) * 2h * s(x0), with
// s(1) = +1 and s(0) = -1: a bit value of 1 stands for +Vref and 0 for -Vref, so
// equal bits contribute +2h (both 1) or -2h (both 0) and unequal bits contribute 0.
// The circuit follows the original design's gate-level description:
//   eq_sign = XNOR(in0, inx)          (samples equal)
//   sub     = eq_sign AND NOT in0     (subtract)
//   the coefficient, widened to AW bits by copying its sign bit, is forced to 0 by
//   AND gates when eq_sign = 0, then XORed with sub; sub is also returned as the
//   carry-in of the accumulator adder, which completes the two's complement negation.
// So operand + carry equals +coef, -coef or 0. Purely combinational.
`timescale 1ns/1ps

module sign_inverter #(
  parameter int unsigned CW = 11,   // stored coefficient width b_l
  parameter int unsigned AW = 14    // accumulator width a_l
) (
  input  logic          in0,    // sample at the fixed tap
  input  logic          inx,    // sample from the tap multiplexer
  input  logic [CW-1:0] coef,   // stored coefficient word
  input  logic          sign,   // its sign bit (0 for all-positive sections)
  output logic [AW-1:0] operand,
  output logic          carry
);

  logic          eq_sign;
  logic          sub;
  logic [AW-1:0] widened;

  assign eq_sign = ~(in0 ^ inx);
  assign sub     = eq_sign & ~in0;
  assign widened = {{(AW-CW){sign}}, coef};
  assign operand = (widened & {AW{eq_sign}}) ^ {AW{sub}};
  assign carry   = sub;

  initial assert (AW > CW) else $error("sign_inverter: AW must exceed CW");

endmodule
