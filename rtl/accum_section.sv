// accum_section: one accumulation section of the decimating FIR filter.
//
// Section l replaces D adjacent adders of the filter's summation node by a single
// accumulator that adds one term per master-clock cycle. Its input in0 sits on the
// fixed tap d_D(l-1); because the delay line moves one tap per cycle, the matching
// partner sample of each term is found on taps two apart, and a D-to-1 multiplexer
// picks input in_(c+1) in cycle c (c = counter). In the same cycle the coefficient
// ROM supplies 2h[Dl-1-c]. The sign inverter turns the pair of samples and the word
// into +2h, 0 or -2h (operand and carry-in) and the accumulator adds it.
//
// Timing (one frame = D cycles, counter 0..D-1): cycles 0..D-1 each add one term;
// in cycle D-1, with `load` and `clr` high, the complete sum (accumulator plus the
// last term) is written into the output register and the accumulator restarts from
// zero for cycle 0. The output register holds the section result v_l for the whole
// next frame. When `sel` is high the result, sign-extended to BUS_W bits, is driven
// onto `bus`; otherwise `bus` is 0, so the sections' outputs can be ORed into one
// shared bus.
//
// From the original design: the section structure, the reverse coefficient order, the
// per-section widths b_l and a_l, the clear/load schedule. This design's choices: a
// single rising clock edge instead of the original design's falling-edge accumulator and
// output registers, an active-high select instead of the active-low SELECT_INV, and
// an AND-OR bus contribution in place of the 24-bit tristate buffers.
`timescale 1ns/1ps

module accum_section
  import decim_pkg::*;
#(
  parameter int unsigned SECTION = 1,
  parameter int unsigned D       = DECIM,
  parameter int unsigned BUS_W   = V_BUS_W,
  parameter int unsigned CNT_W   = $clog2(D),
  parameter int unsigned CW      = COEF_W[SECTION-1],
  parameter int unsigned AW      = ACC_W[SECTION-1]
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] counter,
  input  logic             clr,
  input  logic             load,
  input  logic             sel,
  input  logic             in0,
  input  logic [D-1:0]     in_mux,   // in_mux[k-1] is the original design's input in_k
  output logic [BUS_W-1:0] bus
);

  logic          inx;
  logic [CW-1:0] coef;
  logic          coef_sign;
  logic [AW-1:0] operand;
  logic          carry;
  logic [AW-1:0] acc;
  logic [AW-1:0] sum;
  logic [AW-1:0] result;

  assign inx = in_mux[counter];

  coeff_rom #(.SECTION(SECTION), .D(D), .AW(CNT_W), .CW(CW)) u_rom (
    .addr (counter),
    .coef (coef),
    .sign (coef_sign)
  );

  sign_inverter #(.CW(CW), .AW(AW)) u_inv (
    .in0     (in0),
    .inx     (inx),
    .coef    (coef),
    .sign    (coef_sign),
    .operand (operand),
    .carry   (carry)
  );

  assign sum = acc + operand + AW'(carry);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else          acc <= sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    result <= '0;
    else if (load) result <= sum;
  end

  assign bus = sel ? {{(BUS_W-AW){result[AW-1]}}, result} : '0;

  initial assert (BUS_W >= AW) else $error("accum_section: bus narrower than accumulator");

endmodule
