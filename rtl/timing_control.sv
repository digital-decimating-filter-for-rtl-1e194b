// timing_control: cycle counter, decoder and control strobes of the filter.
//
// A free-running counter of log2(D) bits steps through the D master-clock cycles of
// one output period; its value addresses the coefficient ROMs and the tap
// multiplexers of all sections. A decoder turns it into one-hot `dec` (the original design's
// DEC[15:0]; its complement SEL is not needed with active-high selects). From the
// count the strobes are derived, each high for exactly one clock cycle:
//   clr, load  in cycle D-1: the section accumulators latch their finished sum into
//              their output registers and restart from zero in cycle 0;
//   ld         in even cycles 0, 2, .., 2(L-1): the final accumulator adds the section
//              result on the bus; section l drives the bus in cycle 2(l-1);
//   ld_out,    in cycle 2L-2 (14): the final sum is complete, is latched into the
//   clr_out    output register, and the final accumulator restarts from zero.
// The original design's circuit uses both clock edges (registers loaded in the middle of a
// cycle); here every register is clocked on the rising edge and a strobe that is
// high during cycle c acts at the edge that ends cycle c, which gives the same
// cycle-level schedule. Reset puts the counter at D-1, the state at which the
// original timing diagram begins, so cycle 0 of the first frame follows the first
// edge after reset.
`timescale 1ns/1ps

module timing_control #(
  parameter int unsigned D     = 16,
  parameter int unsigned L     = 8,
  parameter int unsigned CNT_W = $clog2(D)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [CNT_W-1:0] counter,
  output logic [D-1:0]     dec,
  output logic             clr,
  output logic             load,
  output logic             ld,
  output logic             ld_out,
  output logic             clr_out
);

  localparam logic [CNT_W-1:0] LAST = CNT_W'(D - 1);
  localparam logic [CNT_W-1:0] FIN  = CNT_W'(2 * L - 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               counter <= LAST;
    else if (counter == LAST) counter <= '0;
    else                      counter <= counter + 1'b1;
  end

  always_comb begin
    dec = '0;
    dec[counter] = 1'b1;
  end

  assign clr     = (counter == LAST);
  assign load    = (counter == LAST);
  assign ld      = !counter[0] && (counter <= FIN);
  assign ld_out  = (counter == FIN);
  assign clr_out = (counter == FIN);

  // the L section results must fit into the even cycles of one frame
  initial assert (2 * L <= D && (1 << CNT_W) == D)
    else $error("timing_control: need D a power of two and 2L <= D");

endmodule
