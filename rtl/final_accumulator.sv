// final_accumulator: sums the section results and produces the filter output.
//
// The L section results stay in the sections' output registers for a whole frame
// and are placed on the shared bus one at a time, in the even cycles. With `ld`
// high the accumulator adds the word on the bus. In the cycle where the last word
// is added `ld_out` and `clr_out` are high: the complete W-bit sum is latched into
// the output register and the accumulator restarts from zero. The output keeps the
// OUT_W most significant bits of the sum (the W-OUT_W least significant bits are
// dropped, which rounds towards minus infinity), and `out_valid` is high for the
// one cycle after each new output word is latched, once per frame (the decimated
// output clock).
//
// From the original design: 24-bit accumulator and register, 16-bit output by dropping 8
// LSBs, the ld / ld_out / clr_out schedule. This design's choices: single-edge
// clocking, synchronous enables, the `out_valid` strobe and the reset to zero. The
// W-OUT_W low bits of the output register are kept, as in the original design, but drive
// nothing, so a lint tool reports them as unused.
`timescale 1ns/1ps

module final_accumulator #(
  parameter int unsigned W     = 24,
  parameter int unsigned OUT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     bus,
  input  logic             ld,
  input  logic             ld_out,
  input  logic             clr_out,
  output logic [OUT_W-1:0] dout,
  output logic             out_valid
);

  logic [W-1:0] acc;
  logic [W-1:0] sum;
  logic [W-1:0] result;

  assign sum = acc + (ld ? bus : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       acc <= '0;
    else if (clr_out) acc <= '0;
    else              acc <= sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= ld_out;
      if (ld_out) result <= sum;
    end
  end

  assign dout = result[W-1 -: OUT_W];

endmodule
