// shift_register: serial-in, parallel-out delay line of the 1-bit input stream.
//
// Every rising clock edge the input bit enters tap 0 and all stored bits move one
// tap further, so tap k holds the sample taken k clocks before the newest one. The
// line has LEN flip-flops: the first one resynchronises the modulator bit to the
// master clock and is at the same time tap d0; the remaining LEN-1 flip-flops are the
// N = LEN-1 delays of the filter. Bit k of `taps` is tap d_k (the original design's bus
// SR[k+1]). Latency: a bit presented before edge t appears on taps[0] after edge t.
//
// The structure and the length 256 are the original design's. The asynchronous active-low
// reset that clears all taps (a line of zeros, the state assumed for the impulse
// response) is this design's choice.
`timescale 1ns/1ps

module shift_register #(
  parameter int unsigned LEN = 256
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           din,
  output logic [LEN-1:0] taps
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) taps <= '0;
    else        taps <= {taps[LEN-2:0], din};
  end

endmodule
