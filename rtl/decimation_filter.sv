// decimation_filter: 256-tap linear-phase FIR decimation filter for a 1-bit
// delta-sigma bit stream, decimating by 16 (6.4 MHz in, 400 kHz out, 16-bit words).
//
// The 1-bit input enters a 256-bit delay line. Because the input is one bit wide
// and the impulse response is symmetric, each pair of taps (d_k, d_255-k) adds
// +2h[k], 0 or -2h[k] to the output, so no multiplier is needed. Because only every
// 16th output is wanted, groups of 16 adjacent pair terms are summed serially, one
// per clock, by eight accumulation sections; section l reads the fixed tap
// d_16(l-1) and, through a 16-to-1 multiplexer, the taps 255-16(l+1)+2k. A timing
// controller steps a 4-bit counter that addresses every section's multiplexer and
// coefficient ROM. At the end of each 16-cycle frame the sections latch their
// sums; during the next frame the final accumulator reads them one by one over a
// shared 24-bit bus (section l in cycle 2(l-1)) and in cycle 14 latches the total,
// of which the top 16 bits are the output.
//
// Interface: `din` is sampled on every rising edge of `clk` (1 = +Vref, 0 = -Vref).
// `dout` changes once per frame; `out_valid` is high for one cycle right after it
// has changed. The output word produced after frame m (the frame in whose cycle 0
// sample x[16m-15] is on tap d0 and whose last sample is x[16m]) is
//   y[16m] = sum_{k=0..127} XNOR(x[16m-k], x[16m-255+k]) * 2h[k] * s(x[16m-k]),
// with s(1) = +1 and s(0) = -1, and appears at the end of cycle 14 of frame m+1.
// After reset the delay line holds zeros (a constant -Vref input) and cycle 0 of
// the first frame follows the first clock edge.
//
// The architecture, tap wiring, widths and schedule are the original design's. This
// design's choices: one clock edge for all registers, an active-low asynchronous
// reset, an OR-combined bus replacing the tristate bus, and the `out_valid` strobe.
// Only the even outputs of the controller's cycle decoder select a section; the
// odd ones stay unconnected, since the bus is idle in odd cycles.
`timescale 1ns/1ps

module decimation_filter
  import decim_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               din,
  output logic [Y_OUT_W-1:0] dout,
  output logic               out_valid
);

  localparam int unsigned CNT_W = $clog2(DECIM);

  logic [NTAPS-1:0]   taps;
  logic [CNT_W-1:0]   counter;
  logic [DECIM-1:0]   dec;
  logic               clr, load, ld, ld_out, clr_out;
  logic [V_BUS_W-1:0] sec_bus [NSEC];
  logic [V_BUS_W-1:0] v;

  shift_register #(.LEN(NTAPS)) u_sr (
    .clk   (clk),
    .rst_n (rst_n),
    .din   (din),
    .taps  (taps)
  );

  timing_control #(.D(DECIM), .L(NSEC)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .counter (counter),
    .dec     (dec),
    .clr     (clr),
    .load    (load),
    .ld      (ld),
    .ld_out  (ld_out),
    .clr_out (clr_out)
  );

  for (genvar l = 1; l <= NSEC; l++) begin : g_sec
    logic [DECIM-1:0] in_mux;
    for (genvar k = 1; k <= DECIM; k++) begin : g_tap
      assign in_mux[k-1] = taps[tap_mux(l, k, DECIM, NTAPS)];
    end

    accum_section #(.SECTION(l), .D(DECIM), .BUS_W(V_BUS_W)) u_sec (
      .clk     (clk),
      .rst_n   (rst_n),
      .counter (counter),
      .clr     (clr),
      .load    (load),
      .sel     (dec[2*(l-1)]),
      .in0     (taps[tap_in0(l, DECIM)]),
      .in_mux  (in_mux),
      .bus     (sec_bus[l-1])
    );
  end

  always_comb begin
    v = '0;
    for (int i = 0; i < NSEC; i++) v |= sec_bus[i];
  end

  final_accumulator #(.W(V_BUS_W), .OUT_W(Y_OUT_W)) u_final (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus       (v),
    .ld        (ld),
    .ld_out    (ld_out),
    .clr_out   (clr_out),
    .dout      (dout),
    .out_valid (out_valid)
  );

endmodule
