# Multiplier-free decimation filter for a 1-bit delta-sigma sonar receiver

A delta-sigma modulator digitises a sonar transducer signal as a 1-bit stream at
6.4 MHz. This design turns that stream into 16-bit samples at 400 kHz, ready for a
wideband beamformer. It is a 256-tap linear-phase FIR lowpass with decimation by 16.
It has no multipliers, and it runs at only one addition per clock in each of eight
small accumulators.

The RTL is a SystemVerilog implementation of the filter described in R. S. Meier,
*Digital Decimating Filter for a Monolithic Sonar Receiver* (thesis), which built it
from schematics on a Xilinx XC4013XL FPGA. The architecture, coefficient set, word
widths, tap wiring and cycle schedule come from that design. Where this RTL departs
from it, the departure is listed under [Departures from the original design](#departures-from-the-original-design).
For the thesis's own impulse-response test, this RTL reproduces every published
number bit for bit.

## The filter

| quantity | value |
|---|---|
| input | 1 bit per clock; 1 = +Vref, 0 = -Vref; master clock fs = 6.4 MHz |
| filter | linear-phase FIR, order N = 255 (256 taps), symmetric h[k] = h[255-k] |
| passband / stopband edge | 106.7 kHz / 221.7 kHz |
| stopband attenuation | 108 dB before coefficient rounding, at least 100 dB after it |
| gain | 1.5 (a +Vref DC input gives 1.5068 with the quantised coefficients) |
| coefficients | 128 stored values 2h[k], quantised to 2^-22 |
| decimation | D = 16, output rate 400 kHz |
| output | 16-bit two's complement; `dout / 2^14` is the output in units of Vref |
| group delay | 127.5 input samples (19.92 us) |

## Why no multipliers are needed

Because the impulse response is symmetric, taps k and 255-k share the coefficient
h[k]. The output is therefore a sum of 128 pair terms:

    y[n] = sum_{k=0..127} h[k] * ( s(x[n-k]) + s(x[n-255+k]) ),   s(1) = +1, s(0) = -1

Each input is ±1, so a pair term is one of three values:

| x[n-k] | x[n-255+k] | term |
|---|---|---|
| 0 | 0 | -2h[k] |
| 0 | 1 | 0 |
| 1 | 0 | 0 |
| 1 | 1 | +2h[k] |

The ROMs store 2h[k] directly. Each term then needs only an XNOR (are the two bits
equal?), AND gates (pass the word or force it to 0) and a conditional two's
complement negation. The negation is done by XOR-inverting the word and feeding a 1
into the accumulator's carry input (`sign_inverter`).

## Serial summation in eight sections (the part that needs care)

Only every 16th output is needed, so the 128-term sum is spread over the 16 clocks
of one output period (a *frame*). The terms are split into L = 8 sections of 16
terms each. Section l (1..8) handles terms k = 16(l-1) .. 16l-1, and its accumulator
adds one term per clock.

The difficulty is that the delay line keeps shifting while a section works through
its 16 terms. A term computed in cycle c of the frame sees every sample c taps
closer to the input than it will be at the end of the frame. The original design
turns this into a simple wiring rule:

* The first sample of every term is always read from one fixed tap,
  `in0 = d_{16(l-1)}` (tap d_k holds x[n-k]). Term k = 16l-1-c is computed in cycle
  c, and in that cycle its first sample x[n_end-k] has just reached tap 16(l-1).
* The partner sample x[n_end-255+k] sits 2 taps further along for each later cycle,
  because k falls by one and the line moves by one. A 16-to-1 multiplexer, addressed
  by the cycle counter, picks input `in_{c+1}` = tap `255 - 16(l+1) + 2(c+1)`.
* The coefficient ROM is addressed by the same counter. It therefore stores the
  section's words in reverse order: address c holds 2h[16l-1-c]. Section 1 reads
  2h[15] in cycle 0 and 2h[0] in cycle 15.

The resulting taps (rows: multiplexer input, columns: section):

| | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| in0 | 0 | 16 | 32 | 48 | 64 | 80 | 96 | 112 |
| in1 (cycle 0) | 225 | 209 | 193 | 177 | 161 | 145 | 129 | 113 |
| in_k | +2 per step | | | | | | | |
| in16 (cycle 15) | 255 | 239 | 223 | 207 | 191 | 175 | 159 | 143 |

`decim_pkg::tap_in0` and `decim_pkg::tap_mux` compute these numbers, and the top
wires them in a generate loop.

## Frame schedule

A 4-bit counter (`timing_control`) runs 0..15. All registers use the rising clock
edge. A strobe that is high during cycle c takes effect at the edge that ends
cycle c.

| cycle | sections | bus / final accumulator |
|---|---|---|
| 0 | add term for 2h[16l-1] | section 1 on the bus, added (`ld`) |
| 1 | add term | — |
| 2, 4, ..., 12 | add term | sections 2..7 on the bus, added |
| odd cycles | add term | — |
| 14 | add term | section 8 on the bus, added; sum latched into the output register (`ld_out`); accumulator restarts (`clr_out`) |
| 15 | add last term; sum latched into the section's output register (`load`); accumulator restarts (`clr`) | — |

So the sections compute frame m while the final accumulator adds up the section
results of frame m-1. The section results stay in their output registers for all
of frame m+1. The eight results share a single 24-bit bus, and a section drives it
only in its own even cycle. One output word is produced per frame.

**Latency.** Let frame m take the samples at edges 16(m-1) .. 16m-1, counting
edges from 0 after reset. Its output word appears at edge 16m+15. `out_valid` is
high for the one cycle after that edge. Reset fills the delay line with zeros, which
is a -Vref input: the outputs during the first 16 frames are the filter's response
to that history. The word read at the first `out_valid` comes from the reset state
of the section registers and is 0.

## Number formats and widths

Each section stores its words with just enough bits (b_l) and accumulates with just
enough bits (a_l) never to overflow, even if all 16 terms have the same sign:

| section | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| word width b_l | 11 | 13 | 15 | 15 | 16 | 18 | 19 | 20 |
| words signed? | no | no | yes | yes | no | yes | yes | no |
| accumulator width a_l | 14 | 17 | 18 | 19 | 20 | 21 | 22 | 24 |

* Sections 1, 2, 5 and 8 hold only positive coefficients. They store magnitudes,
  and their sign bit is tied to 0.
* The other sections store two's complement words.
* Words are widened to a_l bits (sign bit copied, or zeros for the unsigned
  sections) before the gate and the conditional inversion.
* Section results are sign-extended onto the 24-bit bus.
* The final accumulator is 24 bits wide. The largest output, ±1.5068 · 2^22 =
  ±6 320 038, fits in 24 bits.
* The output keeps bits 23..8. Dropping the low 8 bits rounds towards -infinity.

The word values are in `decim_pkg::COEF_2H`, as the integers 2h[k] · 2^22 written
in each section's word format. They come from a Parks-McClellan (Remez) design with
these settings:

* order 255;
* band edges at 0.03334 and 0.06928 of the Nyquist frequency;
* stopband weight 1835;
* scaled by 1.5 and by 2;
* rounded to 22 fractional bits.

They cannot be recomputed from a closed formula. To change the filter response,
replace the table and the width arrays together. b_l is ceil(log2(max|2h|·2^22 + 1))
bits, plus one if the section has both signs. a_l is 1 + ceil(log2(sum of
|2h|·2^22 over the section)).

## Modules

| file | role |
|---|---|
| `rtl/decim_pkg.sv` | sizes, per-section widths, the coefficient table, tap formulas |
| `rtl/decimation_filter.sv` | top: delay line, controller, 8 sections, OR-bus, final accumulator |
| `rtl/shift_register.sv` | 256-bit serial-in parallel-out delay line, tap 0 = newest sample |
| `rtl/timing_control.sv` | counter, one-hot decoder, `clr`/`load`/`ld`/`ld_out`/`clr_out` |
| `rtl/accum_section.sv` | tap multiplexer, ROM, sign inverter, accumulator, output register, bus driver |
| `rtl/coeff_rom.sv` | 16-word asynchronous ROM of one section, reverse order |
| `rtl/sign_inverter.sv` | XNOR / AND / XOR term generator with carry-in |
| `rtl/final_accumulator.sv` | 24-bit sum of the section results, 16-bit output register |

Top-level ports of `decimation_filter`:

* `clk`: the 6.4 MHz master clock.
* `rst_n`: asynchronous reset, active low.
* `din`: the modulator bit, sampled on the rising edge.
* `dout[15:0]`: the output word.
* `out_valid`: the one-cycle output strobe at 400 kHz.

The top has no parameters. The coefficient table fixes the default sizes, which are
256 taps and D = 16. The submodules are parameterised, for tests and reuse. The
architecture itself needs D to be a power of two with 2L ≤ D, which
`timing_control` asserts, and the number of taps to equal 2·L·D.

## Departures from the original design

* **Single clock edge.** The original design loads the accumulator and output
  registers on the falling edge and clears them on the rising edge. Here every
  register uses the rising edge, and the strobes are one-cycle enables. What happens
  in each cycle is the same, but nothing happens half a cycle early.
* **No tristate bus.** The original design drives the shared 24-bit bus through
  tristate buffers, enabled by active-low `SELECT_INV`. Here a section outputs zeros
  when its active-high `sel` is low, and the top ORs the eight outputs. Only one
  section is selected at a time, so the bus value is the same.
* **Bus order.** The sections are placed on the bus in even cycles 0, 2, ..., 14. The
  order used here (section l in cycle 2(l-1)) is a choice; the original design fixes
  only section 1 in cycle 0.
* **Final accumulator control.** The final accumulator adds with `ld` and latches its
  output with `ld_out`, following the original timing diagram. One passage of the
  original text instead has `LD_OUT` clock the accumulator.
* **Output scaling.** The original text's behavioural model rounds the output to
  2^-15. Its hardware instead keeps bits 23..8 of the sum, which is an LSB of 2^-14.
  This RTL follows the hardware. With this LSB, the ±1.5068 full-scale DC level fits
  in 16 signed bits.
* **Reset and strobe.** The asynchronous reset and the `out_valid` strobe are
  additions. The original design describes neither.
* **Coefficient storage.** The coefficients are one package constant, not eight ROM
  initialisation files.

The rest of the receiver is outside this RTL: transducer, preamplifier, anti-alias
RC filter, the fifth-order delta-sigma modulator and the beamformer.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_decimation_filter` runs the top at full size.
  * **Impulse test.** A single 1 is sent after reset (a quasi-impulse on a -Vref
    background). All 16 output words, the 16 24-bit sums and the 8×16 section
    results are compared with the published reference simulation of the original
    filter. They match exactly.
  * **Random test.** 16 000 random bits are checked against an independent
    direct-form model that sums all 256 taps.
  * **DC test.** Long runs of ones and zeros must settle at 0x606F and 0x9F90
    (±1.5068).
  * **Timing.** Every output's timing is checked: one output per 16 clocks, at edge
    16m+15.
  * **Coverage.** The test counts +2h, -2h and zero terms in every section, and
    every section's bus turns.
* `tb_sine_workload` runs the full filter on a 102 kHz, 0.5 Vref sine (passband)
  and a 300 kHz sine (stopband). The sine is modulated by a first-order delta-sigma
  model, `tb/delta_sigma_model.sv`, a stand-in for the real fifth-order modulator.
  * Every word must match the direct-form model.
  * The passband amplitude must equal 0.5 × 1.5068 within 6 %. Measured: -0.25 dB.
  * The stopband output must stay below 5 % of the passband RMS. Measured: about
    0.7 %, which is mostly the first-order modulator's own noise.
* The block testbenches cover the following:
  * `tb_shift_register`: every tap on every cycle.
  * `tb_timing_control`: the full strobe schedule.
  * `tb_coeff_rom`: all 128 words against the decimal coefficient values, within ±1
    LSB.
  * `tb_sign_inverter`: all input cases, signed and unsigned.
  * `tb_accum_section`: sections 3 and 8, random and all-equal inputs.
  * `tb_final_accumulator`: sums, truncation and the output strobe.

Not verified: gate-level timing, and behaviour with the real fifth-order modulator.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/decim_pkg.sv \
        tb/tb_decimation_filter.sv --top-module tb_decimation_filter -o sim
    ./obj_dir/sim

`-Wno-fatal` is needed because the testbenches pass values of many widths to one
64-bit checking task, which Verilator reports as width warnings. The RTL itself
builds without width warnings.

Any other testbench runs the same way. Replace the testbench file and the top
module name. The package must come first on the command line; Verilator finds the
other modules through `-Irtl -Itb`. Every testbench finishes in well under a second.
