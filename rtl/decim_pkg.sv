// decim_pkg: shared constants of the 256-tap, decimate-by-16 single-bit FIR filter.
//
// The filter is a linear-phase FIR of order N = 255 (256 taps) that is split into
// L = (N+1)/(2D) = 8 accumulation sections of D = 16 coefficients each. Only the
// first half of the symmetric impulse response is stored, already multiplied by 2
// and by the passband gain 1.5 and quantised to B = 22 fractional bits, i.e. the
// integer value of word k is 2h[k] * 2^22.
//
// Every section stores its words with its own width b_l (COEF_W) and accumulates
// with its own width a_l (ACC_W). Sections whose coefficients change sign store a
// two's complement sign bit (COEF_SIGNED = 1); the others hold positive magnitudes
// only and their sign is tied to zero. All of these numbers, the coefficient words
// and the tap numbering formulas are the original design's; the packing of the words into
// one 20-bit-wide constant array is this design's own.
`timescale 1ns/1ps

package decim_pkg;

  localparam int unsigned NTAPS = 256;          // N + 1 filter taps
  localparam int unsigned DECIM = 16;           // downsampling ratio D
  localparam int unsigned NSEC  = NTAPS / (2 * DECIM);   // L = 8 sections
  localparam int unsigned NCOEF = NTAPS / 2;    // 128 stored coefficients
  localparam int unsigned COEF_FRAC = 22;       // B, coefficient quantisation
  localparam int unsigned V_BUS_W = 24;         // a_out, final accumulator / data bus
  localparam int unsigned Y_OUT_W = 16;          // truncated output word
  localparam int unsigned WORD_W = 20;          // widest section word (section 8)

  // b_l: stored word width per section
  localparam int unsigned COEF_W [NSEC] = '{11, 13, 15, 15, 16, 18, 19, 20};
  // sections 3, 4, 6 and 7 hold coefficients of both signs
  localparam bit COEF_SIGNED [NSEC] = '{1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b1, 1'b1, 1'b0};
  // a_l: accumulator width per section
  localparam int unsigned ACC_W [NSEC] = '{14, 17, 18, 19, 20, 21, 22, 24};

  // Stored words 2h[k] * 2^22, k = 0..127, each in the b_l-bit format of its section
  // (two's complement for signed sections, plain magnitude otherwise).
  localparam logic [WORD_W-1:0] COEF_2H [NCOEF] = '{
    // section 1: 2h[0..15], 11-bit words
    20'h00002, 20'h00020, 20'h00028, 20'h00042, 20'h00062, 20'h0008E, 20'h000C6, 20'h0010C,
    20'h00162, 20'h001CC, 20'h0024A, 20'h002DC, 20'h00388, 20'h0044A, 20'h00526, 20'h0061A,
    // section 2: 2h[16..31], 13-bit words
    20'h00724, 20'h00846, 20'h00978, 20'h00ABA, 20'h00C04, 20'h00D52, 20'h00E9C, 20'h00FDA,
    20'h01100, 20'h01208, 20'h012E2, 20'h01386, 20'h013E6, 20'h013F8, 20'h013AC, 20'h012FA,
    // section 3: 2h[32..47], 15-bit words
    20'h011D8, 20'h0103A, 20'h00E1E, 20'h00B7C, 20'h00854, 20'h004A8, 20'h0007A, 20'h07BD6,
    20'h076C8, 20'h07160, 20'h06BB4, 20'h065DC, 20'h05FF6, 20'h05A22, 20'h05486, 20'h04F48,
    // section 4: 2h[48..63], 15-bit words
    20'h04A90, 20'h04688, 20'h0435A, 20'h0412E, 20'h0402A, 20'h04076, 20'h0422E, 20'h0456C,
    20'h04A44, 20'h050C2, 20'h058E4, 20'h062A6, 20'h06DF4, 20'h07AB0, 20'h008B4, 20'h017C8,
    // section 5: 2h[64..79], 16-bit words
    20'h027AC, 20'h03818, 20'h048B8, 20'h0592C, 20'h06914, 20'h07802, 20'h0858A, 20'h09140,
    20'h09AB4, 20'h0A180, 20'h0A540, 20'h0A59A, 20'h0A244, 20'h09B00, 20'h08FA6, 20'h0801A,
    // section 6: 2h[80..95], 18-bit words
    20'h06C60, 20'h0548E, 20'h038D6, 20'h01982, 20'h3F6FC, 20'h3D1C2, 20'h3AA70, 20'h381BC,
    20'h35870, 20'h32F68, 20'h30796, 20'h2E1F4, 20'h2BF8A, 20'h2A162, 20'h28886, 20'h275FA,
    // section 7: 2h[96..111], 19-bit words
    20'h66AB8, 20'h667AC, 20'h66DA6, 20'h67D66, 20'h69780, 20'h6BC72, 20'h6EC86, 20'h727E4,
    20'h76E84, 20'h7C02C, 20'h01C76, 20'h082C8, 20'h0F25C, 20'h16A3C, 20'h1E94A, 20'h26E3A,
    // section 8: 2h[112..127], 20-bit words
    20'h2F7A6, 20'h38400, 20'h411AA, 20'h49EF0, 20'h52A14, 20'h5B156, 20'h632F4, 20'h6AD40,
    20'h71E94, 20'h7856C, 20'h7E062, 20'h82E32, 20'h86DCC, 20'h89E4C, 20'h8BF02, 20'h8CF7C
  };

  // Tap d_n0 read by input in0 of section l (1-based): n0 = D(l-1)   (eq. 3.20)
  function automatic int unsigned tap_in0(int unsigned l, int unsigned d);
    return d * (l - 1);
  endfunction

  // Tap d_nk read by multiplexer input in_k of section l (k = 1..D):
  // nk = N - D(l+1) + 2k  with N = ntaps - 1                        (eq. 3.21)
  function automatic int unsigned tap_mux(int unsigned l, int unsigned k,
                                          int unsigned d, int unsigned ntaps);
    return ntaps - 1 - d * (l + 1) + 2 * k;
  endfunction

endpackage
