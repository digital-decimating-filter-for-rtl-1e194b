// tb_sine_workload: runs the full-size filter on delta-sigma modulated sine waves
// at the 6.4 MHz input rate, as in the filter's evaluation:
//   - a 102 kHz tone of amplitude 0.5 Vref (inside the 106.7 kHz passband); the
//     output amplitude must be 0.5 x the DC gain 1.5068 within 6 %;
//   - a 300 kHz tone of amplitude 0.5 Vref (inside the stopband above 221.7 kHz);
//     the output must keep less than 5 % of the passband tone's RMS value (what
//     remains is the first-order modulator's own noise).
// Every output word is also compared exactly with a direct-form model of the 256
// taps run on the recorded bit stream, and the output period must be 16 clocks.
`timescale 1ns/1ps
module tb_sine_workload;
  import decim_pkg::*;

  localparam int NOUT  = 700;                 // outputs per tone
  localparam int NSAMP = DECIM * NOUT;
  localparam int SKIP  = 40;                  // outputs ignored while settling
  localparam real FS   = 6.4e6;
  localparam real PI   = 3.14159265358979;
  localparam real LSB  = 16384.0;             // output units per Vref (2^22 / 2^8)

  logic clk = 1'b0, rst_n = 1'b0;
  real  vin = 0.0;
  logic din;
  logic [15:0] dout;
  logic out_valid;
  int checks = 0, failures = 0;
  bit xs [NSAMP];
  real outs [NOUT];

  delta_sigma_model u_mod (.clk(clk), .rst_n(rst_n), .vin(vin), .bit_out(din));
  decimation_filter dut (.clk(clk), .rst_n(rst_n), .din(din), .dout(dout), .out_valid(out_valid));

  always #78 clk = ~clk;

  function automatic longint coef_val(int k);
    int l = k / DECIM;
    int w = COEF_W[l];
    longint v = longint'(COEF_2H[k]) & ((longint'(1) << w) - 1);
    if (COEF_SIGNED[l] && v >= (longint'(1) << (w - 1))) v -= (longint'(1) << w);
    return v;
  endfunction

  function automatic longint ref_y(int n);
    longint acc2 = 0;
    for (int j = 0; j < NTAPS; j++) begin
      int idx = (j < NCOEF) ? j : NTAPS - 1 - j;
      bit xb = (n - j >= 0) ? xs[n - j] : 1'b0;
      acc2 += xb ? coef_val(idx) : -coef_val(idx);
    end
    return acc2 / 2;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // amplitude of the component at frequency f (output rate FS/16) and total RMS
  task automatic measure(real f, output real amp, output real rms);
    real sc = 0.0, ss = 0.0, mean = 0.0, sq = 0.0;
    int m = NOUT - SKIP;
    for (int i = SKIP; i < NOUT; i++) mean += outs[i];
    mean /= m;
    for (int i = SKIP; i < NOUT; i++) begin
      real ph;
      ph = 2.0 * PI * f * real'(i) * real'(DECIM) / FS;
      sc += (outs[i] - mean) * $cos(ph);
      ss += (outs[i] - mean) * $sin(ph);
      sq += (outs[i] - mean) * (outs[i] - mean);
    end
    amp = 2.0 / m * $sqrt(sc * sc + ss * ss);
    rms = $sqrt(sq / m);
  endtask

  task automatic run_tone(real f, real a);
    int p = 0, last = -1;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // the modulator's first bit leaves it at the first edge; the filter takes it
    // one edge later, so the filter sees the modulator stream delayed by one clock
    for (int t = 0; t < NSAMP + DECIM; t++) begin
      vin = a * $sin(2.0 * PI * f * real'(t) / FS);
      @(posedge clk);
      #1;
      if (t < NSAMP) xs[t] = dut.u_sr.taps[0];
      if (out_valid) begin
        if (last >= 0) check("output period 16", t - last == DECIM);
        last = t;
        if (p >= 1 && p <= NOUT) begin
          longint y;
          y = ref_y(DECIM * p - 1);
          check($sformatf("%0.0f Hz output %0d equals model", f, p), longint'($signed(dout)) == (y >>> 8));
          outs[p-1] = real'($signed(dout));
        end
        p++;
      end
    end
  endtask

  initial begin
    real amp_pass, rms_pass, amp_stop, rms_stop, want;
    run_tone(102.0e3, 0.5);
    measure(102.0e3, amp_pass, rms_pass);
    want = 0.5 * 1.5068 * LSB;
    $display("102 kHz: amplitude %0.1f LSB (expected %0.1f), rms %0.1f", amp_pass, want, rms_pass);
    check("passband amplitude", amp_pass > 0.94 * want && amp_pass < 1.06 * want);
    run_tone(300.0e3, 0.5);
    measure(100.0e3, amp_stop, rms_stop);   // 300 kHz aliases to 100 kHz at 400 kHz
    $display("300 kHz: alias amplitude %0.1f LSB, rms %0.1f", amp_stop, rms_stop);
    check("stopband rejection", rms_stop < 0.05 * rms_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(156.0 * 2.0 * (NSAMP + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
