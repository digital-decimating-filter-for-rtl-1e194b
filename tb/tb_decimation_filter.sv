// tb_decimation_filter: end-to-end test of the complete filter at its full size.
//
// One continuous input stream is fed through the filter, one bit per clock
// (156 ns period, the 6.4 MHz master clock):
//   1. the quasi-impulse 1,0,0,... from a reset (all-zero) delay line. The 16
//      outputs, their 24-bit sums and the eight section results of each frame are
//      compared with the published reference simulation of this filter;
//   2. random bits, checked against an independent direct-form model that sums all
//      256 taps with the symmetric coefficient set;
//   3. a long run of ones (+Vref DC) and of zeros (-Vref DC): the output must settle
//      at +/- the sum of all stored coefficients (DC gain 1.5068);
// Every output is also checked for its timing: one output every 16 clocks, frame p
// available right after the clock edge that ends cycle 14 of frame p+1.
// Mechanisms counted (each must occur): +2h, -2h and 0 terms in every section, each
// section driving the bus, section loads, negative and positive outputs.
`timescale 1ns/1ps
module tb_decimation_filter;
  import decim_pkg::*;

  localparam int T_IMP  = 512;          // impulse phase
  localparam int T_RND  = 16 * 1000;    // random phase
  localparam int T_ONE  = 16 * 24;      // DC +Vref
  localparam int T_ZERO = 16 * 24;      // DC -Vref
  localparam int TOTAL  = T_IMP + T_RND + T_ONE + T_ZERO;
  localparam int DC_SUM = 6320038;      // sum of all 128 stored words (1.5068 * 2^22)

  localparam logic [23:0] GOLD_ACC [16][8] = '{
    '{24'hFFE766, 24'hFF0CA4, 24'h00A36A, 24'h028276, 24'hF83266, 24'h092702, 24'h04582A, 24'h97CAF8},
    '{24'hFFE14C, 24'hFF1F9E, 24'h00A36A, 24'h028276, 24'hF83266, 24'h092702, 24'h04582A, 24'h97CAF8},
    '{24'hFFE14C, 24'hFF0CA4, 24'h0072B2, 24'h028276, 24'hF83266, 24'h092702, 24'h04582A, 24'h97CAF8},
    '{24'hFFE14C, 24'hFF0CA4, 24'h00A36A, 24'h029A3E, 24'hF83266, 24'h092702, 24'h04582A, 24'h97CAF8},
    '{24'hFFE14C, 24'hFF0CA4, 24'h00A36A, 24'h028276, 24'hF8B280, 24'h092702, 24'h04582A, 24'h97CAF8},
    '{24'hFFE14C, 24'hFF0CA4, 24'h00A36A, 24'h028276, 24'hF83266, 24'h079CFC, 24'h04582A, 24'h97CAF8},
    '{24'hFFE14C, 24'hFF0CA4, 24'h00A36A, 24'h028276, 24'hF83266, 24'h092702, 24'h06C664, 24'h97CAF8},
    '{24'hFFE14C, 24'hFF0CA4, 24'h00A36A, 24'h028276, 24'hF83266, 24'h092702, 24'h04582A, 24'hA09A74},
    '{24'hFFE14C, 24'hFF0CA4, 24'h00A36A, 24'h028276, 24'hF83266, 24'h092702, 24'h04582A, 24'h9AC29E},
    '{24'hFFE14C, 24'hFF0CA4, 24'h00A36A, 24'h028276, 24'hF83266, 24'h092702, 24'h02C2E2, 24'h97CAF8},
    '{24'hFFE14C, 24'hFF0CA4, 24'h00A36A, 24'h028276, 24'hF83266, 24'h099362, 24'h04582A, 24'h97CAF8},
    '{24'hFFE14C, 24'hFF0CA4, 24'h00A36A, 24'h028276, 24'hF85A12, 24'h092702, 24'h04582A, 24'h97CAF8},
    '{24'hFFE14C, 24'hFF0CA4, 24'h00A36A, 24'h024D06, 24'hF83266, 24'h092702, 24'h04582A, 24'h97CAF8},
    '{24'hFFE14C, 24'hFF0CA4, 24'h00B542, 24'h028276, 24'hF83266, 24'h092702, 24'h04582A, 24'h97CAF8},
    '{24'hFFE14C, 24'hFF13C8, 24'h00A36A, 24'h028276, 24'hF83266, 24'h092702, 24'h04582A, 24'h97CAF8},
    '{24'hFFE14E, 24'hFF0CA4, 24'h00A36A, 24'h028276, 24'hF83266, 24'h092702, 24'h04582A, 24'h97CAF8}};
  localparam logic [23:0] GOLD_SUM [16] = '{
    24'h9F9674, 24'h9FA354, 24'h9F5FA2, 24'h9FA822, 24'hA01074, 24'h9E0654, 24'hA1FE94, 24'hA85FD6,
    24'hA28800, 24'h9DFB12, 24'h9FFCBA, 24'h9FB806, 24'h9F5AEA, 24'h9FA232, 24'h9F977E, 24'h9F905C};
  localparam logic [15:0] GOLD_OUT [16] = '{
    16'h9F96, 16'h9FA3, 16'h9F5F, 16'h9FA8, 16'hA010, 16'h9E06, 16'hA1FE, 16'hA85F,
    16'hA288, 16'h9DFB, 16'h9FFC, 16'h9FB8, 16'h9F5A, 16'h9FA2, 16'h9F97, 16'h9F90};
  logic clk = 1'b0;
  logic rst_n;
  logic din;
  logic [15:0] dout;
  logic out_valid;
  int checks = 0, failures = 0;
  bit xs [TOTAL];

  decimation_filter dut (.clk(clk), .rst_n(rst_n), .din(din), .dout(dout), .out_valid(out_valid));

  always #78 clk = ~clk;

  // section results and final sum, probed inside the design
  logic [23:0] sec_res [NSEC];
  logic [NSEC-1:0] eq_s, sub_s, sel_s;
  for (genvar g = 0; g < NSEC; g++) begin : g_probe
    assign sec_res[g] = 24'($signed(dut.g_sec[g+1].u_sec.result));
    assign eq_s[g]    = dut.g_sec[g+1].u_sec.u_inv.eq_sign;
    assign sub_s[g]   = dut.g_sec[g+1].u_sec.u_inv.sub;
    assign sel_s[g]   = dut.g_sec[g+1].u_sec.sel;
  end

  int n_add [NSEC], n_sub [NSEC], n_zero [NSEC], n_sel [NSEC];
  int n_load = 0, n_out = 0, n_neg = 0, n_pos = 0;

  function automatic longint coef_val(int k);
    int l = k / DECIM;
    int w = COEF_W[l];
    longint v = longint'(COEF_2H[k] & ((20'd1 << w) - 1));
    if (COEF_SIGNED[l] && v >= (longint'(1) << (w - 1))) v -= (longint'(1) << w);
    return v;
  endfunction

  // direct form: 2y[n] = sum_{j=0}^{255} c_j * s(x[n-j]), c_j = c_{255-j}
  function automatic longint ref_y(int n);
    longint acc2 = 0;
    for (int j = 0; j < NTAPS; j++) begin
      int idx = (j < NCOEF) ? j : NTAPS - 1 - j;
      bit xb = (n - j >= 0) ? xs[n - j] : 1'b0;
      acc2 += xb ? coef_val(idx) : -coef_val(idx);
    end
    return acc2 / 2;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < TOTAL; t++) begin
      if (t < T_IMP)                      xs[t] = (t == 0);
      else if (t < T_IMP + T_RND)         xs[t] = 1'($urandom_range(0, 1));
      else if (t < T_IMP + T_RND + T_ONE) xs[t] = 1'b1;
      else                                xs[t] = 1'b0;
    end
    for (int l = 0; l < NSEC; l++) begin n_add[l] = 0; n_sub[l] = 0; n_zero[l] = 0; n_sel[l] = 0; end
  end

  initial begin
    static int p = 0;
    static int last_valid = -1;
    rst_n = 1'b0;
    din   = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < TOTAL; t++) begin
      din = xs[t];
      // terms added in this cycle (counter = t mod 16)
      for (int l = 0; l < NSEC; l++) begin
        if (!eq_s[l]) n_zero[l]++; else if (sub_s[l]) n_sub[l]++; else n_add[l]++;
        if (sel_s[l]) n_sel[l]++;
      end
      @(posedge clk);   // edge t
      #1;
      // section results are loaded at edge 16p (end of frame p)
      if (t % DECIM == 0 && t > 0) begin
        int fr;
        fr = t / DECIM;
        n_load++;
        if (fr <= 16)
          for (int l = 0; l < NSEC; l++)
            check($sformatf("impulse frame %0d section %0d", fr, l + 1), sec_res[l], GOLD_ACC[fr-1][l]);
      end
      if (out_valid) begin
        n_out++;
        check("output at edge 16p+15", t, DECIM * p + 15);
        if (last_valid >= 0) check("output period", t - last_valid, DECIM);
        last_valid = t;
        if (p >= 1) begin
          longint y;
          y = ref_y(DECIM * p - 1);
          check($sformatf("frame %0d sum vs model", p), longint'($signed(dut.u_final.result)), y);
          check($sformatf("frame %0d dout vs model", p), longint'($signed(dout)), y >>> 8);
          if ($signed(dout) < 0) n_neg++; else n_pos++;
          if (p <= 16) begin
            check($sformatf("impulse output %0d", p), dout, GOLD_OUT[p-1]);
            check($sformatf("impulse sum %0d", p), dut.u_final.result, GOLD_SUM[p-1]);
          end
          if (16 * p - 256 >= T_IMP + T_RND && 16 * p - 1 < T_IMP + T_RND + T_ONE)
            check("DC +Vref output", longint'($signed(dout)), longint'(DC_SUM) >>> 8);
          if (16 * p - 256 >= T_IMP + T_RND + T_ONE)
            check("DC -Vref output", longint'($signed(dout)), longint'(-DC_SUM) >>> 8);
        end
        p++;
      end
    end
    check("number of outputs", n_out, TOTAL / DECIM);
    for (int l = 0; l < NSEC; l++) begin
      check($sformatf("section %0d +2h terms seen", l + 1), n_add[l] > 0, 1);
      check($sformatf("section %0d -2h terms seen", l + 1), n_sub[l] > 0, 1);
      check($sformatf("section %0d zero terms seen", l + 1), n_zero[l] > 0, 1);
      check($sformatf("section %0d bus selects", l + 1), n_sel[l], TOTAL / DECIM);
    end
    check("negative outputs seen", n_neg > 0, 1);
    check("positive outputs seen", n_pos > 0, 1);
    $display("mechanisms: loads=%0d outputs=%0d neg=%0d pos=%0d add1=%0d sub1=%0d zero1=%0d",
             n_load, n_out, n_neg, n_pos, n_add[0], n_sub[0], n_zero[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(156.0 * (TOTAL + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
