// tb_accum_section: checks accumulation sections 3 (signed words) and 8 (unsigned
// words, widest accumulator) with random input samples. The testbench plays the
// timing controller: the counter runs 0..15, clr and load are high in cycle 15.
// In cycle c the section must add +/-2h[16l-1-c] or 0 according to in0 and the
// multiplexer input in_(c+1); after the edge that ends cycle 15 the bus must carry
// the frame's total, sign-extended to 24 bits, while sel is high, and 0 while sel
// is low. The expected total is computed from the real coefficients of the filter,
// decoded here independently. Frames of all-equal samples (all terms +2h, all
// terms -2h) exercise the largest sums.
`timescale 1ns/1ps
module tb_accum_section;
  import decim_pkg::*;
  localparam int NFR = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] counter;
  logic clr, load, sel;
  logic in0;
  logic [15:0] in_mux;
  logic [23:0] bus3, bus8;
  int checks = 0, failures = 0;

  accum_section #(.SECTION(3)) u_s3 (.clk(clk), .rst_n(rst_n), .counter(counter), .clr(clr),
    .load(load), .sel(sel), .in0(in0), .in_mux(in_mux), .bus(bus3));
  accum_section #(.SECTION(8)) u_s8 (.clk(clk), .rst_n(rst_n), .counter(counter), .clr(clr),
    .load(load), .sel(sel), .in0(in0), .in_mux(in_mux), .bus(bus8));

  always #5 clk = ~clk;

  function automatic longint word(int k);
    int l = k / DECIM;
    longint v = longint'(COEF_2H[k]);
    if (COEF_SIGNED[l] && v >= (longint'(1) << (COEF_W[l] - 1))) v -= (longint'(1) << COEF_W[l]);
    return v;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    static longint e3 = 0, e8 = 0;
    counter = 4'd15; clr = 1'b1; load = 1'b1; sel = 1'b1; in0 = 1'b0; in_mux = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f <= NFR; f++) begin
      int mode;
      longint p3, p8;
      mode = f % 5;   // 0..2 random, 3 all ones, 4 all zeros
      p3 = e3; p8 = e8;
      e3 = 0; e8 = 0;
      for (int c = 0; c < DECIM; c++) begin
        @(negedge clk);
        counter = 4'(c);
        clr  = (c == 15);
        load = (c == 15);
        if (c == 0 && f > 0) begin
          // result of the previous frame, latched at the edge that ended cycle 15
          sel = 1'b1;
          #1;
          check($sformatf("frame %0d section 3", f - 1), longint'($signed(bus3)), p3);
          check($sformatf("frame %0d section 8", f - 1), longint'($signed(bus8)), p8);
          sel = 1'b0;
          #1;
          check("bus released section 3", bus3, 0);
          check("bus released section 8", bus8, 0);
        end
        if (f == NFR) break;
        sel  = 1'($urandom_range(0, 1));
        in0  = (mode == 3) ? 1'b1 : (mode == 4) ? 1'b0 : 1'($urandom_range(0, 1));
        in_mux = (mode == 3) ? '1 : (mode == 4) ? '0 : 16'($urandom);
        if (in0 == in_mux[c]) begin
          e3 += in0 ? word(DECIM * 3 - 1 - c) : -word(DECIM * 3 - 1 - c);
          e8 += in0 ? word(DECIM * 8 - 1 - c) : -word(DECIM * 8 - 1 - c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 20 * (NFR + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
