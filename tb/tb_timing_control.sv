// tb_timing_control: checks the counter, decoder and strobes against the frame
// schedule: after reset the counter shows 15, then counts 0..15 repeatedly; dec is
// one-hot of the count; clr and load are high in cycle 15 only; ld in the even
// cycles 0..14; ld_out and clr_out in cycle 14 only. Each strobe must recur every
// 16 cycles.
`timescale 1ns/1ps
module tb_timing_control;
  localparam int D = 16, L = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [3:0] counter;
  logic [15:0] dec;
  logic clr, load, ld, ld_out, clr_out;
  int checks = 0, failures = 0;
  int last_ldout = -1;

  timing_control #(.D(D), .L(L)) dut (
    .clk(clk), .rst_n(rst_n), .counter(counter), .dec(dec), .clr(clr), .load(load),
    .ld(ld), .ld_out(ld_out), .clr_out(clr_out));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #1;
    check("reset count", counter, 15);
    check("clr in reset state", clr, 1);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int c;
      @(posedge clk);
      #1;
      c = t % 16;
      check("counter", counter, c);
      check("decoder", dec, 1 << c);
      check("clr", clr, c == 15);
      check("load", load, c == 15);
      check("ld", ld, (c % 2 == 0) && c <= 14);
      check("ld_out", ld_out, c == 14);
      check("clr_out", clr_out, c == 14);
      if (ld_out) begin
        if (last_ldout >= 0) check("ld_out period", t - last_ldout, 16);
        last_ldout = t;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
