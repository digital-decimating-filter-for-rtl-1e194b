// tb_final_accumulator: checks the summation of the section results. The testbench
// plays the timing controller (ld in even cycles 0..14, ld_out and clr_out in cycle
// 14) and places a random 24-bit word on the bus in every cycle, also in the odd
// cycles, where it must be ignored. After the edge that ends cycle 14, out_valid
// must be high for one cycle and dout must be the 16 most significant bits of the
// 24-bit sum (modulo 2^24) of the eight words offered in the even cycles.
`timescale 1ns/1ps
module tb_final_accumulator;
  localparam int NFR = 400;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [23:0] bus;
  logic ld, ld_out, clr_out;
  logic [15:0] dout;
  logic out_valid;
  int checks = 0, failures = 0;

  final_accumulator #(.W(24), .OUT_W(16)) dut (.clk(clk), .rst_n(rst_n), .bus(bus), .ld(ld),
    .ld_out(ld_out), .clr_out(clr_out), .dout(dout), .out_valid(out_valid));

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    logic [23:0] e;
    bus = '0; ld = 1'b0; ld_out = 1'b0; clr_out = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);   // cycle 15 of a first, empty frame
    for (int f = 0; f < NFR; f++) begin
      e = '0;
      for (int c = 0; c < 16; c++) begin
        @(negedge clk);
        if (c == 15) begin
          check($sformatf("frame %0d out_valid", f), out_valid, 1);
          check($sformatf("frame %0d dout", f), dout, e[23:8]);
        end else begin
          check("out_valid idle", out_valid, 0);
        end
        bus = (f % 7 == 3) ? 24'h7FFFFF : 24'($urandom);
        ld = (c % 2 == 0) && c <= 14;
        ld_out = (c == 14);
        clr_out = (c == 14);
        if (ld) e += bus;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 16 * (NFR + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
