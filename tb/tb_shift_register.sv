// tb_shift_register: checks the 256-bit serial-in parallel-out delay line.
// Random bits are shifted in; after every clock edge each tap k must hold the bit
// applied k edges earlier (tap 0 the newest), with zeros where nothing has been
// shifted in yet since reset. A reset in the middle must clear all taps.
`timescale 1ns/1ps
module tb_shift_register;
  localparam int LEN = 256;
  localparam int NCYC = 1500;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0;
  logic [LEN-1:0] taps;
  int checks = 0, failures = 0;
  bit hist [$];

  shift_register #(.LEN(LEN)) dut (.clk(clk), .rst_n(rst_n), .din(din), .taps(taps));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NCYC; t++) begin
      @(negedge clk);
      if (t == 700) begin
        rst_n = 1'b0;
        #1;
        checks++;
        if (taps != '0) begin failures++; $display("FAIL reset does not clear"); end
        hist.delete();
        rst_n = 1'b1;
      end
      din = 1'($urandom_range(0, 1));
      @(posedge clk);
      hist.push_front(din);
      #1;
      for (int k = 0; k < LEN; k++) begin
        bit e;
        e = (k < hist.size()) ? hist[k] : 1'b0;
        checks++;
        if (taps[k] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d tap %0d got %0b expected %0b", t, k, taps[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (NCYC + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
