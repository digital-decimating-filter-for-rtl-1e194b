// tb_sign_inverter: checks the multiplier-free term generator. For random words
// and every combination of the two input samples, operand + carry (modulo 2^AW)
// must equal +c for samples 1,1, -c for samples 0,0 and 0 for unequal samples,
// where c is the word's value (two's complement when it has a sign bit, a plain
// magnitude when the sign is tied to 0). Two instances cover an unsigned 11-bit
// word in a 14-bit accumulator and a signed 15-bit word in an 18-bit accumulator.
`timescale 1ns/1ps
module tb_sign_inverter;
  int checks = 0, failures = 0;
  logic in0, inx;
  logic [10:0] coef_a;
  logic [14:0] coef_b;
  logic [13:0] op_a;
  logic [17:0] op_b;
  logic carry_a, carry_b;

  sign_inverter #(.CW(11), .AW(14)) u_a (
    .in0(in0), .inx(inx), .coef(coef_a), .sign(1'b0), .operand(op_a), .carry(carry_a));
  sign_inverter #(.CW(15), .AW(18)) u_b (
    .in0(in0), .inx(inx), .coef(coef_b), .sign(coef_b[14]), .operand(op_b), .carry(carry_b));

  function automatic longint term(bit a, bit b, longint c);
    if (a != b) return 0;
    return a ? c : -c;
  endfunction

  initial begin
    for (int n = 0; n < 400; n++) begin
      coef_a = 11'($urandom);
      coef_b = 15'($urandom);
      if (n == 0) begin coef_a = '1; coef_b = 15'h4000; end
      for (int s = 0; s < 4; s++) begin
        longint ea, eb, ca, cb;
        in0 = s[1];
        inx = s[0];
        #1;
        ca = longint'(coef_a);
        cb = longint'($signed(coef_b));
        ea = term(in0, inx, ca) & ((longint'(1) << 14) - 1);
        eb = term(in0, inx, cb) & ((longint'(1) << 18) - 1);
        checks += 2;
        if (((longint'(op_a) + carry_a) & ((longint'(1) << 14) - 1)) != ea) begin
          failures++;
          $display("FAIL unsigned in0=%0b inx=%0b coef=%0d op=%0h c=%0b", in0, inx, coef_a, op_a, carry_a);
        end
        if (((longint'(op_b) + carry_b) & ((longint'(1) << 18) - 1)) != eb) begin
          failures++;
          $display("FAIL signed in0=%0b inx=%0b coef=%0d op=%0h c=%0b", in0, inx, cb, op_b, carry_b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
