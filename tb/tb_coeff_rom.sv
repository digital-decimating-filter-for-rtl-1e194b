// tb_coeff_rom: checks the coefficient memories of all eight sections.
// The expected values are the real coefficients 2h[k] (gain 1.5 included), listed
// here as decimal numbers with eight fractional digits. For every section and
// address the ROM word, widened with its sign bit, must equal 2h[D*l-1-addr] * 2^22
// to within one unit (the decimal list is itself rounded), which checks the stored
// values, their two's complement signs and the reverse storage order.
`timescale 1ns/1ps
module tb_coeff_rom;
  import decim_pkg::*;

  localparam real COEF_REAL [NCOEF] = '{
    0.00000048, 0.00000763, 0.00000954, 0.00001574, 0.00002337, 0.00003386, 0.00004721, 0.00006390,
    0.00008440, 0.00010967, 0.00013971, 0.00017452, 0.00021553, 0.00026178, 0.00031424, 0.00037241,
    0.00043583, 0.00050497, 0.00057793, 0.00065470, 0.00073338, 0.00081301, 0.00089169, 0.00096750,
    0.00103760, 0.00110054, 0.00115252, 0.00119162, 0.00121450, 0.00121880, 0.00120068, 0.00115824,
    0.00108910, 0.00099039, 0.00086164, 0.00070095, 0.00050831, 0.00028419, 0.00002909, -0.00025415,
    -0.00056267, -0.00089264, -0.00123882, -0.00159550, -0.00195551, -0.00231123, -0.00265360, -0.00297356,
    -0.00326157, -0.00350761, -0.00370169, -0.00383425, -0.00389624, -0.00387812, -0.00377321, -0.00357533,
    -0.00327969, -0.00288343, -0.00238705, -0.00179148, -0.00110149, -0.00032425, 0.00053120, 0.00145149,
    0.00242138, 0.00342369, 0.00443840, 0.00544262, 0.00641346, 0.00732470, 0.00815058, 0.00886536,
    0.00944233, 0.00985718, 0.01008606, 0.01010752, 0.00990391, 0.00946045, 0.00876760, 0.00781870,
    0.00661469, 0.00516081, 0.00346899, 0.00155687, -0.00055027, -0.00282240, -0.00522232, -0.00770664,
    -0.01022720, -0.01273155, -0.01516199, -0.01745892, -0.01955938, -0.02139997, -0.02291727, -0.02404928,
    -0.02473640, -0.02492237, -0.02455759, -0.02359629, -0.02200317, -0.01974821, -0.01681376, -0.01319027,
    -0.00887966, -0.00389576, 0.00173712, 0.00798225, 0.01479244, 0.02210903, 0.02986383, 0.03797770,
    0.04636526, 0.05493164, 0.06357813, 0.07220078, 0.08069324, 0.08894873, 0.09685993, 0.10432434,
    0.11124134, 0.11751842, 0.12307024, 0.12781954, 0.13170147, 0.13466167, 0.13665819, 0.13766384
  };

  int checks = 0, failures = 0;
  logic [3:0] addr;
  logic [19:0] coef_w [NSEC];
  logic sign_w [NSEC];

  for (genvar g = 0; g < NSEC; g++) begin : g_rom
    logic [COEF_W[g]-1:0] coef;
    coeff_rom #(.SECTION(g + 1)) u_rom (.addr(addr), .coef(coef), .sign(sign_w[g]));
    assign coef_w[g] = 20'(coef);
  end

  initial begin
    for (int a = 0; a < DECIM; a++) begin
      addr = 4'(a);
      #1;
      for (int l = 0; l < NSEC; l++) begin
        longint got, exp;
        int w;
        w = COEF_W[l];
        got = longint'(coef_w[l]);
        if (sign_w[l]) got -= (longint'(1) << w);
        exp = longint'($rtoi(COEF_REAL[DECIM * (l + 1) - 1 - a] * 4194304.0 +
                             (COEF_REAL[DECIM * (l + 1) - 1 - a] >= 0 ? 0.5 : -0.5)));
        checks++;
        if (got - exp > 1 || exp - got > 1) begin
          failures++;
          $display("FAIL section %0d addr %0d: got %0d expected %0d", l + 1, a, got, exp);
        end
        checks++;
        if (!COEF_SIGNED[l] && sign_w[l]) begin
          failures++;
          $display("FAIL section %0d has a sign bit set", l + 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
