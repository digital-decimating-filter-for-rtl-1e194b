// delta_sigma_model: behavioural (not synthesizable) 1-bit delta-sigma modulator
// used only as a stimulus source for the filter testbenches.
//
// It is a first-order loop, w[n+1] = w[n] + x[n] - y[n], y[n] = +1 if w[n] >= 0
// else -1, with the analog input `vin` given as a real number in units of Vref
// (keep it within +/-0.5 Vref). The output bit is 1 for +Vref and 0 for -Vref and
// changes after each rising clock edge. The receiver this filter was designed for
// uses a fifth-order modulator whose loop is not given here; a first-order loop has
// much more in-band quantisation noise but produces the same kind of bit stream.
`timescale 1ns/1ps

module delta_sigma_model (
  input  logic clk,
  input  logic rst_n,
  input  real  vin,
  output logic bit_out
);
  real w;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w       <= 0.0;
      bit_out <= 1'b0;
    end else begin
      bit_out <= (w >= 0.0);
      w       <= w + vin - ((w >= 0.0) ? 1.0 : -1.0);
    end
  end
endmodule
