// sigma_delta_model: behavioural (non-synthesizable) model of a first-order
// sigma-delta modulator, used only as a stimulus source by the testbenches.
//
// On each clock with en high it samples a sine of amplitude AMP (relative to
// full scale 1.0) advancing by FREQ cycles per sample, adds the difference
// between that sample and the previous output level (+1 or -1) to an
// integrator, and outputs 1 when the integrator is not negative. The density
// of ones therefore tracks (1 + input)/2.
module sigma_delta_model #(
  parameter real AMP  = 0.5,
  parameter real FREQ = 0.001
) (
  input  logic clk,
  input  logic en,
  output logic bit_out
);
  localparam real TWO_PI = 6.283185307179586;
  real acc   = 0.0;
  real phase = 0.0;
  real u;

  initial bit_out = 1'b0;

  always @(posedge clk) begin
    if (en) begin
      u      = AMP * $sin(TWO_PI * phase);
      phase  = phase + FREQ;
      if (phase >= 1.0) phase = phase - 1.0;
      acc    = acc + u - (bit_out ? 1.0 : -1.0);
      bit_out <= (acc >= 0.0);
    end
  end
endmodule
