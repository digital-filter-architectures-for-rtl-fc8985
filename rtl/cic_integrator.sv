// cic_integrator: one integrator (accumulator) stage of a CIC filter,
// H(z) = 1/(1 - z^-1).
//
// An adder followed by a register whose output is fed back to the adder:
// on every clock with en high, y <= y + x. The output is the register, so the
// stage adds one sample of delay; in a cascade this only shifts the whole
// response. Arithmetic wraps modulo 2**W, which is harmless in a CIC filter
// as long as W covers the filter's full gain (Hogenauer); the enclosing
// decimator sizes W for that.
//
// Interface: en is the input-rate clock enable. Asynchronous active-low reset
// clears the register.
module cic_integrator #(
  parameter int W = 19
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= y + x;
  end
endmodule
