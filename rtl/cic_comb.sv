// cic_comb: one comb (differentiator) stage of a CIC filter,
// H(z) = 1 - z^-M at the decimated rate.
//
// A register chain of M words holds the previous inputs; a subtracter forms
// y = x - x(delayed by M). The subtracter output is combinational, as in the
// usual single-register comb circuit, and the delay registers advance on each
// clock with en high (the decimated-rate enable). Arithmetic wraps modulo 2**W.
//
// Interface: x and y are W-bit signed; en is the low-rate clock enable.
// Asynchronous active-low reset clears the delay line.
module cic_comb #(
  parameter int W = 19,
  parameter int M = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] dly [M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) dly[i] <= '0;
    end else if (en) begin
      dly[0] <= x;
      for (int i = 1; i < M; i++) dly[i] <= dly[i-1];
    end
  end

  assign y = x - dly[M-1];
endmodule
