// sd_input_map: maps the 1-bit output stream of a sigma-delta modulator to
// signed words for the decimation filter.
//
// A '1' becomes +LEVEL and a '0' becomes -LEVEL, a two-way multiplexer of
// constants followed by a register. The default LEVEL of 4182 in a 14-bit word
// is the value this mapping uses in the reference simulations of the
// decimation chains; the design takes the negative level as the exact two's
// complement of it.
//
// Interface and timing: in_valid/in_bit at the modulator rate; out_valid and
// out_data follow one clock later.
module sd_input_map #(
  parameter int W     = 14,
  parameter int LEVEL = 4182
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_bit,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);
  localparam logic signed [W-1:0] POS = W'(LEVEL);
  localparam logic signed [W-1:0] NEG = W'(-LEVEL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= in_bit ? POS : NEG;
    end
  end

  initial assert (LEVEL > 0 && LEVEL < (1 << (W - 1)))
    else $error("sd_input_map: LEVEL does not fit a signed W-bit word");
endmodule
