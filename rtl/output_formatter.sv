// output_formatter: converts the wide accumulator result of the corrector FIR
// into the DATA_OUT word.
//
// The IN_W-bit value is divided by 2**SHIFT with round-half-up and saturated
// to the OUT_W-bit two's-complement range; a sticky-free 'clipped' flag
// reports saturation of the current word. Registered: out_valid/out_data and
// clipped follow in_valid by one clock.
module output_formatter #(
  parameter int IN_W  = 40,
  parameter int OUT_W = 24,
  parameter int SHIFT = 7
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    clipped
);
  localparam logic signed [IN_W:0] MAXV = (IN_W+1)'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [IN_W:0] MINV = -(IN_W+1)'(64'sd1 <<< (OUT_W - 1));

  logic signed [IN_W:0]    rnd;
  logic signed [OUT_W-1:0] sat;
  logic                    clip;

  always_comb begin
    if (SHIFT > 0) rnd = ((IN_W+1)'(in_data) + ((IN_W+1)'(1) <<< (SHIFT - 1))) >>> SHIFT;
    else           rnd = (IN_W+1)'(in_data);
    clip = 1'b1;
    if (rnd > MAXV)      sat = MAXV[OUT_W-1:0];
    else if (rnd < MINV) sat = MINV[OUT_W-1:0];
    else begin
      sat  = rnd[OUT_W-1:0];
      clip = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      clipped   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= sat;
        clipped  <= clip;
      end
    end
  end
endmodule
