// halfband_decimator: half-band FIR filter that decimates by 2, with
// multiplier-less canonic signed digit (CSD) coefficient multipliers.
//
// A tapped delay line of ORDER+1 samples feeds the filter. Because a half-band
// impulse response is symmetric and every second tap except the centre is
// zero, the output is formed as
//   y = h(c)*x(c) + sum over odd k of h(c-k) * (x(c-k) + x(c+k)),  c = ORDER/2
// so an order-ORDER filter needs ceil(ORDER/4)+1 constant multipliers, each a
// csd_const_mult shift-and-add network. Coefficients come from
// decim_pkg::hb_tap (8-bit, 7 fraction bits, unity DC gain). The output is
// computed only for every second input (the decimation), rounded half-up to
// OUT_W bits and saturated.
//
// Interface and timing: in_valid marks input samples (at most one per clock).
// Outputs are produced after the 2nd, 4th, 6th ... input since reset; the
// result appears with out_valid two clocks after that input's in_valid. The
// filter's group delay is ORDER/2 input samples.
module halfband_decimator #(
  parameter int IN_W  = 16,
  parameter int OUT_W = 16,
  parameter int ORDER = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  import decim_pkg::*;

  localparam int L      = ORDER + 1;          // number of taps
  localparam int C      = ORDER / 2;          // centre tap
  localparam int NPAIR  = (C + 1) / 2;        // odd distances 1,3,..: non-zero side pairs
  localparam int PRE_W  = IN_W + 1;           // pre-adder width
  localparam int PROD_W = PRE_W + HB_COEF_W;  // one product
  localparam int ACC_W  = PROD_W + $clog2(NPAIR + 1) + 1;

  // ---- tapped delay line ----
  logic signed [IN_W-1:0] tap [L];
  logic                   phase;     // 1 after an odd number of inputs
  logic                   compute;   // taps hold a complete decimation phase

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) tap[i] <= '0;
      phase   <= 1'b0;
      compute <= 1'b0;
    end else begin
      compute <= in_valid && phase;
      if (in_valid) begin
        tap[0] <= in_data;
        for (int i = 1; i < L; i++) tap[i] <= tap[i-1];
        phase <= ~phase;
      end
    end
  end

  // ---- symmetric pre-adders and CSD constant multipliers ----
  logic signed [PROD_W-1:0] prod [NPAIR+1];

  for (genvar p = 0; p < NPAIR; p++) begin : g_pair
    localparam int K = 2 * p + 1;             // distance from the centre
    logic signed [PRE_W-1:0] pre;
    assign pre = PRE_W'(tap[C-K]) + PRE_W'(tap[C+K]);
    csd_const_mult #(.IN_W(PRE_W), .OUT_W(PROD_W), .COEF(hb_tap(ORDER, C - K))) u_mul (
      .x(pre), .y(prod[p])
    );
  end

  csd_const_mult #(.IN_W(IN_W), .OUT_W(PROD_W), .COEF(hb_tap(ORDER, C))) u_mul_c (
    .x(tap[C]), .y(prod[NPAIR])
  );

  // ---- sum, round, saturate ----
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] rounded;
  logic signed [OUT_W-1:0] sat;

  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(64'sd1 <<< (OUT_W - 1));

  always_comb begin
    acc = '0;
    for (int p = 0; p <= NPAIR; p++) acc = acc + ACC_W'(prod[p]);
    rounded = (acc + ACC_W'(1 << (HB_COEF_FRAC - 1))) >>> HB_COEF_FRAC;
    if (rounded > MAXV)      sat = MAXV[OUT_W-1:0];
    else if (rounded < MINV) sat = MINV[OUT_W-1:0];
    else                     sat = rounded[OUT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= compute;
      if (compute) out_data <= sat;
    end
  end

  initial begin
    assert (ORDER % 4 == 2) else $error("halfband_decimator: ORDER must be 2 mod 4");
    assert (hb_tap(ORDER, C) != 0) else $error("halfband_decimator: no coefficients for this ORDER");
  end
endmodule
