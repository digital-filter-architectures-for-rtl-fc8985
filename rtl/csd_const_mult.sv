// csd_const_mult: multiplier-less multiplication by a constant coefficient.
//
// The coefficient COEF is converted to canonic signed digit form at
// elaboration (decim_pkg::to_csd). Each non-zero digit becomes one copy of the
// sign-extended input shifted left by the digit's position, added for a +1
// digit and subtracted for a -1 digit, so the product costs one adder or
// subtracter per non-zero digit after the first and no multiplier. CSD has the
// fewest non-zero digits of any signed-digit form and never two adjacent ones.
//
// Interface: x (IN_W, signed) in, y = x*COEF (OUT_W, signed, modulo 2**OUT_W)
// out. Purely combinational, no latency. OUT_W must be large enough for the
// product; the instantiating filter chooses it.
module csd_const_mult #(
  parameter int IN_W  = 17,
  parameter int OUT_W = 26,
  parameter int COEF  = 38
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);
  import decim_pkg::*;

  localparam csd_t D        = to_csd(COEF);
  // Number of non-zero CSD digits, hence of shifted terms summed.
  localparam int   NONZERO  = csd_weight(D);

  logic signed [OUT_W-1:0] xe;
  logic signed [OUT_W-1:0] term [CSD_MAXW];

  assign xe = OUT_W'(x);

  for (genvar i = 0; i < int'(CSD_MAXW); i++) begin : g_digit
    if (i < OUT_W && D.pos[i]) begin : g_pos
      assign term[i] = xe <<< i;
    end else if (i < OUT_W && D.neg[i]) begin : g_neg
      assign term[i] = -(xe <<< i);
    end else begin : g_zero
      assign term[i] = '0;
    end
  end

  always_comb begin
    y = '0;
    for (int i = 0; i < int'(CSD_MAXW); i++) y = y + term[i];
  end

  // A CSD number of B digits has at most (B+1)/2 non-zero digits.
  initial assert (NONZERO <= (int'(CSD_MAXW) + 1) / 2)
    else $error("csd_const_mult: malformed CSD digits");

endmodule
