// cic_decimator: N-th order cascaded integrator-comb decimator (decimate by R),
// the multiplier-less stage of the multistage decimation chain.
//
// N cic_integrator stages run at the input rate, a decimation register takes
// every R-th integrator output, and N cic_comb stages with differential delay
// M run at the output rate. The transfer function referred to the input rate
// is ((1 - z^-RM)/(1 - z^-1))^N, i.e. N cascaded length-RM moving sums, with
// DC gain (RM)^N. The plain adder/subtracter stages have no clearing
// multiplexers.
//
// Word widths: the integrators and combs are ACC_W = IN_W + N*ceil(log2(RM))
// bits wide, enough for the full gain so that wrap-around in the integrators
// cancels exactly in the combs. The output is the top OUT_W bits of the comb
// result (a truncating division by 2**(ACC_W-OUT_W)); with OUT_W = IN_W this
// is unity DC gain for power-of-two RM.
//
// Interface and timing: in_valid marks each input sample (at most one per
// clock). After every R-th valid input the decimation register loads on that
// clock, the combs and the output register update on the next clock, and
// out_valid pulses with the output one clock after that: latency 2 clocks
// from the R-th input's in_valid to out_valid. The integrator cascade is
// pipelined, so the output corresponds to the ideal filter delayed by N-1
// input samples.
module cic_decimator #(
  parameter int IN_W  = 16,
  parameter int OUT_W = 16,
  parameter int N     = 5,
  parameter int R     = 2,
  parameter int M     = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  localparam int GROWTH = N * $clog2(R * M);
  localparam int ACC_W  = IN_W + GROWTH;
  localparam int CNT_W  = (R > 1) ? $clog2(R) : 1;

  // ---- integrator section (input rate) ----
  logic signed [ACC_W-1:0] integ [N+1];
  assign integ[0] = ACC_W'(in_data);

  for (genvar s = 0; s < N; s++) begin : g_int
    cic_integrator #(.W(ACC_W)) u_int (
      .clk(clk), .rst_n(rst_n), .en(in_valid), .x(integ[s]), .y(integ[s+1])
    );
  end

  // ---- rate change: decimation register loaded on every R-th input ----
  logic [CNT_W-1:0]        phase;
  logic                    dec_en;
  logic                    comb_en;
  logic signed [ACC_W-1:0] dec_reg;

  assign dec_en = in_valid && (phase == CNT_W'(R - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= '0;
      dec_reg <= '0;
      comb_en <= 1'b0;
    end else begin
      comb_en <= dec_en;
      if (in_valid) phase <= (phase == CNT_W'(R - 1)) ? '0 : phase + 1'b1;
      // The last integrator's register is updated on this same edge, so the
      // decimation register takes the value the integrator is about to hold.
      if (dec_en) dec_reg <= integ[N] + integ[N-1];
    end
  end

  // ---- comb section (output rate) ----
  logic signed [ACC_W-1:0] comb [N+1];
  assign comb[0] = dec_reg;

  for (genvar s = 0; s < N; s++) begin : g_comb
    cic_comb #(.W(ACC_W), .M(M)) u_comb (
      .clk(clk), .rst_n(rst_n), .en(comb_en), .x(comb[s]), .y(comb[s+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= comb_en;
      if (comb_en) out_data <= comb[N][ACC_W-1 -: OUT_W];
    end
  end

  initial begin
    assert (OUT_W <= ACC_W) else $error("cic_decimator: OUT_W exceeds accumulator width");
    assert (R >= 1 && M >= 1) else $error("cic_decimator: R and M must be positive");
  end
endmodule
