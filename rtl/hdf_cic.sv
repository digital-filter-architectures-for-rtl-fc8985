// hdf_cic: high order decimation filter (HDF) of the two-stage decimator, a
// fifth-order CIC filter decimating by R = 16.
//
// Integrator section: five adder+register stages at the input rate. In front
// of each adder's feedback input sits a multiplexer controlled by an
// integrator enable: with int_en[k] high the stage accumulates
// (reg <= reg + x), with it low the feedback is replaced by 0 (reg <= x),
// which flushes that integrator's history. int_en[5] controls the first
// stage and int_en[1] the last. The integrator output is latched into the
// decimation register once every R input samples (the decimated clock
// enable, CK_DEC).
// Comb section: five stages, each a register clocked by the decimated enable
// and a subtracter forming input minus register. comb_en[k] high lets the
// register run; low holds it in reset (it then reads 0, so the stage passes
// its input through). comb_en[5] is the first comb, comb_en[1] the last.
// Rounder: the ACC_W-bit comb result is rounded half-up to OUT_W bits and
// saturated, and held in the HDF output register.
//
// Widths are this design's choice: every stage is ACC_W = IN_W + N*log2(R*M)
// bits (no register pruning), which is exact for the full gain (R*M)^N.
// Rounding drops ACC_W-OUT_W bits, so the DC gain is (R*M)^N / 2**(ACC_W-OUT_W).
//
// Interface and timing: in_valid marks input samples (CK_IN enable). The
// R-th input loads the decimation register; the combs and the output register
// update on the next clock; out_valid pulses one clock after that (2 clocks
// after the R-th input's in_valid). dec_strobe is the decimated enable itself.
module hdf_cic #(
  parameter int IN_W  = 14,
  parameter int OUT_W = 16,
  parameter int N     = 5,
  parameter int R     = 16,
  parameter int M     = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  input  logic [N:1]              int_en,
  input  logic [N:1]              comb_en,
  output logic                    dec_strobe,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  localparam int GROWTH = N * $clog2(R * M);
  localparam int ACC_W  = IN_W + GROWTH;
  localparam int SHIFT  = ACC_W - OUT_W;
  localparam int CNT_W  = (R > 1) ? $clog2(R) : 1;

  // ---- integrators with clearing multiplexers ----
  logic signed [ACC_W-1:0] ireg [N+1];   // ireg[0] is the input
  assign ireg[0] = ACC_W'(in_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= N; s++) ireg[s] <= '0;
    end else if (in_valid) begin
      // stage s (1 = first) is controlled by int_en[N+1-s]
      for (int s = 1; s <= N; s++)
        ireg[s] <= ireg[s-1] + (int_en[N+1-s] ? ireg[s] : '0);
    end
  end

  // ---- decimation register ----
  logic [CNT_W-1:0]        phase;
  logic                    comb_step;
  logic signed [ACC_W-1:0] dec_reg;

  assign dec_strobe = in_valid && (phase == CNT_W'(R - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      comb_step <= 1'b0;
      dec_reg   <= '0;
    end else begin
      comb_step <= dec_strobe;
      if (in_valid) phase <= (phase == CNT_W'(R - 1)) ? '0 : phase + 1'b1;
      // value the last integrator takes on this same edge
      if (dec_strobe) dec_reg <= ireg[N-1] + (int_en[1] ? ireg[N] : '0);
    end
  end

  // ---- comb section with resettable delay registers ----
  logic signed [ACC_W-1:0] creg [1:N];
  logic signed [ACC_W-1:0] cval [N+1];   // cval[0] is the decimation register
  assign cval[0] = dec_reg;

  for (genvar s = 1; s <= N; s++) begin : g_comb
    assign cval[s] = cval[s-1] - creg[s];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= N; s++) creg[s] <= '0;
    end else begin
      for (int s = 1; s <= N; s++) begin
        if (!comb_en[N+1-s])  creg[s] <= '0;
        else if (comb_step)   creg[s] <= cval[s-1];
      end
    end
  end

  // ---- rounder and HDF output register ----
  localparam logic signed [ACC_W:0] MAXV = (ACC_W+1)'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W:0] MINV = -(ACC_W+1)'(64'sd1 <<< (OUT_W - 1));
  logic signed [ACC_W:0]   rnd;
  logic signed [OUT_W-1:0] sat;

  always_comb begin
    if (SHIFT > 0) rnd = ((ACC_W+1)'(cval[N]) + ((ACC_W+1)'(1) <<< (SHIFT - 1))) >>> SHIFT;
    else           rnd = (ACC_W+1)'(cval[N]);
    if (rnd > MAXV)      sat = MAXV[OUT_W-1:0];
    else if (rnd < MINV) sat = MINV[OUT_W-1:0];
    else                 sat = rnd[OUT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= comb_step;
      if (comb_step) out_data <= sat;
    end
  end
endmodule
