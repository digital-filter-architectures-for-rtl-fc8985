// corrector_fir: corrector FIR filter of the two-stage decimator. A
// transversal FIR that decimates by 2 using a single multiply-accumulate unit
// shared by all taps, with data and coefficients held in RAM.
//
// Operation: every input sample is written into the data RAM (a circular
// buffer of DATA_DEPTH words). After every second sample the sequencer issues
// the terms of one output, newest sample first, one per clock:
//   esym = 1 (symmetric, F_ESYM): NTAPS/2 terms, term j pairs samples
//            x(n-j) and x(n-(NTAPS-1-j)) through the pre-adder and uses
//            coefficient j, so an NTAPS-tap linear-phase filter costs NTAPS/2
//            clocks and only coefficients 0..NTAPS/2-1 are used;
//   esym = 0: NTAPS terms, term j uses x(n-j) and coefficient j.
// The coefficient address runs two clocks behind the data address so that
// coefficient and pre-added data meet at the multiplier (see fir_mac). The
// 40-bit result goes through output_formatter (rounding by 2**FMT_SHIFT,
// saturation to 24 bits) to DATA_OUT.
//
// Scaling: with coefficients scaled by 2**18 (unity = 262144) and the 3-bit
// drop into the output register, DATA_OUT = y * 2**(15 - FMT_SHIFT), i.e. 16
// integer bits of the 16-bit input scale and 8 fraction bits at FMT_SHIFT = 7.
//
// Timing: the input rate must leave at least as many clocks between output
// requests (two input samples) as the terms take; a request that arrives
// while the previous output is still being issued is dropped and 'overrun'
// pulses. From the last term to data_out: 7 clocks.
// Coefficients are written over the control bus (coef_we/coef_addr/
// coef_wdata) at any time; a write during a computation affects the terms
// issued after it.
module corrector_fir #(
  parameter int DATA_W     = 16,
  parameter int COEF_W     = 20,
  parameter int NTAPS      = 32,
  parameter int DATA_DEPTH = 64,
  parameter int ACC_W      = 43,
  parameter int OREG_W     = 40,
  parameter int OUT_W      = 24,
  parameter int FMT_SHIFT  = 7
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // samples from the high order decimation filter
  input  logic                       in_valid,
  input  logic signed [DATA_W-1:0]   in_data,
  // mode
  input  logic                       esym,
  // control bus for the coefficient RAM
  input  logic                       coef_we,
  input  logic [$clog2(NTAPS)-1:0]   coef_addr,
  input  logic signed [COEF_W-1:0]   coef_wdata,
  output logic signed [COEF_W-1:0]   coef_rdata,
  // output
  output logic                       out_valid,
  output logic signed [OUT_W-1:0]    data_out,
  output logic                       clipped,
  output logic                       overrun
);
  localparam int AW = $clog2(DATA_DEPTH);
  localparam int CW = $clog2(NTAPS);
  localparam int JW = $clog2(NTAPS + 1);

  // ---- data RAM write side ----
  logic [AW-1:0] wptr;        // next location to write
  logic          half;        // an odd number of samples has been written
  logic          request;
  logic [JW-1:0] fill;        // samples written since reset, saturating at NTAPS

  assign request = in_valid && half;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      half <= 1'b0;
      fill <= '0;
    end else if (in_valid) begin
      wptr <= wptr + 1'b1;
      half <= ~half;
      if (fill != JW'(NTAPS)) fill <= fill + 1'b1;
    end
  end

  // ---- sequencer ----
  logic          busy;
  logic [JW-1:0] j, nterms;
  logic [AW-1:0] newest;
  logic          sym;
  logic [JW-1:0] valid_n;     // samples of history available for this output

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      j       <= '0;
      nterms  <= '0;
      newest  <= '0;
      sym     <= 1'b0;
      valid_n <= '0;
      overrun <= 1'b0;
    end else begin
      overrun <= 1'b0;
      if (busy) begin
        if (j == nterms - 1'b1) busy <= 1'b0;
        j <= j + 1'b1;
      end
      if (request) begin
        if (busy && j != nterms - 1'b1) begin
          overrun <= 1'b1;
        end else begin
          busy   <= 1'b1;
          j      <= '0;
          newest <= wptr;   // the sample written on this edge
          sym    <= esym;
          valid_n <= (fill == JW'(NTAPS)) ? fill : fill + 1'b1;
          nterms <= esym ? JW'(NTAPS / 2) : JW'(NTAPS);
        end
      end
    end
  end

  logic [AW-1:0] raddr_a, raddr_b;
  assign raddr_a = newest - AW'(j);
  assign raddr_b = newest - AW'(NTAPS - 1) + AW'(j);

  logic signed [DATA_W-1:0] rd_a, rd_b;

  fir_data_ram #(.W(DATA_W), .DEPTH(DATA_DEPTH)) u_dataram (
    .clk(clk), .we(in_valid), .waddr(wptr), .wdata(in_data),
    .raddr_a(raddr_a), .rdata_a(rd_a), .raddr_b(raddr_b), .rdata_b(rd_b)
  );

  // coefficient address two clocks behind the data address
  logic [CW-1:0] caddr_d1, caddr_d2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      caddr_d1 <= '0;
      caddr_d2 <= '0;
    end else begin
      caddr_d1 <= CW'(j);
      caddr_d2 <= caddr_d1;
    end
  end

  // Samples older than the number written since reset read as zero, so the
  // filter starts from a clean (all-zero) history.
  logic [JW-1:0]            age_b;
  logic signed [DATA_W-1:0] da, db;
  assign age_b = JW'(NTAPS - 1) - j;
  assign da    = (j < valid_n)     ? rd_a : '0;
  assign db    = (age_b < valid_n) ? rd_b : '0;

  logic signed [COEF_W-1:0] coef;

  fir_coef_ram #(.W(COEF_W), .DEPTH(NTAPS)) u_coefram (
    .clk(clk), .rst_n(rst_n), .we(coef_we), .waddr(coef_addr), .wdata(coef_wdata),
    .raddr(caddr_d2), .rdata(coef), .bus_raddr(coef_addr), .bus_rdata(coef_rdata)
  );

  logic                     mac_valid;
  logic signed [OREG_W-1:0] mac_out;

  fir_mac #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W), .OREG_W(OREG_W)) u_mac (
    .clk(clk), .rst_n(rst_n),
    .in_valid(busy), .first(busy && j == '0), .last(busy && j == nterms - 1'b1),
    .esym(sym), .a(da), .b(db), .coef(coef),
    .out_valid(mac_valid), .out_data(mac_out)
  );

  output_formatter #(.IN_W(OREG_W), .OUT_W(OUT_W), .SHIFT(FMT_SHIFT)) u_fmt (
    .clk(clk), .rst_n(rst_n), .in_valid(mac_valid), .in_data(mac_out),
    .out_valid(out_valid), .out_data(data_out), .clipped(clipped)
  );

  initial begin
    assert (NTAPS % 2 == 0) else $error("corrector_fir: NTAPS must be even");
    assert (DATA_DEPTH >= NTAPS + 2) else $error("corrector_fir: data RAM too small");
  end
endmodule
