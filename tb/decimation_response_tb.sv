// decimation_response_tb: frequency response of the three decimation outputs
// of the top level (Architecture I /32, Architecture II /8 and /32) at their
// default sizes, measured with sigma-delta modulated tones.
//
// A second-order sigma-delta modulator (with a little dither against idle
// tones), written inline so that its frequency can change at run time, drives
// both architectures with one bit per clock (the 64 MHz input rate of the
// reference frequency plan). Because a 1-bit modulator's signal gain is not
// exactly flat, the tone amplitude actually present in the bit stream is
// measured over the same window and used as the reference. Tones are placed
// at n/8192 cycles per input sample, so every output sees a whole number of
// periods in a window of 8192 input samples. For each tone the testbench
// lets the filters settle for 4096 inputs and then correlates each output
// with a cosine and a sine at its (aliased) output frequency over that
// window, which gives the tone's amplitude at that output.
//
// The expected amplitude comes from the analytic responses: each fifth-order
// CIC stage |sin(pi f R)/(R sin(pi f))|^5, each half-band filter and the
// corrector FIR the magnitude of the DTFT of their taps, times the stage
// gains (4 for the 14-to-16-bit CIC stages, 2**8 for the corrector output
// format). Tones within 20 dB of full gain must be measured within 0.3 dB;
// for weaker ones the measurement may not exceed the expectation by more
// than 3 dB or a floor of 60 dB below full gain, whichever is larger (the
// modulator's quantisation noise that folds into the same output frequency
// sets that floor). Outputs whose
// aliased tone falls on DC or on the Nyquist frequency are skipped.
// The table printed is the response in dB relative to each output's DC gain;
// a summary gives, per output, the largest deviation from 0 dB among the
// pass-band tones and the highest level among the stop-band tones, for
// comparison with a 0.001 ripple / 60 dB attenuation target.
// The corrector FIR is loaded with a 32-tap Hamming-windowed low-pass
// (cut-off 0.2 of its 4 MHz input rate, unity DC gain, 2**18 = 1.0) and run
// in symmetric mode.
module decimation_response_tb;
  import decim_model_pkg::*;

  localparam real PI     = 3.141592653589793;
  localparam real AMP    = 0.5;
  localparam real LEVEL  = 4182.0;
  localparam int  WIN    = 8192;
  localparam int  SETTLE = 4096;
  localparam int  NT     = 10;
  localparam int  TONES[NT] = '{16, 48, 96, 160, 300, 416, 560, 700, 900, 1500};

  logic clk = 0, rst_n = 0, sd_valid = 0, sd_bit = 0;
  logic coef_we = 0;
  logic [4:0] coef_addr = '0;
  logic signed [19:0] coef_wdata = '0, coef_rdata;
  logic hdf_valid, a1_valid, clipped, overrun;
  logic signed [15:0] hdf_data, cic1_data, d8, d32;
  logic signed [23:0] a1_out;
  logic cic1_valid, v8, v32;
  logic csd_dig_valid, csd_dig_nz, csd_dig_neg;
  int checks = 0, failures = 0;

  multistandard_decimator dut (
    .clk(clk), .rst_n(rst_n),
    .a1_sd_valid(sd_valid), .a1_sd_bit(sd_bit), .a1_int_en(5'h1f), .a1_comb_en(5'h1f),
    .a1_esym(1'b1), .a1_coef_we(coef_we), .a1_coef_addr(coef_addr), .a1_coef_wdata(coef_wdata),
    .a1_coef_rdata(coef_rdata), .a1_hdf_valid(hdf_valid), .a1_hdf_data(hdf_data),
    .a1_out_valid(a1_valid), .a1_data_out(a1_out), .a1_clipped(clipped), .a1_overrun(overrun),
    .a2_sd_valid(sd_valid), .a2_sd_bit(sd_bit), .a2_path_en(2'b11),
    .a2_cic1_valid(cic1_valid), .a2_cic1_data(cic1_data),
    .a2_out8_valid(v8), .a2_out8_data(d8), .a2_out32_valid(v32), .a2_out32_data(d32),
    .csd_start(1'b0), .csd_bit_valid(1'b0), .csd_b_i(1'b0), .csd_b_i1(1'b0),
    .csd_dig_valid(csd_dig_valid), .csd_dig_nz(csd_dig_nz), .csd_dig_neg(csd_dig_neg));

  always #5 clk = ~clk;

  // ---- sigma-delta stimulus ----
  real freq = 0.0, phase = 0.0, integ1 = 0.0, integ2 = 0.0;
  always @(posedge clk) begin
    real fb, dith;
    if (sd_valid) begin
      fb     = sd_bit ? 1.0 : -1.0;
      dith   = (real'($urandom % 32'd1001) - 500.0) * 2.0e-5;
      integ1 = integ1 + AMP * $sin(2.0 * PI * phase) - fb;
      integ2 = integ2 + integ1 - fb;
      phase  = phase + freq;
      if (phase >= 1.0) phase = phase - 1.0;
      sd_bit <= (integ2 + dith >= 0.0);
    end
  end

  // tone content of the bit stream actually fed to the filters
  real bi = 0.0, bq = 0.0;
  int  bcnt = 0;
  always @(posedge clk) if (rst_n && measuring && sd_valid && bcnt < WIN) begin
    bi += (sd_bit ? 1.0 : -1.0) * $cos(2.0 * PI * freq * real'(bcnt));
    bq += (sd_bit ? 1.0 : -1.0) * $sin(2.0 * PI * freq * real'(bcnt));
    bcnt++;
  end

  logic flagged = 1'b0;
  always @(posedge clk) if (rst_n && (clipped || overrun)) flagged <= 1'b1;

  // ---- correlators: index 0 = Arch. I /32, 1 = Arch. II /8, 2 = Arch. II /32 ----
  localparam int DEC[3] = '{32, 8, 32};
  logic measuring = 1'b0;
  real ci[3], cq[3];
  int  cnt[3];

  task automatic accumulate(int p, real y);
    real ph;
    if (cnt[p] < WIN / DEC[p]) begin
      ph = 2.0 * PI * freq * real'(DEC[p]) * real'(cnt[p]);
      ci[p] += y * $cos(ph);
      cq[p] += y * $sin(ph);
      cnt[p]++;
    end
  endtask

  always @(posedge clk) if (rst_n && measuring) begin
    if (a1_valid) accumulate(0, real'(a1_out));
    if (v8)       accumulate(1, real'(d8));
    if (v32)      accumulate(2, real'(d32));
  end

  // ---- analytic responses ----
  real fir_c[32];

  function automatic real cic_mag(real f, int r);
    real s, d, g;
    s = $sin(PI * f * real'(r));
    d = real'(r) * $sin(PI * f);
    if (d < 1e-12 && d > -1e-12) return 1.0;
    g = s / d;
    if (g < 0.0) g = -g;
    return g * g * g * g * g;
  endfunction

  function automatic real taps_mag(input lvec_t h, real f, real unity);
    real re, im;
    re = 0.0; im = 0.0;
    foreach (h[k]) begin
      re += real'(h[k]) * $cos(2.0 * PI * f * real'(k));
      im -= real'(h[k]) * $sin(2.0 * PI * f * real'(k));
    end
    return $sqrt(re * re + im * im) / unity;
  endfunction

  function automatic real db(real v);
    return (v > 1e-12) ? 20.0 * $log10(v) : -240.0;
  endfunction

  // Output frequency position (in output-sample cycles) folded to 0..0.5
  function automatic real fold(real f);
    real g;
    g = f - $floor(f);
    return (g > 0.5) ? 1.0 - g : g;
  endfunction

  initial begin
    lvec_t h10, h14, fc;
    real exp_a[3], meas[3], full[3], fn, t, s, w, sum, e_db, m_db, ain;
    real worst_pb[3], best_sb[3];
    string tag;
    h10 = hb_taps(10);
    h14 = hb_taps(14);
    fc  = new[32];
    sum = 0.0;
    for (int k = 0; k < 32; k++) begin
      t = real'(k) - 15.5;
      s = $sin(2.0 * PI * 0.2 * t) / (PI * t);
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'(k) / 31.0);
      fir_c[k] = s * w;
      sum += s * w;
    end
    for (int k = 0; k < 32; k++) fc[k] = longint'($rtoi(fir_c[k] / sum * 262144.0 + 0.5));
    // full gain (DC) of each output, in output LSBs for a tone of amplitude AMP
    full[0] = AMP * LEVEL * 4.0 * 256.0 * taps_mag(fc, 0.0, 262144.0);
    full[1] = AMP * LEVEL * 4.0;
    full[2] = AMP * LEVEL * 4.0;
    for (int p = 0; p < 3; p++) begin worst_pb[p] = 0.0; best_sb[p] = -240.0; end

    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 16; k++) begin
      coef_we = 1'b1; coef_addr = 5'(k); coef_wdata = 20'(fc[k]);
      @(negedge clk);
    end
    coef_we = 1'b0;
    sd_valid = 1'b1;

    $display("  f/MHz   in amp| A-I /32: exp    meas  | A-II /8: exp    meas  | A-II /32: exp   meas");
    for (int i = 0; i < NT; i++) begin
      freq = real'(TONES[i]) / real'(WIN);
      repeat (SETTLE) @(posedge clk);
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin ci[p] = 0.0; cq[p] = 0.0; cnt[p] = 0; end
      bi = 0.0; bq = 0.0; bcnt = 0;
      measuring = 1'b1;
      repeat (WIN + 64) @(posedge clk);
      measuring = 1'b0;
      fn = freq;
      ain = 2.0 / real'(WIN) * $sqrt(bi * bi + bq * bq);
      exp_a[0] = ain * LEVEL * 4.0 * cic_mag(fn, 16) * 256.0 * taps_mag(fc, 16.0 * fn, 262144.0);
      exp_a[1] = ain * LEVEL * 4.0 * cic_mag(fn, 2) * taps_mag(h10, 2.0 * fn, 128.0)
                 * taps_mag(h14, 4.0 * fn, 128.0);
      exp_a[2] = ain * LEVEL * 4.0 * cic_mag(fn, 2) * cic_mag(2.0 * fn, 2) * cic_mag(4.0 * fn, 2)
                 * taps_mag(h10, 8.0 * fn, 128.0) * taps_mag(h14, 16.0 * fn, 128.0);
      tag = $sformatf("%8.3f  %5.3f |", fn * 64.0, ain);
      for (int p = 0; p < 3; p++) begin
        real fo, floor_db;
        fo = fold(fn * real'(DEC[p]));
        if (cnt[p] != WIN / DEC[p]) begin
          failures++;
          $display("output %0d delivered %0d of %0d samples", p, cnt[p], WIN / DEC[p]);
        end
        if (fo * real'(WIN / DEC[p]) < 0.5 || (0.5 - fo) * real'(WIN / DEC[p]) < 0.5) begin
          tag = {tag, "      (alias at DC/Nyquist) |"};
          continue;
        end
        meas[p] = 2.0 / real'(WIN / DEC[p]) * $sqrt(ci[p] * ci[p] + cq[p] * cq[p]);
        e_db = db(exp_a[p] / full[p]);
        m_db = db(meas[p] / full[p]);
        checks++;
        if (e_db > -20.0) begin
          if (m_db - e_db > 0.3 || e_db - m_db > 0.3) begin
            failures++;
            $display("output %0d tone %0d: %.2f dB, expected %.2f dB", p, TONES[i], m_db, e_db);
          end
          if (e_db > -1.0 && (m_db > 0.0 ? m_db : -m_db) > worst_pb[p])
            worst_pb[p] = (m_db > 0.0 ? m_db : -m_db);
        end else begin
          floor_db = (e_db + 3.0 > -60.0) ? e_db + 3.0 : -60.0;
          if (m_db > floor_db) begin
            failures++;
            $display("output %0d tone %0d: %.2f dB, expected at most %.2f dB", p, TONES[i], m_db, floor_db);
          end
          if (m_db > best_sb[p]) best_sb[p] = m_db;
        end
        tag = {tag, $sformatf("  %8.2f  %8.2f     |", e_db, m_db)};
      end
      $display("%s", tag);
    end
    for (int p = 0; p < 3; p++)
      $display("output %0d: largest deviation from 0 dB among tones within 1 dB: %.3f dB; highest level among tones below -20 dB: %.1f dB",
               p, worst_pb[p], best_sb[p]);
    if (flagged) begin failures++; $display("unexpected clip/overrun"); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NT * (SETTLE + WIN + 200) + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
