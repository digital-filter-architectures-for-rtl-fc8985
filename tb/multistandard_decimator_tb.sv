// multistandard_decimator_tb: end-to-end test of the top level with every
// parameter at its default. Two sigma-delta models drive the two
// architectures with one bit per clock.
//   Phase 1: Architecture I in symmetric-coefficient mode with a symmetric
//            32-tap low-pass; Architecture II with both paths enabled.
//   Phase 2: after a reset, Architecture I in plain mode with 32 distinct
//            coefficients; Architecture II with only the /8 path enabled.
//   Phase 3: without a reset, the integrators and combs of Architecture I are
//            flushed for 64 input bits (their output must read 0 meanwhile,
//            as a single +/-4182 sample rounds to 0) and then re-enabled.
// Before phase 1 the CSD converter converts the 15 order-14 half-band
// coefficients; the digits must rebuild each value.
// All outputs of phases 1 and 2 are compared word for word with the
// reference arithmetic, counts are checked against the decimation factors
// (/16, /32, /2, /8, /32) and every mechanism is counted; one that never
// occurs counts as a failure.
module multistandard_decimator_tb;
  import decim_model_pkg::*;
  localparam int NIN = 32 * 96;
  logic clk = 0, rst_n = 0;
  logic sd_valid = 0;
  logic bit1, bit2;
  logic [5:1] int_en = '1, comb_en = '1;
  logic esym = 1'b1, coef_we = 1'b0;
  logic [4:0] coef_addr = '0;
  logic signed [19:0] coef_wdata = '0, coef_rdata;
  logic hdf_valid, a1_valid, clipped, overrun;
  logic signed [15:0] hdf_data;
  logic signed [23:0] a1_out;
  logic [1:0] path_en = 2'b11;
  logic v1, v8, v32;
  logic signed [15:0] d1, d8, d32;

  logic csd_start = 0, csd_bit_valid = 0, csd_b_i = 0, csd_b_i1 = 0;
  logic csd_dig_valid, csd_dig_nz, csd_dig_neg;
  int checks = 0, failures = 0;
  longint qh[$], qa[$], q1[$], q8[$], q32[$];
  lvec_t x1, x2;
  int n1 = 0, n2 = 0;
  bit flushing = 0;

  // mechanism counters
  int m_cic16 = 0, m_fir_sym = 0, m_fir_plain = 0, m_coef_load = 0, m_flush = 0;
  int m_cic2 = 0, m_out8 = 0, m_out32 = 0, m_path_off = 0, m_readback = 0, m_csd = 0;

  sigma_delta_model #(.AMP(0.5), .FREQ(1.0 / 512.0))  u_sd1 (.clk(clk), .en(sd_valid), .bit_out(bit1));
  sigma_delta_model #(.AMP(0.6), .FREQ(1.0 / 1024.0)) u_sd2 (.clk(clk), .en(sd_valid), .bit_out(bit2));

  multistandard_decimator dut (
    .clk(clk), .rst_n(rst_n),
    .a1_sd_valid(sd_valid), .a1_sd_bit(bit1), .a1_int_en(int_en), .a1_comb_en(comb_en),
    .a1_esym(esym), .a1_coef_we(coef_we), .a1_coef_addr(coef_addr), .a1_coef_wdata(coef_wdata),
    .a1_coef_rdata(coef_rdata), .a1_hdf_valid(hdf_valid), .a1_hdf_data(hdf_data),
    .a1_out_valid(a1_valid), .a1_data_out(a1_out), .a1_clipped(clipped), .a1_overrun(overrun),
    .a2_sd_valid(sd_valid), .a2_sd_bit(bit2), .a2_path_en(path_en),
    .a2_cic1_valid(v1), .a2_cic1_data(d1), .a2_out8_valid(v8), .a2_out8_data(d8),
    .a2_out32_valid(v32), .a2_out32_data(d32),
    .csd_start(csd_start), .csd_bit_valid(csd_bit_valid), .csd_b_i(csd_b_i), .csd_b_i1(csd_b_i1),
    .csd_dig_valid(csd_dig_valid), .csd_dig_nz(csd_dig_nz), .csd_dig_neg(csd_dig_neg));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (sd_valid) begin
      x1[n1] = bit1 ? 4182 : -4182; n1++;
      x2[n2] = bit2 ? 4182 : -4182; n2++;
    end
    if (hdf_valid) begin
      qh.push_back(longint'(hdf_data));
      m_cic16++;
      if (flushing) m_flush++;
    end
    if (a1_valid) begin
      qa.push_back(longint'(a1_out));
      if (esym) m_fir_sym++; else m_fir_plain++;
    end
    if (coef_we) m_coef_load++;
    if (v1)  begin q1.push_back(longint'(d1)); m_cic2++; if (!path_en[1]) m_path_off++; end
    if (v8)  begin q8.push_back(longint'(d8)); m_out8++; end
    if (v32) begin q32.push_back(longint'(d32)); m_out32++; end
    if (overrun) begin failures++; $display("corrector overrun"); end
  end

  initial begin
    repeat (4 * NIN + 4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string name, longint got[$], lvec_t exp, int expect_n);
    checks++;
    if (got.size() != expect_n) begin
      failures++;
      $display("%s: %0d words, expected %0d", name, got.size(), expect_n);
    end
    for (int i = 0; i < exp.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != exp[i]) begin
        failures++;
        $display("%s: word %0d = %0d expected %0d", name, i, got[i], exp[i]);
      end
    end
  endtask

  task automatic load(input lvec_t c);
    for (int k = 0; k < 32; k++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = 5'(k); coef_wdata = 20'(c[k]);
    end
    @(negedge clk);
    coef_we = 1'b0;
    for (int k = 0; k < 32; k++) begin
      @(negedge clk);
      coef_addr = 5'(k);
      #1;
      checks++;
      m_readback++;
      if (longint'(coef_rdata) != c[k]) begin failures++; $display("coef %0d readback", k); end
    end
  endtask

  task automatic start_phase();
    qh.delete(); qa.delete(); q1.delete(); q8.delete(); q32.delete();
    x1 = new[NIN]; x2 = new[NIN];
    n1 = 0; n2 = 0;
  endtask

  initial begin
    lvec_t c, eh, ea, e1, e8, b1, b2, b3, e32, h10, h14;
    real s, w, t;
    int hstart;
    c = new[32];
    h10 = hb_taps(10);
    h14 = hb_taps(14);
    for (int k = 0; k < 32; k++) begin
      t = real'(k) - 15.5;
      s = $sin(3.141592653589793 * 0.5 * t) / (3.141592653589793 * t);
      w = 0.54 - 0.46 * $cos(6.283185307179586 * real'(k) / 31.0);
      c[k] = longint'($rtoi(s * w * 262144.0 + 0.5));
    end

    repeat (2) @(posedge clk);
    rst_n = 1;
    // CSD conversion of every order-14 half-band coefficient (8-bit), checked
    // by rebuilding its value from the digits
    for (int k = 0; k < 15; k++) begin
      logic [7:0] v;
      longint sum;
      v = 8'(h14[k]);
      sum = 0;
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        csd_start = (i == 0); csd_bit_valid = 1'b1;
        csd_b_i = v[i]; csd_b_i1 = (i < 7) ? v[i+1] : v[7];
        @(negedge clk);
        csd_start = 1'b0; csd_bit_valid = 1'b0;
        if (csd_dig_nz) sum += csd_dig_neg ? -(longint'(1) <<< i) : (longint'(1) <<< i);
      end
      checks++;
      m_csd++;
      if (((sum - h14[k]) % 256) != 0) begin
        failures++;
        $display("CSD digits of %0d rebuild %0d", h14[k], sum);
      end
    end

    // ---------------- phase 1 ----------------
    load(c);
    start_phase();
    esym = 1'b1;
    path_en = 2'b11;
    sd_valid = 1'b1;
    repeat (NIN) @(negedge clk);
    sd_valid = 1'b0;
    repeat (80) @(negedge clk);
    eh = cic_model(x1, 5, 16, 1, 18, 1, 16);
    ea = fir_model(eh, c, 32, 1'b1, 7, 24);
    e1 = cic_model(x2, 5, 2, 1, 3, 0, 16);
    e8 = hb_model(hb_model(e1, h10, 16), h14, 16);
    b1 = cic_model(e1, 5, 2, 1, 5, 0, 16);
    b2 = cic_model(b1, 5, 2, 1, 5, 0, 16);
    b3 = hb_model(b2, h10, 16);
    e32 = hb_model(b3, h14, 16);
    expect_eq("p1 arch1 cic", qh, eh, NIN / 16);
    expect_eq("p1 arch1 out", qa, ea, NIN / 32);
    expect_eq("p1 arch2 cic1", q1, e1, NIN / 2);
    expect_eq("p1 arch2 out8", q8, e8, NIN / 8);
    expect_eq("p1 arch2 out32", q32, e32, NIN / 32);

    // ---------------- phase 2: mode switch ----------------
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 32; k++) c[k] = longint'($urandom % 32'd60000) - 20000;
    load(c);
    start_phase();
    esym = 1'b0;
    path_en = 2'b01;
    sd_valid = 1'b1;
    repeat (NIN) @(negedge clk);
    sd_valid = 1'b0;
    repeat (80) @(negedge clk);
    eh = cic_model(x1, 5, 16, 1, 18, 1, 16);
    ea = fir_model(eh, c, 32, 1'b0, 7, 24);
    e1 = cic_model(x2, 5, 2, 1, 3, 0, 16);
    e8 = hb_model(hb_model(e1, h10, 16), h14, 16);
    expect_eq("p2 arch1 cic", qh, eh, NIN / 16);
    expect_eq("p2 arch1 out", qa, ea, NIN / 32);
    expect_eq("p2 arch2 out8", q8, e8, NIN / 8);
    checks++;
    if (q32.size() != 0) begin failures++; $display("disabled /32 path produced output"); end

    // ---------------- phase 3: flush ----------------
    start_phase();
    int_en = '0;
    comb_en = '0;
    flushing = 1'b1;
    sd_valid = 1'b1;
    repeat (64) @(negedge clk);
    flushing = 1'b0;
    hstart = qh.size();
    int_en = '1;
    comb_en = '1;
    repeat (512) @(negedge clk);
    sd_valid = 1'b0;
    repeat (80) @(negedge clk);
    for (int i = 1; i < hstart; i++) begin
      checks++;
      if (qh[i] != 0) begin failures++; $display("flush word %0d = %0d", i, qh[i]); end
    end
    checks++;
    if (qh.size() != (64 + 512) / 16) begin failures++; $display("phase 3: %0d CIC words", qh.size()); end

    $display("mechanisms: cic16=%0d fir_sym=%0d fir_plain=%0d coef_writes=%0d readbacks=%0d flush=%0d",
             m_cic16, m_fir_sym, m_fir_plain, m_coef_load, m_readback, m_flush);
    $display("            cic2=%0d out8=%0d out32=%0d path32_off=%0d csd=%0d",
             m_cic2, m_out8, m_out32, m_path_off, m_csd);
    if (m_cic16 == 0)     begin failures++; $display("CIC /16 decimation never happened"); end
    if (m_fir_sym == 0)   begin failures++; $display("symmetric FIR mode never used"); end
    if (m_fir_plain == 0) begin failures++; $display("plain FIR mode never used"); end
    if (m_coef_load == 0) begin failures++; $display("coefficients never loaded"); end
    if (m_readback == 0)  begin failures++; $display("coefficients never read back"); end
    if (m_flush == 0)     begin failures++; $display("integrator/comb flush never happened"); end
    if (m_cic2 == 0)      begin failures++; $display("shared CIC /2 never produced output"); end
    if (m_out8 == 0)      begin failures++; $display("/8 path never produced output"); end
    if (m_out32 == 0)     begin failures++; $display("/32 path never produced output"); end
    if (m_csd == 0)       begin failures++; $display("CSD conversion never exercised"); end
    if (m_path_off == 0)  begin failures++; $display("path disable never exercised"); end
    checks += 11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
