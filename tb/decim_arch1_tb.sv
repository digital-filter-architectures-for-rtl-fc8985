// decim_arch1_tb: the complete two-stage decimator at its default size. A
// sigma-delta model produces one bit per clock (the 64 MHz input rate); a
// 32-tap symmetric windowed-sinc corrector is loaded over the control bus.
// Every CIC output word and every DATA_OUT word is compared with the
// reference chain (input map, CIC convolution with rounding, corrector FIR
// convolution with formatting). Rates are checked: one CIC word per 16 input
// bits, one output per 32, evenly spaced 32 clocks apart.
module decim_arch1_tb;
  import decim_model_pkg::*;
  localparam int NIN = 32 * 120;
  logic clk = 0, rst_n = 0, sd_valid = 0;
  logic sd_bit;
  logic [5:1] int_en = '1, comb_en = '1;
  logic esym = 1'b1, coef_we = 1'b0;
  logic [4:0] coef_addr = '0;
  logic signed [19:0] coef_wdata = '0, coef_rdata;
  logic hdf_valid, out_valid, clipped, overrun;
  logic signed [15:0] hdf_data;
  logic signed [23:0] data_out;
  int checks = 0, failures = 0, cyc = 0;
  longint qh[$], qo[$];
  int to[$];
  lvec_t xbits;
  int nbits = 0;

  sigma_delta_model #(.AMP(0.5), .FREQ(1.0 / 512.0)) u_sd (.clk(clk), .en(sd_valid), .bit_out(sd_bit));

  decim_arch1 dut (.clk(clk), .rst_n(rst_n), .sd_valid(sd_valid), .sd_bit(sd_bit),
    .int_en(int_en), .comb_en(comb_en), .esym(esym), .coef_we(coef_we),
    .coef_addr(coef_addr), .coef_wdata(coef_wdata), .coef_rdata(coef_rdata),
    .hdf_valid(hdf_valid), .hdf_data(hdf_data), .out_valid(out_valid),
    .data_out(data_out), .clipped(clipped), .overrun(overrun));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (sd_valid) begin xbits[nbits] = sd_bit ? 4182 : -4182; nbits++; end
    if (hdf_valid) qh.push_back(longint'(hdf_data));
    if (out_valid) begin qo.push_back(longint'(data_out)); to.push_back(cyc); end
    if (overrun) begin failures++; $display("overrun at cycle %0d", cyc); end
  end

  initial begin
    repeat (NIN + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lvec_t c, eh, eo;
    real s, w, t;
    xbits = new[NIN];
    c = new[32];
    // 32-tap Hamming-windowed sinc, cut-off at a quarter of the CIC output
    // rate, scaled so that unity = 2**18
    for (int k = 0; k < 32; k++) begin
      t = real'(k) - 15.5;
      s = $sin(3.141592653589793 * 0.5 * t) / (3.141592653589793 * t);
      w = 0.54 - 0.46 * $cos(6.283185307179586 * real'(k) / 31.0);
      c[k] = longint'($rtoi(s * w * 262144.0 + 0.5));
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 32; k++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = 5'(k); coef_wdata = 20'(c[k]);
    end
    @(negedge clk);
    coef_we = 1'b0;
    sd_valid = 1'b1;
    repeat (NIN) @(negedge clk);
    sd_valid = 1'b0;
    repeat (80) @(negedge clk);

    eh = cic_model(xbits, 5, 16, 1, 18, 1, 16);
    eo = fir_model(eh, c, 32, 1'b1, 7, 24);
    checks += 2;
    if (qh.size() != NIN / 16) begin failures++; $display("%0d CIC words", qh.size()); end
    if (qo.size() != NIN / 32) begin failures++; $display("%0d outputs", qo.size()); end
    for (int i = 0; i < eh.size() && i < qh.size(); i++) begin
      checks++;
      if (qh[i] != eh[i]) begin failures++; $display("CIC word %0d = %0d expected %0d", i, qh[i], eh[i]); end
    end
    for (int i = 0; i < eo.size() && i < qo.size(); i++) begin
      checks++;
      if (qo[i] != eo[i]) begin failures++; $display("output %0d = %0d expected %0d", i, qo[i], eo[i]); end
      if (i > 0) begin
        checks++;
        if (to[i] - to[i-1] != 32) begin failures++; $display("output spacing %0d", to[i] - to[i-1]); end
      end
    end
    $display("last outputs: %0d %0d %0d", qo[qo.size()-3], qo[qo.size()-2], qo[qo.size()-1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
