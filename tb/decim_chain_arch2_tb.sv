// decim_chain_arch2_tb: the multistage decimation chain at its default size.
// A sigma-delta model produces one bit per clock. Run 1 enables both paths;
// every word of the shared CIC, the /8 output and the /32 output is compared
// with the reference chain (input map, CIC convolutions with truncation,
// half-band convolutions with rounding and saturation), and the output counts
// must be exactly one per 8 and one per 32 input bits. Run 2 (after a reset)
// enables only the /8 path: the /8 output must still match the reference and
// the /32 path must stay silent.
module decim_chain_arch2_tb;
  import decim_model_pkg::*;
  localparam int NIN = 32 * 100;
  logic clk = 0, rst_n = 0, sd_valid = 0;
  logic sd_bit;
  logic [1:0] path_en = 2'b11;
  logic v1, v8, v32;
  logic signed [15:0] d1, d8, d32;
  int checks = 0, failures = 0;
  longint q1[$], q8[$], q32[$];
  lvec_t xbits;
  int nbits = 0;

  sigma_delta_model #(.AMP(0.6), .FREQ(1.0 / 1024.0)) u_sd (.clk(clk), .en(sd_valid), .bit_out(sd_bit));

  decim_chain_arch2 dut (.clk(clk), .rst_n(rst_n), .sd_valid(sd_valid), .sd_bit(sd_bit),
    .path_en(path_en), .cic1_valid(v1), .cic1_data(d1), .out8_valid(v8), .out8_data(d8),
    .out32_valid(v32), .out32_data(d32));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (sd_valid) begin xbits[nbits] = sd_bit ? 4182 : -4182; nbits++; end
    if (v1)  q1.push_back(longint'(d1));
    if (v8)  q8.push_back(longint'(d8));
    if (v32) q32.push_back(longint'(d32));
  end

  initial begin
    repeat (3 * NIN) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string name, longint got[$], lvec_t exp, int expect_n);
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

  task automatic run(bit both);
    lvec_t e1, a1, e8, b1, b2, b3, e32, h10, h14;
    q1.delete(); q8.delete(); q32.delete();
    nbits = 0;
    xbits = new[NIN];
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    path_en = both ? 2'b11 : 2'b01;
    sd_valid = 1'b1;
    repeat (NIN) @(negedge clk);
    sd_valid = 1'b0;
    repeat (40) @(negedge clk);
    h10 = hb_taps(10);
    h14 = hb_taps(14);
    e1  = cic_model(xbits, 5, 2, 1, 3, 0, 16);
    a1  = hb_model(e1, h10, 16);
    e8  = hb_model(a1, h14, 16);
    compare("cic1", q1, e1, NIN / 2);
    compare("out8", q8, e8, NIN / 8);
    if (both) begin
      b1  = cic_model(e1, 5, 2, 1, 5, 0, 16);
      b2  = cic_model(b1, 5, 2, 1, 5, 0, 16);
      b3  = hb_model(b2, h10, 16);
      e32 = hb_model(b3, h14, 16);
      compare("out32", q32, e32, NIN / 32);
      $display("out8 tail %0d %0d, out32 tail %0d %0d", q8[q8.size()-2], q8[q8.size()-1],
               q32[q32.size()-2], q32[q32.size()-1]);
    end else begin
      checks++;
      if (q32.size() != 0) begin
        failures++;
        $display("disabled /32 path produced %0d words", q32.size());
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run(1'b1);
    run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
