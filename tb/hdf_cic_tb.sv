// hdf_cic_tb: the fifth-order /16 CIC of the two-stage decimator.
// Phase 1: full-scale square wave then random 14-bit data with all enables
// high; every output must equal the convolution with the CIC response,
// rounded half-up by 2**18 and saturated to 16 bits, and appear 2 clocks after
// every 16th input. Phase 2: a flush (integrator enables and comb enables
// low for 16 zero samples) followed by new random data; the outputs after
// the flush must equal those of a freshly reset filter fed only the new data.
module hdf_cic_tb;
  import decim_model_pkg::*;
  localparam int N1 = 960;     // multiple of 16
  localparam int NF = 16;      // flush length, one decimation period
  localparam int N2 = 480;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [13:0] x = '0;
  logic [5:1] int_en = '1, comb_en = '1;
  logic dec_strobe, v;
  logic signed [15:0] y;
  int checks = 0, failures = 0, cyc = 0;
  longint q[$];
  int tq[$], tin[$];

  hdf_cic dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(x), .int_en(int_en),
               .comb_en(comb_en), .dec_strobe(dec_strobe), .out_valid(v), .out_data(y));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (v) begin q.push_back(longint'(y)); tq.push_back(cyc); end
    if (in_valid) tin.push_back(cyc);
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(longint val);
    @(negedge clk);
    in_valid = 1'b0;
    if ($urandom % 4 == 0) repeat (1 + $urandom % 2) @(negedge clk);
    in_valid = 1'b1;
    x = 14'(val);
  endtask

  initial begin
    lvec_t x1, x2, e1, e2;
    int strobes;
    x1 = new[N1];
    x2 = new[N2];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N1; i++) begin
      if (i < 320) x1[i] = ((i / 80) % 2 == 0) ? 8191 : -8192;
      else         x1[i] = longint'(14'sh2000) + longint'($urandom % 16384);
      feed(x1[i]);
    end
    // flush: clear integrators and combs
    for (int i = 0; i < NF; i++) begin
      feed(0);
      int_en  = '0;
      comb_en = '0;
    end
    for (int i = 0; i < N2; i++) begin
      x2[i] = longint'(14'sh2000) + longint'($urandom % 16384);
      feed(x2[i]);
      int_en  = '1;
      comb_en = '1;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(negedge clk);

    e1 = cic_model(x1, 5, 16, 1, 18, 1, 16);
    e2 = cic_model(x2, 5, 16, 1, 18, 1, 16);
    for (int i = 0; i < e1.size(); i++) begin
      checks += 2;
      if (q[i] != e1[i]) begin
        failures++;
        $display("output %0d = %0d expected %0d", i, q[i], e1[i]);
      end
      if (tq[i] != tin[16 * i + 15] + 2) begin
        failures++;
        $display("output %0d at cycle %0d", i, tq[i]);
      end
    end
    for (int i = 0; i < e2.size(); i++) begin
      int k;
      k = i + (N1 + NF) / 16;
      checks++;
      if (k >= q.size() || q[k] != e2[i]) begin
        failures++;
        $display("after flush: output %0d = %0d expected %0d", i, (k < q.size()) ? q[k] : -1, e2[i]);
      end
    end
    strobes = (N1 + NF + N2) / 16;
    checks++;
    if (q.size() != strobes) begin
      failures++;
      $display("%0d outputs, expected %0d", q.size(), strobes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
