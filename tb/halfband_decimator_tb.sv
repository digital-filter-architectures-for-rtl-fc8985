// halfband_decimator_tb: order-10 and order-14 half-band decimators driven
// with an impulse (which must reproduce the coefficient set at every second
// position), full-scale steps (rounding and saturation) and random data; each
// output word is compared with a direct convolution with the written-out
// taps, rounded and saturated, and its timing (2 clocks after every second
// input) is checked.
module halfband_decimator_tb;
  import decim_model_pkg::*;
  localparam int NIN = 500;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] x = '0;
  logic v10, v14;
  logic signed [15:0] y10, y14;
  int checks = 0, failures = 0;
  int cyc = 0;
  longint q10[$], q14[$];
  int t10[$], t14[$], tin[$];

  halfband_decimator #(.IN_W(16), .OUT_W(16), .ORDER(10)) dut10 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(x), .out_valid(v10), .out_data(y10));
  halfband_decimator #(.IN_W(16), .OUT_W(16), .ORDER(14)) dut14 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(x), .out_valid(v14), .out_data(y14));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (v10) begin q10.push_back(longint'(y10)); t10.push_back(cyc); end
    if (v14) begin q14.push_back(longint'(y14)); t14.push_back(cyc); end
    if (in_valid) tin.push_back(cyc);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string name, longint got[$], int tg[$], lvec_t exp);
    for (int i = 0; i < exp.size(); i++) begin
      checks += 2;
      if (i >= got.size()) begin
        failures++;
        $display("%s: output %0d missing", name, i);
        continue;
      end
      if (got[i] != exp[i]) begin
        failures++;
        $display("%s: output %0d = %0d expected %0d", name, i, got[i], exp[i]);
      end
      if (tg[i] != tin[2 * i + 1] + 2) begin
        failures++;
        $display("%s: output %0d at cycle %0d", name, i, tg[i]);
      end
    end
  endtask

  initial begin
    lvec_t xv, e10, e14, h10, h14;
    xv = new[NIN];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NIN; i++) begin
      @(negedge clk);
      in_valid = 1'b0;
      if (i > 200) repeat ($urandom % 3) @(negedge clk);
      in_valid = 1'b1;
      if (i < 40)       x = (i == 1) ? 16'sd1000 : 16'sd0;        // impulse at an odd index
      else if (i < 80)  x = (i < 60) ? 16'sh7FFF : -16'sh8000;    // steps to full scale
      else              x = 16'($urandom);
      xv[i] = longint'(x);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    h10 = hb_taps(10);
    h14 = hb_taps(14);
    e10 = hb_model(xv, h10, 16);
    e14 = hb_model(xv, h14, 16);
    compare("HB10", q10, t10, e10);
    compare("HB14", q14, t14, e14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
