// cic_decimator_tb: feeds random samples into two CIC decimators, the
// chain's configuration (N=5, R=2, M=1, 14 -> 16 bits) and a wider one (N=3,
// R=4, M=2, 16 -> 16 bits), and compares every output word with the
// convolution of the input with ((1-z^-RM)/(1-z^-1))^N, decimated and scaled.
// Inputs come every clock in the first half and with random gaps in the
// second. It also checks the latency: out_valid exactly 2 clocks after the
// input that completes a decimation phase.
module cic_decimator_tb;
  import decim_model_pkg::*;
  localparam int NIN = 600;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [13:0] xa = '0;
  logic signed [15:0] xb = '0;
  logic va, vb;
  logic signed [15:0] ya, yb;
  int checks = 0, failures = 0;
  int cyc = 0;
  longint qa[$], qb[$];
  int ta[$], tb[$], tin[$];

  cic_decimator #(.IN_W(14), .OUT_W(16), .N(5), .R(2), .M(1)) dut_a (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(xa), .out_valid(va), .out_data(ya));
  cic_decimator #(.IN_W(16), .OUT_W(16), .N(3), .R(4), .M(2)) dut_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(xb), .out_valid(vb), .out_data(yb));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (va) begin qa.push_back(longint'(ya)); ta.push_back(cyc); end
    if (vb) begin qb.push_back(longint'(yb)); tb.push_back(cyc); end
    if (in_valid) tin.push_back(cyc);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string name, longint got[$], int tg[$], lvec_t exp, int r);
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
      if (tg[i] != tin[(i + 1) * r - 1] + 2) begin
        failures++;
        $display("%s: output %0d at cycle %0d, input %0d at %0d", name, i, tg[i],
                 (i + 1) * r - 1, tin[(i + 1) * r - 1]);
      end
    end
  endtask

  initial begin
    lvec_t xa_v, xb_v, ea, eb;
    xa_v = new[NIN];
    xb_v = new[NIN];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NIN; i++) begin
      @(negedge clk);
      if (i >= NIN / 2) begin
        in_valid = 1'b0;
        repeat ($urandom % 3) @(negedge clk);
      end
      in_valid = 1'b1;
      // full-scale extremes in the first 40 samples, random after
      if (i < 40) begin
        xa = (i % 20 < 10) ? 14'sh1FFF : -14'sh2000;
        xb = (i % 20 < 10) ? 16'sh7FFF : -16'sh8000;
      end else begin
        xa = 14'($urandom);
        xb = 16'($urandom);
      end
      xa_v[i] = longint'(xa);
      xb_v[i] = longint'(xb);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    ea = cic_model(xa_v, 5, 2, 1, 3, 0, 16);   // ACC_W 19, keep top 16: shift 3
    eb = cic_model(xb_v, 3, 4, 2, 9, 0, 16);   // ACC_W 25, keep top 16: shift 9
    compare("N5R2", qa, ta, ea, 2);
    compare("N3R4M2", qb, tb, eb, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
