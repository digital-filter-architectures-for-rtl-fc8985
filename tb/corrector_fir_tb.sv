// corrector_fir_tb: the 32-tap single-MAC corrector FIR at its default size.
// Coefficients are loaded over the control bus and read back. Samples arrive
// every 16 clocks (the rate the /16 CIC delivers at one input per clock).
// Run 1 uses the symmetric mode (16 terms per output), run 2 the plain mode
// (32 terms per output, exactly the 32 clocks available), run 3 a random
// coefficient rewrite in symmetric mode; every output word is compared with
// a direct convolution (floor /8, round /128, saturate to 24 bits). Run 4
// feeds samples every 8 clocks in plain mode, which must drop requests and
// pulse 'overrun'. A full-scale run checks that saturation sets 'clipped'.
module corrector_fir_tb;
  import decim_model_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, esym = 0;
  logic signed [15:0] in_data = '0;
  logic coef_we = 0;
  logic [4:0] coef_addr = '0;
  logic signed [19:0] coef_wdata = '0, coef_rdata;
  logic out_valid, clipped, overrun;
  logic signed [23:0] data_out;
  int checks = 0, failures = 0;
  int n_overrun = 0, n_clipped = 0;
  longint q[$];

  corrector_fir dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .esym(esym), .coef_we(coef_we), .coef_addr(coef_addr), .coef_wdata(coef_wdata),
    .coef_rdata(coef_rdata), .out_valid(out_valid), .data_out(data_out),
    .clipped(clipped), .overrun(overrun));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      q.push_back(longint'(data_out));
      if (clipped) n_clipped++;
    end
    if (overrun) n_overrun++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_coefs(input lvec_t c);
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
      if (longint'(coef_rdata) != c[k]) begin
        failures++;
        $display("coefficient %0d reads %0d", k, coef_rdata);
      end
    end
  endtask

  task automatic run(string name, input lvec_t c, bit sym, int nin, int gap, int kind);
    lvec_t x, e;
    x = new[nin];
    q.delete();
    esym = sym;
    for (int i = 0; i < nin; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      case (kind)
        0: x[i] = longint'($signed(16'($urandom)));
        default: x[i] = (i % 2 == 0) ? 32767 : -32768;
      endcase
      in_data = 16'(x[i]);
      @(negedge clk);
      in_valid = 1'b0;
      repeat (gap - 2) @(negedge clk);
    end
    repeat (60) @(negedge clk);
    e = fir_model(x, c, 32, sym, 7, 24);
    checks++;
    if (q.size() != e.size()) begin
      failures++;
      $display("%s: %0d outputs, expected %0d", name, q.size(), e.size());
    end
    for (int i = 0; i < e.size() && i < q.size(); i++) begin
      checks++;
      if (q[i] != e[i]) begin
        failures++;
        $display("%s: output %0d = %0d expected %0d", name, i, q[i], e[i]);
      end
    end
  endtask

  task automatic reset_dut();
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
  endtask

  initial begin
    lvec_t c;
    int nov;
    c = new[32];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // a symmetric low-pass-like set (coefficient scale 2**18)
    for (int k = 0; k < 32; k++) c[k] = longint'($urandom % 32'd40000) - 8000;
    for (int k = 0; k < 16; k++) c[31-k] = c[k];
    load_coefs(c);
    run("sym", c, 1'b1, 200, 16, 0);
    reset_dut();
    load_coefs(c);
    for (int k = 0; k < 32; k++) c[k] = longint'($signed(20'($urandom)));
    load_coefs(c);
    run("plain", c, 1'b0, 200, 16, 0);
    reset_dut();
    for (int k = 0; k < 32; k++) c[k] = longint'($signed(20'($urandom)));
    load_coefs(c);
    run("sym2", c, 1'b1, 120, 16, 0);
    // saturation: large coefficients and a full-scale alternating input
    reset_dut();
    for (int k = 0; k < 32; k++) c[k] = (k % 2 == 0) ? 262143 : -262144;
    load_coefs(c);
    run("clip", c, 1'b0, 80, 16, 1);
    checks++;
    if (n_clipped == 0) begin
      failures++;
      $display("saturation never reported");
    end
    // overrun: plain mode needs 32 clocks per output, give it 16
    reset_dut();
    nov = n_overrun;
    esym = 1'b0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data = 16'($urandom);
      @(negedge clk);
      in_valid = 1'b0;
      repeat (6) @(negedge clk);
    end
    checks++;
    if (n_overrun - nov < 5) begin
      failures++;
      $display("overrun pulsed %0d times", n_overrun - nov);
    end
    // no overrun in the normal runs
    checks++;
    if (nov != 0) begin
      failures++;
      $display("unexpected overrun in normal operation");
    end
    $display("overruns %0d, clipped outputs %0d", n_overrun, n_clipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
