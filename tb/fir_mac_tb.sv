// fir_mac_tb: drives groups of 1..20 terms back to back (and with idle gaps)
// through the pre-adder/MAC pipeline, in both symmetric and plain mode, with
// the coefficient presented two clocks after its data pair. Each output must
// equal floor(sum((a + b*esym) * coef) / 8) and arrive 5 clocks after the
// group's last term.
module fir_mac_tb;
  logic clk = 0, rst_n = 0, in_valid = 0, first = 0, last = 0, esym = 0;
  logic signed [15:0] a = '0, b = '0;
  logic signed [19:0] coef = '0;
  logic out_valid;
  logic signed [39:0] out_data;
  int checks = 0, failures = 0, cyc = 0;
  longint expq[$];
  int     expt[$];
  logic signed [19:0] cpipe [2];

  fir_mac dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .first(first), .last(last),
               .esym(esym), .a(a), .b(b), .coef(coef), .out_valid(out_valid), .out_data(out_data));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      checks += 2;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cyc);
      end else begin
        if (longint'(out_data) != expq[0]) begin
          failures++;
          $display("output %0d expected %0d", out_data, expq[0]);
        end
        if (cyc != expt[0]) begin
          failures++;
          $display("output at cycle %0d expected %0d", cyc, expt[0]);
        end
        void'(expq.pop_front());
        void'(expt.pop_front());
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum;
    int nterm;
    logic signed [19:0] cq[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 300; g++) begin
      nterm = 1 + $urandom % 20;
      sum = 0;
      for (int k = 0; k < nterm; k++) begin
        @(negedge clk);
        in_valid = 1'b1;
        first = (k == 0);
        last  = (k == nterm - 1);
        esym  = (g % 2 == 0);
        if (g % 7 == 3) begin a = 16'sh7FFF; b = 16'sh7FFF; end
        else begin a = 16'($urandom); b = 16'($urandom); end
        cq.push_back(20'($urandom));
        sum += (longint'(a) + (esym ? longint'(b) : 0)) * longint'(cq[cq.size()-1]);
        // coefficient of the term issued two clocks earlier
        coef = (cq.size() > 2) ? cq[cq.size()-3] : '0;
        if (k == nterm - 1) begin
          expq.push_back(sum >>> 3);
          expt.push_back(cyc + 5);
        end
      end
      @(negedge clk);
      in_valid = 1'b0; first = 0; last = 0;
      coef = cq[cq.size()-2];
      @(negedge clk);
      coef = cq[cq.size()-1];
      cq.delete();
      if (g % 3 == 0) repeat ($urandom % 4) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d outputs missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
