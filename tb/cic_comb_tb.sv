// cic_comb_tb: checks a comb with differential delay M = 2 against
// y = x - (input of M enabled clocks earlier), with a random enable, and a
// second instance with M = 1.
module cic_comb_tb;
  localparam int W = 12;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] x = '0, y2, y1;
  int checks = 0, failures = 0;
  logic signed [W-1:0] hist [$];

  cic_comb #(.W(W), .M(2)) dut2 (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y2));
  cic_comb #(.W(W), .M(1)) dut1 (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y1));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] d1, d2;
    hist = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = ($urandom % 3) != 0;
      x  = W'($urandom);
      #1;
      d1 = hist[hist.size()-1];
      d2 = hist[hist.size()-2];
      checks += 2;
      if (y2 !== W'(x - d2)) begin
        failures++;
        $display("M=2 cycle %0d: y=%0d expected %0d", i, y2, W'(x - d2));
      end
      if (y1 !== W'(x - d1)) begin
        failures++;
        $display("M=1 cycle %0d: y=%0d expected %0d", i, y1, W'(x - d1));
      end
      if (en) hist.push_back(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
