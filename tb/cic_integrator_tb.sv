// cic_integrator_tb: drives random samples with a random enable into a 12-bit
// integrator and checks every clock that the register equals the running sum
// of the enabled samples modulo 2**12 (the wrap-around the CIC relies on).
module cic_integrator_tb;
  localparam int W = 12;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] x = '0, y;
  int checks = 0, failures = 0;
  longint model = 0;

  cic_integrator #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (y !== W'(model)) begin
        failures++;
        $display("cycle %0d: y=%0d expected %0d", i, y, W'(model));
      end
      checks++;
      en = ($urandom % 4) != 0;
      x  = W'($urandom);
      if (en) model = model + longint'(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
