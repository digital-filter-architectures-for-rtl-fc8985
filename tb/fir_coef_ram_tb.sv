// fir_coef_ram_tb: checks that the coefficient RAM reads zero after reset,
// then random bus writes with both read ports compared against a shadow
// array every clock.
module fir_coef_ram_tb;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] waddr = '0, ra = '0, rb = '0;
  logic signed [19:0] wdata = '0, d, bd;
  logic signed [19:0] shadow [32];
  int checks = 0, failures = 0;

  fir_coef_ram dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
                    .raddr(ra), .rdata(d), .bus_raddr(rb), .bus_rdata(bd));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      ra = 5'(i);
      #1;
      checks++;
      if (d !== '0) begin failures++; $display("addr %0d not cleared", i); end
    end
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      we = ($urandom % 3) == 0;
      waddr = 5'($urandom);
      wdata = 20'($urandom);
      ra = 5'($urandom);
      rb = 5'($urandom);
      #1;
      checks += 2;
      if (d !== shadow[ra]) begin failures++; $display("read addr %0d", ra); end
      if (bd !== shadow[rb]) begin failures++; $display("bus read addr %0d", rb); end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
