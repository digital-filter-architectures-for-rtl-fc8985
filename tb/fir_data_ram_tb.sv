// fir_data_ram_tb: random writes and two random read addresses per clock,
// checked against a shadow array, including a read of the address being
// written (old data until the edge).
module fir_data_ram_tb;
  logic clk = 0, we = 0;
  logic [5:0] waddr = '0, ra = '0, rb = '0;
  logic signed [15:0] wdata = '0, da, db;
  logic signed [15:0] shadow [64];
  bit written [64];
  int checks = 0, failures = 0;

  fir_data_ram dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                    .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = 16'($urandom);
      shadow[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = 6'($urandom);
      wdata = 16'($urandom);
      ra = 6'($urandom);
      rb = (i % 5 == 0) ? waddr : 6'($urandom);
      #1;
      checks += 2;
      if (da !== shadow[ra]) begin failures++; $display("port a addr %0d", ra); end
      if (db !== shadow[rb]) begin failures++; $display("port b addr %0d", rb); end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
