// sd_input_map_tb: random bits with a random valid; checks that each valid
// bit comes out one clock later as +4182 or -4182 and that out_valid follows
// in_valid by one clock.
module sd_input_map_tb;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0;
  logic out_valid;
  logic signed [13:0] out_data;
  int checks = 0, failures = 0;

  sd_input_map dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_bit(in_bit),
                    .out_valid(out_valid), .out_data(out_data));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pv, pb;
    repeat (2) @(posedge clk);
    rst_n = 1;
    pv = 0; pb = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== pv) begin
        failures++;
        $display("cycle %0d: out_valid=%0b expected %0b", i, out_valid, pv);
      end else if (pv && out_data !== (pb ? 14'sd4182 : -14'sd4182)) begin
        failures++;
        $display("cycle %0d: out_data=%0d for bit %0b", i, out_data, pb);
      end
      in_valid = ($urandom % 3) != 0;
      in_bit   = 1'($urandom);
      pv = in_valid; pb = in_bit;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
