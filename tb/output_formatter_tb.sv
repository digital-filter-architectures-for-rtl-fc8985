// output_formatter_tb: 40-bit values around the rounding ties, around both
// saturation limits and at random are formatted to 24 bits (shift 7); each
// result, its clip flag and the one-clock latency are checked against
// integer arithmetic.
module output_formatter_tb;
  import decim_model_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [39:0] in_data = '0;
  logic out_valid, clipped;
  logic signed [23:0] out_data;
  int checks = 0, failures = 0;

  output_formatter dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
                        .out_valid(out_valid), .out_data(out_data), .clipped(clipped));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, r, e;
    longint lim;
    lim = longint'(1) <<< 30;   // 2**23 * 2**7
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1200; i++) begin
      @(negedge clk);
      case (i % 6)
        0: v = (longint'($urandom % 100000) - 50000) * 128 + 64;       // ties
        1: v = (longint'($urandom % 100000) - 50000) * 128 + 63;
        2: v = lim - 64 + longint'($urandom % 128) - 64;               // near +max
        3: v = -lim - 64 + longint'($urandom % 128) - 64;              // near -max
        4: v = (longint'($urandom) << 8) - (longint'(1) <<< 39);       // large
        default: v = longint'($signed($urandom)) >>> ($urandom % 8);
      endcase
      in_valid = 1'b1;
      in_data = 40'(v);
      @(negedge clk);
      in_valid = 1'b0;
      r = rdiv(v, 7);
      e = sat(r, 24);
      checks += 3;
      if (!out_valid) begin failures++; $display("no out_valid"); end
      if (longint'(out_data) != e) begin
        failures++;
        $display("in %0d: out %0d expected %0d", v, out_data, e);
      end
      if (clipped !== (r != e)) begin
        failures++;
        $display("in %0d: clipped=%0b", v, clipped);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
