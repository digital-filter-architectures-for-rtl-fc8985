// csd_const_mult_tb: multiplies random 17-bit inputs by every half-band
// coefficient and by a few awkward constants (runs of ones, extremes of the
// 8-bit range) and compares with the exact integer product.
module csd_const_mult_tb;
  localparam int NC = 12;
  localparam int COEFS [NC] = '{64, 38, -7, 1, 40, -10, 3, -1, 127, -128, 85, -43};
  logic signed [16:0] x;
  logic signed [25:0] y [NC];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g
    csd_const_mult #(.IN_W(17), .OUT_W(26), .COEF(COEFS[i])) dut (.x(x), .y(y[i]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int t = 0; t < 300; t++) begin
      case (t)
        0: x = 17'sh0FFFF;
        1: x = -17'sh10000;
        2: x = 17'sd0;
        3: x = -17'sd1;
        default: x = 17'($urandom);
      endcase
      #1;
      for (int i = 0; i < NC; i++) begin
        e = longint'(x) * COEFS[i];
        checks++;
        if (longint'(y[i]) != e) begin
          failures++;
          $display("x=%0d coef=%0d: y=%0d expected %0d", x, COEFS[i], y[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
