// csd_converter_tb: converts random 12-bit two's-complement numbers (and a
// few fixed ones) serially, least significant bit first, and checks that the
// digits rebuild the number modulo 2**12, that no two adjacent digits are
// non-zero, and that the number of non-zero digits is minimal (equal to the
// non-adjacent-form weight computed independently by repeated division).
module csd_converter_tb;
  localparam int W = 12;
  logic clk = 0, rst_n = 0, start = 0, bit_valid = 0, b_i = 0, b_i1 = 0;
  logic dig_valid, dig_nz, dig_neg, carry;
  int checks = 0, failures = 0;

  csd_converter dut (.clk(clk), .rst_n(rst_n), .start(start), .bit_valid(bit_valid),
                     .b_i(b_i), .b_i1(b_i1), .dig_valid(dig_valid), .dig_nz(dig_nz),
                     .dig_neg(dig_neg), .carry(carry));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // minimal signed-digit weight of v (as a W-bit signed value), by the
  // non-adjacent-form recurrence on integers
  function automatic int naf_weight(longint v);
    int n;
    n = 0;
    while (v != 0) begin
      if (v % 2 != 0) begin
        n++;
        if (((v % 4) + 4) % 4 == 3) v = v + 1; else v = v - 1;
      end
      v = v / 2;
    end
    return n;
  endfunction

  initial begin
    logic [W-1:0] v;
    longint sum, sv;
    int nz, prev_nz, adj;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      case (t)
        0: v = 12'h000;
        1: v = 12'hFFF;
        2: v = 12'h7FF;
        3: v = 12'h800;
        4: v = 12'h555;
        5: v = 12'h0B7;   // 0000_1011_0111
        default: v = W'($urandom);
      endcase
      sum = 0; nz = 0; prev_nz = 0; adj = 0;
      for (int i = 0; i < W; i++) begin
        @(negedge clk);
        start     = (i == 0);
        bit_valid = 1'b1;
        b_i       = v[i];
        b_i1      = (i + 1 < W) ? v[i+1] : v[W-1];
        @(negedge clk);
        start = 1'b0;
        bit_valid = 1'b0;
        if (!dig_valid) begin
          failures++;
          $display("no digit for bit %0d", i);
        end
        if (dig_nz) begin
          sum += dig_neg ? -(longint'(1) <<< i) : (longint'(1) <<< i);
          nz++;
          if (prev_nz) adj++;
        end
        prev_nz = dig_nz;
      end
      sv = longint'($signed(v));
      checks += 3;
      if (((sum - sv) % (longint'(1) <<< W)) != 0) begin
        failures++;
        $display("value %0d: digits give %0d", sv, sum);
      end
      if (adj != 0) begin
        failures++;
        $display("value %0d: adjacent non-zero digits", sv);
      end
      if (nz != naf_weight(sv)) begin
        failures++;
        $display("value %0d: %0d non-zero digits, minimum %0d", sv, nz, naf_weight(sv));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
