// csd_converter: serial binary to canonic signed digit (CSD) converter.
//
// Hardware form of the CSD conversion table: a two-state machine whose state
// is the carry. Each clock with bit_valid high it takes bit b(i) and the next
// bit b(i+1) of a two's-complement number, least significant bit first, and
// produces CSD digit c(i):
//   state 0: b(i+1)b(i) = 00 -> 0,0   01 -> +1,0   10 -> 0,0   11 -> -1,1
//   state 1: b(i+1)b(i) = 00 -> +1,0  01 -> 0,1    10 -> -1,1  11 -> 0,1
// (digit, next state). The caller feeds the sign bit as b(i+1) at the top
// position; 'start' clears the state before a new number.
//
// Interface: digit is encoded as dig_nz (digit non-zero) and dig_neg (digit
// is -1). Outputs are registered: the digit for a bit appears the clock after
// it is presented, with dig_valid high.
module csd_converter (
  input  logic clk,
  input  logic rst_n,
  input  logic start,      // clear the carry state (with or before bit 0)
  input  logic bit_valid,
  input  logic b_i,        // current bit b(i)
  input  logic b_i1,       // next higher bit b(i+1)
  output logic dig_valid,
  output logic dig_nz,
  output logic dig_neg,
  output logic carry       // current state of the machine
);
  typedef enum logic {S_NOCARRY = 1'b0, S_CARRY = 1'b1} state_t;

  state_t st, st_use, st_next;
  logic   nz_next, neg_next;

  assign st_use = start ? S_NOCARRY : st;

  always_comb begin
    nz_next  = 1'b0;
    neg_next = 1'b0;
    st_next  = S_NOCARRY;
    unique case ({st_use, b_i1, b_i})
      3'b000: begin st_next = S_NOCARRY; end
      3'b001: begin nz_next = 1'b1; st_next = S_NOCARRY; end
      3'b010: begin st_next = S_NOCARRY; end
      3'b011: begin nz_next = 1'b1; neg_next = 1'b1; st_next = S_CARRY; end
      3'b100: begin nz_next = 1'b1; st_next = S_NOCARRY; end
      3'b101: begin st_next = S_CARRY; end
      3'b110: begin nz_next = 1'b1; neg_next = 1'b1; st_next = S_CARRY; end
      3'b111: begin st_next = S_CARRY; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_NOCARRY;
      dig_valid <= 1'b0;
      dig_nz    <= 1'b0;
      dig_neg   <= 1'b0;
    end else begin
      dig_valid <= bit_valid;
      // A CSD number never has two adjacent non-zero digits.
      a_no_adjacent_nonzero : assert (!(bit_valid && !start && dig_valid && dig_nz && nz_next));
      if (bit_valid) begin
        st      <= st_next;
        dig_nz  <= nz_next;
        dig_neg <= neg_next;
      end else if (start) begin
        st <= S_NOCARRY;
      end
    end
  end

  assign carry = st;
endmodule
