// decim_pkg: constants and elaboration-time functions shared by the decimation
// filter blocks.
//
// to_csd() converts a two's-complement constant into canonic signed digit
// (CSD) form by scanning it from the least significant bit upwards with the
// two-state carry machine of the CSD conversion table (state = carry):
//   state 0: b(i+1)b(i) = 00 -> 0,0   01 -> +1,0   10 -> 0,0   11 -> -1,1
//   state 1: b(i+1)b(i) = 00 -> +1,0  01 -> 0,1    10 -> -1,1  11 -> 0,1
// (output digit, next state). A carry out of the top position is dropped,
// which is exact for two's-complement arithmetic modulo 2**CSD_MAXW.
// The same machine is built as hardware, one bit per clock, in csd_converter.
//
// hb_tap() holds the half-band coefficients. They are a Hamming-windowed sinc
// with cut-off at a quarter of the input rate, w(n) = 0.54 - 0.46*cos(2*pi*(n+1)/(L+1))
// for tap n of L taps, normalised to unity DC gain and rounded to 8-bit signed
// numbers with 7 fraction bits (unity = 128), with the two largest side taps
// nudged so that every filter sums to exactly 128. The even taps other than
// the centre are zero, as in every half-band filter, so an order-L filter has
// only ceil(L/4)+1 distinct non-zero values.
package decim_pkg;

  localparam int unsigned CSD_MAXW = 32;

  // One CSD number: pos[i] set means digit +1 at weight 2**i, neg[i] means -1.
  typedef struct packed {
    logic [CSD_MAXW-1:0] pos;
    logic [CSD_MAXW-1:0] neg;
  } csd_t;

  // Half-band coefficient format.
  localparam int unsigned HB_COEF_W    = 8;
  localparam int unsigned HB_COEF_FRAC = 7;

  function automatic csd_t to_csd(input int value);
    csd_t r;
    logic st, bi, bi1;
    logic [CSD_MAXW-1:0] v;
    v = CSD_MAXW'(value);
    r = '0;
    st = 1'b0;
    for (int i = 0; i < CSD_MAXW; i++) begin
      bi  = v[i];
      bi1 = (i + 1 < CSD_MAXW) ? v[i+1] : v[CSD_MAXW-1];
      case ({st, bi1, bi})
        3'b000: begin st = 1'b0; end
        3'b001: begin r.pos[i] = 1'b1; st = 1'b0; end
        3'b010: begin st = 1'b0; end
        3'b011: begin r.neg[i] = 1'b1; st = 1'b1; end
        3'b100: begin r.pos[i] = 1'b1; st = 1'b0; end
        3'b101: begin st = 1'b1; end
        3'b110: begin r.neg[i] = 1'b1; st = 1'b1; end
        default: begin st = 1'b1; end
      endcase
    end
    return r;
  endfunction

  // Number of non-zero digits of a CSD number (adders needed is this minus one).
  function automatic int csd_weight(input csd_t c);
    int n;
    n = 0;
    for (int i = 0; i < CSD_MAXW; i++) n += int'(c.pos[i]) + int'(c.neg[i]);
    return n;
  endfunction

  // Coefficient of tap n (0..order) of the half-band filter of the given
  // order. Orders 10 and 14 are provided; any other order returns 0.
  function automatic int hb_tap(input int order, input int n);
    int c, k;
    c = order / 2;
    k = (n > c) ? n - c : c - n;  // distance from the centre tap
    if (order == 10) begin
      case (k)
        0: return 64;
        1: return 38;
        3: return -7;
        5: return 1;
        default: return 0;
      endcase
    end else if (order == 14) begin
      case (k)
        0: return 64;
        1: return 40;
        3: return -10;
        5: return 3;
        7: return -1;
        default: return 0;
      endcase
    end
    return 0;
  endfunction

endpackage
