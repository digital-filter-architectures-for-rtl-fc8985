// fir_mac: pre-adder and multiply-accumulate section of the corrector FIR.
//
// Pipeline (one term per clock):
//   stage 1  two data registers take the samples a and b read from the data
//            RAM; b is forced to 0 unless esym (symmetric mode) is set
//   stage 2  pre-adder a + b, registered at DATA_W+1 = 17 bits
//   stage 3  multiplier input registers: the pre-adder sum and the
//            coefficient (COEF_W = 20 bits, presented on 'coef' in this clock,
//            i.e. two clocks after its data pair)
//   stage 4  17 x 20 signed multiplier, product register of 37 bits
//   stage 5  43-bit accumulator: loads the product on a term marked 'first',
//            adds it otherwise
// When the term marked 'last' is accumulated, the accumulator value (without
// its 3 least significant bits) is loaded into the 40-bit output register and
// out_valid pulses one clock later (the FIR_CK output clock).
// The 'first'/'last' marks travel down the pipeline with their term, so a new
// output can start the clock after the previous one's last term.
//
// Interface: in_valid/first/last/a/b/esym in stage 0; coef two clocks later.
// out_valid is high for one clock, following the 5th rising edge after the
// clock in which the last term is presented.
module fir_mac #(
  parameter int DATA_W = 16,
  parameter int COEF_W = 20,
  parameter int ACC_W  = 43,
  parameter int OREG_W = 40
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      first,
  input  logic                      last,
  input  logic                      esym,
  input  logic signed [DATA_W-1:0]  a,
  input  logic signed [DATA_W-1:0]  b,
  input  logic signed [COEF_W-1:0]  coef,
  output logic                      out_valid,
  output logic signed [OREG_W-1:0]  out_data
);
  localparam int PRE_W  = DATA_W + 1;
  localparam int PROD_W = PRE_W + COEF_W;

  typedef struct packed {
    logic v;
    logic first;
    logic last;
  } tag_t;

  tag_t                    t1, t2, t3, t4;
  logic signed [DATA_W-1:0] a1, b1;
  logic signed [PRE_W-1:0]  pre2, pre3;
  logic signed [COEF_W-1:0] c3;
  logic signed [PROD_W-1:0] prod4;
  logic signed [ACC_W-1:0]  acc, acc_next;

  assign acc_next = t4.first ? ACC_W'(prod4) : acc + ACC_W'(prod4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1 <= '0; t2 <= '0; t3 <= '0; t4 <= '0;
      a1 <= '0; b1 <= '0; pre2 <= '0; pre3 <= '0; c3 <= '0; prod4 <= '0;
      acc <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      // stage 1: data registers
      t1 <= '{v: in_valid, first: first, last: last};
      a1 <= a;
      b1 <= esym ? b : '0;
      // stage 2: pre-adder
      t2   <= t1;
      pre2 <= PRE_W'(a1) + PRE_W'(b1);
      // stage 3: multiplier operand registers
      t3   <= t2;
      pre3 <= pre2;
      c3   <= coef;
      // stage 4: product register
      t4    <= t3;
      prod4 <= PROD_W'(pre3) * PROD_W'(c3);
      // stage 5: accumulator and output register
      out_valid <= 1'b0;
      if (t4.v) begin
        acc <= acc_next;
        if (t4.last) begin
          out_data  <= acc_next[ACC_W-1 -: OREG_W];
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
