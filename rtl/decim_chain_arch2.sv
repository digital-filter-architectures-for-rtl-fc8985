// decim_chain_arch2: cascaded multistage decimation chain for two standards,
// decimation by 8 and by 32, sharing the first comb stage.
//
//   sd bits -> map -> CIC5 /2 -+-> HB10 /2 -> HB14 /2 ---------------------> out8  (3 stages)
//                              +-> CIC5 /2 -> CIC5 /2 -> HB10 /2 -> HB14 /2 -> out32 (5 stages)
//
// Every stage decimates by 2: multiplier-less fifth-order CIC filters
// (cic_decimator) first, then two half-band FIR filters with CSD coefficient
// multipliers (halfband_decimator), which remove the in-band noise and the
// passband droop the combs leave. With a 64 MHz input the outputs run at
// 8 MHz (3-stage) and 2 MHz (5-stage). All stages carry WORD_W-bit words;
// the first CIC also scales the 14-bit mapped input up to WORD_W bits.
//
// path_en[0] enables the /8 path and path_en[1] the /32 path; a disabled path
// receives no samples, so its registers do not toggle. Single clock; sample
// rates are clock enables. Latency: 2 clocks per CIC stage and per half-band
// stage after the sample that completes a decimation phase, plus 1 for the
// input map.
module decim_chain_arch2 #(
  parameter int IN_W     = 14,
  parameter int LEVEL    = 4182,
  parameter int WORD_W   = 16,
  parameter int CIC_N    = 5,
  parameter int HB1_ORD  = 10,
  parameter int HB2_ORD  = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sd_valid,
  input  logic                     sd_bit,
  input  logic [1:0]               path_en,
  output logic                     cic1_valid,
  output logic signed [WORD_W-1:0] cic1_data,
  output logic                     out8_valid,
  output logic signed [WORD_W-1:0] out8_data,
  output logic                     out32_valid,
  output logic signed [WORD_W-1:0] out32_data
);
  logic                   map_valid;
  logic signed [IN_W-1:0] map_data;

  sd_input_map #(.W(IN_W), .LEVEL(LEVEL)) u_map (
    .clk(clk), .rst_n(rst_n), .in_valid(sd_valid), .in_bit(sd_bit),
    .out_valid(map_valid), .out_data(map_data)
  );

  // shared first comb stage; output top WORD_W bits of IN_W+5 -> gain 4
  cic_decimator #(.IN_W(IN_W), .OUT_W(WORD_W), .N(CIC_N), .R(2), .M(1)) u_cic1 (
    .clk(clk), .rst_n(rst_n), .in_valid(map_valid), .in_data(map_data),
    .out_valid(cic1_valid), .out_data(cic1_data)
  );

  // ---- decimate-by-8 path ----
  logic                     a_hb1_valid;
  logic signed [WORD_W-1:0] a_hb1_data;

  halfband_decimator #(.IN_W(WORD_W), .OUT_W(WORD_W), .ORDER(HB1_ORD)) u_a_hb1 (
    .clk(clk), .rst_n(rst_n), .in_valid(cic1_valid && path_en[0]), .in_data(cic1_data),
    .out_valid(a_hb1_valid), .out_data(a_hb1_data)
  );

  halfband_decimator #(.IN_W(WORD_W), .OUT_W(WORD_W), .ORDER(HB2_ORD)) u_a_hb2 (
    .clk(clk), .rst_n(rst_n), .in_valid(a_hb1_valid), .in_data(a_hb1_data),
    .out_valid(out8_valid), .out_data(out8_data)
  );

  // ---- decimate-by-32 path ----
  logic                     b_cic2_valid, b_cic3_valid, b_hb1_valid;
  logic signed [WORD_W-1:0] b_cic2_data, b_cic3_data, b_hb1_data;

  cic_decimator #(.IN_W(WORD_W), .OUT_W(WORD_W), .N(CIC_N), .R(2), .M(1)) u_b_cic2 (
    .clk(clk), .rst_n(rst_n), .in_valid(cic1_valid && path_en[1]), .in_data(cic1_data),
    .out_valid(b_cic2_valid), .out_data(b_cic2_data)
  );

  cic_decimator #(.IN_W(WORD_W), .OUT_W(WORD_W), .N(CIC_N), .R(2), .M(1)) u_b_cic3 (
    .clk(clk), .rst_n(rst_n), .in_valid(b_cic2_valid), .in_data(b_cic2_data),
    .out_valid(b_cic3_valid), .out_data(b_cic3_data)
  );

  halfband_decimator #(.IN_W(WORD_W), .OUT_W(WORD_W), .ORDER(HB1_ORD)) u_b_hb1 (
    .clk(clk), .rst_n(rst_n), .in_valid(b_cic3_valid), .in_data(b_cic3_data),
    .out_valid(b_hb1_valid), .out_data(b_hb1_data)
  );

  halfband_decimator #(.IN_W(WORD_W), .OUT_W(WORD_W), .ORDER(HB2_ORD)) u_b_hb2 (
    .clk(clk), .rst_n(rst_n), .in_valid(b_hb1_valid), .in_data(b_hb1_data),
    .out_valid(out32_valid), .out_data(out32_data)
  );
endmodule
