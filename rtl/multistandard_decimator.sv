// multistandard_decimator: the two decimation filter architectures for a
// multi-standard receiver, side by side on one clock.
//
//   Architecture I  (decim_arch1): CIC /16 + single-MAC corrector FIR /2,
//                   overall /32, 24-bit output.
//   Architecture II (decim_chain_arch2): shared CIC /2, then a /8 path of two
//                   half-band filters and a /32 path of two more CICs and two
//                   half-band filters; CSD coefficient multipliers; 16-bit
//                   outputs.
// Each architecture has its own sigma-delta input and its own outputs; they
// share only clock and reset. Ports are those of the two sub-blocks with an
// a1_ or a2_ prefix.
// Beside them sits the serial binary-to-CSD converter (csd_ ports), the
// hardware form of the conversion table from which the half-band
// coefficients' CSD digits are derived; it can convert coefficients at run
// time, e.g. for a host preparing a new coefficient set.
module multistandard_decimator (
  input  logic                clk,
  input  logic                rst_n,
  // Architecture I
  input  logic                a1_sd_valid,
  input  logic                a1_sd_bit,
  input  logic [5:1]          a1_int_en,
  input  logic [5:1]          a1_comb_en,
  input  logic                a1_esym,
  input  logic                a1_coef_we,
  input  logic [4:0]          a1_coef_addr,
  input  logic signed [19:0]  a1_coef_wdata,
  output logic signed [19:0]  a1_coef_rdata,
  output logic                a1_hdf_valid,
  output logic signed [15:0]  a1_hdf_data,
  output logic                a1_out_valid,
  output logic signed [23:0]  a1_data_out,
  output logic                a1_clipped,
  output logic                a1_overrun,
  // Architecture II
  input  logic                a2_sd_valid,
  input  logic                a2_sd_bit,
  input  logic [1:0]          a2_path_en,
  output logic                a2_cic1_valid,
  output logic signed [15:0]  a2_cic1_data,
  output logic                a2_out8_valid,
  output logic signed [15:0]  a2_out8_data,
  output logic                a2_out32_valid,
  output logic signed [15:0]  a2_out32_data,
  // CSD converter
  input  logic                csd_start,
  input  logic                csd_bit_valid,
  input  logic                csd_b_i,
  input  logic                csd_b_i1,
  output logic                csd_dig_valid,
  output logic                csd_dig_nz,
  output logic                csd_dig_neg
);
  decim_arch1 u_arch1 (
    .clk(clk), .rst_n(rst_n), .sd_valid(a1_sd_valid), .sd_bit(a1_sd_bit),
    .int_en(a1_int_en), .comb_en(a1_comb_en), .esym(a1_esym),
    .coef_we(a1_coef_we), .coef_addr(a1_coef_addr), .coef_wdata(a1_coef_wdata),
    .coef_rdata(a1_coef_rdata), .hdf_valid(a1_hdf_valid), .hdf_data(a1_hdf_data),
    .out_valid(a1_out_valid), .data_out(a1_data_out), .clipped(a1_clipped),
    .overrun(a1_overrun)
  );

  decim_chain_arch2 u_arch2 (
    .clk(clk), .rst_n(rst_n), .sd_valid(a2_sd_valid), .sd_bit(a2_sd_bit),
    .path_en(a2_path_en), .cic1_valid(a2_cic1_valid), .cic1_data(a2_cic1_data),
    .out8_valid(a2_out8_valid), .out8_data(a2_out8_data),
    .out32_valid(a2_out32_valid), .out32_data(a2_out32_data)
  );

  logic csd_carry_unused;

  csd_converter u_csd (
    .clk(clk), .rst_n(rst_n), .start(csd_start), .bit_valid(csd_bit_valid),
    .b_i(csd_b_i), .b_i1(csd_b_i1), .dig_valid(csd_dig_valid), .dig_nz(csd_dig_nz),
    .dig_neg(csd_dig_neg), .carry(csd_carry_unused)
  );
endmodule
