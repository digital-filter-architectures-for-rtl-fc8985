// decim_arch1: two-stage decimation filter, overall decimation 32.
//
// A 1-bit sigma-delta stream at the input rate (64 MHz in the reference
// frequency plan) is mapped to +/-LEVEL words (sd_input_map), filtered and
// decimated by 16 in the fifth-order CIC high order decimation filter
// (hdf_cic, 4 MHz out, 16-bit words), then shaped and decimated by 2 in the
// single-MAC corrector FIR (corrector_fir, 2 MHz out, 24-bit DATA_OUT).
//
// Control: int_en/comb_en are the CIC's integrator and comb enables (all ones
// for normal operation, zero to flush), esym selects the symmetric-coefficient
// mode of the corrector, and the coefficient RAM is loaded over the control
// bus. All logic runs on one clock; the input rate and the decimated rates are
// clock enables (sd_valid, and the internal strobes), so the corrector has 32
// clocks per output when sd_valid is high every clock.
module decim_arch1 #(
  parameter int IN_W      = 14,
  parameter int LEVEL     = 4182,
  parameter int HDF_W     = 16,
  parameter int CIC_N     = 5,
  parameter int CIC_R     = 16,
  parameter int COEF_W    = 20,
  parameter int NTAPS     = 32,
  parameter int OUT_W     = 24
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sd_valid,
  input  logic                     sd_bit,
  input  logic [CIC_N:1]           int_en,
  input  logic [CIC_N:1]           comb_en,
  input  logic                     esym,
  input  logic                     coef_we,
  input  logic [$clog2(NTAPS)-1:0] coef_addr,
  input  logic signed [COEF_W-1:0] coef_wdata,
  output logic signed [COEF_W-1:0] coef_rdata,
  output logic                     hdf_valid,
  output logic signed [HDF_W-1:0]  hdf_data,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  data_out,
  output logic                     clipped,
  output logic                     overrun
);
  logic                   map_valid;
  logic signed [IN_W-1:0] map_data;
  logic                   dec_strobe;

  sd_input_map #(.W(IN_W), .LEVEL(LEVEL)) u_map (
    .clk(clk), .rst_n(rst_n), .in_valid(sd_valid), .in_bit(sd_bit),
    .out_valid(map_valid), .out_data(map_data)
  );

  hdf_cic #(.IN_W(IN_W), .OUT_W(HDF_W), .N(CIC_N), .R(CIC_R), .M(1)) u_hdf (
    .clk(clk), .rst_n(rst_n), .in_valid(map_valid), .in_data(map_data),
    .int_en(int_en), .comb_en(comb_en), .dec_strobe(dec_strobe),
    .out_valid(hdf_valid), .out_data(hdf_data)
  );

  corrector_fir #(.DATA_W(HDF_W), .COEF_W(COEF_W), .NTAPS(NTAPS), .OUT_W(OUT_W)) u_fir (
    .clk(clk), .rst_n(rst_n), .in_valid(hdf_valid), .in_data(hdf_data), .esym(esym),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_wdata(coef_wdata), .coef_rdata(coef_rdata),
    .out_valid(out_valid), .data_out(data_out), .clipped(clipped), .overrun(overrun)
  );

  // dec_strobe is the CIC's internal decimated clock enable; it is not needed
  // outside the filter.
  logic unused_dec;
  assign unused_dec = dec_strobe;
endmodule
