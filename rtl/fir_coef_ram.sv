// fir_coef_ram: coefficient memory of the corrector FIR filter.
//
// DEPTH words of W bits, written over the control bus (we/waddr/wdata) and
// read asynchronously by the MAC sequencer; a second read port lets the
// control side read coefficients back. Coefficients are signed with the
// binary point chosen by the user (corrector_fir documents its scaling).
// Cleared to zero at reset so that an unloaded filter outputs zeros.
module fir_coef_ram #(
  parameter int W     = 20,
  parameter int DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic signed [W-1:0]      wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic signed [W-1:0]      rdata,
  input  logic [$clog2(DEPTH)-1:0] bus_raddr,
  output logic signed [W-1:0]      bus_rdata
);
  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata     = mem[raddr];
  assign bus_rdata = mem[bus_raddr];
endmodule
