// fir_data_ram: sample memory of the corrector FIR filter.
//
// DEPTH words of W bits, one write port and two independent asynchronous read
// ports, so the filter can fetch the two samples that share a coefficient of a
// symmetric impulse response in the same clock (the registers that follow
// the reads belong to the pre-adder in fir_mac). Written as an array; a
// synthesiser maps it to distributed RAM or registers.
//
// Timing: a write takes effect at the clock edge; reads are combinational and
// see the new value from the next clock on. No reset: the filter ignores
// locations it has not written since reset (see corrector_fir).
module fir_data_ram #(
  parameter int W     = 16,
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic signed [W-1:0]      wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr_a,
  output logic signed [W-1:0]      rdata_a,
  input  logic [$clog2(DEPTH)-1:0] raddr_b,
  output logic signed [W-1:0]      rdata_b
);
  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
endmodule
