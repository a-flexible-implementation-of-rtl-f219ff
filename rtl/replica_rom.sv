// replica_rom: memory of the local replica spectra.
//
// Holds, for each satellite, the N1-point spectrum of one period of its
// spreading code (two spectra per satellite for Galileo: sub-carrier in phase
// and in quadrature), as 16+16 bit complex words. The acquisition engine only
// reads it, through the bus port (synchronous read, data one cycle after
// rd_en). The contents come from outside the design: a load port writes them,
// standing in for the programming of the external ROM. Size 2^AW words is
// this design's choice (the document gives none): 2^18 words hold 64 GPS
// replicas of 4096 bins, or 4 Galileo satellites with two 32768-bin replicas.
module replica_rom #(
  parameter int unsigned AW     = gnss_pkg::MEM_AW,
  parameter int unsigned DATA_W = gnss_pkg::DATA_W
) (
  input  logic              clk,
  // load port
  input  logic              ld_we,
  input  logic [AW-1:0]     ld_addr,
  input  logic [DATA_W-1:0] ld_data,
  // read port
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rd_data
);
  logic [DATA_W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
