// sp_ram: single-port word memory with synchronous read.
//
// 2^AW words of DATA_W bits. A write stores wdata at addr on the clock edge;
// a read returns mem[addr] on rdata in the next cycle. It models the external
// SDRAM that holds the captured samples, their spectra, the correlation work
// buffer and the non-coherent accumulator. The document gives no size; the
// default 2^18 words is the largest region set of Table 1 (Galileo GEO:
// 7 blocks of 32768 samples plus two buffers of 16384). Contents are not
// reset.
module sp_ram #(
  parameter int unsigned AW     = gnss_pkg::MEM_AW,
  parameter int unsigned DATA_W = gnss_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
