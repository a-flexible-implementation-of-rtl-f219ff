// acq_bus: shared bus joining the processing modules to the RAM and the
// replica ROM.
//
// NM masters each drive a bus_req_t. A fixed-priority arbiter (master 0
// highest) grants one request per cycle; the granted master sees gnt in the
// same cycle and must hold its request until then. The address's top bit
// selects the ROM (read only; writes to it are dropped), otherwise the RAM.
// Read data returns on rdata with rvalid to the granting master one cycle
// after the grant, matching the synchronous memories. The document places
// its modules on an OPB bus with one interface each; this single-cycle
// arbitrated bus is a simple stand-in with the same role, its protocol is
// this design's.
module acq_bus #(
  parameter int unsigned NM = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  gnss_pkg::bus_req_t         m_req [NM],
  output gnss_pkg::bus_rsp_t         m_rsp [NM],
  // RAM port
  output logic                       ram_en,
  output logic                       ram_we,
  output logic [gnss_pkg::MEM_AW-1:0] ram_addr,
  output logic [gnss_pkg::DATA_W-1:0] ram_wdata,
  input  logic [gnss_pkg::DATA_W-1:0] ram_rdata,
  // ROM read port
  output logic                       rom_en,
  output logic [gnss_pkg::MEM_AW-1:0] rom_addr,
  input  logic [gnss_pkg::DATA_W-1:0] rom_rdata
);
  import gnss_pkg::*;

  localparam int unsigned IW = (NM > 1) ? $clog2(NM) : 1;

  logic          any;
  logic [IW-1:0] sel;
  bus_req_t      cur;

  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int i = NM - 1; i >= 0; i--) begin
      if (m_req[i].req) begin
        any = 1'b1;
        sel = IW'(i);
      end
    end
    cur = m_req[sel];
  end

  assign ram_en    = any && !cur.addr[MEM_AW];
  assign ram_we    = cur.we;
  assign ram_addr  = cur.addr[MEM_AW-1:0];
  assign ram_wdata = cur.wdata;
  assign rom_en    = any && cur.addr[MEM_AW] && !cur.we;
  assign rom_addr  = cur.addr[MEM_AW-1:0];

  // Read return path.
  logic          rd_q, rom_q;
  logic [IW-1:0] sel_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= 1'b0;
      rom_q <= 1'b0;
      sel_q <= '0;
    end else begin
      rd_q  <= any && !cur.we;
      rom_q <= cur.addr[MEM_AW];
      sel_q <= sel;
    end
  end

  always_comb begin
    for (int i = 0; i < NM; i++) begin
      m_rsp[i].gnt    = any && (sel == IW'(i));
      m_rsp[i].rvalid = rd_q && (sel_q == IW'(i));
      m_rsp[i].rdata  = rom_q ? rom_rdata : ram_rdata;
    end
  end

  // A master that is waiting must not change its request.
  for (genvar i = 0; i < NM; i++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             (m_req[i].req && !m_rsp[i].gnt) |=>
                             (m_req[i].req && $stable(m_req[i].addr) && $stable(m_req[i].we)))
      else $error("acq_bus: master %0d dropped or changed a pending request", i);
  end
endmodule
