// acq_bus_tb: three masters issue random reads and writes to the RAM and
// reads from the ROM of small memories. Checks: the highest-priority
// requesting master is granted each cycle and only one; every read returns
// the model's data to the right master one cycle after its grant; ROM
// writes are ignored; and contention (a master waiting) occurs.
module acq_bus_tb;
  import gnss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t m_req [3];
  bus_rsp_t m_rsp [3];
  logic ram_en, ram_we, rom_en;
  logic [MEM_AW-1:0] ram_addr, rom_addr;
  logic [31:0] ram_wdata, ram_rdata, rom_rdata;

  acq_bus #(.NM(3)) dut (.*);
  sp_ram u_ram (.clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata));
  logic rom_ld;
  logic [MEM_AW-1:0] rom_ld_addr;
  logic [31:0] rom_ld_data;
  replica_rom u_rom (.clk, .ld_we(rom_ld), .ld_addr(rom_ld_addr), .ld_data(rom_ld_data),
                     .rd_en(rom_en), .rd_addr(rom_addr), .rd_data(rom_rdata));

  int checks = 0, failures = 0, n_wait = 0;
  logic [31:0] ram_m [16], rom_m [16];
  logic        pend [3];
  logic [31:0] pexp [3];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++) begin m_req[i] = '0; pend[i] = 0; pexp[i] = 0; end
    rom_ld = 0; rom_ld_addr = 0; rom_ld_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      rom_ld = 1; rom_ld_addr = MEM_AW'(i); rom_ld_data = $urandom; rom_m[i] = rom_ld_data;
    end
    // Initialise the RAM words used.
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      rom_ld = 0;
      m_req[0] = '{req: 1'b1, we: 1'b1, addr: BUS_AW'(i), wdata: 32'(i * 77)};
      ram_m[i] = 32'(i * 77);
    end
    @(negedge clk);
    m_req[0] = '0;
    for (int c = 0; c < 4000; c++) begin
      // New requests for masters that are idle or were granted.
      for (int i = 0; i < 3; i++) begin
        if (!m_req[i].req || m_rsp[i].gnt) begin
          m_req[i] = '0;
          if ($urandom % 2) begin
            m_req[i].req   = 1'b1;
            m_req[i].we    = ($urandom % 3) == 0;
            m_req[i].addr  = BUS_AW'($urandom % 16) | (($urandom % 3 == 0) ? (BUS_AW'(1) << MEM_AW) : '0);
            m_req[i].wdata = $urandom;
          end
        end
      end
      #1;
      // Grant check (combinational).
      begin
        int exp_g;
        exp_g = -1;
        for (int i = 2; i >= 0; i--) if (m_req[i].req) exp_g = i;
        for (int i = 0; i < 3; i++) begin
          checks++;
          if (m_rsp[i].gnt != (exp_g == i)) begin
            failures++;
            if (failures < 10) $display("FAIL grant cycle %0d master %0d", c, i);
          end
          if (m_req[i].req && !m_rsp[i].gnt) n_wait++;
        end
      end
      @(posedge clk);
      for (int i = 0; i < 3; i++) begin
        pend[i] = 0;
        if (m_req[i].req && m_rsp[i].gnt) begin
          logic rom;
          int a;
          rom = m_req[i].addr[MEM_AW];
          a = int'(m_req[i].addr[3:0]);
          if (m_req[i].we) begin
            if (!rom) ram_m[a] = m_req[i].wdata;
          end else begin
            pend[i] = 1;
            pexp[i] = rom ? rom_m[a] : ram_m[a];
          end
        end
      end
      #1;
      // Read data of this edge's grant.
      for (int i = 0; i < 3; i++) begin
        if (pend[i]) begin
          checks++;
          if (!m_rsp[i].rvalid || m_rsp[i].rdata != pexp[i]) begin
            failures++;
            if (failures < 10) $display("FAIL read master %0d got %h exp %h", i, m_rsp[i].rdata, pexp[i]);
          end
        end else if (m_rsp[i].rvalid) begin
          failures++;
          $display("FAIL spurious rvalid master %0d", i);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_wait == 0) failures++;
    $display("contention cycles: %0d", n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
