// correlator_tb: one column correlation with N1 = 256, N2 = 4 (K = 1024, a
// two-level layout with a 512-point core), for two shifts s. The spectrum X1
// and the replica are random words in RAM and ROM; every Z(r1) written must
// equal X1(r2 + N2*((r1+s) mod N1)) * conj(C(r1)) >> 15, rounded, computed
// here with integer arithmetic. Also checks 5 cycles per point.
module correlator_tb;
  import gnss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [MEM_AW-1:0] x_base, work_base, r2;
  logic [BUS_AW-1:0] rep_addr;
  logic [LOGK_W-1:0] n1_log, n2_log;
  logic signed [15:0] s;
  bus_req_t m_req [1];
  bus_rsp_t m_rsp [1];
  logic ram_en, ram_we, rom_en;
  logic [MEM_AW-1:0] ram_addr, rom_addr;
  logic [31:0] ram_wdata, ram_rdata, rom_rdata;

  correlator dut (.clk, .rst_n, .start, .x_base, .rep_addr, .work_base, .n1_log, .n2_log,
                  .r2, .s, .busy, .done, .bus_req(m_req[0]), .bus_rsp(m_rsp[0]));
  acq_bus #(.NM(1)) u_bus (.clk, .rst_n, .m_req, .m_rsp, .ram_en, .ram_we, .ram_addr,
                           .ram_wdata, .ram_rdata, .rom_en, .rom_addr, .rom_rdata);
  sp_ram u_ram (.clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata));
  replica_rom u_rom (.clk, .ld_we(1'b0), .ld_addr('0), .ld_data('0), .rd_en(rom_en),
                     .rd_addr(rom_addr), .rd_data(rom_rdata));

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    start = 0; x_base = 2048; work_base = 8192; r2 = 0; rep_addr = 0; n1_log = 8; n2_log = 2; s = 0;
    for (int i = 0; i < 1024; i++) u_ram.mem[2048 + i] = $urandom;
    for (int i = 0; i < 256; i++) u_rom.mem[512 + i] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      r2 = (run == 0) ? 18'd3 : 18'd1;
      s  = (run == 0) ? 16'sd5 : -16'sd70;
      rep_addr = (BUS_AW'(1) << MEM_AW) | BUS_AW'(512);
      start = 1;
      t0 = $time;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (($time - t0) / 10 > 5 * 256 + 4) begin
        failures++;
        $display("FAIL: %0d cycles for 256 points", ($time - t0) / 10);
      end
      for (int r1 = 0; r1 < 256; r1++) begin
        int b, off;
        longint xr, xi, cr, ci, zr, zi;
        logic [31:0] xw, cw, zw;
        b = int'(r2) + 4 * (((r1 + int'(s)) % 256 + 256) % 256);
        off = (b % 512) * 2 + b / 512;
        xw = u_ram.mem[2048 + off];
        cw = u_rom.mem[512 + r1];
        xr = longint'($signed(xw[31:16])); xi = longint'($signed(xw[15:0]));
        cr = longint'($signed(cw[31:16])); ci = longint'($signed(cw[15:0]));
        zr = (xr * cr + xi * ci + 16384) >>> 15;
        zi = (xi * cr - xr * ci + 16384) >>> 15;
        if (zr > 32767) zr = 32767; if (zr < -32768) zr = -32768;
        if (zi > 32767) zi = 32767; if (zi < -32768) zi = -32768;
        zw = u_ram.mem[8192 + r1];
        checks++;
        if ($signed(zw[31:16]) != 16'(zr) || $signed(zw[15:0]) != 16'(zi)) begin
          failures++;
          if (failures < 10) $display("FAIL r1 %0d: %h expected %0d %0d", r1, zw, zr, zi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
