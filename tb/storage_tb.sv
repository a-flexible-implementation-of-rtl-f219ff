// storage_tb: capture through the shared bus into RAM.
// Run 1: 300 samples with random gaps; every stored word must be the
// sample, sign-extended and scaled by 2^8, at base + index; no overflow.
// Run 2: another master with higher priority holds the bus while samples
// arrive every cycle; the FIFO fills, overflow must be set, the run must
// still end, and the words stored before the stall must be right.
module storage_tb;
  import gnss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, s_valid, busy, done, overflow;
  logic [MEM_AW-1:0] base;
  logic [MEM_AW:0] count;
  logic signed [3:0] s_i, s_q;
  bus_req_t m_req [2];
  bus_rsp_t m_rsp [2];
  logic ram_en, ram_we, rom_en;
  logic [MEM_AW-1:0] ram_addr, rom_addr;
  logic [31:0] ram_wdata, ram_rdata;

  storage dut (.clk, .rst_n, .start, .base, .count, .s_valid, .s_i, .s_q, .busy, .done,
               .overflow, .bus_req(m_req[1]), .bus_rsp(m_rsp[1]));
  acq_bus #(.NM(2)) u_bus (.clk, .rst_n, .m_req, .m_rsp, .ram_en, .ram_we, .ram_addr,
                           .ram_wdata, .ram_rdata, .rom_en, .rom_addr, .rom_rdata(32'd0));
  sp_ram u_ram (.clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata));

  int checks = 0, failures = 0;
  logic [7:0] smp [300];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word(input int a, input logic [7:0] sv);
    logic [31:0] w, e;
    w = u_ram.mem[a];
    e = {16'($signed(sv[7:4])) * 16'sd256, 16'($signed(sv[3:0])) * 16'sd256};
    checks++;
    if (w != e) begin
      failures++;
      if (failures < 10) $display("FAIL addr %0d: %h expected %h", a, w, e);
    end
  endtask

  initial begin
    start = 0; s_valid = 0; s_i = 0; s_q = 0; base = 0; count = 0;
    m_req[0] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Run 1.
    @(negedge clk);
    base = 18'd1000; count = 19'd300; start = 1;
    @(negedge clk);
    start = 0;
    for (int n = 0; n < 300; ) begin
      s_valid = ($urandom % 3) != 0;
      smp[n] = 8'($urandom);
      {s_i, s_q} = smp[n];
      if (s_valid) n++;
      @(negedge clk);
    end
    s_valid = 0;
    while (busy) @(negedge clk);
    for (int n = 0; n < 300; n++) check_word(1000 + n, smp[n]);
    checks++;
    if (overflow) begin failures++; $display("FAIL: unexpected overflow"); end
    // Run 2: bus held by master 0 for 40 cycles from the 5th sample on.
    @(negedge clk);
    base = 18'd5000; count = 19'd100; start = 1;
    @(negedge clk);
    start = 0;
    for (int n = 0; n < 100; n++) begin
      s_valid = 1;
      smp[n] = 8'($urandom);
      {s_i, s_q} = smp[n];
      m_req[0] = (n >= 5 && n < 45) ? '{req: 1'b1, we: 1'b1, addr: BUS_AW'(20), wdata: 32'd0} : '0;
      @(negedge clk);
    end
    s_valid = 0;
    m_req[0] = '0;
    for (int k = 0; k < 200 && busy; k++) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL: run 2 did not end"); end
    checks++;
    if (!overflow) begin failures++; $display("FAIL: overflow not flagged"); end
    for (int n = 0; n < 5; n++) check_word(5000 + n, smp[n]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
