// integrator_tb: three passes over a column of N1 = 1024 delays (inverse-FFT
// layout 512 x 2): first (overwrite), middle (accumulate) and last (envelope
// to the decision port). Each pass reads fresh random work words. Checks the
// accumulator after the first two passes and every envelope
// floor(sqrt(sum of (re^2+im^2)>>4)) with its column and delay, all computed
// here; and that the last pass writes nothing to the accumulator.
module integrator_tb;
  import gnss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, first, last, busy, done;
  logic [MEM_AW-1:0] work_base, acc_base, r2;
  logic [LOGK_W-1:0] n1_log;
  bus_req_t m_req [1];
  bus_rsp_t m_rsp [1];
  logic sq_valid, sq_rsp_valid, det_valid;
  logic [31:0] sq_data;
  logic [15:0] sq_rsp_root, det_value;
  logic [MEM_AW-1:0] det_r2, det_tau;
  logic ram_en, ram_we, rom_en;
  logic [MEM_AW-1:0] ram_addr, rom_addr;
  logic [31:0] ram_wdata, ram_rdata;

  integrator dut (.clk, .rst_n, .start, .work_base, .acc_base, .n1_log, .r2, .first, .last,
                  .busy, .done, .bus_req(m_req[0]), .bus_rsp(m_rsp[0]),
                  .sq_valid, .sq_data, .sq_rsp_valid, .sq_rsp_root,
                  .det_valid, .det_value, .det_r2, .det_tau);
  sqrt_unit u_sqrt (.clk, .rst_n, .in_valid(sq_valid), .in_data(sq_data),
                    .out_valid(sq_rsp_valid), .out_root(sq_rsp_root));
  acq_bus #(.NM(1)) u_bus (.clk, .rst_n, .m_req, .m_rsp, .ram_en, .ram_we, .ram_addr,
                           .ram_wdata, .ram_rdata, .rom_en, .rom_addr, .rom_rdata(32'd0));
  sp_ram u_ram (.clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata));

  int checks = 0, failures = 0, n_det = 0;
  longint acc [1024];
  longint lastacc [1024];
  longint prevacc [1024];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint isqrt(input longint x);
    longint r;
    r = longint'($sqrt(real'(x)));
    while (r * r > x) r--;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  always @(posedge clk) if (det_valid) begin
    checks++;
    n_det++;
    if (det_r2 != 18'd6 || longint'(det_value) != isqrt(lastacc[det_tau])) begin
      failures++;
      if (failures < 10) $display("FAIL det tau %0d: %0d expected %0d", det_tau, det_value, isqrt(lastacc[det_tau]));
    end
  end

  initial begin
    start = 0; first = 0; last = 0; work_base = 1000; acc_base = 4000; r2 = 6; n1_log = 10;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      for (int tau = 0; tau < 1024; tau++) prevacc[tau] = acc[tau];
      for (int tau = 0; tau < 1024; tau++) begin
        int amp, a, b, off;
        longint e;
        amp = (tau == 77) ? 30000 : 2000;
        a = int'($urandom % (2 * amp + 1)) - amp;
        b = int'($urandom % (2 * amp + 1)) - amp;
        off = (tau % 512) * 2 + tau / 512;
        u_ram.mem[1000 + off] = {16'(a), 16'(b)};
        e = (longint'(a) * a + longint'(b) * b) >>> 4;
        acc[tau] = (p == 0) ? e : acc[tau] + e;
        if (acc[tau] > 64'hFFFF_FFFF) acc[tau] = 64'hFFFF_FFFF;
        lastacc[tau] = acc[tau];
      end
      @(negedge clk);
      first = (p == 0); last = (p == 2); start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      if (p < 2) begin
        for (int tau = 0; tau < 1024; tau++) begin
          checks++;
          if (longint'(u_ram.mem[4000 + tau]) != acc[tau]) begin
            failures++;
            if (failures < 10) $display("FAIL acc pass %0d tau %0d: %0d expected %0d", p, tau, u_ram.mem[4000 + tau], acc[tau]);
          end
        end
      end else begin
        for (int tau = 0; tau < 1024; tau++) begin
          checks++;
          if (longint'(u_ram.mem[4000 + tau]) != prevacc[tau]) failures++;
        end
      end
    end
    @(negedge clk);
    checks++;
    if (n_det != 1024) begin failures++; $display("FAIL: %0d envelopes", n_det); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
