// fft_core_tb: the local FFT core on the shared bus with the trigonometric
// unit, checked against a floating-point DFT.
// Test a: 64 points, contiguous, forward, halving on every stage.
// Test b: 512 points at stride 4, inverse, halving on every other stage,
//         with the phase rotation exp(+j*2*pi*3*k/2048) on write-back.
// Test c: 2 points (the smallest transform), forward, no scaling.
// Each output must be within 6 LSB of the reference; the core must make
// exactly 2*L bus accesses per transform (one read and one write per point).
module fft_core_tb;
  import gnss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, cmd_inverse, cmd_rot_en, done;
  logic [BUS_AW-1:0] cmd_base;
  logic [LOGK_W-1:0] cmd_stride_log, cmd_rot_klog;
  logic [3:0] cmd_len_log;
  logic [8:0] cmd_scale_mask, cmd_rot_n1;
  bus_req_t m_req [1];
  bus_rsp_t m_rsp [1];
  logic tw_req_valid, tw_rsp_valid;
  logic [PH_W-1:0] tw_req_phase;
  logic signed [15:0] tw_rsp_cos, tw_rsp_sin;
  logic ram_en, ram_we, rom_en;
  logic [MEM_AW-1:0] ram_addr, rom_addr;
  logic [31:0] ram_wdata, ram_rdata;

  fft_core dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_base, .cmd_stride_log, .cmd_len_log,
                .cmd_inverse, .cmd_scale_mask, .cmd_rot_en, .cmd_rot_n1, .cmd_rot_klog, .done,
                .bus_req(m_req[0]), .bus_rsp(m_rsp[0]),
                .tw_req_valid, .tw_req_phase, .tw_rsp_valid, .tw_rsp_cos, .tw_rsp_sin);
  trigo u_trigo (.clk, .rst_n, .in_valid(tw_req_valid), .in_phase(tw_req_phase),
                 .out_valid(tw_rsp_valid), .out_cos(tw_rsp_cos), .out_sin(tw_rsp_sin));
  acq_bus #(.NM(1)) u_bus (.clk, .rst_n, .m_req, .m_rsp, .ram_en, .ram_we, .ram_addr,
                           .ram_wdata, .ram_rdata, .rom_en, .rom_addr, .rom_rdata(32'd0));
  sp_ram u_ram (.clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata));

  int checks = 0, failures = 0;
  int n_acc = 0;
  always @(posedge clk) if (m_rsp[0].gnt) n_acc <= n_acc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xr [512], xi [512];

  task automatic run(input int llog, input int base, input int slog, input bit inv,
                     input logic [8:0] mask, input bit rot, input int n1, input int klog, input int amp);
    int L, nsc, acc0;
    real pi2, er, ei, ang, sgn, cr, ci, sc;
    L = 1 << llog;
    pi2 = 2.0 * 3.14159265358979;
    sgn = inv ? 1.0 : -1.0;
    for (int n = 0; n < L; n++) begin
      int a, b;
      a = int'($urandom % (2 * amp + 1)) - amp;
      b = int'($urandom % (2 * amp + 1)) - amp;
      xr[n] = a; xi[n] = b;
      u_ram.mem[base + (n << slog)] = {16'(a), 16'(b)};
    end
    nsc = 0;
    for (int s = 0; s < llog; s++) if (mask[s]) nsc++;
    sc = 1.0 / real'(1 << nsc);
    @(negedge clk);
    cmd_valid = 1; cmd_base = BUS_AW'(base); cmd_stride_log = LOGK_W'(slog); cmd_len_log = 4'(llog);
    cmd_inverse = inv; cmd_scale_mask = mask; cmd_rot_en = rot; cmd_rot_n1 = 9'(n1);
    cmd_rot_klog = LOGK_W'(klog);
    acc0 = n_acc;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) @(negedge clk);
    checks++;
    if (n_acc - acc0 != 2 * L) begin
      failures++;
      $display("FAIL: %0d bus accesses for %0d points", n_acc - acc0, L);
    end
    for (int k = 0; k < L; k++) begin
      logic [31:0] w;
      real gr, gi;
      er = 0.0; ei = 0.0;
      for (int n = 0; n < L; n++) begin
        ang = sgn * pi2 * real'((k * n) % L) / real'(L);
        er += xr[n] * $cos(ang) - xi[n] * $sin(ang);
        ei += xr[n] * $sin(ang) + xi[n] * $cos(ang);
      end
      er *= sc; ei *= sc;
      if (rot) begin
        ang = sgn * pi2 * real'((n1 * k) % (1 << klog)) / real'(1 << klog);
        cr = er * $cos(ang) - ei * $sin(ang);
        ci = er * $sin(ang) + ei * $cos(ang);
        er = cr; ei = ci;
      end
      w = u_ram.mem[base + (k << slog)];
      gr = real'($signed(w[31:16]));
      gi = real'($signed(w[15:0]));
      checks++;
      if (gr - er > 6.0 || er - gr > 6.0 || gi - ei > 6.0 || ei - gi > 6.0) begin
        failures++;
        if (failures < 10) $display("FAIL L=%0d k=%0d: got %f %f expected %f %f", L, k, gr, gi, er, ei);
      end
    end
  endtask

  initial begin
    cmd_valid = 0; cmd_base = 0; cmd_stride_log = 0; cmd_len_log = 0; cmd_inverse = 0;
    cmd_scale_mask = 0; cmd_rot_en = 0; cmd_rot_n1 = 0; cmd_rot_klog = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(6, 100, 0, 0, 9'h1FF, 0, 0, 0, 8000);
    run(9, 3, 2, 1, 9'h155, 1, 3, 11, 100);
    run(1, 7000, 0, 0, 9'h000, 0, 0, 0, 8000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
