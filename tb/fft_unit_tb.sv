// fft_unit_tb: the variable-size FFT with the level scheduler, checked
// against a floating-point DFT.
// Test a: 2048 points (512 x 4, two levels), forward, halving on every other
//         stage; bin m must be found at offset fft_loc(m).
// Test b: 256 points (one level), inverse, halving on every stage.
// Test c: 16 points on a core limited to 4 points (LMAX_LOG = 2 instance):
//         4 x 4 on two levels, forward.
// Tolerance 8 LSB. Bus traffic must be 4*K accesses on two levels and 2*K
// on one, the figure the document gives for the multi-level FFT.
module fft_unit_tb;
  import gnss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid [2], cmd_ready [2], done [2];
  logic [BUS_AW-1:0] cmd_base;
  logic [LOGK_W-1:0] cmd_klog;
  logic cmd_inverse;
  logic [8:0] cmd_mask1, cmd_mask2;
  bus_req_t m_req [2];
  bus_rsp_t m_rsp [2];
  logic tw_req_valid [2], tw_rsp_valid [2];
  logic [PH_W-1:0] tw_req_phase [2];
  logic signed [15:0] tw_cos [2], tw_sin [2];
  logic ram_en, ram_we, rom_en;
  logic [MEM_AW-1:0] ram_addr, rom_addr;
  logic [31:0] ram_wdata, ram_rdata;

  fft_unit dut (.clk, .rst_n, .cmd_valid(cmd_valid[0]), .cmd_ready(cmd_ready[0]), .cmd_base,
                .cmd_klog, .cmd_inverse, .cmd_mask1, .cmd_mask2, .done(done[0]),
                .bus_req(m_req[0]), .bus_rsp(m_rsp[0]),
                .tw_req_valid(tw_req_valid[0]), .tw_req_phase(tw_req_phase[0]),
                .tw_rsp_valid(tw_rsp_valid[0]), .tw_rsp_cos(tw_cos[0]), .tw_rsp_sin(tw_sin[0]));
  fft_unit #(.LMAX_LOG(2)) dut4 (.clk, .rst_n, .cmd_valid(cmd_valid[1]), .cmd_ready(cmd_ready[1]), .cmd_base,
                .cmd_klog, .cmd_inverse, .cmd_mask1, .cmd_mask2, .done(done[1]),
                .bus_req(m_req[1]), .bus_rsp(m_rsp[1]),
                .tw_req_valid(tw_req_valid[1]), .tw_req_phase(tw_req_phase[1]),
                .tw_rsp_valid(tw_rsp_valid[1]), .tw_rsp_cos(tw_cos[1]), .tw_rsp_sin(tw_sin[1]));
  for (genvar g = 0; g < 2; g++) begin : g_trigo
    trigo u_trigo (.clk, .rst_n, .in_valid(tw_req_valid[g]), .in_phase(tw_req_phase[g]),
                   .out_valid(tw_rsp_valid[g]), .out_cos(tw_cos[g]), .out_sin(tw_sin[g]));
  end
  acq_bus #(.NM(2)) u_bus (.clk, .rst_n, .m_req, .m_rsp, .ram_en, .ram_we, .ram_addr,
                           .ram_wdata, .ram_rdata, .rom_en, .rom_addr, .rom_rdata(32'd0));
  sp_ram u_ram (.clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata));

  int checks = 0, failures = 0;
  int n_acc = 0;
  always @(posedge clk) if (m_rsp[0].gnt || m_rsp[1].gnt) n_acc <= n_acc + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xr [2048], xi [2048], ct [2048], stb [2048];

  task automatic run(input int u, input int lmax, input int klog, input int base, input bit inv,
                     input logic [8:0] m1, input logic [8:0] m2, input int amp);
    int K, l1, l2, nsc, acc0;
    real sgn, er, ei, sc;
    K = 1 << klog;
    l1 = (klog > lmax) ? lmax : klog;
    l2 = klog - l1;
    sgn = inv ? 1.0 : -1.0;
    for (int k = 0; k < K; k++) begin
      ct[k] = $cos(2.0 * 3.14159265358979 * k / K);
      stb[k] = $sin(2.0 * 3.14159265358979 * k / K);
    end
    for (int n = 0; n < K; n++) begin
      int a, b;
      a = int'($urandom % (2 * amp + 1)) - amp;
      b = int'($urandom % (2 * amp + 1)) - amp;
      xr[n] = a; xi[n] = b;
      u_ram.mem[base + n] = {16'(a), 16'(b)};
    end
    nsc = 0;
    for (int s = 0; s < l1; s++) if (m1[s]) nsc++;
    for (int s = 0; s < l2; s++) if (m2[s]) nsc++;
    sc = 1.0 / real'(1 << nsc);
    @(negedge clk);
    cmd_valid[u] = 1; cmd_base = BUS_AW'(base); cmd_klog = LOGK_W'(klog); cmd_inverse = inv;
    cmd_mask1 = m1; cmd_mask2 = m2;
    acc0 = n_acc;
    @(negedge clk);
    cmd_valid[u] = 0;
    while (!done[u]) @(negedge clk);
    checks++;
    if (n_acc - acc0 != ((l2 > 0) ? 4 * K : 2 * K)) begin
      failures++;
      $display("FAIL: %0d bus accesses for K=%0d", n_acc - acc0, K);
    end
    for (int m = 0; m < K; m++) begin
      logic [31:0] w;
      real gr, gi;
      int off;
      er = 0.0; ei = 0.0;
      for (int n = 0; n < K; n++) begin
        int t;
        t = (m * n) % K;
        er += xr[n] * ct[t] - sgn * xi[n] * stb[t];
        ei += sgn * xr[n] * stb[t] + xi[n] * ct[t];
      end
      er *= sc; ei *= sc;
      off = ((m % (1 << l1)) << l2) + (m >> l1);
      w = u_ram.mem[base + off];
      gr = real'($signed(w[31:16]));
      gi = real'($signed(w[15:0]));
      checks++;
      if (gr - er > 8.0 || er - gr > 8.0 || gi - ei > 8.0 || ei - gi > 8.0) begin
        failures++;
        if (failures < 10) $display("FAIL K=%0d m=%0d: got %f %f expected %f %f", K, m, gr, gi, er, ei);
      end
    end
  endtask

  initial begin
    cmd_valid[0] = 0; cmd_valid[1] = 0; cmd_base = 0; cmd_klog = 0; cmd_inverse = 0;
    cmd_mask1 = 0; cmd_mask2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 9, 11, 4096, 0, 9'h155, 9'h155, 1000);
    run(0, 9, 8, 100, 1, 9'h1FF, 9'h000, 8000);
    run(1, 2, 4, 9000, 0, 9'h001, 9'h001, 4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
