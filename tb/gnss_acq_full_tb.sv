// gnss_acq_full_tb: one complete acquisition at the design's full size.
//
// The engine runs with its default parameters: 512-point local FFT, GPS C/A
// in low Earth orbit, N1 = 4096 samples per code period, N2 = 8, so the
// forward FFT has 32768 points (64 FFTs of 512, rotation, 512 FFTs of 64) and
// each inverse FFT 4096 points (8 FFTs of 512, rotation, 512 FFTs of 8). The
// full Doppler range of the mode is searched: 84 shifts of 1 kHz (672 bins of
// 125 Hz). Satellites 0 and 1 are searched; the record holds satellite 1 at
// -29 bins (-3.625 kHz) and a delay of 3024 samples. The testbench checks that
// satellite 1 is found there and satellite 0 is rejected, and counts the
// two-level transforms. It also checks the search rate: the time between
// the two results (one satellite's full Doppler search) must stay within
// the reported 2 min 15 s for 32 satellites at 100 MHz.
module gnss_acq_full_tb;
  import gnss_pkg::*;

  localparam int DIV  = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]  mode;
  logic [15:0] n_iter_ovr, threshold;
  logic [5:0]  sat_first, sat_last;
  logic        start, busy, done, s_valid, overflow;
  logic signed [3:0] s_i, s_q;
  logic        rom_we;
  logic [MEM_AW-1:0] rom_addr;
  logic [31:0] rom_data;
  logic        res_valid, res_detected;
  logic [5:0]  res_sat;
  logic signed [15:0] res_dopp;
  logic [MEM_AW-1:0] res_tau;
  logic [15:0] res_value;
  logic [23:0] res_n_above;

  gnss_acq_top dut (.*);

  int checks = 0, failures = 0;
  int n_fwd2 = 0, n_inv2 = 0, n_rot = 0, n_ncoh = 0, n_scpc = 0, n_det = 0, n_rej = 0;
  longint cycles = 0;
  longint t_res [2];
  // Reported LEO search time for the 32 GPS satellites at 100 MHz: 2 min 15 s,
  // i.e. at most 135 s * 100e6 / 32 cycles per satellite.
  localparam longint MAX_SAT_CYCLES = 64'd421_875_000;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (dut.u_fft.u_core.cmd_valid && dut.u_fft.u_core.cmd_ready && dut.u_fft.u_core.cmd_rot_en) begin
      n_rot <= n_rot + 1;
      if (dut.u_fft.u_core.cmd_inverse) n_inv2 <= n_inv2 + 1;
      else                              n_fwd2 <= n_fwd2 + 1;
    end
    if (dut.u_int.start && !dut.u_int.busy && !dut.u_int.first) n_ncoh <= n_ncoh + 1;
    if (dut.u_cor.start && !dut.u_cor.busy && dut.u_ctrl.pass) n_scpc <= n_scpc + 1;
  end

  initial begin
    #(64'd20_000_000_000);
    failures++;
    $display("watchdog expired: ctrl state %0d it %0d col %0d fft %0d core %0d", dut.u_ctrl.state, dut.u_ctrl.it, dut.u_ctrl.col, dut.u_fft.state, dut.u_fft.u_core.state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------------------- stimulus
  localparam int MAXN1 = 4096;
  logic signed [1:0] code [4][2][MAXN1];   // [sat][pass][chip]
  real ctab [MAXN1], stab [MAXN1];

  function automatic int q4(input real v);
    int r;
    r = $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
    if (r > 7) r = 7;
    if (r < -8) r = -8;
    return r;
  endfunction

  function automatic real gauss();
    real a;
    a = 0.0;
    for (int k = 0; k < 4; k++) a += real'($urandom % 10000) / 10000.0 - 0.5;
    return a * 1.732;  // unit variance
  endfunction

  task automatic make_codes(input int n1, input int nsat, input int npass);
    for (int s = 0; s < nsat; s++)
      for (int p = 0; p < npass; p++)
        for (int n = 0; n < n1; n++)
          code[s][p][n] = ($urandom % 2) ? 2'sd1 : -2'sd1;
    for (int k = 0; k < n1; k++) begin
      ctab[k] = $cos(2.0 * 3.14159265358979 * k / n1);
      stab[k] = $sin(2.0 * 3.14159265358979 * k / n1);
    end
  endtask

  // Replica spectrum C(r1) = sum_n c[n] exp(-j 2 pi r1 n / N1), scaled.
  task automatic load_replicas(input int n1, input int nsat, input int npass);
    real sc, re, im;
    int  ir, ii;
    sc = 32767.0 / (4.0 * $sqrt(real'(n1)));
    for (int s = 0; s < nsat; s++)
      for (int p = 0; p < npass; p++)
        for (int r = 0; r < n1; r++) begin
          re = 0.0; im = 0.0;
          for (int n = 0; n < n1; n++) begin
            re += code[s][p][n] * ctab[(r * n) % n1];
            im -= code[s][p][n] * stab[(r * n) % n1];
          end
          ir = $rtoi(re * sc); ii = $rtoi(im * sc);
          if (ir > 32767) ir = 32767; if (ir < -32767) ir = -32767;
          if (ii > 32767) ii = 32767; if (ii < -32767) ii = -32767;
          @(negedge clk);
          rom_we   = 1'b1;
          rom_addr = MEM_AW'((s * npass + p) * n1 + r);
          rom_data = {16'(ir), 16'(ii)};
        end
    @(negedge clk);
    rom_we = 1'b0;
  endtask

  task automatic run(input int md, input int n1, input int n2, input int n3, input int npass,
                     input int nsat, input int sig_sat, input int d, input int tau,
                     input real amp, input real sigma, input int thr, input int iters);
    int k, total, got;
    real ph;
    k = n1 * n2;
    total = k * n3;
    make_codes(n1, nsat, npass);
    load_replicas(n1, nsat, npass);
    @(negedge clk);
    mode = 2'(md); threshold = 16'(thr); n_iter_ovr = 16'(iters);
    sat_first = 0; sat_last = 6'(nsat - 1);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!dut.u_storage.busy) @(negedge clk);
    for (int n = 0; n < total; n++) begin
      ph = 2.0 * 3.14159265358979 * real'(d) * real'(n % k) / real'(k);
      s_valid = 1'b1;
      s_i = 4'(q4(amp * code[sig_sat][0][((n - tau) % n1 + n1) % n1] * $cos(ph) + sigma * gauss()));
      s_q = 4'(q4(amp * code[sig_sat][0][((n - tau) % n1 + n1) % n1] * $sin(ph) + sigma * gauss()));
      @(negedge clk);
    end
    s_valid = 1'b0;
    got = 0;
    while (got < nsat) begin
      @(posedge clk);
      if (res_valid) begin
        if (got < 2) t_res[got] = cycles;
        got++;
        $display("mode %0d sat %0d: detected=%0d dopp=%0d tau=%0d value=%0d above=%0d",
                 md, res_sat, res_detected, res_dopp, res_tau, res_value, res_n_above);
        checks++;
        if (int'(res_sat) == sig_sat) begin
          if (!(res_detected && res_dopp == 16'(d) && int'(res_tau) == tau)) begin
            failures++;
            $display("FAIL: expected detection at dopp=%0d tau=%0d", d, tau);
          end else n_det++;
        end else begin
          if (res_detected) begin
            failures++;
            $display("FAIL: false detection of sat %0d", res_sat);
          end else n_rej++;
        end
      end
    end
    @(posedge clk);
    checks++;
    if (overflow) begin failures++; $display("FAIL: storage overflow"); end
  endtask

  initial begin
    mode = 0; n_iter_ovr = 0; threshold = 0; sat_first = 0; sat_last = 0;
    start = 0; s_valid = 0; s_i = 0; s_q = 0; rom_we = 0; rom_addr = 0; rom_data = 0;
    void'($urandom(1234));
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    // GPS LEO at full size, full Doppler range.
    run(0, 4096, 8, 1, 1, 2, 1, -29, 3024, 2.0, 1.5, 600, 0);
    $display("GPS LEO run done at cycle %0d", cycles);
    $display("two-level forward FFT sub-transforms: %0d", n_fwd2);
    $display("two-level inverse FFT sub-transforms: %0d", n_inv2);
    $display("phase rotations: %0d, non-coherent adds: %0d, SCPC passes: %0d", n_rot, n_ncoh, n_scpc);
    $display("detections: %0d, rejections: %0d", n_det, n_rej);
    $display("cycles for one satellite search: %0d (limit %0d)", t_res[1] - t_res[0], MAX_SAT_CYCLES);
    checks += 5;
    if (t_res[1] - t_res[0] > MAX_SAT_CYCLES) failures++;
    if (n_fwd2 != 64)   failures++;
    if (n_inv2 != 84 * 8 * 8 * 2) failures++;
    if (n_det == 0)  failures++;
    if (n_rej == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
