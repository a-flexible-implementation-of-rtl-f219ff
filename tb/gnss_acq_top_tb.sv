// gnss_acq_top_tb: end-to-end test of the acquisition engine on short
// records.
//
// The engine runs with a 32-point local FFT and every N1 divided by 64, so
// that both the forward FFT (512 points = 32 x 16) and the inverse FFT run on
// two levels. The testbench synthesises a record: one satellite's +-1 code of
// N1 chips, delayed by TAU samples, rotated by D Doppler bins (of 1/K of the
// sample rate), plus pseudo-Gaussian noise, quantised to 4 bits. It loads the
// replica spectra (DFT of each satellite's code, computed here in floating
// point) into the ROM, then checks that the present satellite is detected at
// the right Doppler and delay and that the absent ones are not.
// Part 1: GPS LEO mode, satellites 0..2, signal of satellite 1.
// Part 2: Galileo GEO mode (N3 = 7, SCPC: two replicas per satellite),
// satellites 0..1, signal of satellite 0 - a mode switch between runs.
// Part 3: GPS GEO mode (N3 = 7, 32-point inverse FFT on one level),
// satellites 0..1, signal of satellite 1.
// Part 4: Galileo LEO mode (SCPC, N3 = 1), satellites 0..1, signal of
// satellite 1.
// The mechanisms counted (each must occur): two-level forward FFT, two-level
// inverse FFT with phase rotation, non-coherent accumulation, SCPC second
// pass, a detection and a rejection.
module gnss_acq_top_tb;
  import gnss_pkg::*;

  localparam int LMAX = 5;
  localparam int DIV  = 6;
  localparam int THR_GG = 300;
  localparam int THR_GL = 250;

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

  gnss_acq_top #(.LMAX_LOG(LMAX), .N1_DIV_LOG(DIV)) dut (.*);

  int checks = 0, failures = 0;
  int n_fwd2 = 0, n_inv2 = 0, n_rot = 0, n_ncoh = 0, n_scpc = 0, n_det = 0, n_rej = 0;
  longint cycles = 0;

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
    #(64'd2_000_000_000);
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
    // GPS LEO: N1 = 4096/64, N2 = 8, N3 = 1.
    run(0, 4096 >> DIV, 8, 1, 1, 3, 1, 5, 23, 2.0, 1.5, 150, 4);
    $display("GPS LEO run done at cycle %0d", cycles);
    // Galileo GEO: N1 = 16384/64, N2 = 2, N3 = 7, SCPC.
    run(3, 16384 >> DIV, 2, 7, 2, 2, 0, -3, 100, 2.0, 1.5, 350, 4);
    $display("Galileo GEO run done at cycle %0d", cycles);
    // GPS GEO: N1 = 2048/64, N2 = 8, N3 = 7 (inverse FFT on one level).
    run(1, 2048 >> DIV, 8, 7, 1, 2, 1, -7, 11, 2.0, 1.5, THR_GG, 4);
    $display("GPS GEO run done at cycle %0d", cycles);
    // Galileo LEO: N1 = 32768/64, N2 = 2, N3 = 1, SCPC.
    run(2, 32768 >> DIV, 2, 1, 2, 2, 1, 2, 301, 2.0, 1.5, THR_GL, 4);
    $display("Galileo LEO run done at cycle %0d", cycles);
    $display("two-level forward FFT sub-transforms: %0d", n_fwd2);
    $display("two-level inverse FFT sub-transforms: %0d", n_inv2);
    $display("phase rotations: %0d, non-coherent adds: %0d, SCPC passes: %0d", n_rot, n_ncoh, n_scpc);
    $display("detections: %0d, rejections: %0d", n_det, n_rej);
    checks += 6;
    if (n_fwd2 == 0) failures++;
    if (n_inv2 == 0) failures++;
    if (n_ncoh == 0) failures++;
    if (n_scpc == 0) failures++;
    if (n_det == 0)  failures++;
    if (n_rej == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
