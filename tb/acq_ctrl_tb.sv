// acq_ctrl_tb: the sequencer against responder models of the storage, FFT,
// correlator and integrator (each answers done a random few cycles after its
// start). Galileo GEO mode (N3 = 7, SCPC) with N1 divided by 256, three
// shifts, satellites 2..3. Checks the capture length, that the forward FFTs
// cover the N3 blocks in order, and that every correlator / inverse FFT /
// integrator step has the block, pass, column, shift, replica address and
// first/last flags of the nested loops, generated here independently; and
// one result per satellite.
module acq_ctrl_tb;
  import gnss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  acq_cfg_t cfg;
  mode_e mode;
  logic [15:0] n_iter_ovr;
  acq_config #(.N1_DIV_LOG(8)) u_cfg (.mode, .n_iter_ovr, .cfg);

  logic start, busy, done;
  logic [5:0] sat_first, sat_last, res_sat;
  logic st_start, st_done, fft_start, fft_inverse, fft_ready, fft_done;
  logic [MEM_AW:0] st_count;
  logic [BUS_AW-1:0] fft_base, cor_rep_addr;
  logic [LOGK_W-1:0] fft_klog;
  logic [8:0] fft_mask1, fft_mask2;
  logic cor_start, cor_done, int_start, int_first, int_last, int_done, dec_clear, res_valid;
  logic [MEM_AW-1:0] cor_x_base, col;
  logic signed [15:0] shift;

  acq_ctrl dut (.*);

  int checks = 0, failures = 0;

  // Responders.
  int st_t = -1, fft_t = -1, cor_t = -1, int_t = -1;
  assign fft_ready = (fft_t < 0);
  always @(posedge clk) begin
    st_done <= 0; fft_done <= 0; cor_done <= 0; int_done <= 0;
    if (st_start) st_t <= 3 + $urandom % 5; else if (st_t > 0) st_t <= st_t - 1; else if (st_t == 0) begin st_done <= 1; st_t <= -1; end
    if (fft_start && fft_ready) fft_t <= 2 + $urandom % 5; else if (fft_t > 0) fft_t <= fft_t - 1; else if (fft_t == 0) begin fft_done <= 1; fft_t <= -1; end
    if (cor_start) cor_t <= 1 + $urandom % 4; else if (cor_t > 0) cor_t <= cor_t - 1; else if (cor_t == 0) begin cor_done <= 1; cor_t <= -1; end
    if (int_start) int_t <= 1 + $urandom % 4; else if (int_t > 0) int_t <= int_t - 1; else if (int_t == 0) begin int_done <= 1; int_t <= -1; end
  end

  // Expected step sequence.
  typedef struct { int blk; int pass; int col; int sh; int rep; bit first; bit last; } step_t;
  step_t exp_q [$];
  int fwd_q [$];
  int n_res = 0, n_inv = 0;
  localparam int N1 = 16384 >> 8, N2 = 2, N3 = 7, K = N1 * N2;

  always @(posedge clk) if (rst_n) begin
    if (st_start) begin
      checks++;
      if (int'(st_count) != N3 * K) begin failures++; $display("FAIL capture count %0d", st_count); end
    end
    if (fft_start && fft_ready) begin
      checks++;
      if (!fft_inverse) begin
        int b;
        b = fwd_q.pop_front();
        if (int'(fft_base) != b * K || int'(fft_klog) != 7) begin
          failures++; $display("FAIL forward FFT base %0d klog %0d", fft_base, fft_klog);
        end
      end else begin
        n_inv++;
        if (int'(fft_base) != int'(cfg.work_base) || int'(fft_klog) != 6) begin
          failures++; $display("FAIL inverse FFT base %0d klog %0d", fft_base, fft_klog);
        end
      end
    end
    if (cor_start) begin
      step_t e;
      e = exp_q[0];
      checks++;
      if (int'(cor_x_base) != e.blk * K || int'(col) != e.col || int'(shift) != e.sh ||
          int'(cor_rep_addr) != ((1 << MEM_AW) | e.rep)) begin
        failures++;
        if (failures < 10) $display("FAIL correlator step: base %0d col %0d s %0d rep %h; expected blk %0d col %0d s %0d rep %h",
                                    cor_x_base, col, shift, cor_rep_addr, e.blk, e.col, e.sh, e.rep);
      end
    end
    if (int_start) begin
      step_t e;
      e = exp_q.pop_front();
      checks++;
      if (int_first != e.first || int_last != e.last || int'(col) != e.col) begin
        failures++;
        if (failures < 10) $display("FAIL integrator flags %0d %0d expected %0d %0d", int_first, int_last, e.first, e.last);
      end
    end
    if (res_valid) begin
      checks++;
      if (int'(res_sat) != 2 + n_res) failures++;
      n_res++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MODE_GAL_GEO; n_iter_ovr = 3; start = 0; sat_first = 2; sat_last = 3;
    for (int b = 0; b < N3; b++) fwd_q.push_back(b);
    for (int sat = 2; sat <= 3; sat++)
      for (int it = 0; it < 3; it++)
        for (int c = 0; c < N2; c++)
          for (int b = 0; b < N3; b++)
            for (int p = 0; p < 2; p++)
              exp_q.push_back('{blk: b, pass: p, col: c, sh: it - 1, rep: (sat * 2 + p) * N1,
                                first: (b == 0 && p == 0), last: (b == N3 - 1 && p == 1)});
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks += 3;
    if (n_res != 2) begin failures++; $display("FAIL: %0d results", n_res); end
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d steps missing", exp_q.size()); end
    if (n_inv != 2 * 3 * N2 * N3 * 2) begin failures++; $display("FAIL: %0d inverse FFTs", n_inv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
