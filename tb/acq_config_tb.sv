// acq_config_tb: checks the configuration of the four modes against the
// search-array sizes (N1, N2, N3), Doppler ranges and 125 Hz step, the SCPC
// flag, the memory layout and the shift override, with the default sizes
// and with N1 divided by 64.
module acq_config_tb;
  import gnss_pkg::*;
  mode_e mode;
  logic [15:0] n_iter_ovr;
  acq_cfg_t cfg, cfg_s;
  acq_config dut (.mode, .n_iter_ovr, .cfg);
  acq_config #(.N1_DIV_LOG(6)) dut_s (.mode, .n_iter_ovr, .cfg(cfg_s));

  int checks = 0, failures = 0;
  int N1 [4] = '{4096, 2048, 32768, 16384};
  int N2 [4] = '{8, 8, 2, 2};
  int N3 [4] = '{1, 7, 1, 7};
  int DR [4] = '{84000, 16000, 84000, 16000};  // Doppler range in Hz

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL mode %0d: %s", mode, what); end
  endtask

  initial begin
    for (int m = 0; m < 4; m++) begin
      int it;
      mode = mode_e'(m);
      n_iter_ovr = 0;
      #1;
      it = DR[m] / 125 / N2[m];
      chk((1 << cfg.n1_log) == N1[m], "N1");
      chk((1 << cfg.n2_log) == N2[m], "N2");
      chk(int'(cfg.n3) == N3[m], "N3");
      chk(cfg.scpc == (m >= 2), "SCPC");
      chk(int'(cfg.n_iter) == it, "shifts");
      chk(int'(cfg.s_first) == -(it / 2), "first shift");
      chk(int'(cfg.work_base) == N3[m] * N1[m] * N2[m], "work base");
      chk(int'(cfg.acc_base) == N3[m] * N1[m] * N2[m] + N1[m], "acc base");
      chk(int'(cfg.acc_base) + N1[m] <= (1 << MEM_AW), "memory size");
      chk((1 << cfg_s.n1_log) == N1[m] / 64, "reduced N1");
      n_iter_ovr = 6;
      #1;
      chk(int'(cfg.n_iter) == 6 && int'(cfg.s_first) == -3, "override");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
