// decision_tb: streams cells for two satellites (clear in between) with
// random values, random shifts s and columns; checks the best value, its
// Doppler bin r2 + s*N2 and delay (first of equal maxima), the threshold
// flag and the count of cells above the threshold against a model.
module decision_tb;
  import gnss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, det_valid, detected;
  logic [15:0] threshold, det_value, best_value;
  logic signed [15:0] s, best_dopp;
  logic [LOGK_W-1:0] n2_log;
  logic [MEM_AW-1:0] det_r2, det_tau, best_tau;
  logic [23:0] n_above;
  decision dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; det_valid = 0; threshold = 0; det_value = 0; s = 0; n2_log = 3; det_r2 = 0; det_tau = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int sat = 0; sat < 2; sat++) begin
      int bv, bd, bt, na;
      @(negedge clk);
      clear = 1;
      threshold = (sat == 0) ? 16'd900 : 16'd60000;
      n2_log = (sat == 0) ? 5'd3 : 5'd1;
      @(negedge clk);
      clear = 0;
      bv = 0; bd = 0; bt = 0; na = 0;
      for (int i = 0; i < 3000; i++) begin
        det_valid = ($urandom % 4) != 0;
        det_value = 16'($urandom % 1000);
        if (i == 1500) det_value = 16'd999;
        s = 16'(int'($urandom % 21) - 10);
        det_r2 = MEM_AW'($urandom % (1 << n2_log));
        det_tau = MEM_AW'($urandom % 4096);
        if (det_valid) begin
          if (int'(det_value) > bv) begin
            bv = det_value; bd = int'(det_r2) + int'(s) * (1 << n2_log); bt = det_tau;
          end
          if (det_value > threshold) na++;
        end
        @(negedge clk);
        checks++;
        if (int'(best_value) != bv || int'(best_dopp) != bd || int'(best_tau) != bt ||
            int'(n_above) != na || detected != (bv > int'(threshold))) begin
          failures++;
          if (failures < 10) $display("FAIL sat %0d i %0d: %0d %0d %0d %0d vs %0d %0d %0d %0d",
                                      sat, i, best_value, best_dopp, best_tau, n_above, bv, bd, bt, na);
        end
      end
      det_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
