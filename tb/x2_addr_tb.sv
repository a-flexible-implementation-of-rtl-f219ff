// x2_addr_tb: checks the X2 address map for all four mode sizes and random
// (r1, r2, s), against bin = r2 + N2*((r1+s) mod N1) and the transposed
// offset of the two-level FFT, both recomputed here with integer arithmetic.
// Also checks that for a fixed s and r2 the N1 offsets are all different.
module x2_addr_tb;
  import gnss_pkg::*;
  logic [LOGK_W-1:0] n1_log, n2_log;
  logic [MEM_AW-1:0] r1, r2, bin, offset;
  logic signed [15:0] s;
  x2_addr dut (.*);

  int checks = 0, failures = 0;
  int n1l [4] = '{12, 11, 15, 14};
  int n2l [4] = '{3, 3, 1, 1};
  bit seen [int];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      int N1, N2, kl, l1, l2;
      N1 = 1 << n1l[m]; N2 = 1 << n2l[m];
      kl = n1l[m] + n2l[m];
      l1 = (kl > 9) ? 9 : kl;
      l2 = kl - l1;
      n1_log = LOGK_W'(n1l[m]); n2_log = LOGK_W'(n2l[m]);
      for (int i = 0; i < 500; i++) begin
        int eb, eo, ss;
        r1 = MEM_AW'($urandom % N1);
        r2 = MEM_AW'($urandom % N2);
        ss = int'($urandom % 401) - 200;
        s = 16'(ss);
        #1;
        eb = int'(r2) + N2 * (((int'(r1) + ss) % N1 + N1) % N1);
        eo = (eb % (1 << l1)) * (1 << l2) + eb / (1 << l1);
        checks++;
        if (int'(bin) != eb || int'(offset) != eo) begin
          failures++;
          if (failures < 10) $display("FAIL mode %0d r1 %0d r2 %0d s %0d: %0d %0d exp %0d %0d",
                                      m, r1, r2, ss, bin, offset, eb, eo);
        end
      end
    end
    // Column read is a permutation of N1 distinct words (GPS GEO sizes).
    n1_log = 11; n2_log = 3; r2 = 5; s = -7;
    for (int i = 0; i < 2048; i++) begin
      r1 = MEM_AW'(i);
      #1;
      seen[int'(offset)] = 1;
    end
    checks++;
    if (seen.num() != 2048) begin failures++; $display("FAIL: column offsets collide"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
