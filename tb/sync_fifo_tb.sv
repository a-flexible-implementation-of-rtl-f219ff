// sync_fifo_tb: random pushes and pops against a queue model; checks the
// head word, empty, full and count every cycle, including runs that fill and
// drain the FIFO.
module sync_fifo_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, empty, full;
  logic [15:0] din, dout;
  logic [3:0] count;
  sync_fifo #(.WIDTH(16), .DEPTH(8)) dut (.*);

  int checks = 0, failures = 0, n_full = 0;
  logic [15:0] q [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 8) || int'(count) != q.size() ||
          (q.size() > 0 && dout != q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: count %0d model %0d", i, count, q.size());
      end
      if (full) n_full++;
      // Phases biased towards filling, then towards draining.
      push = ((i / 200) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      pop  = ((i / 200) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      if (full) push = 0;
      din = 16'($urandom);
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
