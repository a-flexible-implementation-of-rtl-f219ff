// sqrt_unit_tb: checks floor(sqrt(x)) for edge values and random 32-bit
// operands of all magnitudes against a reference found by integer search,
// and checks the 16-cycle latency.
module sqrt_unit_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [31:0] in_data;
  logic [15:0] out_root;
  sqrt_unit dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] xq [$];
  int tq [$];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
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

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [31:0] x;
    int t;
    x = xq.pop_front();
    t = tq.pop_front();
    checks++;
    if (longint'(out_root) != isqrt(longint'(x)) || cyc - t != 16) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d root=%0d latency %0d", x, out_root, cyc - t);
    end
  end

  initial begin
    logic [31:0] list [8] = '{0, 1, 2, 3, 4, 32'hFFFF_FFFF, 32'hFFFE_0001, 32'hFFFE_0000};
    in_valid = 0; in_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3008; i++) begin
      @(negedge clk);
      in_valid = (i < 8) || ($urandom % 3 != 0);
      in_data  = (i < 8) ? list[i] : ($urandom >> ($urandom % 32));
      if (in_valid) begin
        xq.push_back(in_data);
        tq.push_back(cyc);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (xq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
