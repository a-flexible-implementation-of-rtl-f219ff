// trigo_tb: checks the CORDIC cosine/sine against floating-point values.
// Random phases plus the four quarter turns and the +-45 degree edges are
// fed one per cycle; each result must be within 3 LSB of 32767*cos/sin and
// arrive exactly 18 cycles after its phase (NST = 16 stages plus input and
// output registers).
module trigo_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [15:0] in_phase;
  logic signed [15:0] out_cos, out_sin;
  trigo dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  logic [15:0] phq [$];
  int tq [$];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [15:0] p;
    int t;
    real a, ec, es;
    p = phq.pop_front();
    t = tq.pop_front();
    a = 2.0 * 3.14159265358979 * real'(p) / 65536.0;
    ec = 32767.0 * $cos(a);
    es = 32767.0 * $sin(a);
    checks++;
    if ((real'(out_cos) - ec > 3.0) || (ec - real'(out_cos) > 3.0) ||
        (real'(out_sin) - es > 3.0) || (es - real'(out_sin) > 3.0) || (cyc - t != 18)) begin
      failures++;
      if (failures < 10)
        $display("FAIL phase %0d: got %0d %0d expected %f %f latency %0d", p, out_cos, out_sin, ec, es, cyc - t);
    end
  end

  initial begin
    logic [15:0] list [10] = '{16'h0000, 16'h4000, 16'h8000, 16'hC000, 16'h2000, 16'h1FFF,
                               16'hE000, 16'hDFFF, 16'hFFFF, 16'h6000};
    in_valid = 0; in_phase = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2010; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_phase = (i < 10) ? list[i] : 16'($urandom);
      if (i < 10) in_valid = 1;
      if (in_valid) begin
        phq.push_back(in_phase);
        tq.push_back(cyc);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (phq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
