// sp_ram_tb: random writes and reads of a small instance against an array
// model; read data must appear exactly one cycle after the read.
module sp_ram_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we;
  logic [7:0] addr;
  logic [31:0] wdata, rdata;
  sp_ram #(.AW(8)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [256];
  logic        known [256];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        rd_pend;
    logic [31:0] exp_d;
    en = 0; we = 0; addr = 0; wdata = 0; rd_pend = 0; exp_d = 0;
    for (int i = 0; i < 256; i++) known[i] = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (rd_pend) begin
        checks++;
        if (rdata != exp_d) begin
          failures++;
          if (failures < 10) $display("FAIL read: got %h expected %h", rdata, exp_d);
        end
      end
      en = ($urandom % 4) != 0;
      we = (i < 300) ? 1'b1 : (($urandom % 2) == 0);
      addr = 8'($urandom);
      wdata = $urandom;
      rd_pend = en && !we && known[addr];
      exp_d = model[addr];
      if (en && we) begin
        model[addr] = wdata;
        known[addr] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
