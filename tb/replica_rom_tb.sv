// replica_rom_tb: loads a small instance through the load port, then reads
// it back in random order; data must appear one cycle after rd_en and hold
// while rd_en is low.
module replica_rom_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic ld_we, rd_en;
  logic [7:0] ld_addr, rd_addr;
  logic [31:0] ld_data, rd_data;
  replica_rom #(.AW(8)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [256];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_d;
    ld_we = 0; rd_en = 0; ld_addr = 0; rd_addr = 0; ld_data = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = 8'(i); ld_data = $urandom;
      model[i] = ld_data;
    end
    @(negedge clk);
    ld_we = 0;
    exp_d = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (rd_data != exp_d) begin
          failures++;
          if (failures < 10) $display("FAIL: got %h expected %h", rd_data, exp_d);
        end
      end
      rd_en = (i == 0) || ($urandom % 3 != 0);
      rd_addr = 8'($urandom);
      if (rd_en) exp_d = model[rd_addr];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
