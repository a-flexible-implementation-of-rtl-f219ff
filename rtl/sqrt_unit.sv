// sqrt_unit: integer square root, floor(sqrt(x)) of a 32-bit unsigned value.
//
// Digit-by-digit (restoring) method, one result bit per pipeline stage: each
// stage brings down two bits of the radicand into the partial remainder and
// keeps the next root bit when the remainder is not smaller than 4*root+1.
// A new operand is accepted every cycle; the 16-bit root appears 16 cycles
// later with out_valid. The document only names a SQRT unit attached to the
// integrator by a FIFO link; the method and the pipeline are this design's.
module sqrt_unit (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  output logic        out_valid,
  output logic [15:0] out_root
);
  logic [31:0] xs  [17];
  logic [17:0] rem [17];
  logic [15:0] rt  [17];
  logic        vs  [17];

  always_comb begin
    xs[0]  = in_data;
    rem[0] = '0;
    rt[0]  = '0;
    vs[0]  = in_valid;
  end

  for (genvar i = 0; i < 16; i++) begin : g_stage
    logic [17:0] r_in, trial;
    always_comb begin
      r_in  = {rem[i][15:0], xs[i][31:30]};
      trial = {rt[i], 2'b01};
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[i+1]  <= 1'b0;
        xs[i+1]  <= '0;
        rem[i+1] <= '0;
        rt[i+1]  <= '0;
      end else begin
        vs[i+1] <= vs[i];
        xs[i+1] <= xs[i] << 2;
        if (r_in >= trial) begin
          rem[i+1] <= r_in - trial;
          rt[i+1]  <= {rt[i][14:0], 1'b1};
        end else begin
          rem[i+1] <= r_in;
          rt[i+1]  <= {rt[i][14:0], 1'b0};
        end
      end
    end
  end

  assign out_valid = vs[16];
  assign out_root  = rt[16];
endmodule
