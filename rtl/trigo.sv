// trigo: cosine and sine of a phase, for the FFT twiddle factors and the phase
// rotator between FFT levels.
//
// The phase is unsigned, PH_W bits for a full turn. The unit first removes the
// nearest multiple of a quarter turn, so the CORDIC only rotates by +-45
// degrees, then runs NST rotation-mode CORDIC iterations, one per pipeline
// stage, starting from the vector (1/gain, 0) so no final gain correction is
// needed, and finally applies the quarter turn. Outputs are Q1.15 (32767 is
// +1.0). A new phase is accepted every cycle; the result appears NST+1 cycles
// later with out_valid. The document names this unit and links it to the FFT
// by a FIFO; the CORDIC method, the precision and the latency are this
// design's choices.
module trigo #(
  parameter int unsigned NST = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [gnss_pkg::PH_W-1:0]     in_phase,
  output logic                          out_valid,
  output logic signed [15:0]            out_cos,
  output logic signed [15:0]            out_sin
);
  localparam int unsigned ZW = 22;  // angle, 2^20 per turn
  localparam int unsigned XW = 22;  // Q1.15 plus 4 guard bits
  // atan(2^-i) in units of 2^-20 turn.
  localparam int ATAN [16] = '{131072, 77376, 40884, 20753, 10417, 5213, 2607,
                               1304, 652, 326, 163, 81, 41, 20, 10, 5};
  localparam logic signed [XW-1:0] X0 = 22'sd318366;  // 16 * 32767 / CORDIC gain

  logic signed [XW-1:0] xs [NST+1];
  logic signed [XW-1:0] ys [NST+1];
  logic signed [ZW-1:0] zs [NST+1];
  logic [1:0]           qs [NST+1];
  logic                 vs [NST+1];

  // Stage 0: quadrant reduction.
  logic [gnss_pkg::PH_W-1:0] ph_r;
  logic [1:0]                quad;
  always_comb begin
    quad = 2'(({1'b0, in_phase} + 17'h2000) >> 14);
    ph_r = in_phase - {quad, 14'd0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs[0] <= 1'b0;
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
      qs[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      xs[0] <= X0;
      ys[0] <= '0;
      zs[0] <= ZW'($signed(ph_r)) <<< 4;
      qs[0] <= quad;
    end
  end

  for (genvar i = 0; i < NST; i++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[i+1] <= 1'b0;
        xs[i+1] <= '0;
        ys[i+1] <= '0;
        zs[i+1] <= '0;
        qs[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        qs[i+1] <= qs[i];
        if (zs[i] >= 0) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - ZW'(ATAN[i]);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + ZW'(ATAN[i]);
        end
      end
    end
  end

  // Drop the guard bits with rounding and clip to +-32767.
  function automatic logic signed [15:0] clip(input logic signed [XW-1:0] v);
    logic signed [XW-1:0] r;
    r = (v + 22'sd8) >>> 4;
    if (r > 22'sd32767) return 16'sd32767;
    if (r < -22'sd32767) return -16'sd32767;
    return r[15:0];
  endfunction

  logic signed [15:0] c, s;
  always_comb begin
    c = clip(xs[NST]);
    s = clip(ys[NST]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cos   <= '0;
      out_sin   <= '0;
    end else begin
      out_valid <= vs[NST];
      unique case (qs[NST])
        2'd0: begin out_cos <= c;  out_sin <= s;  end
        2'd1: begin out_cos <= -s; out_sin <= c;  end
        2'd2: begin out_cos <= -c; out_sin <= -s; end
        default: begin out_cos <= s; out_sin <= -c; end
      endcase
    end
  end
endmodule
