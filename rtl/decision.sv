// decision: peak search over the search grid and threshold comparison.
//
// `clear` starts the search for one satellite. Every cell reported on
// det_valid (envelope value, Doppler column r2 and code delay tau, plus the
// current replica shift s) is compared with the best so far; a strictly
// larger value replaces it, so the first of equal peaks is kept. The Doppler
// of the best cell is reported as a signed bin number d = r2 + s*N2, in steps
// of 1/T_coh (125 Hz), and the delay in samples. `detected` is set when the
// best value exceeds `threshold`; n_above counts the cells above it. All
// outputs update the cycle after the cell arrives. The document gives the
// decision against a threshold; the peak search and the counter are this
// design's.
module decision (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic [15:0]                   threshold,
  input  logic signed [15:0]            s,
  input  logic [gnss_pkg::LOGK_W-1:0]   n2_log,
  input  logic                          det_valid,
  input  logic [15:0]                   det_value,
  input  logic [gnss_pkg::MEM_AW-1:0]   det_r2,
  input  logic [gnss_pkg::MEM_AW-1:0]   det_tau,
  output logic [15:0]                   best_value,
  output logic signed [15:0]            best_dopp,
  output logic [gnss_pkg::MEM_AW-1:0]   best_tau,
  output logic                          detected,
  output logic [23:0]                   n_above
);
  import gnss_pkg::*;

  logic signed [15:0] d;
  assign d = 16'(det_r2) + (s <<< n2_log);
  assign detected = (best_value > threshold);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_value <= '0;
      best_dopp  <= '0;
      best_tau   <= '0;
      n_above    <= '0;
    end else if (clear) begin
      best_value <= '0;
      best_dopp  <= '0;
      best_tau   <= '0;
      n_above    <= '0;
    end else if (det_valid) begin
      if (det_value > best_value) begin
        best_value <= det_value;
        best_dopp  <= d;
        best_tau   <= det_tau;
      end
      if (det_value > threshold && n_above != '1) n_above <= n_above + 1'b1;
    end
  end
endmodule
