// fft_unit: variable-size FFT and inverse FFT of 2^klog points in memory.
//
// The transform is done in place in bus memory by one fft_core and a level
// scheduler. A transform that fits the local memory (klog <= LMAX_LOG) is one
// fft_core command. A larger one, K = L1*L2 with L1 = 2^LMAX_LOG, runs as a
// first level of L2 transforms of L1 points on the words n1, n1+L2, n1+2*L2,
// ... (n1 = 0..L2-1), each multiplied on write-back by the phase factor
// W_K^(n1*k2), followed by a second level of L1 transforms of L2 contiguous
// words. Every word thus crosses the bus four times in all. The result is
// left transposed: bin m sits at offset (m mod L1)*L2 + (m div L1), which is
// gnss_pkg::fft_loc. Example: 32768 points = 64 FFTs of 512, rotation, then
// 512 FFTs of 64. mask1 and mask2 select the halving stages of the two
// levels. done pulses when the last core command has finished. The two-level
// split, the 512-point core and the phase rotation follow the document; the
// in-place transposed layout is this design's choice.
module fft_unit #(
  parameter int unsigned LMAX_LOG = 9,
  parameter int unsigned TW_DEPTH = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          cmd_valid,
  output logic                          cmd_ready,
  input  logic [gnss_pkg::BUS_AW-1:0]   cmd_base,
  input  logic [gnss_pkg::LOGK_W-1:0]   cmd_klog,
  input  logic                          cmd_inverse,
  input  logic [8:0]                    cmd_mask1,
  input  logic [8:0]                    cmd_mask2,
  output logic                          done,
  output gnss_pkg::bus_req_t            bus_req,
  input  gnss_pkg::bus_rsp_t            bus_rsp,
  output logic                          tw_req_valid,
  output logic [gnss_pkg::PH_W-1:0]     tw_req_phase,
  input  logic                          tw_rsp_valid,
  input  logic signed [15:0]            tw_rsp_cos,
  input  logic signed [15:0]            tw_rsp_sin
);
  import gnss_pkg::*;

  typedef enum logic [2:0] {U_IDLE, U_L1, U_L1W, U_L2, U_L2W, U_DONE} ustate_e;
  ustate_e state;

  logic [BUS_AW-1:0] base;
  logic [LOGK_W-1:0] klog, l1log, l2log;
  logic              inverse;
  logic [8:0]        mask1, mask2;
  logic [9:0]        idx;

  logic              c_valid, c_ready, c_done;
  logic [BUS_AW-1:0] c_base;
  logic [LOGK_W-1:0] c_stride;
  logic [3:0]        c_len;
  logic [8:0]        c_mask;
  logic              c_rot;

  always_comb begin
    c_valid  = (state == U_L1) || (state == U_L2);
    if (state == U_L1) begin
      c_base   = base + BUS_AW'(idx);
      c_stride = l2log;
      c_len    = 4'(l1log);
      c_mask   = mask1;
      c_rot    = (l2log != 0);
    end else begin
      c_base   = base + (BUS_AW'(idx) << l2log);
      c_stride = '0;
      c_len    = 4'(l2log);
      c_mask   = mask2;
      c_rot    = 1'b0;
    end
  end

  fft_core #(.LMAX_LOG(LMAX_LOG), .TW_DEPTH(TW_DEPTH)) u_core (
    .clk, .rst_n,
    .cmd_valid     (c_valid),
    .cmd_ready     (c_ready),
    .cmd_base      (c_base),
    .cmd_stride_log(c_stride),
    .cmd_len_log   (c_len),
    .cmd_inverse   (inverse),
    .cmd_scale_mask(c_mask),
    .cmd_rot_en    (c_rot),
    .cmd_rot_n1    (idx[8:0]),
    .cmd_rot_klog  (klog),
    .done          (c_done),
    .bus_req, .bus_rsp,
    .tw_req_valid, .tw_req_phase, .tw_rsp_valid, .tw_rsp_cos, .tw_rsp_sin
  );

  assign cmd_ready = (state == U_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= U_IDLE;
      done    <= 1'b0;
      base    <= '0;
      klog    <= '0;
      l1log   <= '0;
      l2log   <= '0;
      inverse <= 1'b0;
      mask1   <= '0;
      mask2   <= '0;
      idx     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        U_IDLE: if (cmd_valid) begin
          base    <= cmd_base;
          klog    <= cmd_klog;
          l1log   <= fft_l1_log(cmd_klog, LOGK_W'(LMAX_LOG));
          l2log   <= cmd_klog - fft_l1_log(cmd_klog, LOGK_W'(LMAX_LOG));
          inverse <= cmd_inverse;
          mask1   <= cmd_mask1;
          mask2   <= cmd_mask2;
          idx     <= '0;
          state   <= U_L1;
        end
        U_L1:  if (c_ready) state <= U_L1W;
        U_L1W: if (c_done) begin
          if (idx == (10'(1) << l2log) - 1'b1) begin
            idx   <= '0;
            state <= (l2log == 0) ? U_DONE : U_L2;
          end else begin
            idx   <= idx + 1'b1;
            state <= U_L1;
          end
        end
        U_L2:  if (c_ready) state <= U_L2W;
        U_L2W: if (c_done) begin
          if (idx == (10'(1) << l1log) - 1'b1) state <= U_DONE;
          else begin
            idx   <= idx + 1'b1;
            state <= U_L2;
          end
        end
        default: begin
          done  <= 1'b1;
          state <= U_IDLE;
        end
      endcase
    end
  end

  a_size: assert property (@(posedge clk) disable iff (!rst_n)
                           (cmd_valid && cmd_ready) |->
                           (cmd_klog >= 1 && cmd_klog <= LOGK_W'(2*LMAX_LOG) && cmd_klog <= LOGK_W'(PH_W)))
    else $error("fft_unit: unsupported transform size");
endmodule
