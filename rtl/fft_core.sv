// fft_core: FFT of up to 2^LMAX_LOG points held in a local memory, with a
// phase rotator on the write-back path.
//
// One command transforms 2^len_log complex words read over the bus from
// base, base + 2^stride_log, base + 2*2^stride_log, ... and writes the
// results back to the same addresses in natural order. The transform is a
// radix-2 decimation-in-time FFT: the words are stored in bit-reversed order
// during the load, then len_log stages of butterflies run in place, one
// butterfly per cycle. Each butterfly takes its twiddle factor from the
// trigonometric unit through a FIFO: a requester runs ahead of the
// butterflies and keeps at most TW_DEPTH phases in flight. When rot_en is
// set, output k is multiplied on write-back by exp(-+j*2*pi*rot_n1*k/2^rot_klog),
// the phase factor between the two levels of a larger FFT. inverse selects
// the sign +j (inverse transform). Bit st of scale_mask halves the outputs of
// stage st, rounding to even; results saturate to 16 bits.
//
// Timing: about 2^len_log cycles to load, len_log*2^(len_log-1) cycles of
// butterflies and 2^len_log cycles to store, plus the trigonometric latency
// once, when the bus grants every cycle. done pulses for one cycle at the end.
// The 512-point local size, the phase rotator and the 16-bit internal words
// follow the document; the radix, the scheduling and the scaling control are
// this design's choices.
module fft_core #(
  parameter int unsigned LMAX_LOG = 9,
  parameter int unsigned TW_DEPTH = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // command
  input  logic                          cmd_valid,
  output logic                          cmd_ready,
  input  logic [gnss_pkg::BUS_AW-1:0]   cmd_base,
  input  logic [gnss_pkg::LOGK_W-1:0]   cmd_stride_log,
  input  logic [3:0]                    cmd_len_log,
  input  logic                          cmd_inverse,
  input  logic [8:0]                    cmd_scale_mask,
  input  logic                          cmd_rot_en,
  input  logic [8:0]                    cmd_rot_n1,
  input  logic [gnss_pkg::LOGK_W-1:0]   cmd_rot_klog,
  output logic                          done,
  // bus master
  output gnss_pkg::bus_req_t            bus_req,
  input  gnss_pkg::bus_rsp_t            bus_rsp,
  // trigonometric unit
  output logic                          tw_req_valid,
  output logic [gnss_pkg::PH_W-1:0]     tw_req_phase,
  input  logic                          tw_rsp_valid,
  input  logic signed [15:0]            tw_rsp_cos,
  input  logic signed [15:0]            tw_rsp_sin
);
  import gnss_pkg::*;

  localparam int unsigned L = 2**LMAX_LOG;
  localparam int unsigned CW = LMAX_LOG + 1;
  localparam int unsigned TWC = $clog2(TW_DEPTH) + 1;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_COMP, S_STORE, S_DONE} state_e;
  state_e state;

  // Command registers.
  logic [BUS_AW-1:0] base;
  logic [LOGK_W-1:0] stride_log, rot_klog;
  logic [3:0]        len_log;
  logic              inverse, rot_en;
  logic [8:0]        scale_mask, rot_n1;

  cplx_t lmem [L];

  logic [CW-1:0] len, half_len;
  assign len      = CW'(1) << len_log;
  assign half_len = CW'(1) << (len_log - 1'b1);

  function automatic logic [CW-1:0] bitrev(input logic [CW-1:0] v, input logic [3:0] n);
    logic [CW-1:0] r;
    r = '0;
    for (int i = 0; i < CW; i++)
      if (i < int'(n)) r[i] = v[int'(n) - 1 - i];
    return r;
  endfunction

  // Complex multiply by a Q1.15 twiddle, rounded, 18-bit result.
  function automatic logic signed [17:0] mul_re(input cplx_t a, input logic signed [15:0] c,
                                                input logic signed [15:0] s);
    logic signed [33:0] p;
    p = 34'(a.re * c) - 34'(a.im * s) + 34'sd16384;
    return 18'(p >>> 15);
  endfunction
  function automatic logic signed [17:0] mul_im(input cplx_t a, input logic signed [15:0] c,
                                                input logic signed [15:0] s);
    logic signed [33:0] p;
    p = 34'(a.re * s) + 34'(a.im * c) + 34'sd16384;
    return 18'(p >>> 15);
  endfunction

  function automatic logic signed [15:0] bf_out(input logic signed [18:0] v, input logic sc);
    logic signed [33:0] w;
    // Halving rounds to even, so that the rounding adds no bias at DC.
    w = 34'(v) >>> 1;
    if (v[0] && w[0]) w = w + 34'sd1;
    return sat16(sc ? w : 34'(v));
  endfunction

  // ---------------------------------------------------------------- twiddles
  logic                 tf_pop, tf_empty, tf_full;
  logic [31:0]          tf_dout;
  logic [TWC-1:0]       tf_count;
  logic [TWC-1:0]       inflight;
  logic signed [15:0]   tw_c, tw_s;

  sync_fifo #(.WIDTH(32), .DEPTH(TW_DEPTH)) u_twfifo (
    .clk, .rst_n,
    .push (tw_rsp_valid),
    .din  ({tw_rsp_cos, tw_rsp_sin}),
    .pop  (tf_pop),
    .dout (tf_dout),
    .empty(tf_empty),
    .full (tf_full),
    .count(tf_count)
  );
  assign tw_c = tf_dout[31:16];
  assign tw_s = tf_dout[15:0];

  // Requester: butterfly twiddles of all stages, then the rotation factors.
  logic          rq_busy, rq_rot;
  logic [3:0]    rq_st;
  logic [CW-1:0] rq_b;
  logic [PH_W-1:0] rq_ph;
  logic          rq_fire;

  always_comb begin
    logic [31:0]   p;
    logic [CW-1:0] m;
    m = (CW'(1) << rq_st) - CW'(1);
    if (!rq_rot) begin
      p = 32'(rq_b & m) << (5'd15 - 5'(rq_st));
    end else begin
      p = (32'(rot_n1) * 32'(rq_b)) << (5'(PH_W) - rot_klog);
    end
    rq_ph = inverse ? p[PH_W-1:0] : PH_W'(-p[PH_W-1:0]);
  end

  assign rq_fire      = rq_busy && ((TWC+1)'(tf_count) + (TWC+1)'(inflight) < (TWC+1)'(TW_DEPTH));
  assign tw_req_valid = rq_fire;
  assign tw_req_phase = rq_ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight <= '0;
    end else begin
      inflight <= inflight + TWC'(rq_fire) - TWC'(tw_rsp_valid);
    end
  end

  // ---------------------------------------------------------------- datapath
  logic [CW-1:0] li, lr;     // load issue / return counters
  logic [3:0]    st;         // butterfly stage
  logic [CW-1:0] b;          // butterfly within stage
  logic [CW-1:0] sk;         // store index

  logic [CW-1:0] i0, i1;
  cplx_t         x0, x1, y0, y1, st_val;
  logic signed [17:0] t_re, t_im;

  always_comb begin
    logic [CW-1:0] hs;
    hs = CW'(1) << st;
    i0 = ((b >> st) << (st + 1'b1)) | (b & (hs - 1'b1));
    i1 = i0 | hs;
    x0 = lmem[i0[LMAX_LOG-1:0]];
    x1 = lmem[i1[LMAX_LOG-1:0]];
    t_re = mul_re(x1, tw_c, tw_s);
    t_im = mul_im(x1, tw_c, tw_s);
    y0.re = bf_out(19'(x0.re) + 19'(t_re), scale_mask[st]);
    y0.im = bf_out(19'(x0.im) + 19'(t_im), scale_mask[st]);
    y1.re = bf_out(19'(x0.re) - 19'(t_re), scale_mask[st]);
    y1.im = bf_out(19'(x0.im) - 19'(t_im), scale_mask[st]);
  end

  always_comb begin
    cplx_t v;
    v = lmem[sk[LMAX_LOG-1:0]];
    if (rot_en) begin
      st_val.re = sat16(34'(mul_re(v, tw_c, tw_s)));
      st_val.im = sat16(34'(mul_im(v, tw_c, tw_s)));
    end else begin
      st_val = v;
    end
  end

  logic bf_fire, st_fire;
  assign bf_fire = (state == S_COMP) && !tf_empty;

  always_comb begin
    bus_req = '0;
    st_fire = 1'b0;
    if (state == S_LOAD && li < len) begin
      bus_req.req  = 1'b1;
      bus_req.we   = 1'b0;
      bus_req.addr = base + (BUS_AW'(li) << stride_log);
    end else if (state == S_STORE && (!rot_en || !tf_empty)) begin
      bus_req.req   = 1'b1;
      bus_req.we    = 1'b1;
      bus_req.addr  = base + (BUS_AW'(sk) << stride_log);
      bus_req.wdata = st_val;
      st_fire       = bus_rsp.gnt;
    end
  end

  assign tf_pop    = bf_fire || (st_fire && rot_en);
  assign cmd_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      base       <= '0;
      stride_log <= '0;
      len_log    <= '0;
      inverse    <= 1'b0;
      scale_mask <= '0;
      rot_en     <= 1'b0;
      rot_n1     <= '0;
      rot_klog   <= '0;
      li <= '0; lr <= '0; st <= '0; b <= '0; sk <= '0;
      rq_busy <= 1'b0; rq_rot <= 1'b0; rq_st <= '0; rq_b <= '0;
    end else begin
      done <= 1'b0;
      // twiddle requester
      if (rq_fire) begin
        if (!rq_rot) begin
          if (rq_b == half_len - 1'b1) begin
            rq_b <= '0;
            if (rq_st == len_log - 1'b1) begin
              rq_st <= '0;
              if (rot_en) rq_rot <= 1'b1;
              else        rq_busy <= 1'b0;
            end else begin
              rq_st <= rq_st + 1'b1;
            end
          end else begin
            rq_b <= rq_b + 1'b1;
          end
        end else begin
          if (rq_b == len - 1'b1) begin
            rq_b    <= '0;
            rq_busy <= 1'b0;
          end else begin
            rq_b <= rq_b + 1'b1;
          end
        end
      end

      unique case (state)
        S_IDLE: if (cmd_valid) begin
          base       <= cmd_base;
          stride_log <= cmd_stride_log;
          len_log    <= cmd_len_log;
          inverse    <= cmd_inverse;
          scale_mask <= cmd_scale_mask;
          rot_en     <= cmd_rot_en;
          rot_n1     <= cmd_rot_n1;
          rot_klog   <= cmd_rot_klog;
          li <= '0; lr <= '0; st <= '0; b <= '0; sk <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (bus_rsp.gnt && li < len) li <= li + 1'b1;
          if (bus_rsp.rvalid) begin
            lr <= lr + 1'b1;
            if (lr == len - 1'b1) begin
              state   <= S_COMP;
              rq_busy <= 1'b1;
              rq_rot  <= 1'b0;
              rq_st   <= '0;
              rq_b    <= '0;
            end
          end
        end
        S_COMP: if (bf_fire) begin
          if (b == half_len - 1'b1) begin
            b <= '0;
            if (st == len_log - 1'b1) state <= S_STORE;
            else                      st <= st + 1'b1;
          end else begin
            b <= b + 1'b1;
          end
        end
        S_STORE: if (st_fire) begin
          sk <= sk + 1'b1;
          if (sk == len - 1'b1) state <= S_DONE;
        end
        default: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  // Local memory: written by the load and by the butterflies.
  always_ff @(posedge clk) begin
    if (state == S_LOAD && bus_rsp.rvalid)
      lmem[LMAX_LOG'(bitrev(lr, len_log))] <= cplx_t'(bus_rsp.rdata);
    if (bf_fire) begin
      lmem[i0[LMAX_LOG-1:0]] <= y0;
      lmem[i1[LMAX_LOG-1:0]] <= y1;
    end
  end

  a_len: assert property (@(posedge clk) disable iff (!rst_n)
                          (cmd_valid && cmd_ready) |-> (cmd_len_log >= 4'd1 && 32'(cmd_len_log) <= LMAX_LOG))
    else $error("fft_core: unsupported length");
endmodule
