// correlator: frequency-domain correlation of one column of the signal
// spectrum with the local replica spectrum.
//
// For r1 = 0..N1-1 it reads the signal bin X2(r2, r1+s) (through x2_addr,
// from the forward FFT result at x_base) and the replica bin C(r1) (from
// rep_addr, normally in the ROM), and writes Z(r1) = X * conj(C), scaled by
// 2^-ZSHIFT with rounding and saturated to 16 bits, to work_base + r1. The
// inverse FFT of Z is then the circular correlation of the signal with the
// replica for every code delay, at the Doppler of column r2 shifted by s
// columns. Each point takes five cycles (two reads, one write) when the bus
// grants at once. done pulses after the last write. The operation follows
// the document (step 3 of the algorithm); the sequencing and the fixed-point
// scaling are this design's.
module correlator #(
  parameter int unsigned LMAX_LOG = 9,
  parameter int unsigned ZSHIFT   = 15
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [gnss_pkg::MEM_AW-1:0]   x_base,
  input  logic [gnss_pkg::BUS_AW-1:0]   rep_addr,
  input  logic [gnss_pkg::MEM_AW-1:0]   work_base,
  input  logic [gnss_pkg::LOGK_W-1:0]   n1_log,
  input  logic [gnss_pkg::LOGK_W-1:0]   n2_log,
  input  logic [gnss_pkg::MEM_AW-1:0]   r2,
  input  logic signed [15:0]            s,
  output logic                          busy,
  output logic                          done,
  output gnss_pkg::bus_req_t            bus_req,
  input  gnss_pkg::bus_rsp_t            bus_rsp
);
  import gnss_pkg::*;

  typedef enum logic [2:0] {C_IDLE, C_RX, C_WX, C_RC, C_WC, C_WR} cstate_e;
  cstate_e state;

  logic [MEM_AW-1:0]   xb, wb, col, r1;
  logic [BUS_AW-1:0]   rb;
  logic [LOGK_W-1:0]   l1, l2;
  logic signed [15:0]  sh;
  cplx_t               xv, cv, zv;
  logic [MEM_AW-1:0]   x_off, x_bin;

  x2_addr #(.LMAX_LOG(LMAX_LOG)) u_x2 (
    .n1_log(l1), .n2_log(l2), .r1(r1), .r2(col), .s(sh), .bin(x_bin), .offset(x_off)
  );

  always_comb begin
    logic signed [33:0] pr, pi;
    pr = 34'(xv.re * cv.re) + 34'(xv.im * cv.im) + (34'sd1 <<< (ZSHIFT - 1));
    pi = 34'(xv.im * cv.re) - 34'(xv.re * cv.im) + (34'sd1 <<< (ZSHIFT - 1));
    zv.re = sat16(pr >>> ZSHIFT);
    zv.im = sat16(pi >>> ZSHIFT);
  end

  always_comb begin
    bus_req = '0;
    unique case (state)
      C_RX: begin
        bus_req.req  = 1'b1;
        bus_req.addr = BUS_AW'(xb) + BUS_AW'(x_off);
      end
      C_RC: begin
        bus_req.req  = 1'b1;
        bus_req.addr = rb + BUS_AW'(r1);
      end
      C_WR: begin
        bus_req.req   = 1'b1;
        bus_req.we    = 1'b1;
        bus_req.addr  = BUS_AW'(wb) + BUS_AW'(r1);
        bus_req.wdata = zv;
      end
      default: ;
    endcase
  end

  assign busy = (state != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      done  <= 1'b0;
      xb <= '0; wb <= '0; col <= '0; r1 <= '0; rb <= '0;
      l1 <= '0; l2 <= '0; sh <= '0;
      xv <= '0; cv <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        C_IDLE: if (start) begin
          xb <= x_base; wb <= work_base; rb <= rep_addr;
          l1 <= n1_log; l2 <= n2_log; col <= r2; sh <= s;
          r1 <= '0;
          state <= C_RX;
        end
        C_RX: if (bus_rsp.gnt) state <= C_WX;
        C_WX: if (bus_rsp.rvalid) begin
          xv    <= cplx_t'(bus_rsp.rdata);
          state <= C_RC;
        end
        C_RC: if (bus_rsp.gnt) state <= C_WC;
        C_WC: if (bus_rsp.rvalid) begin
          cv    <= cplx_t'(bus_rsp.rdata);
          state <= C_WR;
        end
        C_WR: if (bus_rsp.gnt) begin
          if (r1 == (MEM_AW'(1) << l1) - 1'b1) begin
            state <= C_IDLE;
            done  <= 1'b1;
          end else begin
            r1    <= r1 + 1'b1;
            state <= C_RX;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
