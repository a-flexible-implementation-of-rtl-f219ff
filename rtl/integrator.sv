// integrator: square-law detector and non-coherent integration.
//
// For each code delay tau = 0..N1-1 of one Doppler column it reads the
// inverse-FFT output at work_base (in the transposed order of the two-level
// FFT, see gnss_pkg::fft_loc), forms the energy (re^2 + im^2) >> ESHIFT and
// adds it, with saturation, to the accumulator word acc_base + tau. On the
// first pass (`first`) the accumulator is overwritten instead of read. The
// passes over one column are the N3 non-coherent periods and, for Galileo
// with sub-carrier phase cancellation (SCPC), the in-phase and quadrature
// sub-carrier replicas, whose energies are summed the same way. On the last
// pass (`last`) the sum is not written back: its square root, from the SQRT
// unit, is sent with r2 and tau to the decision block. done pulses after the
// last delay. Per delay it takes about six bus cycles, plus the SQRT latency
// on the last pass. The detector, the sum over N3 and the I/Q combination
// follow the document; the envelope (square root) on the last pass, the
// energy scaling and the memory layout are this design's.
module integrator #(
  parameter int unsigned LMAX_LOG = 9,
  parameter int unsigned ESHIFT   = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [gnss_pkg::MEM_AW-1:0]   work_base,
  input  logic [gnss_pkg::MEM_AW-1:0]   acc_base,
  input  logic [gnss_pkg::LOGK_W-1:0]   n1_log,
  input  logic [gnss_pkg::MEM_AW-1:0]   r2,
  input  logic                          first,
  input  logic                          last,
  output logic                          busy,
  output logic                          done,
  output gnss_pkg::bus_req_t            bus_req,
  input  gnss_pkg::bus_rsp_t            bus_rsp,
  // SQRT link
  output logic                          sq_valid,
  output logic [31:0]                   sq_data,
  input  logic                          sq_rsp_valid,
  input  logic [15:0]                   sq_rsp_root,
  // to the decision block
  output logic                          det_valid,
  output logic [15:0]                   det_value,
  output logic [gnss_pkg::MEM_AW-1:0]   det_r2,
  output logic [gnss_pkg::MEM_AW-1:0]   det_tau
);
  import gnss_pkg::*;

  typedef enum logic [2:0] {I_IDLE, I_RW, I_WW, I_RA, I_WA, I_SQ, I_SW, I_WR} istate_e;
  istate_e state;

  logic [MEM_AW-1:0] wb, ab, col, tau;
  logic [LOGK_W-1:0] l1;
  logic              fst, lst;
  logic [31:0]       energy, sum;
  cplx_t             wv;

  function automatic logic [31:0] sat_add(input logic [31:0] a, input logic [31:0] b);
    logic [32:0] t;
    t = {1'b0, a} + {1'b0, b};
    return t[32] ? 32'hFFFF_FFFF : t[31:0];
  endfunction

  always_comb begin
    logic [32:0] e;
    e = 33'(wv.re * wv.re) + 33'(wv.im * wv.im);
    energy = 32'(e >> ESHIFT);
  end

  always_comb begin
    bus_req = '0;
    unique case (state)
      I_RW: begin
        bus_req.req  = 1'b1;
        bus_req.addr = BUS_AW'(wb) + BUS_AW'(fft_loc(tau, l1, LOGK_W'(LMAX_LOG)));
      end
      I_RA: begin
        bus_req.req  = 1'b1;
        bus_req.addr = BUS_AW'(ab) + BUS_AW'(tau);
      end
      I_WR: if (!lst) begin
        bus_req.req   = 1'b1;
        bus_req.we    = 1'b1;
        bus_req.addr  = BUS_AW'(ab) + BUS_AW'(tau);
        bus_req.wdata = sum;
      end
      default: ;
    endcase
  end

  assign busy     = (state != I_IDLE);
  assign sq_valid = (state == I_SQ);
  assign sq_data  = sum;

  logic last_tau;
  assign last_tau = (tau == (MEM_AW'(1) << l1) - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= I_IDLE;
      done  <= 1'b0;
      wb <= '0; ab <= '0; col <= '0; tau <= '0; l1 <= '0;
      fst <= 1'b0; lst <= 1'b0; sum <= '0; wv <= '0;
      det_valid <= 1'b0; det_value <= '0; det_r2 <= '0; det_tau <= '0;
    end else begin
      done      <= 1'b0;
      det_valid <= 1'b0;
      unique case (state)
        I_IDLE: if (start) begin
          wb <= work_base; ab <= acc_base; col <= r2; l1 <= n1_log;
          fst <= first; lst <= last; tau <= '0;
          state <= I_RW;
        end
        I_RW: if (bus_rsp.gnt) state <= I_WW;
        I_WW: if (bus_rsp.rvalid) begin
          wv    <= cplx_t'(bus_rsp.rdata);
          state <= fst ? I_SW : I_RA;
        end
        I_RA: if (bus_rsp.gnt) state <= I_WA;
        I_WA: if (bus_rsp.rvalid) begin
          sum   <= sat_add(bus_rsp.rdata, energy);
          state <= lst ? I_SQ : I_WR;
        end
        I_SW: begin  // first pass: the sum is the energy alone
          sum   <= energy;
          state <= lst ? I_SQ : I_WR;
        end
        I_SQ: state <= I_WR;  // operand handed to SQRT, wait in I_WR
        I_WR: begin
          if (lst ? sq_rsp_valid : bus_rsp.gnt) begin
            if (lst) begin
              det_valid <= 1'b1;
              det_value <= sq_rsp_root;
              det_r2    <= col;
              det_tau   <= tau;
            end
            if (last_tau) begin
              state <= I_IDLE;
              done  <= 1'b1;
            end else begin
              tau   <= tau + 1'b1;
              state <= I_RW;
            end
          end
        end
        default: state <= I_IDLE;
      endcase
    end
  end
endmodule
