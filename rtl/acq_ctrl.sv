// acq_ctrl: sequencer of the acquisition.
//
// After start it (1) has the storage block capture N3 blocks of K = N1*N2
// samples, (2) transforms each block with the forward FFT, then for every
// satellite from sat_first to sat_last (3) clears the decision block and,
// for each replica shift s and each Doppler column r2, runs for every
// non-coherent period l and replica pass p (two passes with SCPC): the
// correlator on column r2 of block l against replica p of the satellite, the
// inverse FFT of the N1-point result, and the integrator, which starts the
// accumulator on the first pass and hands envelopes to the decision block on
// the last. After the last shift it reports the satellite's result on
// res_valid for one cycle. done pulses when all satellites are searched.
// Replica p of satellite n is read at ROM word (n*passes + p)*N1. The steps
// and their nesting follow the document's algorithm; the document runs this
// control in software on a processor, this design does it in hardware, and
// the loop order (shifts, then columns, then periods) is its own choice,
// which keeps the accumulator at N1 words.
// The top bit of cor_rep_addr is constant 1: it selects the replica ROM on
// the bus.
module acq_ctrl (
  input  logic                          clk,
  input  logic                          rst_n,
  input  gnss_pkg::acq_cfg_t            cfg,
  input  logic                          start,
  input  logic [5:0]                    sat_first,
  input  logic [5:0]                    sat_last,
  output logic                          busy,
  output logic                          done,
  // storage
  output logic                          st_start,
  output logic [gnss_pkg::MEM_AW:0]     st_count,
  input  logic                          st_done,
  // FFT
  output logic                          fft_start,
  output logic [gnss_pkg::BUS_AW-1:0]   fft_base,
  output logic [gnss_pkg::LOGK_W-1:0]   fft_klog,
  output logic                          fft_inverse,
  output logic [8:0]                    fft_mask1,
  output logic [8:0]                    fft_mask2,
  input  logic                          fft_ready,
  input  logic                          fft_done,
  // correlator
  output logic                          cor_start,
  output logic [gnss_pkg::MEM_AW-1:0]   cor_x_base,
  output logic [gnss_pkg::BUS_AW-1:0]   cor_rep_addr,
  output logic [gnss_pkg::MEM_AW-1:0]   col,
  output logic signed [15:0]            shift,
  input  logic                          cor_done,
  // integrator
  output logic                          int_start,
  output logic                          int_first,
  output logic                          int_last,
  input  logic                          int_done,
  // decision
  output logic                          dec_clear,
  output logic                          res_valid,
  output logic [5:0]                    res_sat
);
  import gnss_pkg::*;

  typedef enum logic [3:0] {
    A_IDLE, A_CAP, A_CAPW, A_FFT, A_FFTW, A_SAT, A_COR, A_CORW,
    A_IFFT, A_IFFTW, A_INT, A_INTW, A_NEXT, A_RES
  } astate_e;
  astate_e state;

  logic [3:0]        blk;       // non-coherent period l
  logic              pass;      // replica pass p
  logic [15:0]       it;        // shift index
  logic [5:0]        sat;
  logic [LOGK_W-1:0] klog;

  assign klog     = cfg.n1_log + cfg.n2_log;
  assign busy     = (state != A_IDLE);
  assign st_count = (MEM_AW+1)'(cfg.n3) << klog;
  assign st_start = (state == A_CAP);
  assign cor_start = (state == A_COR);
  assign int_start = (state == A_INT);
  assign cor_x_base = MEM_AW'(blk) << klog;
  assign cor_rep_addr = {1'b1, ((MEM_AW'(sat) << cfg.scpc) + MEM_AW'(pass)) << cfg.n1_log};
  assign int_first = (blk == 0) && !pass;
  assign int_last  = (blk == cfg.n3 - 1'b1) && (pass == cfg.scpc);

  always_comb begin
    fft_start   = (state == A_FFT) || (state == A_IFFT);
    if (state == A_FFT || state == A_FFTW) begin
      fft_base    = BUS_AW'(MEM_AW'(blk) << klog);
      fft_klog    = klog;
      fft_inverse = 1'b0;
      fft_mask1   = cfg.fwd_mask1;
      fft_mask2   = cfg.fwd_mask2;
    end else begin
      fft_base    = BUS_AW'(cfg.work_base);
      fft_klog    = cfg.n1_log;
      fft_inverse = 1'b1;
      fft_mask1   = cfg.inv_mask1;
      fft_mask2   = cfg.inv_mask2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A_IDLE;
      done <= 1'b0; dec_clear <= 1'b0; res_valid <= 1'b0;
      blk <= '0; pass <= 1'b0; it <= '0; sat <= '0; col <= '0; shift <= '0;
      res_sat <= '0;
    end else begin
      done      <= 1'b0;
      dec_clear <= 1'b0;
      res_valid <= 1'b0;
      unique case (state)
        A_IDLE: if (start) begin
          sat   <= sat_first;
          blk   <= '0;
          state <= A_CAP;
        end
        A_CAP:  state <= A_CAPW;
        A_CAPW: if (st_done) state <= A_FFT;
        A_FFT:  if (fft_ready) state <= A_FFTW;
        A_FFTW: if (fft_done) begin
          if (blk == cfg.n3 - 1'b1) begin
            blk   <= '0;
            state <= A_SAT;
          end else begin
            blk   <= blk + 1'b1;
            state <= A_FFT;
          end
        end
        A_SAT: begin
          dec_clear <= 1'b1;
          it    <= '0;
          shift <= cfg.s_first;
          col   <= '0;
          blk   <= '0;
          pass  <= 1'b0;
          state <= A_COR;
        end
        A_COR:   state <= A_CORW;
        A_CORW:  if (cor_done) state <= A_IFFT;
        A_IFFT:  if (fft_ready) state <= A_IFFTW;
        A_IFFTW: if (fft_done) state <= A_INT;
        A_INT:   state <= A_INTW;
        A_INTW:  if (int_done) state <= A_NEXT;
        A_NEXT: begin
          state <= A_COR;
          if (pass != cfg.scpc) begin
            pass <= 1'b1;
          end else begin
            pass <= 1'b0;
            if (blk != cfg.n3 - 1'b1) begin
              blk <= blk + 1'b1;
            end else begin
              blk <= '0;
              if (col != (MEM_AW'(1) << cfg.n2_log) - 1'b1) begin
                col <= col + 1'b1;
              end else begin
                col <= '0;
                if (it != cfg.n_iter - 1'b1) begin
                  it    <= it + 1'b1;
                  shift <= shift + 1'b1;
                end else begin
                  state <= A_RES;
                end
              end
            end
          end
        end
        default: begin  // A_RES: decision outputs are settled
          res_valid <= 1'b1;
          res_sat   <= sat;
          if (sat == sat_last) begin
            done  <= 1'b1;
            state <= A_IDLE;
          end else begin
            sat   <= sat + 1'b1;
            state <= A_SAT;
          end
        end
      endcase
    end
  end
endmodule
