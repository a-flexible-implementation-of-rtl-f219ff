// gnss_acq_top: FFT-based acquisition engine of a GNSS L1 receiver (GPS C/A
// and Galileo E1 OS as BOC(1,1)).
//
// The engine searches the code delay and the Doppler of every satellite of a
// range at once with FFTs. The storage block captures N3 blocks of N1*N2
// samples from the front end; each block is transformed by the variable-size
// FFT; for every satellite and every shift of the local replica, each of the
// N2 columns of the spectrum (one Doppler bin of 125 Hz each) is multiplied
// by the replica spectrum read from the replica ROM, brought back by an
// N1-point inverse FFT and integrated non-coherently; the decision block keeps
// the strongest cell and compares it with the threshold. The processing
// modules share one bus to the RAM and the ROM; the twiddle factors come
// from the trigonometric unit and the envelope from the SQRT unit, each over
// a direct link. The configuration block sets the sizes for the selected
// mode; the sequencer runs the loops.
//
// Interface: set mode, threshold, sat_first/sat_last and n_iter_ovr (0 for
// the full Doppler range of the mode), pulse start, then offer N3*N1*N2
// samples on s_valid/s_i/s_q. One result per satellite comes out on
// res_valid; done pulses at the end. The replica spectra are written
// beforehand through the rom_* load port. Parameters: LMAX_LOG, the local
// FFT size (512 points in the document); N1_DIV_LOG, which shortens every N1
// by a power of two for quick runs (0 gives the document's sizes); MEM_AW
// fixed by the package. The block set and their links follow the document's
// platform; the processor-based control, the OPB bus and the memory
// controllers are replaced by the hardware sequencer, a simple shared bus
// and plain memories.
module gnss_acq_top #(
  parameter int unsigned LMAX_LOG   = 9,
  parameter int unsigned N1_DIV_LOG = 0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // control
  input  logic [1:0]                    mode,
  input  logic [15:0]                   n_iter_ovr,
  input  logic [15:0]                   threshold,
  input  logic [5:0]                    sat_first,
  input  logic [5:0]                    sat_last,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  // front-end samples
  input  logic                          s_valid,
  input  logic signed [3:0]             s_i,
  input  logic signed [3:0]             s_q,
  output logic                          overflow,
  // replica ROM load port
  input  logic                          rom_we,
  input  logic [gnss_pkg::MEM_AW-1:0]   rom_addr,
  input  logic [31:0]                   rom_data,
  // results
  output logic                          res_valid,
  output logic [5:0]                    res_sat,
  output logic                          res_detected,
  output logic signed [15:0]            res_dopp,
  output logic [gnss_pkg::MEM_AW-1:0]   res_tau,
  output logic [15:0]                   res_value,
  output logic [23:0]                   res_n_above
);
  import gnss_pkg::*;

  acq_cfg_t cfg;
  bus_req_t m_req [4];
  bus_rsp_t m_rsp [4];

  acq_config #(.N1_DIV_LOG(N1_DIV_LOG), .LMAX_LOG(LMAX_LOG)) u_cfg (
    .mode(mode_e'(mode)), .n_iter_ovr, .cfg
  );

  // ----------------------------------------------------------- sequencer
  logic              st_start, st_done, st_busy;
  logic [MEM_AW:0]   st_count;
  logic              fft_start, fft_ready, fft_done, fft_inverse;
  logic [BUS_AW-1:0] fft_base;
  logic [LOGK_W-1:0] fft_klog;
  logic [8:0]        fft_mask1, fft_mask2;
  logic              cor_start, cor_done, cor_busy;
  logic [MEM_AW-1:0] cor_x_base, col;
  logic [BUS_AW-1:0] cor_rep_addr;
  logic signed [15:0] shift;
  logic              int_start, int_first, int_last, int_done, int_busy;
  logic              dec_clear;

  acq_ctrl u_ctrl (
    .clk, .rst_n, .cfg, .start, .sat_first, .sat_last, .busy, .done,
    .st_start, .st_count, .st_done,
    .fft_start, .fft_base, .fft_klog, .fft_inverse, .fft_mask1, .fft_mask2,
    .fft_ready, .fft_done,
    .cor_start, .cor_x_base, .cor_rep_addr, .col, .shift, .cor_done,
    .int_start, .int_first, .int_last, .int_done,
    .dec_clear, .res_valid, .res_sat
  );

  // ----------------------------------------------------------- modules
  storage u_storage (
    .clk, .rst_n, .start(st_start), .base('0), .count(st_count),
    .s_valid, .s_i, .s_q, .busy(st_busy), .done(st_done), .overflow,
    .bus_req(m_req[0]), .bus_rsp(m_rsp[0])
  );

  logic              tw_req_valid, tw_rsp_valid;
  logic [PH_W-1:0]   tw_req_phase;
  logic signed [15:0] tw_cos, tw_sin;

  fft_unit #(.LMAX_LOG(LMAX_LOG)) u_fft (
    .clk, .rst_n,
    .cmd_valid(fft_start), .cmd_ready(fft_ready), .cmd_base(fft_base), .cmd_klog(fft_klog),
    .cmd_inverse(fft_inverse), .cmd_mask1(fft_mask1), .cmd_mask2(fft_mask2), .done(fft_done),
    .bus_req(m_req[1]), .bus_rsp(m_rsp[1]),
    .tw_req_valid, .tw_req_phase, .tw_rsp_valid, .tw_rsp_cos(tw_cos), .tw_rsp_sin(tw_sin)
  );

  trigo u_trigo (
    .clk, .rst_n, .in_valid(tw_req_valid), .in_phase(tw_req_phase),
    .out_valid(tw_rsp_valid), .out_cos(tw_cos), .out_sin(tw_sin)
  );

  correlator #(.LMAX_LOG(LMAX_LOG)) u_cor (
    .clk, .rst_n, .start(cor_start), .x_base(cor_x_base), .rep_addr(cor_rep_addr),
    .work_base(cfg.work_base), .n1_log(cfg.n1_log), .n2_log(cfg.n2_log),
    .r2(col), .s(shift), .busy(cor_busy), .done(cor_done),
    .bus_req(m_req[2]), .bus_rsp(m_rsp[2])
  );

  logic              sq_valid, sq_rsp_valid;
  logic [31:0]       sq_data;
  logic [15:0]       sq_root;
  logic              det_valid;
  logic [15:0]       det_value;
  logic [MEM_AW-1:0] det_r2, det_tau;

  integrator #(.LMAX_LOG(LMAX_LOG)) u_int (
    .clk, .rst_n, .start(int_start), .work_base(cfg.work_base), .acc_base(cfg.acc_base),
    .n1_log(cfg.n1_log), .r2(col), .first(int_first), .last(int_last),
    .busy(int_busy), .done(int_done),
    .bus_req(m_req[3]), .bus_rsp(m_rsp[3]),
    .sq_valid, .sq_data, .sq_rsp_valid, .sq_rsp_root(sq_root),
    .det_valid, .det_value, .det_r2, .det_tau
  );

  sqrt_unit u_sqrt (
    .clk, .rst_n, .in_valid(sq_valid), .in_data(sq_data),
    .out_valid(sq_rsp_valid), .out_root(sq_root)
  );

  decision u_dec (
    .clk, .rst_n, .clear(dec_clear), .threshold, .s(shift), .n2_log(cfg.n2_log),
    .det_valid, .det_value, .det_r2, .det_tau,
    .best_value(res_value), .best_dopp(res_dopp), .best_tau(res_tau),
    .detected(res_detected), .n_above(res_n_above)
  );

  // ----------------------------------------------------------- bus, memories
  logic              ram_en, ram_we, rom_en;
  logic [MEM_AW-1:0] ram_addr, rom_raddr;
  logic [31:0]       ram_wdata, ram_rdata, rom_rdata;

  acq_bus #(.NM(4)) u_bus (
    .clk, .rst_n, .m_req, .m_rsp,
    .ram_en, .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
    .rom_en, .rom_addr(rom_raddr), .rom_rdata
  );

  sp_ram u_ram (
    .clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata)
  );

  replica_rom u_rom (
    .clk, .ld_we(rom_we), .ld_addr(rom_addr), .ld_data(rom_data),
    .rd_en(rom_en), .rd_addr(rom_raddr), .rd_data(rom_rdata)
  );
endmodule
