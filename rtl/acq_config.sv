// acq_config: configuration of the processing chain for one application.
//
// Maps the signal and mission mode to the search-array sizes of the
// acquisition (N1 samples per code period, N2 periods per coherent
// integration of 8 ms, N3 non-coherent integrations), to the number of
// replica shifts that cover the Doppler range (672 bins of 125 Hz in low
// Earth orbit, 128 in geostationary orbit, N2 bins per shift), to SCPC for
// Galileo and to the memory layout and FFT scaling. Combinational.
//
//   mode        N1     N2  N3  Doppler bins  shifts
//   GPS  LEO   4096    8   1   672            84
//   GPS  GEO   2048    8   7   128            16
//   Gal  LEO  32768    2   1   672           336
//   Gal  GEO  16384    2   7   128            64
//
// n_iter_ovr, when non-zero, replaces the number of shifts (a narrower search
// centred on zero Doppler). N1_DIV_LOG divides every N1 by a power of two to
// run the same chain on short records; its default 0 gives the sizes above.
// The sizes, Doppler ranges and the 125 Hz step come from the document; the
// centring of the search, the scaling pattern (halving on every other FFT
// stage) and the layout (N3 sample blocks, then an N1-word work buffer and an
// N1-word accumulator) are this design's.
// Some bits of cfg are constant for all four modes (for example the upper
// bits of the sizes and masks, and the low bits of the base addresses, which
// are multiples of N1); they are kept so that the record type stays general.
module acq_config #(
  parameter int unsigned N1_DIV_LOG = 0,
  parameter int unsigned LMAX_LOG   = 9
) (
  input  gnss_pkg::mode_e   mode,
  input  logic [15:0]       n_iter_ovr,
  output gnss_pkg::acq_cfg_t cfg
);
  import gnss_pkg::*;

  logic [LOGK_W-1:0] n1l, n2l, kl, l1, l2;
  logic [3:0]        n3;
  logic              scpc;
  logic [15:0]       dopp_bins, iters;
  logic [MEM_AW:0]   blocks_end;

  always_comb begin
    unique case (mode)
      MODE_GPS_LEO: begin n1l = 5'd12; n2l = 5'd3; n3 = 4'd1; scpc = 1'b0; dopp_bins = 16'd672; end
      MODE_GPS_GEO: begin n1l = 5'd11; n2l = 5'd3; n3 = 4'd7; scpc = 1'b0; dopp_bins = 16'd128; end
      MODE_GAL_LEO: begin n1l = 5'd15; n2l = 5'd1; n3 = 4'd1; scpc = 1'b1; dopp_bins = 16'd672; end
      default:      begin n1l = 5'd14; n2l = 5'd1; n3 = 4'd7; scpc = 1'b1; dopp_bins = 16'd128; end
    endcase
    n1l   = n1l - LOGK_W'(N1_DIV_LOG);
    kl    = n1l + n2l;
    iters = (n_iter_ovr != 0) ? n_iter_ovr : (dopp_bins >> n2l);

    cfg           = '0;
    cfg.n1_log    = n1l;
    cfg.n2_log    = n2l;
    cfg.n3        = n3;
    cfg.scpc      = scpc;
    cfg.n_iter    = iters;
    cfg.s_first   = -$signed(16'(iters >> 1));
    // Halve the outputs of every other butterfly stage.
    l1            = fft_l1_log(kl, LOGK_W'(LMAX_LOG));
    l2            = kl - l1;
    cfg.fwd_mask1 = 9'h155 & ((9'd1 << l1) - 1'b1);
    cfg.fwd_mask2 = 9'h155 & ((9'd1 << l2) - 1'b1);
    l1            = fft_l1_log(n1l, LOGK_W'(LMAX_LOG));
    l2            = n1l - l1;
    cfg.inv_mask1 = 9'h155 & ((9'd1 << l1) - 1'b1);
    cfg.inv_mask2 = 9'h155 & ((9'd1 << l2) - 1'b1);
    blocks_end    = (MEM_AW+1)'(n3) << kl;
    cfg.work_base = blocks_end[MEM_AW-1:0];
    cfg.acc_base  = blocks_end[MEM_AW-1:0] + (MEM_AW'(1) << n1l);
  end
endmodule
