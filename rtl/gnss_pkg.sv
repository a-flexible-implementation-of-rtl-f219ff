// gnss_pkg: types and constants shared by the blocks of the GNSS acquisition
// engine.
//
// All data words on the shared bus are 32 bits. A complex value is packed as
// 16-bit signed real part (upper half) and 16-bit signed imaginary part (lower
// half), following the 16-bit internal precision of the FFT. The bus address is
// word-based; its top bit selects the replica ROM, the rest address the RAM.
// The package also carries the four signal/mission modes of the receiver and
// the configuration record that the configuration block hands to the
// acquisition sequencer, plus the address map of the two-level FFT output.
package gnss_pkg;

  localparam int unsigned DATA_W = 32;
  // Word address width of the RAM and of the replica ROM.
  localparam int unsigned MEM_AW = 18;
  // Bus address: bit MEM_AW selects the ROM.
  localparam int unsigned BUS_AW = MEM_AW + 1;
  // Phase of the trigonometric unit: a full turn is 2^PH_W.
  localparam int unsigned PH_W = 16;
  // Largest transform handled by the two-level FFT (2^LOGK_MAX points).
  localparam int unsigned LOGK_W = 5;

  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cplx_t;

  // One bus master request. A request stays asserted until gnt is seen.
  typedef struct packed {
    logic              req;
    logic              we;
    logic [BUS_AW-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } bus_req_t;

  // Response to one master: gnt accepts the request in the current cycle,
  // rvalid returns read data one cycle after the accepting cycle.
  typedef struct packed {
    logic              gnt;
    logic              rvalid;
    logic [DATA_W-1:0] rdata;
  } bus_rsp_t;

  typedef enum logic [1:0] {
    MODE_GPS_LEO = 2'd0,
    MODE_GPS_GEO = 2'd1,
    MODE_GAL_LEO = 2'd2,
    MODE_GAL_GEO = 2'd3
  } mode_e;

  // Configuration of one acquisition, produced by acq_config.
  typedef struct packed {
    logic [LOGK_W-1:0]  n1_log;     // log2 N1, samples per code period
    logic [LOGK_W-1:0]  n2_log;     // log2 N2, code periods per coherent time
    logic [3:0]         n3;         // non-coherent integrations
    logic               scpc;       // two replica passes (sub-carrier I and Q)
    logic signed [15:0] s_first;    // first replica shift (in columns of N2 bins)
    logic [15:0]        n_iter;     // number of replica shifts
    logic [8:0]         fwd_mask1;  // stage scaling, forward FFT, level 1
    logic [8:0]         fwd_mask2;  // stage scaling, forward FFT, level 2
    logic [8:0]         inv_mask1;  // stage scaling, inverse FFT, level 1
    logic [8:0]         inv_mask2;  // stage scaling, inverse FFT, level 2
    logic [MEM_AW-1:0]  work_base;  // N1-word buffer of the correlator / IFFT
    logic [MEM_AW-1:0]  acc_base;   // N1-word non-coherent accumulator
  } acq_cfg_t;

  // Split of a 2^logk point transform into a first level of 2^l1 points and a
  // second level of 2^(logk-l1) points, l1 limited by the local FFT size.
  function automatic logic [LOGK_W-1:0] fft_l1_log(input logic [LOGK_W-1:0] logk,
                                                  input logic [LOGK_W-1:0] lmax_log);
    return (logk > lmax_log) ? lmax_log : logk;
  endfunction

  // Memory offset of frequency bin m after the two-level FFT: the result is
  // left transposed, bin m sits at (m mod L1) * L2 + (m div L1).
  function automatic logic [MEM_AW-1:0] fft_loc(input logic [MEM_AW-1:0] m,
                                               input logic [LOGK_W-1:0] logk,
                                               input logic [LOGK_W-1:0] lmax_log);
    logic [LOGK_W-1:0] l1, l2;
    logic [MEM_AW-1:0] lo, hi;
    l1 = fft_l1_log(logk, lmax_log);
    l2 = logk - l1;
    lo = m & ((MEM_AW'(1) << l1) - 1'b1);
    hi = m >> l1;
    return (lo << l2) | hi;
  endfunction

  function automatic cplx_t to_cplx(input logic [DATA_W-1:0] w);
    return cplx_t'(w);
  endfunction

  function automatic logic signed [15:0] sat16(input logic signed [33:0] v);
    if (v > 34'sd32767) return 16'sd32767;
    if (v < -34'sd32768) return -16'sd32768;
    return v[15:0];
  endfunction

endpackage
