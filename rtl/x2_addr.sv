// x2_addr: address generator that reads the spectrum X1 as the matrix X2.
//
// The correlator sees the K = N1*N2 point spectrum X1 as N2 columns of N1
// bins, X2(r2, r1) = X1(r2 + N2*r1): column r2 gathers the bins that carry
// the signal when its Doppler is r2 bins (125 Hz each) plus a whole number of
// columns. Shifting the replica by s columns reads X1(r2 + N2*((r1+s) mod N1)),
// which moves the searched Doppler band by s*N2 bins. Because the two-level
// FFT leaves its result transposed, the bin index is then mapped to its
// memory offset with gnss_pkg::fft_loc. Purely combinational. The X2 layout
// is the document's; the shift by whole columns is how this design sweeps
// the Doppler axis between iterations.
module x2_addr #(
  parameter int unsigned LMAX_LOG = 9
) (
  input  logic [gnss_pkg::LOGK_W-1:0] n1_log,
  input  logic [gnss_pkg::LOGK_W-1:0] n2_log,
  input  logic [gnss_pkg::MEM_AW-1:0] r1,
  input  logic [gnss_pkg::MEM_AW-1:0] r2,
  input  logic signed [15:0]          s,
  output logic [gnss_pkg::MEM_AW-1:0] bin,
  output logic [gnss_pkg::MEM_AW-1:0] offset
);
  import gnss_pkg::*;

  logic [MEM_AW-1:0] r1s, n1_mask;
  always_comb begin
    n1_mask = (MEM_AW'(1) << n1_log) - 1'b1;
    r1s     = (r1 + MEM_AW'($unsigned(32'(s)))) & n1_mask;
    bin     = r2 | (r1s << n2_log);
    offset  = fft_loc(bin, n1_log + n2_log, LOGK_W'(LMAX_LOG));
  end
endmodule
