# FFT-based GNSS acquisition engine (GPS L1 C/A and Galileo E1 OS)

Before a GNSS receiver can track a satellite, it has to find two unknowns for it:
the code delay τ of its spreading code, and the residual Doppler frequency f_d of
its carrier. Acquisition searches this two-dimensional grid and returns the cell
where the correlation peak is. This RTL does that search for a receiver that
rides on a satellite, in low Earth orbit (LEO, ±42 kHz Doppler) or
geostationary orbit (GEO, ±8 kHz). It runs in one of four modes:

| mode        | N1 samples per code period | N2 periods per 8 ms | N3 non-coherent sums | Doppler bins (125 Hz) | replica shifts |
|-------------|-------:|---:|---:|----:|----:|
| GPS / LEO   |  4096  | 8  | 1  | 672 |  84 |
| GPS / GEO   |  2048  | 8  | 7  | 128 |  16 |
| Galileo / LEO | 32768 | 2 | 1  | 672 | 336 |
| Galileo / GEO | 16384 | 2 | 7  | 128 |  64 |

The main idea is to search the delay and the Doppler axes with the **same**
FFTs. It does not sweep the Doppler by mixing the input with a carrier for
each frequency. Instead:

1. The engine takes the FFT of a whole coherent record, K = N1·N2 samples
   (8 ms). This gives the spectrum X1.
2. It reads X1 as a matrix: X2(r2, r1) = X1(r2 + N2·r1). There are N2
   columns of N1 bins each. The code repeats N2 times in the record, so the
   code's energy lies only on every N2-th bin. A Doppler of d bins moves that
   energy onto column r2 = d mod N2. So each column holds the signal for one
   Doppler bin.
3. Each column is multiplied by the conjugate of the replica's code spectrum
   C(r1), one N1-point spectrum per satellite.
4. An N1-point inverse FFT of each product gives the circular correlation for
   all N1 code delays, for each of the N2 Doppler bins.

Steps 3 and 4 are repeated with the replica shifted by s whole bins. The
column is then read as X2(r2, r1+s), so each repeat covers the next N2 Doppler
bins (1 kHz for GPS, 250 Hz for Galileo). The Doppler found is
d = r2 + s·N2 bins of 125 Hz, and the delay is τ samples. For GEO, the squared
magnitudes of N3 = 7 successive records are added (non-coherent integration)
before the peak search.

Galileo E1 is processed as BOC(1,1). It uses sub-carrier phase cancellation
(SCPC): each satellite has two replica spectra, one for the sub-carrier in
phase and one in quadrature. The energies of the two correlations are added.
This removes the side peaks of the BOC correlation.

## Data flow

```
front end (4-bit I/Q) -> storage -> RAM: N3 blocks of K samples
                                      |
        fft_unit (forward, K points, in place) <-> trigo (twiddles, FIFO link)
                                      |
 for each satellite, shift s, column r2, record l, replica pass p:
   correlator:  work[r1] = X2_l(r2, r1+s) * conj(C_p(r1))      (RAM, ROM -> RAM)
   fft_unit:    inverse N1-point FFT of work, in place
   integrator:  acc[tau] (+)= |work[tau]|^2 >> 4 ;  last pass: sqrt -> decision
 decision: strongest cell (d, tau) of the satellite, compared with the threshold
```

All the processing modules (storage, FFT, correlator, integrator) are masters
on one shared bus (`acq_bus`). The bus leads to the RAM (`sp_ram`) and the
replica ROM (`replica_rom`). The trigonometric unit (`trigo`) and the
square-root unit (`sqrt_unit`) are not on the bus. Each is wired straight to
the module that uses it. `acq_config` turns the mode into sizes. `acq_ctrl`
runs the loops. `gnss_acq_top` wires it all together.

## The two-level FFT and where its results land

This part is the hardest to follow, and it decides every address in the
design.

`fft_core` holds at most 512 points (`LMAX_LOG = 9`) in a local memory. A
larger transform, K = L1·L2 with L1 = 512, runs in memory in two levels:

* **Level 1.** There are L2 transforms of 512 points each. Transform n1
  (n1 = 0..L2-1) reads the words n1, n1+L2, n1+2·L2, …. On write-back, output
  k2 is multiplied by the phase factor W_K^(n1·k2) = exp(∓j2π·n1·k2/K). The
  result goes back to the same addresses.
* **Level 2.** There are 512 transforms of L2 points each, on contiguous
  words. Transform k2 covers words k2·L2 … k2·L2+L2-1.

For example, 32768 points = 64 FFTs of 512, then the rotation, then 512 FFTs
of 64. Each word crosses the bus four times in total (read and write at each
level). A 512-point core that kept no data locally would need one read and one
write per butterfly stage.

The result is **transposed in place**: frequency bin m sits at offset
`(m mod L1)·L2 + (m div L1)`. The function `gnss_pkg::fft_loc(m, logk, lmax)`
computes this offset. When K ≤ 512 there is one level and the offset is just
m. Nothing is ever reordered. Instead, every reader computes addresses with
`fft_loc`:

* `x2_addr` computes bin = r2 + N2·((r1+s) mod N1), then the offset of that
  bin in the forward result. This is the X2 matrix: it is never stored as a
  separate buffer.
* `integrator` reads delay τ of the inverse FFT at `fft_loc(τ, log2 N1)`.

The inverse FFT uses the same hardware. The twiddle and rotation phases change
sign, and there is no 1/N factor.

Inside `fft_core`, a command goes through three phases:

1. **Load.** The words are read over the bus and stored in bit-reversed order.
2. **Butterflies.** Radix-2 decimation-in-time butterflies run, one per cycle.
3. **Store.** The words are written back, with the optional rotation.

A requester runs ahead of the butterflies. It sends phases to `trigo`, a
pipelined 16-stage CORDIC that returns Q1.15 cos/sin 18 cycles later. The
results wait in a 32-entry FIFO, which the butterflies and the rotator pop.

## Number formats and scaling

* Samples are 4-bit signed I and Q. `storage` stores them as a 16+16-bit
  complex word multiplied by 2^8. Every data word is 32 bits: real part in
  the upper half, imaginary part in the lower half.
* FFT data stays at 16 bits. Each butterfly stage can halve its outputs, set
  by one bit per stage in `mask1`/`mask2`. Halving rounds to even, so no DC
  bias builds up. Results saturate. `acq_config` halves on every other stage.
  Noise-like input then keeps roughly its level through the transform: noise
  grows by √2 per stage, so two stages add ×2 and the one halving cancels it.
  The coherent signal peak rises well above the noise.
* The correlator product is X·conj(C)·2^-15, so the replica spectrum is best
  stored near full scale. The testbenches store C/(4·√N1)·32767.
* The integrator accumulates (re²+im²)>>4 in 32 bits, with saturation. On
  the last pass it sends ⌊√sum⌋ (16 bits) to `decision`. The threshold is
  compared against this envelope.

## Memory map

Word addresses are 19 bits. If bit 18 is set, the address goes to the replica
ROM; otherwise to the RAM, which has 2^18 words.

* RAM: N3 sample blocks of K words from address 0, then the N1-word
  correlation/inverse-FFT work buffer, then the N1-word accumulator. Galileo
  GEO fills the RAM exactly (7·32768 + 2·16384 = 2^18).
* ROM: replica p of satellite n starts at word (n·passes + p)·N1, where
  passes = 2 with SCPC and 1 otherwise. 2^18 words hold 64 GPS replicas, or 4
  Galileo satellites. The host loads the ROM through the `rom_*` port of the
  top.

## Interface and timing of the top

1. Load the replica spectra through `rom_we/rom_addr/rom_data`.
2. Set `mode` (0 GPS/LEO, 1 GPS/GEO, 2 Galileo/LEO, 3 Galileo/GEO),
   `threshold`, `sat_first`, `sat_last` and `n_iter_ovr`. With
   `n_iter_ovr = 0` the engine searches the full Doppler range of the mode; a
   non-zero value gives that many shifts, centred on zero.
3. Pulse `start`.
4. Supply samples on `s_valid/s_i/s_q`. Storage takes the N3·K samples that
   arrive after it goes busy, one per cycle at most. If its 16-entry FIFO
   overflows, `overflow` is set. That cannot happen when samples arrive at one
   per cycle or slower, since storage is alone on the bus during capture.
5. The record is captured and transformed once, then searched for every
   satellite in the range. Each satellite gives one `res_valid` pulse with
   `res_sat`, `res_detected`, `res_dopp` (signed, in 125 Hz bins), `res_tau`
   (in samples), `res_value` (the envelope) and `res_n_above` (the number of
   cells above the threshold). `done` pulses at the end.

Modules step one point at a time through bus requests. Each point costs about
5 cycles in the correlator and 6 in the integrator. Measured at full size
(GPS/LEO, all 84 shifts), one satellite takes about 104.4 million cycles: 1.04 s
at 100 MHz, or roughly 33 s for 32 GPS satellites. This does not count
loading the ROM.
The published FPGA prototype took 2 min 15 s for the same search. It used a
processor-driven schedule and a slower shared bus, and this design is not
cycle-matched to it. The full-size test only checks that the design stays
within that time.

## Bus protocol

A master holds `req`, `we`, `addr` and `wdata` until it sees `gnt`. Read data
comes back with `rvalid` one cycle after the grant. Grants are by fixed
priority: storage, then FFT, then correlator, then integrator. Assertions in
`acq_bus` check that a waiting request does not change.

## How this relates to the published receiver

These parts follow the published design:

* the acquisition algorithm: FFT of the record, the X2 column view, frequency-domain
  correlation, N2 inverse FFTs per shift, repeats over shifts and over N3;
* the four mode sizes (N1, N2, N3), the 125 Hz step and the Doppler ranges;
* 4-bit samples and 16-bit FFT words;
* the 512-point FFT core with a phase rotator and a level scheduler, and its
  four bus accesses per point;
* the set of modules (Storage, FFT, Correlator, Integrator, TRIGO, SQRT,
  Acquisition, Configuration), replicas in a ROM, and direct links for TRIGO
  and SQRT.

These are choices of this design:

* **Control in hardware.** In the original, Acquisition and Configuration are
  software on a soft processor under an RTOS. Here they are `acq_ctrl` and
  `acq_config`. The processor, RTOS, UART, flash controller and OPB bus are
  not included.
* **The bus.** A simple single-cycle arbitrated bus with plain memories
  stands in for the OPB bus and the SDRAM controller.
* **Loop order.** The order is shift → column → record → pass, so the
  accumulator needs only N1 words. The record is captured and transformed
  once and reused for every satellite.
* **Memory contents and layout.** The ROM holds replica spectra, not code
  chips. The transposed FFT layout is read through address maps instead of
  being copied into an X2 buffer.
* **SQRT and SCPC.** The SQRT unit produces an envelope for the decision. The
  original names the unit but does not give its use. SCPC is taken as the sum
  of the in-phase and quadrature energies.
* **Arithmetic.** The CORDIC method, all fixed-point scaling, rounding and
  saturation rules, FIFO depths and handshakes are this design's.
* **Direct links.** In the original platform, TRIGO also links to Storage,
  but no use of that link is described. Here Storage does not use TRIGO.
  SQRT is fed by a plain pipeline from the integrator, not by a FIFO.
* **Search window and decision.** The Doppler window is centred on zero. The
  decision keeps the single strongest cell, the first one if two are equal.

## Files

RTL (`rtl/`), one unit per file:
`gnss_pkg` (types, `fft_loc`), `gnss_acq_top`, `acq_ctrl`, `acq_config`,
`storage`, `fft_unit`, `fft_core`, `trigo`, `x2_addr`, `correlator`,
`integrator`, `sqrt_unit`, `decision`, `acq_bus`, `sp_ram`, `replica_rom`,
`sync_fifo`.

Testbenches (`tb/`). Each one checks against values it computes itself, and
ends with a `TB_RESULT checks=… failures=…` line:

* `<module>_tb` for each unit. For example, `fft_unit_tb` compares 2048-,
  256- and 16-point transforms with a floating-point DFT and counts bus
  accesses. `acq_ctrl_tb` checks the whole loop nest against responder
  models.
* `gnss_acq_top_tb` runs the whole engine on short records. It uses a
  32-point core and N1 divided by 64, so both FFT levels are used. It runs
  all four modes in turn and checks detection and rejection. It also checks
  that two-level transforms, non-coherent sums and SCPC passes occur.
* `gnss_acq_full_tb` runs the default-size engine. It searches GPS/LEO over
  the full ±42 kHz for two satellites. The signal is at −3.625 kHz and delay
  3024; the absent satellite must be rejected. It also checks that one
  satellite's search takes no more than 1/32 of 2 min 15 s at 100 MHz, the
  published time for the whole GPS constellation in LEO mode. It takes a
  few minutes.

The records are synthetic: ±1 random codes, a Doppler rotation, Gaussian-like
noise and 4-bit quantisation. Replica spectra are computed in the testbench in
floating point.

Simulation with Verilator 5 (package first):

```
verilator --binary --timing -Wno-fatal rtl/gnss_pkg.sv $(ls rtl/*.sv | grep -v gnss_pkg) \
    tb/gnss_acq_top_tb.sv --top-module gnss_acq_top_tb
./obj_dir/Vgnss_acq_top_tb
```

Replace the testbench file and top name to run any other test. To run a
shortened chain, use `N1_DIV_LOG`, which divides every N1 by a power of two,
and `LMAX_LOG`, which sets the local FFT size. For example, `LMAX_LOG=5` with
`N1_DIV_LOG=6` gives 512-point forward transforms on two levels in about a
second of simulation.

## Limits

* Transforms may be at most 2^(2·LMAX_LOG) points, and at most 2^16 because
  of the 16-bit phase. That is 65536 at the defaults, enough for every mode.
* Detection was checked only on synthetic records with strong signals. The
  threshold for a given false-alarm rate depends on C/N0 and the chosen
  scaling, and is left to the user.
* `overflow` reports lost samples but does not stop the run. The missing
  words are at the end of the buffer.
