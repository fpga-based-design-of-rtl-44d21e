# DCT-based channel estimation for a 2x1 MIMO-OFDM link

A receiver that must equalise an OFDM signal needs the channel response on every
subcarrier. The cheapest estimate, least squares (LS), divides each received pilot by the
pilot that was sent. It is exact for a noiseless channel, but it passes all the noise through.
The real channel response varies slowly across the subcarriers. So if the LS estimates are
moved into a cosine-transform domain, the useful part sits in the first few coefficients and
the rest is mostly noise. Dropping those coefficients and transforming back smooths the
estimate.

To keep the transform small, the 64 LS estimates are not transformed at once. They are cut
into 8 blocks of 8 neighbouring subcarriers. Each block goes through an 8-point DCT, keeps its
first `W` coefficients, and goes through an 8-point IDCT. One DCT and one IDCT serve all
blocks in turn.

This repository holds synthesizable SystemVerilog for the complete link around that estimator:

```
            din0 ─► ofdm_tx (antenna 0) ─► tx0_* ─┐
  start ─┤                                        ├─► channel (outside) ─► rx_in_* ─► ofdm_rx ─► rx_*  data subcarriers
            din1 ─► ofdm_tx (antenna 1) ─► tx1_* ─┘                                          ├─► ls_*  LS estimates, both links
                                                                                             └─► h_*   DCT-smoothed estimates
```

`mimo_ofdm_top` holds two transmitters and one receiver. The radio channel is not hardware,
so the transmit samples leave the top and the received samples come back in on `rx_in_*`.

## Signal chain

**Transmitter (`ofdm_tx`), one per antenna.** A frame has 2 preamble symbols and then
`NDATA` data symbols. Each symbol has `N` subcarriers.
- `pilot_insert` fills the preamble symbols with pilots on every subcarrier (block-type
  pilots).
- `qam16_mapper` fills the data symbols with Gray-coded 16-QAM points. Each point is made from
  4 bits read on `din`.
- An `N`-point IDCT (`dct_engine`, inverse mode) turns each symbol into time samples. This is
  DCT-based OFDM: the IDCT takes the place of the usual IFFT.
- `cp_insert` puts the last `CP` samples of each symbol in front of it as a cyclic prefix.

**Receiver (`ofdm_rx`), one receive antenna.**
- `cp_remove` drops the prefix and numbers the symbols in the frame.
- An `N`-point DCT returns each symbol to the frequency domain.
- The two preamble symbols go to `ls_estimator`. The data symbols leave on `rx_*`.
- The LS estimates (`ls_*`) go through `dct_chest` and come out smoothed on `h_*`.

The receiver stops at the channel coefficients. It has no equaliser, MIMO detector or
demapper.

## Separating the two transmit antennas

The receive antenna hears both transmitters at once. Their preambles are therefore made
orthogonal in time:

| preamble symbol | antenna 0 | antenna 1 |
|---|---|---|
| 0 | P | P |
| 1 | P | −P |

So on subcarrier k the receiver sees `Y0 = P(H0+H1) + E0` and `Y1 = P(H0−H1) + E1`. The LS
estimates are:

```
H0_LS = (Y0 + Y1) / (2P)        H1_LS = (Y0 − Y1) / (2P)
```

Every pilot is ±1±j, so `1/P = conj(P)/2`. Each estimate is then just sign changes, additions
and a right shift by 2: `ls_estimator` needs no multiplier and no divider.

`ls_estimator` stores preamble symbol 0 in an N-entry buffer. While symbol 1 arrives, it sends
out `H0_LS` at once and writes `H1_LS` over the buffer entry it has just read. It then replays
the buffer. As a result, the 64 estimates of link 0 and then the 64 of link 1 leave on one
stream. The noise terms average over the two symbols, which is why E0 and E1 appear with a
factor ½.

## The block DCT estimator (`dct_chest`)

```
LS stream ─► dct_engine (8-pt DCT) ─► dct_smoother (keep k < W) ─► dct_engine (8-pt IDCT) ─► smoothed stream
```

- Blocks are consecutive and do not overlap: subcarriers 0–7, 8–15, and so on.
- `W` is the window size, set by `W = 2L/R`, where `L` is the channel length and `R` the
  number of blocks. The default `W = 4` corresponds to `L = 16` (the prefix length) and
  `R = 8`.
- The real and imaginary parts go through the same real kernel side by side.
- A tag (antenna and block number) travels with each block. The receiver uses it to label
  the smoothed estimates.
- `zeroed_cnt` counts the coefficients the window has removed.

The end-to-end test measures what the smoothing gains. With a flat channel and uniform noise,
the DCT estimate has about half the mean square error of the LS estimate (for example 1396 →
659 LSB²). This matches keeping 4 of 8 coefficients.

## The transform engine (`dct_engine`)

One module is used for all four transforms: the 8-point DCT and IDCT of the estimator, the
64-point IDCT modulator and the 64-point DCT demodulator.

```
forward  (INVERSE=0):  X(k) = 2^-SHIFT ·  Σn x(n)·cos(π(2n+1)k / 2N)
inverse  (INVERSE=1):  x(n) = 2^-SHIFT · (X(0)/2 + Σk≥1 X(k)·cos(π(2n+1)k / 2N))
```

With `SHIFT = log2(N)−1` for the forward transform and `SHIFT = 0` for the inverse, the pair
is the identity, up to rounding. Only shifts are needed, no extra multipliers for
normalisation.

**Architecture: a column-serial matrix product.**
- Input sample `i` of a block is multiplied by column `i` of the cosine matrix, and the N
  products are added into N complex accumulators. This needs 2N real multipliers, and one
  block of N samples takes N clocks.
- When the last sample of a block arrives, the N rounded and saturated results move to an
  output buffer, and the accumulators start the next block at once.
- Blocks can follow each other with no gap. Throughput is one sample per clock.

**Timing.** Results leave on N consecutive cycles. The first has `out_valid` high two cycles
after the cycle of the block's last input. An assertion checks that a block never completes
while the previous one is still being sent.

**Cosines (`cos_rom`).** The cosines come from a table memory loaded with `$readmemh` from
`rtl/cos_qw.hex`. The table holds a quarter wave: entry p (p = 0..64) is
`round(16384·cos(2πp/256))`. Any phase on the 256-step circle is folded onto it by
symmetry. The cosine needed is `cos(2π·((2n+1)k·64/N mod 256)/256)`, so the one table
serves every power-of-two `N` up to 64.

The original work names a faster "modified" DCT algorithm but does not describe it. The
matrix-product engine is a plain replacement with the same input/output behaviour.

## Number formats and scaling

- **Complex samples** (`ofdm_pkg::cplx_t`): two signed 16-bit parts with 9 fraction bits, so
  1.0 = 512. The 16-QAM levels are ±1 and ±3, and pilots are ±1±j.
- **Channel estimates** use the same format. A gain of 1.0 reads 512.
- **Cosines**: signed 16-bit with 14 fraction bits.
- **Transmitter scaling**: the modulator IDCT runs with `TX_SHIFT = 3` (÷8) so that 64-subcarrier
  16-QAM symbols stay well inside ±64.
- **Receiver scaling**: the demodulator DCT uses `RX_SHIFT = log2(N)−1−TX_SHIFT = 2`, so with a
  unit channel the receiver returns exactly the transmitted constellation values.
- **Rounding**: every transform rounds half up and saturates to 16 bits.

## Interfaces and timing

All modules use one clock and a synchronous active-low reset `rst_n`. Streams are qualified by
a `valid` signal. Gaps are allowed, and there is no back-pressure.

- **Transmitter**
  - A one-cycle `start` sends one frame from both transmitters. `start` is ignored while a
    frame is being fed.
  - Each transmitter spends `N+CP` cycles per symbol.
  - `din_reqX` is high in the cycles that take 4 bits from `dinX`. The bits must be present in
    that same cycle. Both transmitters therefore stay in lock-step.
  - The frame leaves as `(2+NDATA)·(N+CP)` contiguous samples, and `txX_sof` marks the first.
  - The first sample appears `2N+5` cycles after the start cycle.
- **Receiver**
  - The receiver needs `rx_in_sof` on the first sample of each frame. It assumes ideal frame
    synchronisation and has no timing recovery.
  - `rx_*` gives the data-symbol number, subcarrier and received value.
  - `ls_*` and `h_*` give, for each estimate, the transmit antenna (`*_tx`), the subcarrier
    (`*_sc`) and the value.
  - The smoothed block of 8 leaves 12 cycles after the last LS estimate of that block.

Top-level parameters:

| parameter | default | meaning |
|---|---|---|
| `N` | 64 | subcarriers per symbol (8 blocks of 8) |
| `CP` | 16 | cyclic prefix samples |
| `NDATA` | 4 | data symbols per frame |
| `BLK` | 8 | DCT block size of the estimator |
| `W` | 4 | DCT coefficients kept per block |
| `TX_SHIFT` | 3 | modulator scaling |

`N` must be a power of two and at most 64, because of the cosine table and the 128-bit pilot
pattern.

## Where this design departs from or adds to the original

- **Transform.** The original work describes its transform as an MDCT, a lapped transform with
  50 % overlap and 2N inputs for N outputs. But its estimator is specified as 8 separate
  blocks of 8 with 8 outputs each. This design follows the block form: plain, non-overlapped
  8-point DCT/IDCT.
- **Fast algorithm.** The "modified" fast DCT algorithm is not described there. This design
  uses the matrix product above, so it has more multipliers (16 per 8-point engine, 128 per
  64-point engine) than a fast algorithm would.
- **LS estimation in hardware.** The original feeds its DCT estimator with LS estimates
  computed in software. Here the LS estimator is hardware in the receiver.
- **This design's own choices.** These are not fixed by the original:
  - the modulator size (64);
  - the prefix length, frame length and pilot values;
  - the preamble sign pattern;
  - the Gray mapping;
  - all word lengths and the scaling;
  - the window (rectangular, `W = 4`);
  - the antenna count of 2 transmit and 1 receive. A second receive antenna would be a second
    `ofdm_rx`.
- **Not built.** The radio channel is not part of the design. The original also reports
  Virtex-5 results (about 830 slice registers, 8 DSP blocks, a 4.346 ns clock period). This
  RTL has not been placed on an FPGA, and its architecture differs, so those numbers do not
  carry over.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The reference values come from
floating-point models in the testbenches, not from the RTL.

| testbench | what it checks |
|---|---|
| `tb_cos_rom` | all 256 phases against `$cos` |
| `tb_dct_engine` | 8-point DCT, 8-point IDCT and 64-point DCT on random streams, back to back and with gaps; latency and tags |
| `tb_dct_smoother` | pass, zero and flag by index |
| `tb_dct_chest` | 16 random blocks against a floating-point DCT / window / IDCT; 12-cycle latency; removed-coefficient count |
| `tb_ls_estimator` | both links from noisy preambles; back-to-back replay |
| `tb_qam16_mapper` | all 16 points; Gray property |
| `tb_pilot_insert` | pilots, antenna-1 sign, data pass-through |
| `tb_cp_insert` | prefix content; unbroken output at full rate; random gaps |
| `tb_cp_remove` | framing, including a frame cut short by a new start |
| `tb_ofdm_tx` | both antennas, two frames, every sample against a floating-point modulator; `2N+5` latency; ignored start |
| `tb_ofdm_rx` | time-domain frames over frequency-selective channels; data, LS and smoothed estimates |
| `tb_mimo_ofdm_top` | three frames end to end at the default sizes, with a channel model in the testbench; checks described below |

`tb_mimo_ofdm_top` uses a complex gain per link, with noise in frames 2 and 3. It checks:
- all data symbols against `h0·X0 + h1·X1`;
- both estimates against the true gains;
- that smoothing lowers the error;
- how often each mechanism ran.

To run one with Verilator from the repository root (the ROM file path is relative to it):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mimo_ofdm_top \
    -y rtl -y tb +libext+.sv rtl/ofdm_pkg.sv tb/tb_mimo_ofdm_top.sv
./obj_dir/Vtb_mimo_ofdm_top
```

The full-size end-to-end test runs in well under a second.

**Regenerating the cosine table.** `rtl/cos_qw.hex` holds 65 lines, one per entry p = 0..64.
Each line is `round(16384·cos(2πp/256))`, written as a 16-bit two's-complement hex number.
