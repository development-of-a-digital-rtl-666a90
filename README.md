# Digital base band converter: one channel in SystemVerilog

A VLBI station records narrow slices ("video bands", up to a few MHz wide) cut out of a
receiver IF that is hundreds of MHz wide. Traditionally, analog base band converters do
this. Each one mixes its slice down with a single-sideband mixer and low-pass filters it.
This RTL does the same job digitally, for one channel. The input is the IF band sampled
at 1.024 GS/s with 4 bits. The outputs are the upper and lower sidebands of a 2 MHz
slice, as 1- or 2-bit samples at 32 MS/s. The local oscillator (LO) can be placed
anywhere in the band in 62.5 kHz steps.

The design follows the architecture of the DBBC prototype described by G. Tuccari (IRA
Noto). That prototype ran the chain in a Virtex-E FPGA behind a commercial A/D board.
No FPGA can run the front of this chain at 1 GS/s. The main idea is therefore to
process **16 samples in parallel at 64 MHz** up to the point where the rate has been
decimated. Two parts make this work and are the least ordinary parts of the design:

* a local oscillator made of 16 phase accumulators, one per sample slot (`ppo`);
* a CIC integrator cascade that advances 16 samples per clock through a closed-form
  block update (`poly_integrator`).

## Signal chain

```
 din[2] 2x512 MS/s ─► demux ─► 16 x 64 MS/s ─► lut_complex_mixer ─► I[16], Q[16] (4 bit)
                                  ▲
                     ppo (16 LO phases) ◄── lo_inc, lo_init[16], lo_load
 per branch (I and Q):
   poly_integrator (64 MS/s) ─► decimator (/2 → 32 MS/s) ─► cic_comb (16 stages)
   ─► top 12 bits ─► comp_fir
 I ─► iq_delay ─────┐
                    ├─► sideband_adder ─► usb = I + H(Q) ─► shaping_fir ─► usb (2 bit)
 Q ─► hilbert_fir ──┘                   ─► lsb = I − H(Q) ─► shaping_fir ─► lsb (2 bit)
```

| stage | rate | word |
|---|---|---|
| input | 1024 MS/s as 2 samples per 512 MHz clock | 4 bit, two's complement |
| demux → mixer | 64 MHz blocks of 16 samples | 4 bit |
| integrators | 64 MS/s | 84 bit, wrapping |
| comb, compensation, Hilbert, shaping | 32 MS/s | 84 → 12 → 13 → 16 bit |
| output | 32 MS/s | 1 or 2 bit (plus the 16-bit word) |

The whole design uses **one clock**, `clk`, at 512 MHz. The 64 MHz and 32 MHz rates are
carried as valid strobes: `demux` raises its strobe once every 8 clocks, and `decimator`
passes every second one. Every block moves only on its input strobe. Each block's
latency in clocks is given in the comment at the top of its file.

## The parallel local oscillator (`ppo`)

A normal NCO adds the phase increment `inc` once per sample, and `f_LO = inc · f_s /
2^14`. With f_s = 1.024 GHz, 14 bits give the 62.5 kHz step. Here, accumulator `i`
holds the phase of sample slot `i` of the current block. Every 64 MHz block, all 16
accumulators add `16·inc`. The controller loads the starting phases `lo_init[i] = φ0 +
i·inc (mod 2^14)` together with `lo_inc`. Because the starting phases are explicit, the
absolute LO phase is under the controller's control. Pulse `lo_load` for one clock; the
setting applies from the next block. The LO phase is truncated to its top 6 bits.

## The LUT mixer (`lut_complex_mixer`)

No multipliers are used. Each lane forms a 10-bit address from the 4-bit sample and the
6-bit LO phase. That address reads `round(x·sin φ)` for I and `round(x·cos φ)` for Q,
clipped to 4 bits, from two 1024 × 4 tables. The tables are computed at elaboration.

## The block-parallel CIC integrators (`poly_integrator`)

The CIC filter has order N = 16, rate change R = 32 (1024 → 32 MS/s) and differential
delay M = 1. Its integrators obey `s_k[t] = s_k[t-1] + s_{k-1}[t]`, with `s_0` the
input. Unrolling this recursion over a block of L = 16 samples `x_0 … x_15` (x_0
earliest) gives an exact update that runs once per block:

```
s_k' = Σ_{j≤k} C(L+k−j−1, k−j) · s_j  +  Σ_i C(k−1+L−1−i, k−1) · x_i
```

C(n, k) is the binomial coefficient. The weights are polynomials in the lane index,
fixed at build time; the largest is C(30,15) ≈ 1.6·10^8.

The input part uses **distributed arithmetic**:

* The 16 lanes form two groups of 8.
* For each bit plane b of the 4-bit samples, the 8 bits of a group address a 256-entry
  table holding the sum of the weights of the lanes whose bit is set.
* The four planes are added with weights 2^b, and the sign plane is subtracted.
* The two group sums are then added.

The state part is a set of constant multiplications of the old states. All arithmetic
wraps modulo 2^84. This is exact, because the CIC output needs 4 + 16·log2(32) = 84
bits. The output is `s_16` after each block. `decimator` keeps every second value, and
`cic_comb` applies 16 pipelined stages of `y = x − x[−1]` at 32 MS/s. The DC gain is
32^16 = 2^80. The top keeps bits [83:72], so one input LSB becomes 256 at the 12-bit
compensator input.

The testbench checks this block against a plain serial 16-stage integrator cascade run
sample by sample. They agree bit for bit.

## Filters after the CIC

All filters use `fir_inverse`, the transposed ("inverse") form. Each coefficient
multiplies the registered input, and the products pass down a chain of
register-separated adders. No adder path grows with the number of taps. The output is
rounded and saturated.

* `comp_fir` corrects the CIC droop `(sin πf / πf)^16`. It uses the 3-tap filter
  `[−a, 1+2a, −a]` with a = N/24, which matches `(x/sin x)^N` to second order. At the
  2 MHz band edge (f = 1/16 of 32 MS/s) the product of droop and correction is within
  1 %. `GAIN_SHIFT` sets a power-of-two coarse gain.
* `hilbert_fir` is a 63-tap Hamming-windowed Hilbert transformer. Its sign gives
  positive frequencies a +90° shift. `iq_delay` delays I by the same 31 samples and the
  same 2-clock pipeline.
* `sideband_adder` forms `usb = I + H(Q)` and `lsb = I − H(Q)`. Because I uses the sine
  and Q the cosine, a tone above the LO appears on `usb` and a tone below it on `lsb`.
* `shaping_fir` is a 64-tap Hamming-windowed low-pass with cut-off `BW_HZ` (2 MHz) at
  32 MS/s and unit DC gain. Its 16-bit output `y_full` is shifted right by `Q_SHIFT` (5)
  and saturated to `OUT_BITS` two's complement bits: for 2 bits the levels are −2…1,
  for 1 bit the sign. The bandwidth is a build parameter. As in the prototype,
  changing it means rebuilding, not reloading coefficients.

## Measured behaviour (default parameters, `tb_dbbc_top`)

The test input is a 4-bit tone of amplitude 6.5 LSB with ±0.5 LSB dither.

| case | USB power | LSB power |
|---|---|---|
| LO 100 MHz, tone 101 MHz | 1.43·10^6 (amplitude ≈ 1690 = 6.5·256) | 71 |
| LO 102 MHz, tone 101 MHz | 77 | 1.43·10^6 |
| LO 100 MHz, tone 108 MHz (outside the band) | 45 | 60 |
| LO 100 MHz, tone 100.5 MHz | 1.19·10^6 | 1.0·10^4 |

This means:

* Sideband rejection is about 43 dB at 1 MHz from the LO.
* It falls to about 21 dB at 0.5 MHz. There the 63-tap Hilbert filter is no longer
  accurate, and a longer filter would improve it.
* An out-of-band tone is suppressed by about 44 dB.
* Outputs come exactly every 16 clocks (32 MS/s).

`tb_dbbc_noise_band` feeds broadband 4-bit noise (σ ≈ 2.3 LSB) with the LO at
300 MHz. It analyses 8192 output samples per sideband with an averaged periodogram:

* The band from 0.5 to 1.5 MHz is flat within 3 dB.
* The stop band from 4 to 15 MHz lies about 50 dB lower.
* USB and LSB carry equal power.
* With `Q_SHIFT` = 5, the four 2-bit levels occur in roughly 1:2:2:1 proportion,
  close to the usual VLBI optimum for 2-bit sampling.

## Interface of `dbbc_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | 512 MHz clock; synchronous active-high reset |
| `din[2]` | in | 2 × 4 | two samples per clock, `din[0]` the earlier |
| `lo_load` | in | 1 | one-clock pulse: take `lo_inc` and `lo_init` |
| `lo_inc` | in | 14 | phase increment per 1.024 GS/s sample: f_LO = lo_inc · 62.5 kHz |
| `lo_init[16]` | in | 16 × 14 | start phase of each sample slot, normally `i·lo_inc` |
| `out_valid` | out | 1 | one clock in 16: a new output sample |
| `usb`, `lsb` | out | `OUT_BITS` | requantised sidebands |
| `usb_full`, `lsb_full` | out | 16 | sidebands before requantisation |

The main parameters, with their defaults:

* `LANES` (16), `SAMPLE_W` (4), `PHASE_W` (14), `LUT_PHASE_W` (6), `MIX_W` (4);
* `CIC_N` (16), `CIC_OUT_W` (12);
* `HILB_TAPS` (63), `SHAPE_TAPS` (64), `BW_HZ` (2e6);
* `FULL_W` (16), `OUT_BITS` (2), `Q_SHIFT` (5).

## What follows the prototype and what is this design's own

**Taken from the prototype:**

* the sample rates and the 16-lane, 64 MHz parallel structure;
* 4-bit samples and 4-bit mixer products;
* the LUT mixer, and the per-slot LO accumulators with precomputed start phases;
* an integrator computed as an LUT-based polynomial over two groups of 8 lanes;
* decimation to 32 MS/s, and 16 pipelined comb stages;
* one compensation filter per branch;
* the Hilbert filter on Q with a delay on I, and the USB/LSB sum and difference;
* a 64-tap final filter with 1–2 bit output;
* transposed FIRs everywhere.

**Chosen here** (the prototype did not publish these details):

* the single-clock, strobe-based timing;
* the exact block-update formulation of the integrators, including the state
  feedback;
* reading the "16 differential stages" as CIC order 16;
* the 6-bit LO phase address and the rounding in the tables;
* every filter coefficient and every filter length except the 64 shaping taps;
* the word widths after the CIC (12/13/16 bits);
* the quantiser threshold;
* reset behaviour and the LO-load protocol.

**Not included:**

* the A/D board, its 1.024 GHz synthesizer and the differential PECL link into the
  FPGA: this design starts from received samples;
* the controller that computes LO settings and takes the output (a Nios processor
  board in the prototype): its job is done by the testbench;
* the VSI formatter, optional fibre link and recorder of the general scheme;
* the multi-channel (14-BBC) system envisaged for a full replacement.

**Limits:**

* Bandwidths below about 2 MHz are accepted by `BW_HZ`, but 64 taps at 32 MS/s cannot
  shape them sharply. The transition band is around 1.6 MHz.
* The 4-bit mixer output and the 6-bit phase truncation set a spur floor. In the
  tests, with a dithered input, spurs stayed more than 40 dB below the tone.

## Simulating

All files are in `rtl/` (design) and `tb/` (testbenches). Every testbench prints
`TB_RESULT checks=N failures=M` and ends. To run the end-to-end test at full size:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_dbbc_top \
          rtl/dbbc_pkg.sv tb/tb_dbbc_top.sv
./obj_dir/Vtb_dbbc_top
```

It builds in about 20 s and runs in about a second. Block testbenches are run the same
way. `tb_dbbc_noise_band` is built like `tb_dbbc_top`. For a block, use
`tb_<block>` with `tb/tb_<block>.sv`, for example `tb_poly_integrator`,
`tb_ppo` and `tb_hilbert_fir`. `dbbc_pkg.sv` holds the elaboration-time functions:
binomials, the mixer table, the CIC weights and the Hamming window.
