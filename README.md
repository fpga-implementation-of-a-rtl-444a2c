# 40-channel TVWS transmultiplexer on a 40-point prime-factor FFT

The UK TV white space spans 470–790 MHz as 40 channels of 8 MHz. A
frequency-agile radio that may use any subset of them can up- and
down-convert all 40 at once with an oversampled DFT-modulated filter bank:
one real prototype lowpass filter, run as a polyphase network, plus one DFT
across the channels. A power-of-two FFT would force 64 channels, 24 of them
wasted, and a 60 % higher baseband rate. This RTL uses a **40-point FFT**
made of radix-5 and 8-point blocks, so the bank has exactly 40 channels and
runs at a baseband rate of 40 × 8 MHz = 320 MS/s.

The design is the *second stage* of a two-stage converter:

```
 Tx:  40 channels @16 MS/s --> [fbmc_tx] --> complex baseband @320 MS/s --> stage 1 (RF, off-chip)
 Rx:  stage 1 --> complex baseband @320 MS/s --> [fbmc_rx] --> 40 channels @16 MS/s
```

Each channel is sampled at 16 MHz, twice its 8 MHz bandwidth. This
oversampling by 2 leaves a transition band for the prototype filter. It
also means the Rx decimates, and the Tx expands, by M = K/2 = 20, not by
K = 40.

## Contents of `rtl/`

| module | role |
|---|---|
| `fbmc_stage2_top` | Tx and Rx banks side by side, sharing one coefficient-load port |
| `fbmc_tx` | synthesis bank: channel sign → inverse 40-point FFT → `pfb_synthesis` |
| `fbmc_rx` | analysis bank: `pfb_analysis` → inverse 40-point FFT → channel sign |
| `pfb_analysis` | Rx polyphase network, one branch per clock |
| `pfb_synthesis` | Tx polyphase network, one output sample every 2 clocks |
| `fft40_serial` | serialised 40-point FFT: one radix-5 and one 8-point block, reused |
| `fft40_par_stream` | parallel 40-point FFT with serial-to-parallel and parallel-to-serial buffers |
| `fft40_parallel` | fully parallel 40-point FFT: 8 radix-5 and 5 8-point blocks |
| `radix5_fft`, `fft8` | 5-point and 8-point DFT butterflies |
| `cneg_sat` | saturating complex negation (the odd-channel sign) |
| `fbmc_pkg` | sizes, the complex `cplx_t` type, FFT constants, rounding helpers |

The top's `FFT_SERIAL` parameter selects the FFT in both banks. It defaults
to 1, the serial FFT: that version needs far fewer multipliers than the
parallel one and costs only some buffer memory.

## The 40-point FFT: no twiddles between the stages

8 and 5 are coprime, so the 40-point DFT splits with the Good–Thomas
(prime-factor) index maps. Unlike a Cooley–Tukey split, this needs no
twiddle multiplications between the two stages.

* Stage 1: eight 5-point DFTs. Radix-5 number `n1` (0..7) takes the inputs
  `x[(5·n1 + 8·n2) mod 40]`, n2 = 0..4.
* Reorganisation: output `k2` of radix-5 number `n1` becomes input `n1` of
  8-point FFT number `k2`.
* Stage 2: five 8-point DFTs. Output `k1` of 8-point FFT `k2` is bin
  `k = (25·k1 + 16·k2) mod 40`.

This holds because W40^(5·n1·k) = W8^(n1·(k mod 8)), W40^(8·n2·k) =
W5^(n2·(k mod 5)), and the output map is the CRT inverse of (k mod 8,
k mod 5). Both maps are fixed wiring in `fft40_parallel` and fixed
addresses in `fft40_serial`.

**Radix-5** (`radix5_fft`) computes the DFT with four real gains applied to
complex signals, i.e. eight real multipliers. With s1 = x1+x4, s2 = x2+x3,
d1 = x1−x4, d2 = x2−x3, s = s1+s2 and u = 2π/5:

```
X0     = x0 + s
A1,A2  = x0 − s/4 ± K1·(s1 − s2)           K1 = (cos u − cos 2u)/2
B1     = G3·(d1 + d2) + G4·d1              G3 = sin 2u,  G4 = sin u − sin 2u
B2     = G3·(d1 + d2) + G5·d2              G5 = −(sin u + sin 2u)
X1,X4  = A1 ∓ j·B1      X2,X3 = A2 ∓ j·B2
```

The −1/4 is a shift and the ±j are re/im swaps. The graph uses 17 complex
additions. Published radix-5 graphs with these four gains count 18; this
arrangement is this design's own.

**8-point** (`fft8`) is radix-2 decimation in frequency. W8² = −j is a
swap. W8¹ and W8³ are one 1/√2 gain on (re ± im), which makes 4 real
multipliers.

**Scaling.** The 40-point FFT returns DFT/32: the radix-5 stage divides by
4 and the 8-point stage by 8, each rounded and saturated to 18 bits. Inside
each butterfly the values are 28 bits wide with 2 extra fraction bits.
With `INVERSE=1` bin k is delivered at position (40 − k) mod 40, which
gives the e^{+j} (inverse) transform at no cost. Both banks use the FFT
this way.

### Serial schedule (`fft40_serial`)

The serial FFT owns one radix-5 block and one 8-point block. Per transform
the radix-5 runs 8 times and the 8-point block 5 times, so they run at 8×
and 5× the transform rate. With one sample per clock, a frame lasts 40
clocks:

```
clock (after sample 39)   1..8        radix-5 passes n1 = 0..7  (ibuf -> mbuf)
                          10..14      8-point passes k2 = 0..4  (mbuf -> obuf)
                          17..56      bins 0..39 stream out, one per clock
```

`ibuf` (2×40) and `obuf` (2×40) are ping-pong buffers: the next frame can
arrive while the current one is still being read. `mbuf` (8×5) holds the
intermediate results and needs a single copy, because stage 2 ends long
before the next frame is complete. The engine is busy 15 of every 40
clocks, so input at one sample per clock is sustained. Latency from sample
39 to bin 0 is 17 clocks.

`fft40_par_stream` gives the parallel FFT the same stream interface. It
collects 40 samples and transforms them in one clock; its latency is 4
clocks. Bin 0 leaves in the clock the result appears, so bin 39 is read
before the next frame's result replaces it.

## Polyphase networks and the clock

One clock runs at 40× the channel rate, which is 2× the baseband rate
(640 MHz for real-time TVWS). A slower clock handles proportionally
narrower channels. Call the prototype h[0..L−1], with L = K·P (K = 40,
P taps per branch, default 8, so 320 taps).

**Rx (`pfb_analysis`)** keeps the last samples in a 512-entry circular
delay line. After every 20 new samples (frame m, newest sample t_m) it
computes, one branch per clock:

```
v[ρ] = Σ_p h[ρ + 40p] · x[t_m − ρ − 40p],    ρ = 0..39
```

Only the P multipliers of one branch exist; all 40 branches share them.
The inverse 40-point FFT of v then gives the channels. Odd channels come
out multiplied by (−1)^(k(m+1)), an artefact of decimating by K/2, and
`fbmc_rx` flips their sign. What remains is each channel at baseband, up to
a fixed phase e^{j2πk/40}:

```
y_k[m] = ± (1/32) · Σ_n h[n] · e^{j2πkn/40} · x[t_m − n]
```

**Tx** works in the mirror order. `fbmc_tx` first applies the sign
(−1)^(k·m), which puts the expanded odd channels on their own band. It then
takes the inverse 40-point FFT across the channels (frame w_m).
`pfb_synthesis` keeps 2P+1 such frames and produces 20 outputs per frame,
one every 2 clocks:

```
y[20·m + r] = Σ_{q=0}^{2P−1} h[r + 20q] · w_{m−q}[(r + 20q) mod 40]
            = (1/32) Σ_k e^{j2πkn/40} Σ_m u_k[m] h[n − 20m]      (n = 20m + r)
```

Samples and frames from before reset count as zero. The memories are not
cleared; a fill counter masks the stale entries instead.

**Coefficients** are not built in. They are written through
`coef_we / coef_tap / coef_branch / coef_data`, with coefficient h[ρ + 40p]
at tap p and branch ρ, in Q1.17. The top writes the same prototype into
both banks. Only the prototype's role is fixed (an 8 MHz-wide channel
filter with a transition band set by the oversampling), so this design
leaves its values to software. The testbenches use a Hann-windowed sinc:
320 taps, cutoff 6 MHz at 320 MS/s, DC gain 20. With that filter the Tx
gain is 1/32, the Rx gain 20/32, and the loopback gain 20/1024.

## Number formats and interfaces

* All samples are 18-bit signed Q1.17 complex values (`cplx_t` is
  `{re, im}`). All coefficients are 18 bits: Q1.17 in the filters, Q2.16
  in the FFT. Every block boundary rounds and saturates.
* Streams carry a `valid` strobe with a fixed order. Channels and branches
  go 0..39, and each frame is counted from reset. There is no
  back-pressure. Inputs may pause between samples.
* Rate limits: Tx input at most one channel sample per clock, Rx input at
  most one baseband sample per 2 clocks. Faster input sets the sticky
  `overrun` flag and fires an assertion.
* Latencies, from the last input of a frame to its first output:

  | block | serial FFT | parallel FFT |
  |---|---|---|
  | Rx: 20th sample → channel 0 | 59 clocks | 46 clocks |
  | Tx: channel 39 → first sample | 58 clocks | 45 clocks |

* Reset is asynchronous and active low.

## Where this departs from, or adds to, the published design

* The prototype filter's length and coefficients are not given. P = 8 is
  an assumed parameter, and the coefficients are loaded at run time.
* The polyphase networks follow the textbook decomposition; their internal
  structure was not published. "Serialisation factor K = N" is read as all
  40 branches sharing one set of tap multipliers, one branch per clock.
* The FFT stages are joined by prime-factor maps (no twiddles), chosen
  because the published operation count has no inter-stage multiplications.
* The radix-5 adder graph (17 additions) and the 8-point FFT structure
  (4 real multipliers) are this design's own. The published 8-point figure
  counts full complex multiplications.
* The ÷32 FFT scaling, the sign correction of odd channels, the buffer
  sizes, the 2-clock output pacing and the stream handshake are all this
  design's own choices.
* Only the 40-point system is built, in its serial (default) and parallel
  forms. The 48-, 56- and 64-point variants used for comparison
  (radix-3×16, radix-7×8, and a vendor 64-point FFT) are not built. Nor are
  the RF stage 1 and the host processor.
* The serialisation factor is fixed at K = N: one polyphase branch per
  clock. The K = N/m variants (m = 2, 4, 8) would process m branches per
  clock, for a real-time system at a practical FPGA clock. They are not
  built.

## Testbenches and how far to trust them

Each module in `rtl/` has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference models in
`tb/tb_util_pkg.sv` compute in real numbers, or in exact integers for the
filters, independently of the RTL.

| testbench | what it checks |
|---|---|
| `radix5_fft_tb`, `fft8_tb` | random and full-scale vectors against a DFT, within 4 LSB; 1-clock latency |
| `fft40_parallel_tb` | forward and inverse transforms, random vectors and tones, within 6 LSB; 2-clock latency |
| `fft40_serial_tb`, `fft40_par_stream_tb` | streamed frames, back to back and with gaps; bin order, latency, both ping-pong halves |
| `pfb_analysis_tb`, `pfb_synthesis_tb` | bit-exact against the integer polyphase sums; latency, output spacing, memory wrap |
| `fbmc_rx_tb`, `fbmc_tx_tb` | both FFT versions against the real-number filter bank equations (RMS error below 0.5 LSB) |
| `fbmc_stage2_top_tb` | full default size, Tx→Rx loopback: two occupied channels return at gain 20/1024 ± 5 %; neighbours stay below 3 %, all others below 1 % |
| `fbmc_stage2_par_tb` | the same loopback with `FFT_SERIAL=0` |
| `fbmc_all_channels_tb` | all 40 channels occupied in loopback: each returns its own level within 6 % and a steady phase; after channels 0..19 are switched off, they fall below 3 % while 20..39 hold |

The loopback tests also count that every mechanism occurred:
coefficient loads, frames, odd-channel sign flips on both sides, input
gaps, and both halves of the output ping-pong. Nothing has been run on an
FPGA, and timing closure has not been studied. The butterflies are single
combinational stages between registers, so a fast clock would need extra
pipeline registers.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fbmc_pkg.sv tb/tb_util_pkg.sv tb/fbmc_stage2_top_tb.sv --top-module fbmc_stage2_top_tb
./obj_dir/Vfbmc_stage2_top_tb
```

Every test finishes in seconds.
