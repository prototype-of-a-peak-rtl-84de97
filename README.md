# DSI-EPTS: a hardware PAPR-reduction transmitter for OFDM

An OFDM symbol is the inverse FFT of many independent sub-carriers. Now and then they add up
in phase, which gives time-domain peaks far above the average power. A high
peak-to-average power ratio (PAPR) forces the power amplifier to back off and the DAC to
carry extra bits. Partial transmit sequence (PTS) methods cut the frequency-domain symbol
into sub-blocks, transform each one separately, and look for the set of phase rotations of
the sub-blocks whose sum has the smallest peak.

This RTL implements a PTS variant called DSI-EPTS, which adds two things:

* **Dummy sequence insertion (DSI).** The last L sub-carriers of the N-point symbol are not
  data. They carry dummy values. If the best rotation still misses a PAPR threshold, the
  dummies are replaced by new ones and the search is repeated. The receiver discards those
  sub-carriers, so nothing about them has to be signalled.
* **An interleaved phase-sequence matrix.** Each sub-block is not multiplied by one scalar
  phase. It is multiplied, sample by sample in the time domain, by a phase sequence. The
  sequence is one of P stored rows of N/P entries, repeated P times across the symbol. The
  matrix has P = D·W^(V−1) rows: V is the number of sub-blocks, W the number of phase
  values, and D a design knob that trades search effort against PAPR. Only the index of the
  chosen candidate is sent as side information: log2(P) bits, which is 1 bit in the default
  configuration.

The default configuration matches a small FPGA prototype: N = 256 sub-carriers, L = 55 dummy
sub-carriers (so 201 data sub-carriers), V = 2 sub-blocks, W = 2 (phases ±1) and D = 1, which
gives P = 2 candidates.

## Data flow of one symbol

```
 in_data ─► input_buffer ─► dummy_insert ─► subblock_partition ─┬─► radix4_fft (IFFT) ─┐
 (K=N-L words)    ▲         ▲ dummy_seq_gen                      └─► radix4_fft (IFFT) ─┤ V cores
                  │                                                                     ▼
                  │          phase_seq_matrix ──(c_v[n] for candidate p)──► pts_combiner
                  │                                                           │ y[n], |y[n]|²
                  └──────────── retry with new dummies ◄── papr_comparator ◄──┘
                                                              │ pass / limit
                                                              ▼
                                        transmit y[n] of the best candidate, si = its index
```

`dsi_epts_top` sequences these steps with a small state machine:

1. **IN**: `in_ready` is high. The K = N−L data sub-carriers are written into
   `input_buffer`.
2. **FEED**: for n = 0 … N·S−1 the vector U[n] is formed. It holds data for n < K, a fresh
   dummy value for K ≤ n < N, and zero above N (oversampling padding when S > 1). Each
   sub-block's copy, with the other sub-blocks' indices masked to zero, is loaded into its
   own IFFT core.
3. **FFT**: the V cores transform in parallel.
4. **SEARCH**: for every candidate p = 0 … P−1, all N·S time samples are read from the
   cores and rotated by their phase factors, then summed:
   y[n] = Σ_v c_v[n]·u_v[n]. `papr_comparator` records each candidate's peak and total of
   |y|², and keeps the candidate with the smallest peak.
5. **DECIDE**: if that candidate's PAPR is below `papr_th`, go to TX. Otherwise go back to
   FEED. The dummy generator has moved on, so the new iteration uses new dummies. After
   MAX_ITER failed iterations, see *Running out of iterations* below.
6. **TX**: the chosen candidate's N·S samples are recomputed from the IFFT results and
   streamed out. `si`, `papr_ok`, `iterations` and `replayed` stay valid for the whole burst.

### Running out of iterations

If no iteration meets the threshold, the design sends the best symbol it has seen: the
iteration whose best candidate had the lowest PAPR. Comparing iterations needs the ratio
peak/Σ|y|², which is done by cross-multiplying (peak_a·sum_b < peak_b·sum_a), so no
divider is needed. Only that iteration's PAPR numbers, its candidate and the dummy generator's state
at its start are kept, not its samples.

If the best iteration is the last one, its samples are still in the IFFT cores and TX
starts at once. If it is an earlier one, the design *replays* it. It loads the saved LFSR
state back into `dummy_seq_gen` through its `load` port, refills and reruns the IFFTs, and
then goes straight to TX with the recorded candidate, with no new search. `replayed` is
high for such a symbol. This costs one extra load and transform, and saves a second
N·S-sample buffer per sub-block.

### How a candidate uses the matrix

This is the least obvious part. Row r of the matrix holds phase indices c[r][0 … N/P−1].
Time sample n of row r uses column n mod (N/P). For candidate p:

* sub-block 0 is not rotated (factor 1);
* sub-block v ≥ 1 uses row (p + v − 1) mod P.

So the P stored rows give P distinct candidates. Keeping the first sub-block fixed is the
usual PTS convention. It also matters in practice: if rows were instead rotated over all V
sub-blocks, then with V = 2 and ±1 phases the two candidates would differ only by a common
±1 sequence. They would have identical peaks and the search would be useless.

A phase index w stands for exp(j·2π·w/W). After reset the matrix holds a Walsh–Hadamard
pattern, c[r][i] = (W/2)·parity(r AND i). Row 0 of that pattern is all +1, so candidate 0 is
always the unmodified symbol. Optimised matrices, computed offline or by a processor, are
written through the `pm_*` port while `busy` is low.

### PAPR test without a divider

PAPR = peak / mean = peak·NS / Σ|y|². The threshold `papr_th` is a linear power ratio in
unsigned Q8.8; for example 6.3 dB ≈ 4.27 ≈ 0x0444. A candidate passes when
`peak · NS · 256 < papr_th · Σ|y|²`. The peak, not the PAPR, selects the candidate. Different
candidates can have slightly different mean power, because the per-sample phase sequence
mixes the sub-blocks.

## The radix-4 burst-I/O IFFT (`radix4_fft`)

This block takes the most care to understand. It has four data RAMs, one radix-4 butterfly
("dragonfly"), a twiddle ROM and two switches.

* **Bank mapping.** Address a lives in bank (sum of base-4 digits of a) mod 4, at row a/4.
  The four operands of a radix-4 butterfly differ in exactly one base-4 digit, so they always
  sit in four different banks. One butterfly is therefore read and written per cycle. The
  switch is just a rotation by the bank of the butterfly's first operand.
* **Algorithm.** Decimation in time. Samples are written at their base-4 digit-reversed
  address while loading. Pass s (span 4^s) multiplies legs 1–3 by W^(m·j·N/(4·span)) and then
  runs a 4-point DFT. The result comes out in natural order.
* **Inverse.** `inverse=1` conjugates the twiddles and flips the ±j of the butterfly.
* **Scaling.** Every radix-4 pass divides by 4 with rounding (the radix-2 pass by 2), so the
  transform is scaled by 1/NFFT.
  Magnitudes can never grow, and inputs only need |re|, |im| < 2^(DW−2).
* **Sizes that are not a power of 4.** For NFFT = 2·4^k, such as the 2048 points of
  N = 512 with 4× oversampling, the even input samples go to the lower half and the odd
  ones to the upper half, each half in digit-reversed order. The radix-4 passes then
  transform both halves side by side. One closing radix-2 pass forms
  X[q] = E[q] + W^q·O[q] and X[q+N/2] = E[q] − W^q·O[q], where E and O are the two half
  results. That pass keeps the one-issue-per-cycle rhythm by running two radix-2
  butterflies at once, on the words q, q+N/2, q+2 and q+2+N/2. The dragonfly has a
  `radix2` mode for this, scaled by 1/2. The top address bit counts as one more digit in
  the bank sum, so those four words also fall into four different banks.
* **Timing.** Loading takes NFFT cycles. Computing takes ceil(log4(NFFT))·(NFFT/4 + 1)
  cycles, because one idle cycle between passes keeps a pass from reading a word that the
  previous pass is still writing. For NFFT = 256 that is 260 cycles; for 2048, 3078. After `done`, the result can be
  read any number of times in any order: X[n] appears one cycle after `rd_addr = n`.
  `start` discards the frame. Load and compute do not overlap (burst I/O).
* **Constraint.** NFFT must be a power of 2, at least 16.

## Fixed point

| quantity | format |
|---|---|
| data samples (`cplx_t`) | 16-bit signed re/im (`dsi_pkg::DW`) |
| twiddles, phase factors (`twid_t`) | 16-bit signed re/im, Q2.14 (`dsi_pkg::TW`) |
| IFFT output | input × 1/NFFT, rounded at every pass |
| combined sample | saturated to 16 bits |
| power | 33 bits; candidate sums 33 + log2(NS) bits |

With QPSK data at ±8192 and dummies at ±4096, the combined output differs from a
double-precision model by at most about 2 LSB. The 1/N scaling leaves a 256-point symbol
with an rms of only a few hundred LSB. If more resolution is needed, widen `DW` or drop the
per-pass scaling of some passes.

## Timing of the whole transmitter

With NS = N·S and P candidates:

* each iteration takes NS + 2 (load) + ceil(log4(NS))·(NS/4 + 1) (transform) + P·NS + 4
  (search and decide) cycles;
* a replay adds NS + 2 + ceil(log4(NS))·(NS/4 + 1) cycles;
* the first output sample appears 4 cycles after the final decision, or after the replayed
  transform;
* the output burst lasts NS cycles.

At the defaults that is 1034 cycles per iteration, and 1038 cycles from the last input word
to the first output sample when the first iteration passes. Input is held off (`in_ready`
low) from the last data word until the output burst has ended.

## Top-level interface (`dsi_epts_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, synchronous active-low reset |
| `in_valid`, `in_ready`, `in_data` | in/out/in | data sub-carriers, one per accepted cycle, K = N−L per symbol |
| `papr_th[15:0]` | in | PAPR threshold, linear, Q8.8 |
| `pm_we`, `pm_row`, `pm_col`, `pm_val` | in | phase-matrix write (ignored while busy) |
| `out_valid`, `out_first`, `out_data` | out | transmitted time-domain samples, no back pressure |
| `si` | out | side information: chosen candidate, log2(P) bits |
| `papr_ok` | out | the transmitted symbol met the threshold |
| `iterations` | out | dummy sequences used for this symbol |
| `replayed` | out | the sent symbol was regenerated from an earlier iteration |
| `busy` | out | a symbol is in progress |

Parameters: `N`=256, `V`=2, `W`=2, `D`=1, `L`=55, `S`=1, `MAX_ITER`=4, `ADJACENT`=1
(adjacent sub-blocks; 0 interleaves them), `DUMMY_AMP`=4096. N·S must be a power of 2 (at least 16),
W a power of 2, and P must divide N.

## What follows the scheme and what is this design's own

Taken from the scheme:

* the chain of dummy insertion, sub-block partitioning, one IFFT per sub-block, phase
  multipliers, adder, and PAPR comparator with a retry on failure;
* U = [data, dummy] with N = K + L;
* the interleaved P × N matrix with P = D·W^(V−1);
* argmin of the peak;
* a radix-4 burst-I/O IFFT built from four RAMs, switches, a dragonfly and a twiddle ROM,
  with the inverse obtained by conjugation;
* the prototype sizes N = 256, V = 2, W = 2, L = 55.

Chosen here, because the scheme leaves them open:

* all word lengths and the per-pass scaling;
* the bank mapping and schedule of the IFFT;
* how candidates map to matrix rows (above), and the reset contents of the matrix;
* the dummy generator: a 16-bit LFSR, taps 16/14/13/11, stepped twice per value, making
  QPSK points ±DUMMY_AMP. Its state can be read and reloaded;
* the limit of MAX_ITER iterations, after which the best iteration is sent (by replay if
  needed) with `papr_ok = 0`;
* the threshold format;
* valid/ready input with no output back pressure.

Departures and limits:

* **PAPR test in hardware.** The test is done in hardware by `papr_comparator`. In the
  original prototype the PAPR was evaluated offline. The phase-matrix optimisation (done in
  software on an embedded processor there) is not part of this RTL; its result enters
  through the `pm_*` port.
* **Adjacent partitioning by default.** The scheme calls for adjacent sub-blocks in DSI-EPTS
  and interleaved ones in conventional PTS. Both are available.
* **Mixed radix.** The scheme names a radix-4 IFFT only. The radix-2 closing pass is an
  addition, so that the 2048-point size of the oversampled N = 512 evaluation can be built.
* **Not modelled.** Board-level parts are not modelled: host PC and PCI link, DAC/ADC,
  external SRAM/SDRAM and the power amplifier. There is no receiver, so no BER measurement.

## Files

`rtl/`:

* `dsi_pkg.sv`: types, widths, base-4 helpers
* `dsi_epts_top.sv`: the transmitter
* `radix4_fft.sv`, `bank_ram.sv`, `radix4_dragonfly.sv`, `twiddle_rom.sv`, `cmplx_mult.sv`:
  the IFFT core and its parts
* `input_buffer.sv`, `dummy_seq_gen.sv`, `dummy_insert.sv`, `subblock_partition.sv`:
  building U
* `phase_seq_matrix.sv`, `pts_combiner.sv`, `papr_comparator.sv`: candidate search

`tb/`: one self-checking testbench per module, `tb_<module>.sv` (`tb_radix4_fft` drives
256-, 512- and 32-point cores through `radix4_fft_tester.sv`). Each ends by printing
`TB_RESULT checks=<n> failures=<n>`. `tb_dsi_epts_top` runs the full-size transmitter against
a floating-point model of every iteration. It covers acceptance on the first try, acceptance
after a retry, the iteration limit, a replay, input back pressure, a phase-matrix rewrite, and
both candidates being chosen.

`tb_dsi_epts_workloads` runs four more configurations through `dsi_epts_harness.sv`, a
parameterised driver and floating-point model. They are N = 512 with S = 4 oversampling
(2048-point IFFTs) for (V, D) = (2, 1), (2, 2) and (4, 1), and N = 256, S = 1 with
interleaved sub-blocks. Every sample is checked, and the mean PAPR of the plain and
transmitted symbols is printed. With a threshold of 5 (7 dB) the mean PAPR drops by about
0.4 dB for P = 2, 0.5 dB for P = 4 and 0.9 dB for P = 8. These are small samples: only 4–8
symbols and at most 4 iterations per configuration. The test fails if a configuration shows
no reduction at all.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/dsi_pkg.sv tb/tb_dsi_epts_top.sv \
          --top-module tb_dsi_epts_top -o sim && ./obj_dir/sim
```

Replace the testbench name to run any other block's test. Verilator finds the modules in
`rtl/` through `-Irtl`, so only the package and the testbench need naming. The full-size
end-to-end test simulates 16 symbols in well under a second.
