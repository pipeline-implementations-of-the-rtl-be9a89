# Streaming FFT pipelines: R2MDC, R2SDF, R4SDF, R4MDC

A Fourier transform is computed on blocks of N samples, but the data arrive as a stream.
An FFT *pipeline* bridges the two. It is a chain of butterfly stages separated by delay
buffers, and it takes one sample per clock and delivers one transformed sample (or one
group of them) per clock. In its plain form it needs no block memory and no address
sequencing: the delay buffers line up the pairs (radix-2) or quadruples (radix-4) of
samples that each butterfly must combine.

This repository holds synthesizable SystemVerilog for the classic pipeline structures:

| pipeline | module | default size | delay words | butterflies busy | outputs |
|---|---|---|---|---|---|
| radix-2 multi-path delay commutator (R2MDC) | `r2mdc_fft` | 8 | 3N/2 − 2 = 10 | 50 % | 2 per cycle, half of the time |
| R2MDC with ping-pong input buffer | `r2mdc_pingpong_fft` | 8 | 2N + N − 2 = 22 | 100 % at half rate | 2 every second cycle |
| radix-2 single-path delay feedback (R2SDF) | `r2sdf_fft` | 8 | N − 1 = 7 | 50 % | 1 per cycle |
| radix-4 single-path delay feedback (R4SDF) | `r4sdf_fft` | 16 | N − 1 = 15 | 25 % (multiplier 75 %) | 1 per cycle |
| radix-4 multi-path delay commutator (R4MDC) | `r4mdc_fft` | 16 | 5N/2 − 4 = 36 | 25 % | 4 per cycle, a quarter of the time |
| R4MDC with duplicated input buffer | `r4mdc_qrate_fft` | 16 | 2N + N − 4 = 44 | 100 % at quarter rate | 4 every fourth cycle |

The repository also holds the building blocks these pipelines share:
- four interchangeable delay-buffer structures;
- radix-2 DIF and DIT butterflies;
- radix-4 butterflies in the direct form and the radix-2² form;
- a twiddle-factor multiplier;
- the ping-pong input buffer with bit-reversed read-out that a non-pipelined, block-based FFT needs.

`fft_pipelines_top` places all of them side by side, each with its own ports. They share
only `clk` and `rst_n`. Every pipeline is parameterised in N (a power of 2, or a power of 4
for radix-4) and has been simulated at sizes up to 1024 points.

The structures follow the well-known pipeline FFT architectures: R2MDC (Rabiner and Gold, 1975),
R2SDF (Groginsky and Works, 1970) and their radix-4 counterparts, as presented in teaching
material on OFDM baseband design (after Chiueh and Tsai). That material gives the block
diagrams, the delay lengths and the switching pattern of the 8-point R2MDC. It gives no word
widths, no control logic, no interface and no timing of the feedback and radix-4 structures.
Those parts are this design's own, and the section *Own choices* at the end lists them.

## Number format and scaling

`fft_pkg` defines the shared types and widths:
- `cplx_t`: a packed struct of two signed 16-bit parts, `re` and `im` (`DW = 16`).
- Twiddle factors W_N^k = exp(−j2πk/N) have 16 bits with 14 fraction bits (`TW = 16`), so +1.0
  is exact.

Change `DW` or `TW` in the package and every module follows.

Every radix-2 butterfly divides its outputs by 2, and every radix-4 butterfly divides by 4.
Both use an arithmetic shift, which truncates. So **every pipeline outputs X[k]/N**. Overflow
cannot happen as long as each input sample has a modulus below 2^15. A half-sum never exceeds
the larger input, and a twiddle multiplication is a rotation. The twiddle product is
saturated, which only matters when a rounded twiddle of magnitude just above 1 meets a
full-scale sample. Expect about one LSB of truncation error per stage. Against an exact
DFT/N, the testbenches accept 2 LSBs per stage plus 2, or 4 LSBs per stage plus 2 for the
R4SDF.

The twiddle table is computed when the design is elaborated, from `$cos`/`$sin` in a
constant function (`fft_pkg::twiddle`). No table file is needed. Entry k is
round(2^14·cos(2πk/N)) + j·round(−2^14·sin(2πk/N)).

## Stream interface, common to all pipelines

```
clk, rst_n            clock, asynchronous active-low reset
in_valid, in_data     one sample per clock while in_valid is high
out_valid, out_data   result sample(s), X[k]/N
out_bin               the bin number k of each output lane
```

- **`in_valid` is a clock enable for the whole pipeline.** While it is low, every counter,
  delay buffer and switch holds (a stall), and `out_valid` is low. So an output is valid
  only in a cycle where an input is taken.
- **Blocks are implicit.** The first sample after reset is sample 0 of a block, and blocks
  follow each other with no gap. To get the last block out, feed one more block (zeros will
  do), or two for the ping-pong R2MDC and the quarter-rate R4MDC.
- **Latency is counted in enabled cycles.** The first result of a block appears N − 1 enabled
  cycles after the block's first sample, and 2N − 1 for the ping-pong R2MDC and the
  quarter-rate R4MDC. By default the datapath between the delay buffers is combinational:
  the only storage is the delays themselves. The feed-forward (MDC) structures accept
  pipeline registers anywhere; both R2MDC versions have them as an option (`PIPE`, below). The
  feedback (SDF) structures would need their loops re-timed.
- **Outputs are in scrambled order.** They are bit-reversed for radix-2 and base-4
  digit-reversed for radix-4. `out_bin` names the bin of each lane:

| pipeline | result slot | lanes carry |
|---|---|---|
| R2SDF | position p = 0..N−1 | X[bitrev(p)] |
| R4SDF | position p = 0..N−1 | X[digitrev4(p)] |
| R2MDC, ping-pong R2MDC | pair k = 0..N/2−1 | X[bitrev(2k)], X[bitrev(2k+1)] |
| R4MDC, quarter-rate R4MDC | group g = 0..N/4−1 | lane j: X[digitrev4(4g+j)] |

One free-running block-position counter `cnt` (log2 N bits, advanced by `in_valid`)
controls each pipeline. All switch settings and twiddle exponents are bits or residues of
this one counter. This works because the latency up to any stage is a multiple of that
stage's switching period, which makes the control very small.

## How the multi-path pipelines work (R2MDC, R4MDC)

**R2MDC** (`r2mdc_fft`). All butterflies are decimation-in-frequency: they compute
(a+b)/2 and ((a−b)/2)·W.

In stage 0 the input goes both into an N/2 delay and straight to the butterfly. During the
second half of a block, the butterfly therefore sees x[n] (delayed) together with x[n+N/2]
(direct). Its twiddle is W_N^n with n = `cnt` mod N/2.

Each later stage s has a pair distance D = N/2^(s+1) and three parts:
1. The lower output of the previous butterfly is delayed by D.
2. A 2×2 commutator (`commutator2`) passes its two inputs straight for D samples, then
   crisscross for D samples. It switches on bit log2(D) of `cnt`.
3. The new upper path is delayed by D again.

For N = 8 this gives the following sample indices on the wires, taken one stage after
another. C/D are the butterfly-1 upper output and the delayed lower output, E/G the
commutator outputs, and F is E after 2D:

```
C: 0 1 2 3        E: 0 1 4 5        F: . . 0 1 4 5
D: . . 4 5 6 7    G: . . 2 3 6 7    -> butterfly 2 pairs (0,2) (1,3) (4,6) (5,7)
```

The twiddle of stage s is W_N^((cnt mod D)·2^s). The last stage (D = 1) has no multiplier.
The butterflies work during half of each block period.

`PIPE = 1` registers both outputs of every butterfly, which breaks the long combinational
path through all stages. Since nothing feeds back, the registers only make the data of
stage s arrive s cycles later. That stage's commutator and twiddles therefore use the block
position `cnt` − s, and the output flags are delayed by log2 N cycles. The latency becomes
N − 1 + log2 N. `tb_r2mdc_fft` runs both settings side by side.

**R2MDC with ping-pong input buffer** (`r2mdc_pingpong_fft`). The input buffer is doubled.
Each block is written into one of two buffer sets. A set is two memories of N/2 words: one
for the first half of the block, one for the second half. While one set fills, the first
butterfly reads x[n] and x[n+N/2] of the previous block from the other set. It reads one pair
every two input samples.

All butterflies, commutators and stage delays then advance once every two input samples.
That is half the sample rate, implemented as a clock enable in the single clock domain.
Blocks now reach the butterflies without gaps, so the butterflies compute in every one of
their cycles. The testbenches check this 100 % utilisation. The cost is a latency of 2N − 1
and 2N words of input buffering. The `PIPE` option works as in `r2mdc_fft`. The registers
advance at the half rate, stage s uses the pair index n − s, and the latency grows to
2N − 1 + 2·log2 N.

**R4MDC** (`r4mdc_fft`). The radix-4 version keeps four paths.

- **Stage 0.** Quarter j of the block is kept on path j by a delay of (3−j)·N/4 (12D, 8D, 4D
  and 0 for 16 points). During the last quarter, the radix-4 butterfly therefore sees
  x[n], x[n+N/4], x[n+N/2], x[n+3N/4] at once. Its outputs 1..3 are multiplied by W_N^n,
  W_N^2n and W_N^3n.
- **Each later stage**, with L = N/4^(s+1), has three parts:
  1. Path p is delayed by p·L (0, 1D, 2D, 3D).
  2. A 4×4 commutator sends path p to lane ((`cnt`/L) − p) mod 4.
  3. Lane j is delayed by (3−j)·L (3D, 2D, 1D, 0).

  With these settings, each butterfly operation again receives the four samples, L apart, of
  one sub-transform. The operations follow each other in consecutive cycles.

This commutator rule is this design's derivation. It has been checked at 16, 64 and 256
points.

**R4MDC at a quarter of the sample rate** (`r4mdc_qrate_fft`). The plain R4MDC keeps every
butterfly and multiplier idle three quarters of the time. The duplicated-buffer idea of
the ping-pong R2MDC removes that idle time for radix-4 too:
- **Input buffer.** The input delays of stage 0 are replaced by two buffer sets of four
  N/4-word memories, one memory per quarter of the block. One set fills while the first
  butterfly reads x[n], x[n+N/4], x[n+N/2], x[n+3N/4] of the previous block from the other,
  one quadruple every four samples.
- **Later stages.** They are those of `r4mdc_fft`. They advance once every four input samples
  and use the quadruple counter n = `cnt`/4 where the plain version uses `cnt`.

Every butterfly and all three multipliers of a stage then work in every quarter-rate cycle.
The cost is 2N words of input buffer instead of 3N/2 words of input delay, and a latency
of 2N − 1.

## How the feedback pipelines work (R2SDF, R4SDF)

**R2SDF element** (`r2sdf_stage`). An element is a delay line of L words fed back around a
radix-2 butterfly. It alternates between two modes every L samples, on bit log2(L) of `cnt`:

- **fill**: the incoming sample (first half of a group) goes into the delay line. The sample
  leaving the delay line goes on, after multiplication by its twiddle
  W_N^((cnt mod L)·N/(2L)). That sample is the half-difference stored during the previous
  compute phase.
- **compute**: the incoming sample (second half) meets its partner leaving the delay line.
  The half-sum goes on at once, and the half-difference is written back into the delay line.

`r2sdf_fft` chains elements with L = N/2, N/4, …, 1. There is one sample in and one out per
cycle, and each butterfly computes half of the time. The delay total is N − 1 words, the
minimum. The number of adders and multipliers is the same as in the R2MDC.

**R4SDF element** (`r4sdf_stage`). An element has three delay lines A, B, C of L words around
a radix-4 butterfly. It goes through four phases q = (`cnt`/L) mod 4:

- **q = 0, 1, 2**: the input enters A, A feeds B and B feeds C, all through the butterfly's
  switches. The word leaving C goes out.
- **q = 3**: C, B and A hold x[n], x[n+L] and x[n+2L], and the input brings x[n+3L]. The
  butterfly sends y0 out at once and writes y1, y2, y3 into C, B, A. These outputs leave in
  the next phases 0, 1, 2.

The multiplier after the element applies W_N^(m·(cnt mod L)·N/(4L)) to output m = (q+1) mod 4.
It is idle (m = 0) in one phase of four, which gives 75 % use. `r4sdf_fft` chains elements
with L = N/4, N/16, …, 1. The delay total is N − 1 words.

## Delay buffers

All four delay-buffer modules have the same interface: `en`, `d` in, and `q` out. `q` is the
`d` of L enabled edges ago. `delay_line` picks one of them through its `IMPL` parameter
(`fft_pkg::delay_impl_e`). Every pipeline has a `DELAY_IMPL` parameter. The top uses all four
in its pipelines:
- shift registers in both R2MDC versions;
- dual-port RAM in the R2SDF and the quarter-rate R4MDC;
- two single-port RAMs in the R4SDF;
- one-hot RAM in the R4MDC.

| module | structure | storage | note |
|---|---|---|---|
| `delay_shiftreg` | chain of L registers | L words of flip-flops | simple; every word toggles on every shift |
| `delay_dpram` | cyclic buffer in a dual-port RAM | L+1 words | see below |
| `delay_2spram` | two single-port RAMs written in turn | 2 × L/2 words + output register | see below |
| `delay_onehot` | RAM with one-hot word lines instead of address decoders | L+1 words + L+1 flip-flops | see below |

- **`delay_dpram`**: a pointer register writes at p and reads at p+1 (mod L+1), then moves one
  place.
- **`delay_2spram`**: counter k (mod L). Its LSB is the write enable that selects the RAM to
  write; the other RAM is read. RAM2 is addressed by k/2, RAM1 by (k+1)/2. A multiplexer and
  an output register follow. Odd L adds one register in front, and L = 1 is a single register.
- **`delay_onehot`**: a ring of flip-flops holds a single 1 that selects the word to write; the
  next word is read. Only two flip-flops toggle per sample. An assertion checks that the ring
  stays one-hot.

The RAMs are arrays with an asynchronous read port. This is what "L+1 words hold L samples"
assumes. A RAM macro with registered read data would need its read address one step earlier.
RAM contents are not reset. The `out_valid` flags hide the values they hold before they are
first written.

## Butterflies and twiddles

- `bfly2`: the add/subtract core, (a+b)/2 and (a−b)/2 with one guard bit.
- `r2_dif_butterfly`: the core followed by `twiddle_mult` on the difference. The
  multiplication comes after the subtraction.
- `r2_dit_butterfly`: `twiddle_mult` on the odd input, then the core. The multiplication
  comes first. It is not used by a pipeline and stands alone in the top.
- `r4_butterfly`: y_m = Σ_i x_i·(−j)^(m·i)/4, as four four-input sums. That is 12 complex
  additions, and the ±1 and ±j factors are sign changes and swaps.
- `r22_butterfly`: the same function in two radix-2 layers: a0 = x0+x2, a1 = x1+x3, a2 = x0−x2,
  a3 = −j(x1−x3), then y0 = a0+a1, y2 = a0−a1, y1 = a2+a3, y3 = a2−a3. That is 8 additions. The
  sums are exact and divided by 4 only at the end, so the two forms agree bit for bit.
  `USE_R22` chooses the form in the radix-4 pipelines. R4SDF defaults to radix-2², R4MDC to
  direct radix-4.
- `twiddle_mult`: x·W_N^k, with four multipliers, truncation by 14 bits and saturation.

## Ping-pong bit-reversal buffer

`pingpong_bitrev_buffer` is the input buffer of a block-based (non-pipelined)
decimation-in-time FFT. That FFT wants its inputs in bit-reversed order:
x[0], x[4], x[2], x[6], … for N = 8. The buffer has two N-word memories:
- one memory fills in natural order;
- meanwhile the other memory is read at the bit-reversed address of the same counter;
- after every block the two memories swap roles.

The output is the previous block, `out_index` = bitrev(position), with a latency of N.

## Files and simulation

- `rtl/fft_pkg.sv` must be compiled first; `tb/tb_fft_ref_pkg.sv` is the testbench reference
  (a direct double-precision DFT).
- Every block has a self-checking testbench `tb/tb_<module>.sv`. It prints
  `TB_RESULT checks=N failures=M` and stops. A watchdog ends a hung run.
- `tb/tb_fft_pipelines_top.sv` runs the whole top at its default sizes end to end. It
  applies random stalls to every pipeline and checks:
  - every output against the DFT;
  - the bin order and the latency;
  - that each mechanism occurred: stalls, both commutator settings, both SDF modes, all
    R4SDF phases, all R4MDC rotations, buffer swaps, and full butterfly use in the
    ping-pong R2MDC and the quarter-rate R4MDC.
- `tb/tb_r2sdf_fft_1024.sv` runs a 1024-point R2SDF with dual-port-RAM delays.

Example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/fft_pkg.sv tb/tb_fft_ref_pkg.sv tb/tb_fft_pipelines_top.sv \
    -y rtl -y tb --top-module tb_fft_pipelines_top
./obj_dir/Vtb_fft_pipelines_top
```

Replace the testbench name to run another one. To try another size, change the `N`
localparam in a pipeline testbench. The pipeline testbenches have passed at these sizes:

| pipeline | sizes passed |
|---|---|
| R2SDF | 64, 128, 1024 |
| R2MDC (with and without `PIPE`) | 4, 64, 128, 1024 |
| R4SDF | 64, 256, 1024 |
| R4MDC | 64, 256 |
| quarter-rate R4MDC | 64, 256 |
| ping-pong R2MDC (with and without `PIPE`) | 4, 32, 256 |

Every file passes Verilator lint and the slang front end of Yosys. Each testbench has been
shown to fail against a deliberately broken copy of its module.

## Own choices and limits

These points are this design's own; the reference structures leave them open:
- **Arithmetic**: 16-bit words, scaling by 1/2 per radix-2 stage and 1/4 per radix-4 stage,
  and truncation.
- **Pipeline registers**: where the optional R2MDC registers sit, and how the control is
  shifted to match.
- **Interface**: a clock enable as the stall mechanism, implicit block framing after reset,
  and the `out_valid`/`out_bin` outputs.
- **Control**: the counter-based control of all switches.
- **R4SDF and R4MDC**: the phase schedule of the R4SDF element and the R4MDC commutator rule.
- **Quarter-rate R4MDC**: the whole structure. The reference material gives only its properties: a
  quarter of the sample rate and full multiplier use. Its buffer organisation extends the
  ping-pong R2MDC to four paths.
- **Delay buffers**: the exact addressing of the two-single-port-RAM buffer, and RAMs with an
  asynchronous read.
- **Twiddle multipliers**: their placement at the SDF element outputs and on the MDC
  butterfly outputs.

Known limits and departures:
- By default nothing is registered between the delay elements, so long combinational paths
  run through several butterflies and multipliers. Only the two R2MDC versions offer
  pipeline registers (`PIPE`). The R4MDC versions could be cut the same way. The SDF loops
  cannot be cut without re-timing.
- `r4mdc_fft` is built as the classic structure, at the sample rate, with 25 % butterfly use.
  Full use at a quarter of the rate is in `r4mdc_qrate_fft`.
- The half-rate parts of the ping-pong R2MDC and the quarter-rate parts of `r4mdc_qrate_fft`
  run on a clock enable, not on a divided clock.
- No pipeline returns results in natural order. `pingpong_bitrev_buffer` shows the
  bit-reversed addressing that a reordering buffer would use. It is not attached to a
  pipeline output.
- The DIT butterfly and the ping-pong buffer stand alone. No DIT pipeline is described here.
- The 1024-point case is a parameter setting. The top instantiates the 8- and 16-point
  versions.
