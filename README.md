# Radix-2² single-path delay feedback FFT, 4096 points

A streaming FFT core for medical image reconstruction (MRI k-space, CT view
spectra). One complex sample enters per clock in natural order and one
frequency bin leaves per clock, without gaps between transforms. The core is
a radix-2² single-path delay feedback (SDF) pipeline with decimation in
frequency. Each butterfly stage has a feedback delay line. The delay keeps
half a block of samples until their partners arrive, so the only memory in
the core is N − 1 words of delay. For the default N = 4096 the pipeline has
12 butterfly stages and 5 complex multipliers. The -j rotations between
stage pairs need no multiplier; they are done by swapping and negating.

The structure, the 4096-point size, the half-scaling butterfly, the -j
multiplier and the per-multiplier twiddle tables follow the published
architecture. Word lengths, rounding, register placement, flow control and
reset are this implementation's own choices. They are listed under
[Departures and choices](#departures-and-choices).

## The pipeline

```
 x ─► BF2I ─► BF2II ─► ⊗W ─► BF2I ─► BF2II ─► ⊗W ─► … ─► BF2I ─► BF2II ─► X (bit-reversed)
      N/2     N/4            N/8     N/16                 2        1        (feedback delay)
               │-j                    │-j                          │-j
```

| N    | stages | delays               | twiddle multipliers (table points) | latency |
|------|--------|----------------------|------------------------------------|---------|
| 16   | 4      | 8, 4, 2, 1           | 1 (16)                             | 19      |
| 256  | 8      | 128 … 1              | 3 (256, 64, 16)                    | 265     |
| 512  | 9      | 256 … 1              | 4 (512, 128, 32, 8); last stage alone | 523  |
| 4096 | 12     | 2048 … 1             | 5 (4096, 1024, 256, 64, 16)        | 4111    |

Latency is counted in accepted input samples. It is the total feedback delay
N − 1, plus one register per stage except the last, plus one per multiplier.
The first result of a transform is captured on the clock edge that accepts
input sample number `latency` (counting from 0). It shows on the outputs one
clock later.

## How one SDF stage works

This is the part that takes the most effort to follow. A stage with delay L
works on blocks of 2L samples and has two phases. The butterfly control `s`
selects the phase.

* **Fill, `s = 0`, the first L samples of a block.** Each new sample goes into
  the delay line. The delay line's old content leaves the stage: these are
  the L half-differences left over from the previous block.
* **Butterfly, `s = 1`, the next L samples.** Each new sample `x[n+L]` meets
  `x[n]`, which comes out of the delay line at that moment. The half-sum
  `(x[n] + x[n+L]) / 2` leaves the stage at once. The half-difference
  `(x[n] − x[n+L]) / 2` goes back into the delay line and leaves during the
  next block's fill phase.

So a stage emits a block of L sums followed by L differences, exactly L
samples behind its input. Stage s has delay N/2^(s+1). Its output blocks are
therefore the two halves of a radix-2 DIF split, and the next stage splits
each half again. After log2 N stages the result comes out in bit-reversed
order. `out_index` gives the natural index k of each result.

`sdf_bf` is the butterfly with its two multiplexers. `delay_buffer` is the
delay line, a circular memory with a single pointer. `sdf_stage` joins the
two and adds the output register.

## Radix-2² factorisation: -j and twiddles

Take a pair of stages, BF2I with delay 2M followed by BF2II with delay M, and
write the pair's block length as N' = 4M. The radix-2² split
`n = 2M·n1 + M·n2 + n3`, `k = k1 + 2k2 + 4k3` gives:

* Between the two butterflies, the difference half (k1 = 1) is rotated by -j
  in its second quarter (n2 = 1). In stream terms, BF2II multiplies its
  inputs by -j in the last quarter of each 4M block. `trivial_mult` does this
  by swapping re and im and negating. Its select is `~t & s`, where `s` is
  the BF2II phase bit and `t` is the inverted next-higher position bit.
* After BF2II, the sample at block position p = (2k1 + k2)·M + n3 is
  multiplied by W_N'^(n3·(k1 + 2k2)). In other words, the exponent is n3
  times the bit-reversed top two bits of p. The exponent is always below
  3N'/4. `twiddle_rom` holds exactly those entries, and `complex_mult` applies
  them.

With an odd log2 N (for example 512), the last stage is a lone BF2I that
finishes with a final radix-2 split.

## Control

`fft_control` has a single counter that counts accepted samples modulo N.
The stream reaches stage s with a fixed lag of `stage_off(N, s)` samples: the
delays and registers in front of it. The functions in `sdf_fft_pkg` compute
these lags at elaboration. Each stage's position in its block is therefore
`cnt − stage_off`. Its phase bit is bit log2 L of that position. Its -j
select and its twiddle exponent come from the bits above. Subtracting a
constant from one counter gives the same bits as a chain of small delay
registers on the counter bits.

A second counter saturates at the latency. Together with the accept signal,
it produces `out_valid`.

## Interface and timing (`sdf_fft_core`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | a sample is accepted this clock; the whole pipeline moves only then |
| `in_re`, `in_im` | in | DW | input sample, natural order |
| `out_valid` | out | 1 | this clock shows a result of a complete transform (one pulse per result) |
| `out_re`, `out_im` | out | DW | X[k] / N |
| `out_index` | out | log2 N | k |

Parameters: `N` (4096; any power of two ≥ 4), `DW` (16) and `TW` (16).

The core is a clock-enabled pipeline. A cycle with `in_valid = 0` freezes
everything, so input gaps are allowed. The feedback delays move only when
samples are pushed. A transform's last results therefore come out while the
next transform enters. To drain the last transform of a stream, push
`latency(N)` filler samples (zeros, for example).

## Number format and accuracy

Data is two's complement, DW bits per component. Every butterfly halves its
sum and difference with an arithmetic shift, which rounds toward −∞. Word
growth is therefore absorbed stage by stage, and the core returns X[k]/N.
Twiddles are signed with TW − 2 fraction bits, so 1.0 is exact at 2^14. The
complex product is rounded half up and saturated. The -j negation saturates
at the most negative value.

Against a double-precision DFT/N, with inputs up to ±2^13, the largest
errors seen in simulation were:

| N | largest error per component |
|---|-----------------------------|
| 16 … 256 | 2 LSB |
| 512 | 3 LSB |
| 4096 | 4 LSB |

The floor rounding of the 12 halvings adds a small negative bias.

### Word length for 2-D reconstruction

Because each pass divides by N, a full 2-D inverse transform divides by N².
The k-space centre (DC) of a 256 × 256 image is 65536 times its mean pixel
value, and it must fit in the input word. With DW = 16, a unit pixel of a
typical head phantom therefore ends up as fewer than two LSB. With DW = 24
and TW = 24 it comes out as about 420 LSB, and the reconstruction in
`tb_mri_recon_2d` stays within 3 LSB of a double-precision inverse DFT.
Use a wider `DW` when the core does both passes of a 2-D transform.

## Files

| file | content |
|------|---------|
| `rtl/sdf_fft_pkg.sv` | default sizes; stage count, delays, offsets and latency as functions |
| `rtl/sdf_fft_core.sv` | top: generates the stage chain, multipliers and tables |
| `rtl/sdf_stage.sv` | one BF2I / BF2II stage |
| `rtl/sdf_bf.sv` | butterfly with the 1/2 scaling and phase multiplexers |
| `rtl/trivial_mult.sv` | -j multiplier |
| `rtl/delay_buffer.sv` | feedback delay line |
| `rtl/twiddle_rom.sv` | twiddle table, computed at elaboration (cos, −sin of 2πe/N') |
| `rtl/complex_mult.sv` | registered complex multiplier |
| `rtl/fft_control.sv` | counter and all control bits |
| `tb/tb_*.sv` | one self-checking testbench per module, plus end-to-end tests |
| `tb/fft_stream_checker.sv` | stimulus and DFT reference shared by the end-to-end tests |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sdf_fft_full \
    -Irtl -Itb -y rtl -y tb rtl/sdf_fft_pkg.sv tb/tb_sdf_fft_full.sv -o sim
./obj_dir/sim
```

* `tb_sdf_fft_full` runs the default 4096-point core. It streams two
  transforms (a tone and random data) with random stalls, and checks all
  8192 results, their order and the latency. It takes a few seconds.
* `tb_sdf_fft_core` runs N = 16, 32 and 64 side by side, 8 transforms each.
  It also counts the pipeline mechanisms in the 64-point core: fill cycles,
  butterfly cycles, -j rotations, twiddle products, stalls and back-to-back
  transforms. Each must happen at least once.
* `tb_workloads` runs 256-point transforms (MRI rows of a 256 × 256 image),
  512-point transforms (CT views of a 512 × 512 slice) and the 1024-point
  pipeline (five stage pairs, four twiddle multipliers).
* `tb_mri_recon_2d` reconstructs a 256 × 256 phantom image from its k-space.
  It runs 512 inverse transforms through one 256-point core: rows, then
  columns. The testbench does the conjugation, reordering and transposition
  between passes. See [Word length for 2-D reconstruction](#word-length-for-2-d-reconstruction).
* `tb_sdf_bf`, `tb_trivial_mult`, `tb_delay_buffer`, `tb_sdf_stage`,
  `tb_twiddle_rom`, `tb_complex_mult` and `tb_fft_control` test the modules
  one at a time, against models written independently of the RTL.

To change the size, set `N` on `sdf_fft_core`. The functions in
`sdf_fft_pkg` give the matching latency.

## Departures and choices

* **Control delays.** The reference diagram drives each butterfly from a
  counter bit through short delay registers (D1, D4/D5, D8/D9). This core
  subtracts constant offsets from a single counter instead. The offsets
  match its own register placement: one register after every stage and every
  multiplier. The printed delay lengths belong to a different register
  placement and are not copied. Control polarity follows the butterfly's
  multiplexer labels (1 = butterfly).
* **Control and twiddle inputs.** The measured 16-point prototype took its
  butterfly selects, -j controls and twiddle values as top-level inputs.
  Here the control unit and the twiddle tables are inside the core.
* **Word lengths.** The 16-point prototype used very narrow words (4-bit
  inputs, 5-bit twiddles, 8-bit output). The default here is 16-bit data and
  16-bit twiddles, and both are parameters.
* **Twiddle storage.** The tables are computed inside the RTL at elaboration,
  not loaded from a file generated by an outside tool.
* **Output order.** Results leave in bit-reversed order with their index. No
  reorder memory is included.
* **Not included.** The clock generator, clock tree and delay matching are
  physical design and are not part of this RTL. The same holds for the
  input/output drive buffers. The core has no inverse-transform mode: an IFFT
  is obtained by conjugating the input and the output. It also has no
  transpose memory for 2-D transforms, and no convolution or back-projection
  logic.
* **Sizes.** N may be any power of two of at least 4. Odd log2 N (512, for
  example) ends with a lone radix-2 stage, which extends the radix-2²-only
  structure.
