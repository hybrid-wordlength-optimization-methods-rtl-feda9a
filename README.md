# Pipelined FFT processors with a separate wordlength for each stage

A fixed-point pipelined FFT usually uses one data width in every stage. It
has to be wide enough for the last, noisiest stage, so the early stages are
wider than they need to be. This design gives each butterfly stage (PE
stage, for "process element") its own wordlength. Early stages run narrow
and later stages run wider. The widths were chosen to just meet a signal
to quantization noise ratio (SQNR) of 45 dB at the output with the smallest
area. For an 8192-point transform the width goes from 11 bits in the first
stage to 19 bits in the last. A uniform design would need 17 bits
everywhere for the same SQNR.

There are two streaming processors. Both use decimation in frequency and
take one complex sample per clock.

| processor | module | default size | stage wordlengths (first to last) | I/O |
|---|---|---|---|---|
| radix-2 single-path delay feedback (R2SDF) | `r2sdf_fft` | N = 8192 | 11 12 13 13 14 15 15 16 17 17 18 18 19 | 18 bit |
| radix-2² single-path delay feedback (R2²SDF) | `r22sdf_fft` | N = 4096 | 11 12 12 13 14 14 15 16 17 18 18 18 | 18 bit |

`fft_top` puts both processors side by side. They share clock and reset,
and each has its own ports (`r2_*` and `r22_*`). The wordlength sets are
the area-optimized results reported for a 45 dB SQNR target, 18-bit input
and output, and 50 MS/s throughput.

## Number format and where precision is lost

Every data word is a signed two's-complement fraction. A W-bit word has W-1
fraction bits and a range of [-1, 1). In the wordlength lists, W is the
total width of one real part, sign bit included.

Each butterfly divides by two, so no stage can overflow for inputs with
|x| < 1. The processors therefore return X(k)/N.

Precision is lost in exactly these places, each through `fx_quant`:

* **Butterfly.** (a ± b)/2 is computed without loss on WI+1 bits. It is
  then cut to the stage wordlength WO. The /2 and the wordlength reduction
  are a single truncation.
* **Twiddle multiply.** `cmult` forms the four real products. Each product
  is truncated to WO bits on its own, then the pairs are added. Coefficients
  are WO bits wide, rounded to nearest, with +1.0 clipped to the largest
  positive code.
* **Output.** The last stage's word is requantized to W_OUT.

The rules for loss are:

* Truncation always means rounding toward minus infinity: the dropped bits
  are simply discarded.
* Any value outside the range saturates. For inputs with |x| < 1 the
  butterflies cannot overflow. The twiddle product can: a rotated sample
  whose magnitude is near 1 (or above 1, as with full-scale inputs in
  both parts) can leave [-1, 1) in one part. Each processor's `ovf`
  output is a sticky flag: it goes high when a saturation happens and
  stays high until reset.
* Twiddle factors of ±1 and ±j are never sent through the multiplier.
  They are applied exactly, by swapping and negating the real and
  imaginary parts, so they add no noise.

## The delay-feedback stage (`r2sdf_pe`)

A stage of local length L does one radix-2 step on blocks of L samples. Its
feedback memory (`sdf_buffer`, L/2 words) is a circular buffer with a
single pointer. It behaves like a shift register of L/2 words that moves
one position per valid sample. A counter (`sdf_ctrl`) splits each block
into two modes.

* **Mode 1: first half of a block.**
  * The incoming sample x(n) goes into the memory.
  * The word leaving the memory is the difference the stage stored during
    the previous block.
  * That difference is multiplied by W_L^n and sent on.
* **Mode 2: second half of a block.**
  * The butterfly combines x(n) from the memory with the incoming
    x(n + L/2).
  * (x(n) + x(n+L/2))/2 goes out at once.
  * (x(n) − x(n+L/2))/2 goes into the memory in place of x(n).

The stage output is therefore L/2 sums followed by L/2 twiddled
differences. That is exactly the input order that the next stage, of
length L/2, needs.

The memory is max(WI, WO) bits wide. This way the stored inputs (WI bits)
and the stored differences (WO bits) both fit without loss.

Twiddle handling:

* With e = n, the factors W_L^0 and W_L^(L/4) are handled exactly: W_L^0
  passes through unchanged, and W_L^(L/4) = −j is an exact rotation.
* All other factors are read from `twiddle_rom` and multiplied in
  `cmult`. The table holds W_L^e for e < L/2 and is computed at
  elaboration from cos and sin.
* Stages with L ≤ 4 need only trivial factors, so they have no ROM and no
  multiplier.
* An N-point R2SDF therefore has log2 N − 2 real multiplier groups. The
  total feedback memory is N − 1 words.

`r2sdf_fft` chains LOGN of these stages with L = N, N/2, …, 2. Stage k
works at `WL[k]` bits.

## The radix-2² pair (BF2I + BF2II)

This is the least obvious part of the design. Radix-2² uses the radix-4
index split k = k1 + 2·k2 + 4·k3 but keeps radix-2 butterflies. Two
butterfly stages of local length L are paired, with twiddles only after the
second one. This halves the number of multipliers compared with R2SDF:
log4 N − 1 groups.

* **BF2I** is `r2sdf_pe` with `TW = 0`. It has memory L/2 and no twiddle.
  Per block it emits L/2 sums (k1 = 0), then L/2 differences (k1 = 1).
* **BF2II** is `r22_bf2ii_pe`. It runs the same two-mode radix-2 step with
  memory L/4 on that stream.
  * Before the butterfly, the last quarter of each block (the second half
    of the k1 = 1 part) is multiplied by −j. This is done exactly, by
    swapping the parts. It is the trivial radix-4 twiddle that makes the
    two radix-2 steps into one radix-4 step. In code this is
    `rotj = mode2 && cnt[MSB]`.
  * The four output quarters then carry the frequency groups
    k1 + 2·k2 = 0, 2, 1, 3, in that order.
  * Each output at position n of its quarter is multiplied by
    W_L^(n·(k1 + 2·k2)).
    * Factors whose exponent is a multiple of L/4 are applied as exact
      rotations.
    * All others come from a ROM of 3·L/4 − 2 entries, the largest exponent
      being 3(L/4 − 1).
  * The multiplier and its coefficients use the BF2II stage's wordlength.

`r22sdf_fft` chains LOGN/2 pairs with L = N, N/4, …, 4. Each of the LOGN
butterfly stages has its own wordlength. LOGN must be even.

## Interface

Both processors have the same ports. Only the widths follow the parameters.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | a sample is presented this cycle |
| `in_re`, `in_im` | in | W_IN | sample, natural order, frames back to back |
| `out_valid` | out | 1 | an output sample is presented |
| `out_re`, `out_im` | out | W_OUT | X(k)/N |
| `out_bin` | out | LOGN | the frequency index k of this output |
| `ovf` | out | 1 | sticky: some stage saturated since reset |

Input and output use these conventions:

* **Idle cycles, no back-pressure.** `in_valid` may be low in any cycle.
  Every stage has its own counter and memory pointer, advanced only by
  valid samples, so an idle cycle travels down the pipeline and shows up
  as a gap in `out_valid`. The output cannot be stalled.
* **Bit-reversed output.** Outputs leave in bit-reversed order, so
  `out_bin` counts 0, N/2, N/4, 3N/4, …. There is no reorder buffer: the
  only memory is the N − 1 words of feedback.
* **Resetting the framing.** Reset clears the counters, the pointers and
  `ovf`. The memories are not cleared; their contents are not used until
  they have been filled.

## Timing

* **Throughput.** One complex sample per clock. The required sample rate
  is the required clock rate, for example 50 MHz for 50 MS/s.
* **Per stage.** A stage has two register levels: a result register
  together with the ROM read, then the multiplier register.
* **Latency.** With gapless input, the first output of a frame appears
  N + 2·LOGN cycles after the first input of that frame. After that there
  is one output per valid input.
* **Flushing.** The last outputs of a frame are pushed out by the next
  frame's samples. To drain the pipeline, feed N further samples, for
  example zeros.

## Files

| file | content |
|---|---|
| `rtl/fft_pkg.sv` | shared constants (`MAX_W`, `MAX_LOGN`), the trivial rotation enum `rot_e`, `imax` |
| `rtl/fx_quant.sv` | truncate / zero-fill / saturate requantizer |
| `rtl/bf2.sv` | scaled radix-2 butterfly |
| `rtl/sdf_buffer.sv` | feedback memory (circular buffer) |
| `rtl/sdf_ctrl.sv` | per-stage counter, mode and primed flag |
| `rtl/twiddle_rom.sv` | coefficient table computed at elaboration, synchronous read |
| `rtl/cmult.sv` | four-multiplier complex product with exact trivial rotations |
| `rtl/r2sdf_pe.sv` | R2SDF stage / BF2I stage |
| `rtl/r22_bf2ii_pe.sv` | BF2II stage with the pair's twiddle multiplier |
| `rtl/r2sdf_fft.sv`, `rtl/r22sdf_fft.sv` | the two processors |
| `rtl/fft_top.sv` | both processors side by side |
| `tb/fft_ref_pkg.sv` | bit-exact models of both processors, double-precision FFT, DFT |
| `tb/fft_stream_drv.sv` | reusable stimulus/checker for one processor |
| `tb/fft_wl_case.sv` | one processor configuration plus its checker, for `tb_workloads` |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_workloads` |

The parameter `WL` is an array of `MAX_LOGN` = 13 entries, whatever LOGN is.
Entries past LOGN are ignored. To configure a smaller transform, override
`LOGN` and give all 13 entries, padding the list with zeros, e.g.
`.LOGN(6), .WL('{11,12,13,13,13,14,0,0,0,0,0,0,0})`. A width must not
exceed `MAX_W` = 32.

## Verification

Every testbench checks itself. It ends with a
`TB_RESULT checks=<n> failures=<n>` line, and it has a watchdog.

* **Block tests.** Each block is checked against values computed in the
  testbench itself:
  * `fx_quant`, `bf2` and `cmult` against integer arithmetic on random and
    corner-case operands;
  * `sdf_buffer` and `sdf_ctrl` cycle by cycle;
  * `twiddle_rom` against `$cos`/`$sin`;
  * `r2sdf_pe` and `r22_bf2ii_pe` against a sample-by-sample model of one
    stage. These tests also count the modes, twiddles and −j rotations
    they saw.
* **Processor tests** (`tb_r2sdf_fft`, `tb_r22sdf_fft`, 64 points). Five
  frames are run:
  * frames 0 and 1 are random with no gaps;
  * frame 2 is random with idle cycles;
  * frame 3 is full-scale with idle cycles, which forces saturation;
  * frame 4 is zeros, to flush frame 3 out.

  Every output word must match the fixed-point model in `fft_ref_pkg` bit
  for bit. The model is written from the signal-flow graph, not from the
  RTL structure. The tests also check `out_bin`, the latency, the
  gap-free rate, `ovf`, and an SQNR floor against a double-precision FFT.
  That FFT is itself checked against a direct DFT. The 64-point sets are
  {11 12 13 13 13 14} (R2SDF) and {11 12 12 13 13 14} (R2²SDF).
* **Full size** (`tb_fft_top`). The same checks run on `fft_top` at its
  default parameters, 8192-point R2SDF and 4096-point R2²SDF, with
  uniform inputs in (−1/√2, 1/√2). It also counts mode-1 and mode-2
  cycles, exact and ROM twiddles, −j rotations, stalls and saturations,
  and fails if any of them never happened. It takes well under a minute
  in Verilator.
* **Other configurations** (`tb_workloads`). Twelve more processors are
  built side by side through `fft_wl_case`, each with the optimized
  wordlength set for its size, and run with the same checks:
  * 18-bit I/O: R2SDF at 8, 256, 1024 and 4096 points; R2²SDF at 16, 256
    and 1024 points.
  * Two further 18-bit R2SDF sets, at 1024 and 2048 points, from a faster
    statistical search.
  * 14-bit I/O: R2SDF at 512 and 1024 points; R2²SDF at 1024 points.

Measured SQNR on random frames:

| configuration | SQNR |
|---|---|
| R2SDF 8192 | 47.4 dB |
| R2²SDF 4096 | 47.8 dB |
| R2SDF 64 | 48.4 dB |
| R2²SDF 64 | 48.6–49.8 dB |
| other 18-bit I/O sets, 8 to 4096 points | 47.2–52.0 dB |
| 14-bit I/O, R2SDF 512 | about 46 dB |
| 14-bit I/O, 1024 points, both processors | 45.0–45.3 dB |

All meet the 45 dB target, within the per-frame spread. The 14-bit 1024-point cases are the tightest:
with a 14-bit output word and outputs scaled by 1/N, the output rounding
alone allows only about 45 dB. For the same reason no 14-bit set exists
for larger N. Their testbench floor is 44 dB; every other case is
checked against 44.9 dB. The 18-bit sets were chosen to land at
about 45.0 dB, so these results are 2–3 dB above that. Two choices here
make the hardware less noisy than the error model behind those sets:

* trivial twiddles are applied without error, while the error model
  treats every twiddle multiplication as noisy for simplicity;
* the coefficients are rounded to nearest.

How SQNR is measured also moves the figure by a dB or so: here the error
is measured against the double-precision FFT of the quantized input. The
exact cause of the margin has not been pinned down.

To simulate with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_fft_top \
    rtl/fft_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft_top.sv -y rtl -y tb
./obj_dir/Vtb_fft_top
```

Replace `tb_fft_top` with any other testbench name. The block tests that do
not use `fft_ref_pkg` need only `rtl/fft_pkg.sv` ahead of their own file.

## Design choices beyond the reference description

The algorithm, the stage structure, the per-stage wordlengths, the scaling,
the truncation and saturation rules, and the exact trivial twiddles follow
the published design. The following were not specified and are choices
made here:

* The valid-only streaming handshake, the asynchronous reset, the
  `out_bin` and `ovf` outputs, and the bit-reversed output order.
* The coefficient width (the stage wordlength) and the rounding of the
  coefficients.
* The register placement: two registers per stage. The only requirement
  given was that each stage is pipelined.
* The memory is a circular buffer rather than a shift register, and its
  width is max(WI, WO).
* The R2²SDF twiddle multiplier sits in the BF2II stage and uses that
  stage's wordlength.
* Both processors are instantiated at the top. The published work treats
  them as two alternative architectures, each with its own optimized set.

The wordlength sets themselves come from a design-time search: error
models, simulation, and area figures from a 0.25 µm cell library. That
search is software and is not part of this RTL. To build another
configuration, for a different N, an I/O width such as 14 bits, or another
SQNR, pass its wordlength list through `WL` together with `LOGN`, `W_IN`
and `W_OUT`.
