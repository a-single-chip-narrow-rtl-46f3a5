# Frequency-domain narrow-band interference excisor (FDIS)

A GPS signal arrives 20–30 dB below the thermal noise, so a single continuous-wave
(CW) jammer or a few of them can swamp it. A jammer, though, occupies only a few
frequency bins, while the GPS spread-spectrum signal is spread thinly across all of
them. This design removes the jammers in the frequency domain. It cuts the complex
baseband stream into overlapping windowed blocks of 256 samples and transforms each
block with an FFT. It then zeroes every bin whose level stands out from the block's
own statistics, transforms the block back, and stitches the blocks into a continuous
output stream.

The RTL is a single synthesizable SystemVerilog design (`fdis_top`) for a complex
input of 12-bit I and 12-bit Q at up to 10 M complex samples per second. The
internal arithmetic is 20 bits wide.

```
            +----------------+   fwd   +----------+   +-----------+   inv   +----------+   +----------------+
 in ------->| overlap_window |-------->|          |-->|  excisor  |-------->|          |-->| overlap_select |--> out
 12b I/Q    | 2 paths, window|  slot   | fft_core |   | N-sigma   |  slot   | fft_core |   | keep middle N/2|    12b I/Q
            +----------------+         +----------+   +-----------+         +----------+   +----------------+
                                       (one physical core; forward and inverse blocks alternate)
```

## Signal flow

1. **Overlap and window** (`overlap_window`, `window_rom`). Every N/2 = 128 new
   samples complete a block of N = 256 samples. Successive blocks overlap by
   half, so they alternate between a *normal* path and a path *delayed* by half a
   block. Each block is multiplied by a minimum four-term Blackman–Harris window,
   whose −92 dB sidelobes keep a strong tone from leaking across the spectrum.
2. **Forward FFT** (`fft_core`): 256-point, radix-2, decimation in frequency. The
   output comes in bit-reversed order.
3. **N-sigma excision** (`excisor`). The excisor computes the level of each bin in
   dB, and the mean μ and standard deviation σ of those levels over the block. It
   sets the threshold to μ + N·σ and zeroes every bin above it.
4. **Inverse FFT**: the same core, with conjugate weights and a division by 256.
5. **Overlap select** (`overlap_select`). Each inverse block keeps only its middle
   half, samples 64…191, where the window is large. The kept halves of the two paths
   interleave into a continuous output.

Step 5 throws away the window's tapered ends, which limits the loss of wanted
signal through windowing. The price is twice the transform work: every input
sample goes through two forward and two inverse transforms.

## One FFT core for four transforms

The four transforms (forward and inverse, normal and delayed path) all run on one
pipelined FFT core.

- **Throughput.** The core takes two complex samples per clock, so it accepts a
  256-point block every 128 clocks. At a 20 MHz clock that is 40 M samples per
  second, four times the 10 M samples per second input rate. The input is
  therefore accepted at one sample per two clocks.
- **Slots.** The top divides the core's time into *slots* of N/2 = 128 clocks, and
  the slots alternate between forward and inverse.
  - A forward slot takes the next windowed block from `overlap_window`.
  - An inverse slot takes the next excised block from `excisor`.
- **Idle blocks.** If a source has nothing ready, the slot is sent as an idle block
  (`valid = 0`). The pipeline never stops and never needs flushing.
- **Start timing.** Both sources answer `start` two clocks later. The scheduler
  therefore starts them one clock before a slot boundary, and an assertion checks
  that every block lands exactly on one.

Each block carries a three-bit tag `{valid, inv, scale}` through the pipeline
alongside its data. Every stage applies the tag to the block it is working on. One
stage can be finishing a forward block while its neighbour is starting an inverse
block.

## Inside the FFT core

`fft_core` is eight identical stages in a chain (`fft_stage`). Each stage has:

- a RAM;
- an address generator;
- a weight ROM (`twiddle_rom`);
- a butterfly (`butterfly`);
- a pseudo-random generator for rounding (`pn_seq`);
- two test multiplexers.

All stages run at once. Each stage does 128 butterflies per block.

### Read-modify-write shuffling

A radix-2 DIF stage needs its inputs in pairs N/2^(s+1) apart. Its data, however,
arrives in the order the previous stage produces it. Each value is used exactly
once, so the stage does not double-buffer. Every clock it does three things:

1. It reads the two words that its butterfly needs now.
2. It feeds them to the butterfly, and the results go on to the next stage.
3. It writes the two words arriving from the previous stage into the two locations
   it has just freed.

The RAM is modelled as an array with two reads and two writes per clock, read
before write.

Because arriving words fill locations in read order, the write order changes
from block to block. The address generators track this change without any lookup
table.

- **First stage** (`addr_gen_first`). A base counter runs from 0 to N−1, and its bits
  are rotated right by a block counter that runs from 0 to log2(N)−1. With N = 8,
  block 0 uses the natural order 0,1,…,7. Block 1 uses 0,4,1,5,2,6,3,7, and block 2
  uses 0,2,4,6,1,3,5,7. After log2(N) blocks the sequence repeats.
- **Later stages** (`addr_gen_sub`). A base counter with a one-bit odd/even block
  counter. On odd blocks the MSB and LSB of the address are swapped.
  - The stage-s memory has M = log2(N)+1−s address bits, and the swap uses that
    stage's own MSB.
  - Stage 1 needs a full block of N words before its first butterfly can run.
  - From stage 2 on, the memory halves at each stage: 256, 256, 128, 64, 32, 16, 8
    and 4 words of 40 bits.
- **Weight index** (`fft_stage`). For pair p in stage s the weight index is k = p for
  stage 0 and k = (p mod 2^(M−2))·2^s for later stages. This comes from the address
  scheme. It is checked against a floating-point DFT.

Check: `fft_core_tb` compares the core with a direct DFT on random forward and
inverse blocks, with idle blocks mixed in. It does this at N = 256 and at N = 8.
Blocks of both directions are interleaved, and the check includes the exact
latency.

### Arithmetic

- **Word width.** Samples enter the core as 12-bit values sign-extended to 20 bits.
  In a forward transform a coherent tone grows by one bit per stage, and 20 = 12 + 8
  bits hold that growth without scaling.
- **Inverse scaling.** An inverse block has `scale` set, and every stage halves it,
  which gives 1/256 overall. Spreading the division over the stages keeps the
  inverse within 20 bits and rounds eight times by ½ rather than once by 1/256.
- **Rounding.** Each butterfly adds pseudo-random bits below the kept LSB before
  truncating. Products are Q1.14 weights times 20-bit data. This *dithered*
  rounding is unbiased on average, so repeated rounding does not pile up a DC error.
  Each stage has its own 16-bit LFSR with its own seed.
- **Saturation.** Results saturate at 20 bits.

`out_sop`, the tag and the data leave the core 390 clocks after they enter, for
N = 256.

### Test multiplexers

Each stage has two bypasses: `byp_ram` sends the incoming pair straight to the
butterfly, skipping the RAM shuffle, and `byp_bfly` passes the pair around the
butterfly. With both set on every stage, the core is a delay line of one register
per stage. The end-to-end testbench checks exactly that.

## The N-sigma excisor

When a jammer is present, a few bins rise far above the others and widen the
spread of bin levels. The excisor works on a log (dB) scale so that these few large
bins do not dominate the statistics.

For each block:

1. **Level of each bin** (`log_mag`).
   - The magnitude is approximated as max(|Re|,|Im|) + min(|Re|,|Im|)/4. This
     overestimates by at most 11.6 %, at 45°.
   - The level in dB is 10·log10|X| ≈ 3·log2|X|. Here log2 is the position of the
     leading one plus the bits after it as a linear fraction.
   - Levels are unsigned with 6 fraction bits (1/64 dB).
2. **Statistics** (`block_stats`).
   - Over the block, it accumulates S = ΣL and Q = ΣL².
   - Then μ = S/N and σ² = (N·Q − S²)/N², which are exact divisions by powers of
     two.
   - σ is found by `sqrt_approx`. This writes σ² = a·2^b with 1 ≤ a < 2 and
     approximates √a by the chord through (1, 1) and (2, √2). If b is odd it
     multiplies by √2 ≈ 1.0110101b. The worst error is about 1.5 %.
3. **Choice of N** (`threshold_sel`).
   - σ is compared with four programmable levels. The number of levels it exceeds
     (0–4) picks one of five programmable values of N, in unsigned Q4.4.
   - Program the levels in ascending order and the N values in descending order.
     A larger σ then means more interference, so N shrinks and the threshold stays
     at the top of the noise floor.
   - The threshold is μ + N·σ.
4. **Compare and zero** (`excisor`).
   - The block's values are held in one of two banks while the statistics finish.
     The dB levels are not stored; each magnitude is computed again as the block is
     read out.
   - Any bin whose recomputed level is strictly above the threshold is zeroed,
     unless excision is disabled.
   - The banks are read at bit-reversed addresses, so the inverse transform gets the
     bins in natural order.

Settings live in the `cfg` port (`excise_cfg_t`):

- `excise_en`;
- `sigma_lvl[0..3]` in dB with 6 fraction bits;
- `n_val[0..4]` in Q4.4.

For example, the end-to-end test uses:

- levels of 3, 4.5, 8 and 12 dB;
- N values of 3, 2, 1/4, 1/8 and 1/16.

σ of the dB levels is about 2.6 dB for noise alone. It is 3.4–4.2 dB with one strong
tone and 4.7–5.1 dB with five tones. So a block of noise uses N = 3, a block with one
tone uses N = 2, and a block with five tones uses N = 1/4.

- **One tone, N = 2.** The tone lies halfway between two bins and is about 20 dB above
  the noise per sample. About 6 bins per block are zeroed.
- **Five tones, N = 1/4.** About 61 of 256 bins per block are zeroed. The low
  threshold takes many noise bins along with the tones' window main lobes.

The excisor reports each block's μ, σ, the index of the N it chose and the number
of bins it zeroed (`st_*`, valid on `st_done`).

## Interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (20 MHz for the full rate); synchronous active-low reset |
| `in_valid`, `in_re`, `in_im` | in | 1, 12, 12 | input sample; at most one every two clocks |
| `out_valid`, `out_re`, `out_im` | out | 1, 12, 12 | output sample, saturated to 12 bits |
| `cfg` | in | struct | excision enable, four σ levels, five N values |
| `byp_ram`, `byp_bfly` | in | 8 each | per-stage test bypasses, 0 in normal use |
| `st_mu`, `st_sigma`, `st_nsel`, `st_excised`, `st_done` | out | 12, 12, 3, 9, 1 | statistics of the last excised block |
| `overrun` | out | 3 | sticky `{output, excisor, input}` overrun flags |

- **Output gain.** The window stays in the output: with excision off, each output
  sample is the input times the window value at that point. The window is 0.5–1.0
  over the kept middle half. The output comes in bursts of 128 samples at one per
  clock, one burst for every 128 input samples.
- **Latency.** A sample takes 1801 clocks from input to output in the end-to-end
  test, which is 90 µs at 20 MHz. It is measured on the first output sample, which
  is input sample 64 of the first block. The fixed part is about 1424 clocks
  (71 µs):
  - completing the block after that sample: 384 clocks;
  - two passes through the core: 2 × 390;
  - buffering the whole block in the excisor until its statistics are known: 130;
  - collecting the kept half block at the output: 130.

  The rest is waiting for slots. Up to 256 clocks go to waiting for a forward slot,
  depending on when the input starts relative to the slot counter. The wait for an
  inverse slot is about 120 clocks, because the excisor becomes ready a few clocks
  after a slot boundary has passed.
- **Overruns.** None occur at the full input rate. They are flagged if input arrives
  faster than one sample per two clocks.

## Where this design departs from, or adds to, the original chip

- **Latency.** The original chip reports 70 µs. This RTL takes 90 µs at a 20 MHz
  clock in the test, and its fixed part alone is 71 µs. The slot waits come from
  this design's own scheduler.
- **Slot scheduler.** The scheduler, the start/ready handshakes and the output
  bursts are this design's own. The chip is known only to time-multiplex the four
  transforms on one pipelined core.
- **Inverse scaling.** The 1/N inverse scaling is split into a halving per stage,
  rather than one shift at the output.
- **Window coefficients.** The window is the standard minimum four-term
  Blackman–Harris, in its periodic form, with Q0.16 coefficients computed at
  elaboration. The chip's exact coefficients are unknown.
- **Square root.** The √a line is a chord with shift-add constants. Its worst
  error, about 1.5 %, is a little above the 1.3 % reported for the chip's line.
- **Choosing N.** The mapping from "σ above k levels" to the k-th N, and the Q4.4
  format of N, are assumptions.
- **Unspecified details.** Widths not fixed by the original design are this
  design's choices: weights Q1.14, window Q0.16, dB values with 6 fraction bits,
  and 12-bit saturated output. So are the reset behaviour and the LFSR polynomial
  (x^16+x^14+x^13+x^11+1).
- **Programming interface.** There is no register interface for the settings; they
  are a plain input port.
- **Not covered.** The pads, the A/D converter and RF front end ahead of the chip,
  and the GPS receiver after it are not part of this RTL.

## Files

`rtl/` (one module or package per file):

- `fdis_pkg.sv`: widths, `cplx_t`, `blk_tag_t`, `excise_cfg_t`, `bitrev`.
- `fdis_top.sv`: the chain and the slot scheduler.
- `overlap_window.sv`, `window_rom.sv`: input buffer, the two paths and the window.
- `fft_core.sv`, `fft_stage.sv`, `addr_gen_first.sv`, `addr_gen_sub.sv`,
  `butterfly.sv`, `twiddle_rom.sv`, `pn_seq.sv`: the pipelined FFT.
- `excisor.sv`, `log_mag.sv`, `block_stats.sv`, `sqrt_approx.sv`,
  `threshold_sel.sv`: the N-sigma excisor.
- `overlap_select.sv`: output selection.

`tb/` has one self-checking testbench per module, `<module>_tb.sv`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog. The points below are what each
checks against:

- `fft_core_tb`: a double-precision DFT at N = 256 and N = 8.
- `fft_stage_tb`: an eight-point stage and its bypasses.
- `addr_gen_*_tb`: the address sequences of the eight-point example and of N = 256.
- `fdis_top_tb`: the whole design at full size, in four phases.
  - A: noise with excision off. The output is checked sample by sample against the
    windowed input.
  - B: noise plus one strong tone halfway between two bins. About 36 dB
    suppression, with N = 2 chosen.
  - C: noise plus five tones. The residual is about 23 dB below the tone power,
    counting the noise bins lost too, with N = 1/4 chosen.
  - D: all bypasses on.

  It counts forward, inverse and idle slots, both paths, zeroed bins, N choices and
  bypass use, and fails if any of them never happens.

Simulate any testbench with Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
          rtl/fdis_pkg.sv tb/fdis_top_tb.sv --top-module fdis_top_tb -o sim && ./obj_dir/sim
```

Verilator finds the other modules in `rtl/` through `-Irtl`. Each testbench and the
RTL build without warnings at Verilator's default settings. `--timescale` is
needed only because the RTL files carry no timescale of their own.

The full-size end-to-end test runs in well under a second. `LOG2N` sets the block
size in every module; the stage-level tests use 3 (eight points) and everything
else defaults to 8.
