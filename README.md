# HEVC motion compensation interpolation accelerator

In HEVC inter prediction, a block of the picture is predicted from one or two
regions of earlier pictures. The motion vectors locate them to a quarter of a luma
sample and an eighth of a chroma sample, so most predictions need samples *between*
the stored ones. Interpolating those fractional samples is motion compensation. In a
software decoder it takes more time than any other step.

This RTL does that interpolation in hardware for a decoder split between hardware
and software. Software parses the stream and decides, for each prediction unit (PU),
the block size, the fractional offsets, uni- or biprediction and the weights. It then
streams the reference samples to the accelerator and reads back the final predicted
samples. The accelerator computes exactly the HEVC results: the fractional-sample
filters, default bi-averaging and explicit weighted prediction, for 8- and 10-bit
video.

The architecture follows the accelerator by M. Göbel, "A High-Performance Hardware
Accelerator for HEVC Motion Compensation" (Informatiktage 2014). It has two
independent datapaths, one for luma and one for chroma. Each datapath has two
filter chains for the two references of a biprediction, built as horizontal filter,
buffer and vertical filter. A biprediction/weighting unit follows the two chains.
Each filter handles one sample per cycle. Everything below the block level is this
implementation's own design and is described here: the buffer organisation, the
handshakes, the control, the register interface and all widths.

## Separable filtering in two passes

The 2-D interpolation filter of HEVC is separable, so each reference block is
filtered in two 1-D passes:

1. **Horizontal pass** (`mc_hfilter`). The reference block arrives row by row, one
   sample per cycle, and shifts through a window of `TAPS` samples (8 for luma, 4
   for chroma). Once a row has filled the window, each new sample produces one
   filtered value. That value is shifted right by `bit_depth - 8` and written into
   the buffer as a 16-bit signed intermediate.
2. **Vertical pass** (`mc_vfilter`). This pass starts only after the whole
   horizontal pass has finished. It walks the output block in row-major order. Each
   cycle it reads a column of `TAPS` intermediates, filters them, shifts right by 6
   and emits one 16-bit prediction sample.

The vertical filter needs rows that the horizontal pass produces last. Therefore the
two passes of one block run one after the other, and the peak rate is 0.5 output
samples per cycle per datapath.

**Reference block layout.** In a direction with a fractional offset, the filter
needs `TAPS-1` extra samples: `TAPS/2-1` before the block and `TAPS/2` after it. In
a direction with an integer offset, it needs none. So the host sends
`(width + ex) x (height + ey)` samples in row-major order, where `ex` is `TAPS-1`
when the horizontal fraction is non-zero and 0 otherwise, and `ey` is set the same
way from the vertical fraction. The first sample sent lies `TAPS/2-1` left of and
above the integer position in every filtered direction.

**Integer positions without a special path.** HEVC treats an integer position
separately: the sample is scaled or filtered in one direction only. Here, fraction 0
uses a one-tap "filter" of weight 64. The horizontal identity sits on the newest
sample of the window. The vertical identity sits on the top row of the window. With
the standard shifts (`>> (bd-8)` and then `>> 6`), this gives bit-exact HEVC results
for all four cases: both fractional, horizontal only, vertical only, and neither. So
one datapath with one timing covers every case.

The coefficient tables are in `rtl/mc_pkg.sv` (`mc_coef`). They are the HEVC luma
filters for quarter-sample positions 1-3 and the chroma filters for eighth-sample
positions 1-7.

## The intermediate buffer (`mc_buffer`)

To output one sample per cycle, the vertical filter must read `TAPS` vertically
adjacent values in a single cycle. The buffer therefore spreads the rows over `TAPS`
single-port-read memory banks:

- row `r` is stored in bank `r mod TAPS`, at word `(r div TAPS) * MAX_W + column`;
- any `TAPS` consecutive rows `y .. y+TAPS-1` fall into distinct banks;
- for a window starting at row `y`, bank `b` reads row `y + ((b - y) mod TAPS)`;
- the bank outputs are then rotated back into tap order.

The luma buffer holds 71 rows of 64 values: 8 banks of 576 words, 16 bits each. The
chroma buffer holds 35 rows of 32 values: 4 banks of 288 words. `TAPS` must be a
power of two. Reads have one cycle of latency, and the output holds while `rd_en` is
low. The vertical filter relies on that hold to stall without losing data.

## Biprediction and weighted prediction (`mc_weight`)

Each chain ends in a multiplier, one per reference. Both references use the same
formula, taken from HEVC explicit weighted prediction, with
`log2WD = log2_denom + 14 - bit_depth`:

    uni: clip( ((p0*w0 + 2^(log2WD-1)) >> log2WD) + o0 )
    bi : clip( (p0*w0 + p1*w1 + ((o0 + o1 + 1) << log2WD)) >> (log2WD + 1) )

With weights 1, offsets 0 and `log2_denom` 0, these equal HEVC's default
prediction: the rounded scale-down for uniprediction and the rounded average for
biprediction. The host does not need a separate mode for that. Offsets are given in
units of the output sample, already scaled by `2^(bit_depth-8)`. The result is
clipped to `[0, 2^bit_depth - 1]`. The unit has two pipeline stages: the products,
then the sum, shift and clip.

## Control and timing (`mc_datapath`)

A job is one block of one plane, described by `mc_pkg::mc_job_t`. The datapath
accepts a job only when idle, then runs these steps:

1. **H pass.** The horizontal filter of reference 0 runs, and the one of reference 1
   runs too for a biprediction. The two input streams are independent and may have
   different lengths, because each reference has its own fractions.
2. **V pass.** This starts when every horizontal filter is done. Both vertical
   filters start in the same cycle and stay in lockstep. Their outputs are joined
   into the weighting unit, and the predicted samples leave in row-major order. If
   the output is not taken (`out_ready` low), the whole V-pass pipeline stalls.
3. **End.** The job ends when the last sample is taken.

With gap-free input and output, a job takes

    cycles = N_in + width*height + 8

where `N_in` is the sample count of the longer reference block. The time is counted
from the cycle the job is accepted to the cycle the last sample is taken. Measured
luma throughput for PUs with fractional offsets in both directions:

| PU    | cycles | samples per cycle |
|-------|-------:|------------------:|
| 8x8   |    297 | 0.215 |
| 16x16 |    793 | 0.323 |
| 32x32 |   2553 | 0.401 |
| 64x64 |   9145 | 0.448 |

Throughput approaches 0.5 for large blocks because the filter margin of `TAPS-1`
rows and columns matters less as the block grows. This matches the trend reported
for the original design.

## Luma and chroma (`mc_accel`)

The top level holds two datapaths:

- **Luma:** `TAPS=8`, blocks up to 64x64. PUs range from 8x4/4x8 to 64x64.
- **Chroma:** `TAPS=4`, blocks up to 32x32, which is the 4:2:0 chroma of the
  largest PU.

The host runs the Cb and Cr blocks one after the other through the single chroma
datapath. Together they have half as many samples as the luma block, so chroma keeps
pace with luma. Luma and chroma jobs run at the same time.

## Host register interface (`mc_regif`)

The host performs all memory traffic and moves every sample across a simple
request/response bus. A request is accepted in a cycle where `req_valid` and
`req_ready` are both high. A read returns `rsp_rdata` with `rsp_valid` in the next
cycle. Writes to `START`, `IN0` and `IN1`, and reads of `OUT`, are held off
(`req_ready` low) until the datapath can take or give a sample, so the host needs no
polling loop.

Datapath `d` (0 = luma, 1 = chroma) has its registers at byte address `d*0x40 +`:

| offset | name   | bits |
|-------:|--------|------|
| 0x00 | SIZE   | [6:0] width, [14:8] height, [16] bipred, [23:20] bit depth, [26:24] log2 weight denominator |
| 0x04 | FRAC   | [2:0] xfrac0, [6:4] yfrac0, [10:8] xfrac1, [14:12] yfrac1 (luma 0..3, chroma 0..7) |
| 0x08 | WEIGHT | [8:0] w0, [24:16] w1, signed |
| 0x0C | OFFSET | [11:0] o0, [27:16] o1, signed, in output-sample units |
| 0x10 | START  | write: start the job held in SIZE..OFFSET |
| 0x14 | IN0    | write: next sample of reference block 0 |
| 0x18 | IN1    | write: next sample of reference block 1 (biprediction only) |
| 0x1C | OUT    | read: next predicted sample |
| 0x20 | STATUS | [0] busy, [1] output sample waiting |

Addresses from 0x80 up are unmapped: writes there are ignored and reads return 0.
After reset, each datapath is set to an 8x8 block, uniprediction, bit depth 8, both
weights 1 and both offsets 0.

One PU is processed in this order:

1. Write the luma SIZE, FRAC, WEIGHT and OFFSET registers, then write START.
2. Write every sample of the luma reference block to IN0, and to IN1 for a
   biprediction.
3. Do the same for Cb on the chroma datapath.
4. Read the luma and Cb results from OUT.
5. Run Cr through the chroma datapath the same way.

The registers may be rewritten while a job runs, because the job is latched at
START.

## Files

| file | contents |
|------|----------|
| `rtl/mc_pkg.sv` | widths, job descriptor, coefficient function |
| `rtl/mc_hfilter.sv` | horizontal filter |
| `rtl/mc_buffer.sv` | banked intermediate buffer |
| `rtl/mc_vfilter.sv` | vertical filter |
| `rtl/mc_subpath.sv` | one filter chain: horizontal filter, buffer, vertical filter |
| `rtl/mc_weight.sv` | biprediction and weighted prediction |
| `rtl/mc_datapath.sv` | two chains, weighting unit, job controller |
| `rtl/mc_regif.sv` | host register interface |
| `rtl/mc_accel.sv` | top level: luma and chroma datapaths plus register interface |
| `tb/mc_ref_pkg.sv` | reference model written directly from the HEVC equations |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mc_throughput` |

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. To build and run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/mc_pkg.sv tb/mc_ref_pkg.sv tb/tb_mc_accel.sv --top-module tb_mc_accel
    ./obj_dir/Vtb_mc_accel

Replace `tb_mc_accel` with any other testbench name. The testbenches:

- `tb_mc_accel` runs the top level at its default sizes through the register bus. It
  covers PUs from 8x4 to 64x64, uni- and biprediction, explicit weights, integer and
  fractional offsets, and 8- and 10-bit samples. It counts each of these mechanisms
  and fails if any of them never occurs.
- `tb_mc_datapath` checks the cycle formula above with random gaps and stalls.
- `tb_mc_throughput` produces the throughput table.

The reference model deliberately keeps the four HEVC integer/fractional cases
separate. It therefore also checks the identity-tap shortcut used by the RTL.

## Limits and departures

- **Bit depth.** The maximum bit depth is 10 (`SAMPLE_W`). Deeper video needs wider
  samples, and the HEVC shift rules then change (`shift1 = min(4, bd-8)`).
- **No pass overlap.** The next block's horizontal pass does not overlap the current
  block's vertical pass. One buffer per chain is used, and the 0.5 samples/cycle
  bound holds.
- **No on-chip fetching.** The accelerator fetches no reference data itself; the host
  provides the blocks, already padded at picture edges. A DMA-based interface to
  memory is also described for the original accelerator, but its structure is not
  published, so it is not part of this RTL. The register interface moves one sample
  per bus access and is the bottleneck of any host-driven system built on it.
- **Assertions.** `mc_datapath` asserts that the two vertical filters of a
  biprediction deliver their samples together, and that both have drained when a job
  ends.
