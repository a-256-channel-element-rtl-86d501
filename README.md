# Multi-tau photon correlator for a 256-pixel X-ray detector group

X-ray photon correlation spectroscopy measures how fast a sample's speckle
pattern fluctuates by computing, for every detector pixel, the intensity
autocorrelation

    G(n) = sum_i x(i) * x(i+n)

of the photon counts x(i) taken every tau = 10 us, together with the two
partial sums needed for symmetric normalisation,

    Intp(n) = sum_{i=1}^{m-n} x(i)     Intf(n) = sum_{i=n+1}^{m} x(i)
    g(n)    = G(n) * (m - n) / (Intp(n) * Intf(n))

for lags from 10 us to 10.24 ms. Computing every lag from 1 to 1024 tau would
take 1024 multiply-accumulators per pixel. This RTL uses a *multi-tau*
correlator instead: 36 lags spread logarithmically, each computed on data
that is binned more coarsely the longer the lag, and it runs it in real time
for 256 pixels (one readout group of a 64x64 detector) with only 13
multipliers, shared over pixels and lags. The normalisation division itself is left to software; the
hardware supplies G, Intp, Intf and m.

## The multi-tau element

One correlator element has eight stages.

| stage | sample = sum of | data width | delay line | lags (tau) |
|-------|-----------------|------------|------------|------------|
| 1     | 1 count         | 5 bit      | 8 regs     | 1, 2, ... 8 |
| 2     | 2 counts        | 6 bit      | 8 regs     | 10, 12, 14, 16 |
| 3     | 4               | 7          | 8          | 20, 24, 28, 32 |
| s     | 2^(s-1)         | 4+s        | 8          | (5..8) * 2^(s-1) |
| 8     | 128             | 12         | 8          | 640, 768, 896, 1024 |

Stage 1 (`mtc8_core`) shifts each new 5-bit count into an 8-register delay
line and multiplies it with every register: 8 lags. Stage s >= 2
(`mtc4_core`) takes registers 7 and 8 of the stage before it
(`dq_odd`, `dq_even`), adds them into one sample of twice the duration, shifts
that into its own 8-register line, and correlates against registers 5..8 only;
registers 1..4 would repeat lags that the previous stage already covers.
Each lag has three 64-bit accumulators: G (sum of products), intp (sum of the
delayed operand) and intf (sum of the current operand). The element also
counts the samples (`term`, m) and sums them (`intc`).

### Stage timing and the bin phase

Stage s takes a sample every 2^(s-1) ticks. Which ticks matters: a stage adds
registers 7 and 8 of the stage before, and those two values must be two
adjacent samples that together form one complete bin of 2^s input samples,
bins counted from the first sample of the measurement. Because a stage's input
is already 8 of the previous stage's samples old, the correct phase is

    stage s is due at tick c   when   (c + 8) mod 2^(s-1) == 0

with c = 0 at the first sample. For stages 1..4 this is the same as
c mod 2^(s-1) == 0; from stage 5 on it is not, and a plain divider would mix
samples from neighbouring bins. With this phase the element's result is
exactly the "ideal" multi-tau result: stage s sees the input binned in
complete 2^(s-1)-sample bins from the start, and partial bins at the end are
dropped.

### Start, stop and draining (`mtc_enable_chain`)

A measurement starts at the first tick with `en_in = 1`: all stages are
enabled together and all sums cleared. Every delay-line register carries a
valid flag, and a product (with its intp and intf terms) is accumulated only
when both operands are valid. Zero-filled registers would give the same G, but
would put the first samples into intf wrongly; the flags make Intp and Intf
match their definitions exactly.

When `en_in` drops, stage 1 stops taking data, but the samples still in the
delay lines have not yet reached the later stages. The delay lines therefore
keep shifting (with invalid samples) and stage s stays enabled (`en_stage`)
as long as valid data remains anywhere in stages 1..s-1. The stages switch off
one after another, stage 8 last, roughly 1000 tau after the stop. `busy` then
falls and `done` pulses; `en_in` is ignored while draining.

### Result word map

Every element has 110 result words of 64 bits, kept in this order (in the
single element's 128 x 64 RAM, and per channel in the array):

| words | content |
|-------|---------|
| 0..7 | G, stage 1, lags 1..8 |
| 8 + 4(s-2) .. +3 | G, stage s = 2..8 |
| 36..43 / 44..51 | intp / intf, stage 1 |
| 52 + 8(s-2) .. +3 | intp, stage s |
| 56 + 8(s-2) .. +3 | intf, stage s |
| 108 | term (number of samples m) |
| 109 | intc (sum of all samples) |

For lag word w of stage s with lag n (in tau) and bin size b = 2^(s-1),
g(n) = G * (m/b - n/b) / (intp * intf), all in stage-s units.

### Lag numbering option (`LAG_BASE`)

With `LAG_BASE = 1` (default) the taps are registers 1..8 (stage 1) and 5..8
(stages 2..8), giving the lags listed above. `LAG_BASE = 0` moves every tap
one register towards the input: lags 0..7 tau in stage 1 and 4..7 stage
samples in stages 2..8 (0 .. 896 tau). That is the numbering of a published
reference run of this correlator (3072 samples of round(15(1+sin(0.1 i)))),
whose 35 lag sums, term and intc `tb_fig8_sine_workload` reproduces exactly.

## The 256-channel system

    serial bits ──► vipic_deser ──frame (256 x 5 bit)──► mtc_array_opt ──► result_readout ──► 64-bit bus
                    (double buffer)      frame_ready      (13 multipliers,        (or mtc_array,
                                                           state in RAM)           OPT_ARRAY = 0)

### Detector input (`vipic_deser`)

Each readout group sends, per hit pixel, a 16-bit record on one serial line:
3-bit start code, 5-bit count, 8-bit pixel address (MSB first, start code
`3'b101` by default). In sparse mode only hit pixels are sent (up to 62 per
10 us frame fits in 1000 bit times); in imaging mode every pixel is sent. The
parser writes the count into a 256-entry frame buffer. `frame_tick` closes the
frame: the two banks swap and `frame_ready` pulses one clock later. The
correlator reads the closed bank with read-and-clear, so a pixel without a
record in the next frame reads 0. Per-entry "written" flags, cleared on reset,
make RAM initialisation unnecessary.

### Thirteen multipliers (`mtc_array_opt`, the default)

A stage-s sample only changes every 2^(s-1) tau, so the later stages have
far more time per update than stage 1. The array gives each stage group its
own lane and just enough multipliers to sweep all 256 channels within that
stage's own sample period:

| lane | stages | multipliers | clocks per channel | clocks per sweep | sweep every |
|------|--------|-------------|--------------------|------------------|-------------|
| stage 1 (`mtc8_core`) | 1 | 8 | 1 | 256 | 1 tau |
| `mtc_slow_lane` | 2 | 2 | 2 | 512 | 2 tau |
| `mtc_slow_lane` | 3 | 1 | 4 | 1024 | 4 tau |
| `mtc_slow_lane` | 4 | 1 | 4 | 1024 | 8 tau |
| `mtc_slow_lane` | 5, 6, 7, 8 in turn | 1 | 4 per stage | up to 4096 | 16 tau |

Each multiplier is one `mtc_lag_mac` (one lag: G, intp and intf of one
channel in one clock) or one of the eight inside `mtc8_core`.

**Delay lines as ring RAMs.** Each stage keeps its 8 delay-line registers
for all channels in 8 RAMs of 256 entries. Because every channel of a stage
shifts at the same tick, a shift does not move data: the new sample is
written into RAM `wp` and the stage's single pointer `wp` advances after the
sweep. Register r of a channel is then RAM `(wp - r) mod 8`.

**Passing data down.** While stage s sweeps a tick at which stage s+1 is
also due, it writes registers 7 + 8 of each channel (before its own shift)
into stage s+1's input latch (one RAM entry per channel). Stage s+1 starts
its sweep only when stage s has finished that tick, so the latch is complete.
Stage 1 sweeps at every `frame_ready` and reads the frame buffer; the others
run in the background, each holding a pending record of its tick (valid
flags, clear flag) until it can start.

**Timing.** With 500 clocks per tau (50 MHz, 10 us), stage 1 is done 256
clocks after the tick, stage 2 after 768, stage 3 after 1792, stage 4 after
2816 and stages 5..8 after at most 6912, each before that stage is due
again. A stage that becomes due again before its sweep has ended sets the
sticky `overrun` flag and fires an assertion; frames need at least about
2 x 256 clocks. `done` comes when the last background sweep after the drain
has ended.

**Clearing.** Stages 5..8 are not due at the first tick of a measurement.
Rather than clearing their 4096 result words, each stage keeps a "fresh"
flag: until its first due tick its old sums read as zero, and that first
sweep starts from zero.

Results are kept per multiplier in RAMs addressed {stage, step, channel}
(8 of 256 words for stage 1, 2 of 512 for stage 2, 1024 for stages 3 and 4,
4096 for stages 5..8), one each for G, intp and intf, and read through the
same word map as below. The results are identical, word for word, to those
of the 36-lag element.

### Swept 36-lag array (`mtc_array`, `OPT_ARRAY = 0`)

Instead of 256 copies of the element, there is one element datapath
(`mtc36_system`: one `mtc8_core` and seven `mtc4_core`, 36 multiply-accumulate
lanes), and the state of each channel lives in RAM: one 544-bit word for all
its delay lines, one 7040-bit word for its 110 results. After each
`frame_ready` the array visits channel 0..255, one per clock: read the count
from the frame buffer, read the channel's state, compute, write back. A sweep
takes 256 clocks and has to end before the next frame (1000 clocks at 100 MHz,
500 at 50 MHz); a `frame_ready` during a sweep sets the sticky `overrun` flag
and fires an assertion. All channels sample at the same ticks, so one
`mtc_enable_chain` times them all; its outputs for the tick are latched for
the duration of the sweep.

### Readout (`result_readout`)

After `ro_start`, each `ro_next` strobe reads the next word, channel 0 words
0..109, then channel 1, and so on; the word appears on `ro_data` one clock
later with `ro_valid`, and `ro_last` flags word 109 of channel 255.

### The single element (`mtc_all_core_readout`)

The top also holds one stand-alone element on its `el_*` ports: the same
datapath with its state in registers, fed one sample per `el_tick`. When it
has drained, its 110 words are copied (one per clock) into a 128 x 64
`result_ram`; `el_ready` rises 110 clocks after `el_busy` falls, and words are
read at `el_rd_addr` with one clock of latency.

## Interfaces of the top (`xpcs_correlator_top`)

Parameters: `NCH = 256` channels, `LAG_BASE = 1`, `OPT_ARRAY = 1`
(13-multiplier array; 0 selects the 36-lag swept array). One clock `clk`, active-low
asynchronous reset `rst_n`.

| port | dir | meaning |
|------|-----|---------|
| `ser_valid`, `ser_data` | in | one serial bit per strobe |
| `frame_tick` | in | end of a 10 us frame, one clock |
| `en_in` | in | 1 = measure; sampled at each frame |
| `busy`, `done`, `en_stage[7:0]` | out | measurement / drain status |
| `sweeping`, `overrun`, `hit_count` | out | stage-1 sweep (frame buffer read), overrun, records this frame |
| `stage_busy[7:0]` | out | sweep of each stage in progress |
| `ro_start`, `ro_next` | in | result stream control |
| `ro_active`, `ro_data[63:0]`, `ro_valid`, `ro_last` | out | result stream |
| `el_tick`, `el_en_in`, `el_din[4:0]`, `el_rd_addr[6:0]` | in | single element |
| `el_rd_data[63:0]`, `el_busy`, `el_ready`, `el_en_stage` | out | single element |

## Where this RTL departs from, or adds to, its source design

* The 13-multiplier array follows the source design's resource plan
  (multipliers per stage, 50 MHz against a 10 us tau, delay lines and
  results in RAMs of the sizes listed above). Its schedule is this design's
  own: the order of the sweeps, the input latches, the start rule, the fresh
  flags and the ring pointer. Its normalisation RAMs were planned narrower
  than the 64-bit intp and intf words used here. It reads RAMs
  asynchronously, one read-modify-write per clock; a block-RAM mapping would
  need a read pipeline.
* `mtc_array` is the source's earlier shared structure (36 multipliers
  swept over the channels), kept as an alternative; its delay lines are in
  RAM too.
* Stage phase, valid flags, the draining rule, the record start code and bit
  order, double buffering, read-and-clear, the overrun flag, the copy-on-done
  result RAM, the read latencies and the single clock are this design's own
  choices.
* Lag numbering follows the stated specification (1..8 and 5..8 per stage);
  the published result dump follows `LAG_BASE = 0`.
* Normalisation (division) is not in hardware.
* One top instance serves one 256-pixel readout group; a 64x64 detector needs
  16 of them.

## Verification

Every module has a self-checking testbench in `tb/` ending in a
`TB_RESULT checks=N failures=M` line. The reference model `corr_ref_pkg`
computes the 110 words directly from the sample list by binning, with no delay
lines, so it is independent of the RTL structure.

| testbench | what it checks |
|-----------|----------------|
| `tb_mtc8_core`, `tb_mtc4_core` | datapath arithmetic and shifts, both lag numberings, random stimulus |
| `tb_mtc_enable_chain` | due pattern per tick, valid inputs per stage = floor(m/2^(s-1)), switch-off order, done |
| `tb_mtc36_system` | 36-lag element against the model |
| `tb_result_ram` | data and one-clock read latency |
| `tb_mtc_all_core_readout` | element with RAM; 1100 and 37 samples; enable order; ready latency |
| `tb_fig8_sine_workload` | the 3072-sample sine runs (T = 62.8 and 628 tau) against the published numbers and the model |
| `tb_vipic_deser` | sparse and imaging frames with random bit gaps, read-and-clear, double buffering |
| `tb_mtc_array` | 8-channel array, 1030 and 90 samples, sweep order and length |
| `tb_mtc_array_opt` | 8-channel 13-multiplier array, both lag numberings, 1030 and 90 samples, sweep length of every stage, shared lane never doubly busy, done, no overrun at the normal frame rate and an overrun on too-fast frames |
| `tb_result_readout` | sequence, `ro_last`, restart |
| `tb_xpcs_correlator_top` | full size (256 channels, defaults): 1100 frames of at least 1000 clocks with serial data (sparse and imaging), drain, all 28160 words streamed and checked, every stage swept, single element checked |
| `tb_xpcs_correlator_top_par` | the same end-to-end test with `OPT_ARRAY = 0` (36-lag swept array), 300 frames |

To run one with plain Verilator, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
        rtl/cor_pkg.sv tb/corr_ref_pkg.sv tb/tb_xpcs_correlator_top.sv \
        --top-module tb_xpcs_correlator_top -o sim
    ./obj_dir/sim

The full-size end-to-end test runs in about 15 seconds, build included.
