# Transmitted-reference UWB receiver back-end

An impulse-radio UWB link sends one very short pulse per frame. On the way to
the receiver the multipath channel smears each pulse into a long train of
echoes with unknown amplitudes and signs. A Rake receiver would have to
estimate that train. A **transmitted-reference (TR)** receiver avoids this:
the transmitter sends a few pulses with known signs ("references") before the
data pulses. The receiver averages the received references into a template,
which already has the channel's shape, and decides each data bit by the sign of
the data pulse's correlation with that template.

This repository holds the digital part of such a receiver in SystemVerilog.
It starts at the output of a bank of time-interleaved A/D converters and ends
at the demodulated bits. There are two complete implementations of the same
algorithm:

* `tr_receiver_seq`: minimum area. It has one multiplier, one adder and one
  subtractor for synchronization, and three multiply-accumulate units for
  demodulation. It delivers one bit per data pulse.
* `tr_receiver_par`: maximum throughput. It computes all correlation values of
  a frame in one clock, finds their maximum with a comparator tree, and
  demodulates a whole block in one clock.

The top module `tr_uwb_receiver` puts the two side by side on one input.
The two receivers are independent, and each can be used on its own.

## Signal format and default sizes

| Symbol | Parameter | Default | Meaning |
|---|---|---|---|
| N_f | `NF` | 1000 | samples per frame (one pulse per frame) |
| N_w | `NW` | 100 | samples of a frame that hold the pulse and its echoes |
| N_p | `NP` | 3 | number of later frames correlated during acquisition |
| N_r | `NR` | 2 | reference pulses per block |
| N_d | `ND` | 8 | data pulses per block |
| N_ad | `NAD` | 10 | interleaved A/D converters, which is also samples per clock |
| n | `NBITS` | 4 | A/D resolution |
| | `MAPPING` | `MAP_SIGN_MAG` | A/D code mapping (see below) |
| | `REF_PATTERN` | all +1 | signs of the NR reference pulses |
| | `TRAIN`, `TRAIN_LEN` | `8'b0010_1101`, 8 | block-start training pattern |

At a 1 GHz sample rate the defaults give a 1 µs frame, a 100 ns pulse window
and a 100 MHz clock. The block is NR+ND = 10 frames long. `ND`, the training
pattern and the reference signs are this design's own choices.

## A/D bank and the sample stream (`adc_bank`, `capture_buffer`)

NAD converters sample in turn, so each clock delivers NAD consecutive samples.
Lane 0 holds the earliest sample. `adc_bank` is a behavioural model of the
converters. It takes one finely resolved amplitude per lane (`AIN_W` bits,
where 2^(AIN_W-1) means 1.0), clips it to ±0.5 and quantizes it to `NBITS`
bits. It supports two code mappings:

* `MAP_OFFSET_BINARY` has 2^n uniform levels and no zero level. Its value is
  `2c - (2^n - 1)`.
* `MAP_SIGN_MAG` is sign-magnitude with 2^n - 1 levels, including an exact
  zero. It rounds to the nearest level.

Sign-magnitude is the default because it has a zero level: noise-only
samples quantize to zero instead of to ±1 LSB. That keeps idle noise out of
the correlations, and zero operands do not toggle the multipliers.
`tr_pkg::decode_sample` turns a code into a signed integer for both mappings.

The acquisition memory `capture_buffer` is a shift register, not an addressed
RAM. Each clock shifts in one row of NAD samples, so no write decoder is
needed. It holds (NP+1)·NF + NW - 1 samples, rounded up to whole rows
(4100 × 4 bits at the defaults). Once full, it freezes and is read through
two read ports (sequential receiver) or as one flat vector (parallel receiver).

## Symbol acquisition: finding the pulse in the frame

Before it can demodulate, the receiver must know where in the frame the N_w
samples of the pulse lie. It has no template yet. What it uses instead is that
consecutive frames repeat the same channel response, up to a sign. Call the
buffer r. For every candidate start k in one frame, the correlation of the
window at k with the same window j frames later is

    s(k, j) = Σ_{i=k}^{k+NW-1} r[i] · r[i + j·NF]

The metric adds the magnitudes over j, because the sign of a pulse is unknown:

    S(k) = Σ_{j=1}^{NP} |s(k, j)|

The start is k_max = argmax S(k). With noise only, the maximum is small. An
input `threshold` rejects such captures, and the receiver then refills the
buffer and tries again.

**Sequential synchronizer (`seq_sync_correlator`, `seq_max_search`).**
Moving from k to k+1 only drops one product from the window and adds one:

    s(k, j) = s(k-1, j) - r[k-1]r[k-1+jNF] + r[k+NW-1]r[k+NW-1+jNF]

The unit therefore walks a sample index c = 0 … NF+NW-2 once for each
j = 1 … NP. Each step forms one product p(c) = r[c]·r[c+jNF] and adds it to a
running window sum. It also subtracts the product that leaves the window,
p(c-NW), which it takes from an NW-deep delay line instead of computing it
again. From c ≥ NW-1 on, the window sum is s(k = c-NW+1, j). Its magnitude is
accumulated into S(k) in an NF-entry memory, which is the outer adder. In the
last pass, S(k) streams out to a one-comparator max search; on ties the earlier
k wins.

A run takes NP·(NF+NW-1) clocks: 3297 at the defaults. The testbench checks
this count exactly.

**Parallel synchronizer (`par_sync_correlator`, `max_tree`).** The products of
neighbouring windows overlap. Over all k, each j needs only NF+NW-1 distinct
products, so the unit has NP·(NF+NW-1) multipliers. It shares the adders
through running prefix sums c(m) = Σ_{i<m} p(i), so that each window sum is
c(k+NW) - c(k). All NF values of S(k) are registered one clock after `start`.
A binary comparator tree (padded to a power of two; on ties the lower index
wins) gives k_max one clock later.

## Placing the windows after acquisition

The sequential search takes about 33 µs at a 100 MHz clock. During that time
new samples arrive but cannot be stored. The receiver accepts this loss, so the
search is not real-time. What it must not lose is the frame phase. Both
receivers therefore number every input sample with a 32-bit absolute counter
(`chunk_abs`). The buffer's first sample has absolute index A0, so the pulse
starts at A0 + k_max. That position is moved forward in whole frames until it
lies ahead of the live stream, and becomes the start of the first window. The
parallel receiver uses the same controller, although its search finishes
almost at once.

`window_capture` then cuts one window per frame out of the stream. Each window
holds NW + 2 samples: the nominal NW, plus one sample before and one after for
the early and late correlations. The window is double-buffered. It is handed
over (`win_valid`) with its frame number `win_seq`, and capture of the next
frame continues at once.

## Block synchronization with a training pattern (`block_sync`)

Acquisition gives the pulse phase, but not which frame starts a block. No
template exists yet, so the receiver demodulates differentially: it
correlates each window with the previous one. The sign of that correlation
is b(m)·b(m-1), i.e. 1 when two consecutive pulses have the same sign.

The transmitter sends a preamble of +1 pulses, then TRAIN_LEN frames whose
consecutive sign changes spell `TRAIN`, then one guard frame, then the
first block. `block_sync` shifts the differential decisions into a history
register and reports the frame number of the decision that completes `TRAIN`.
It ignores the first decision after a restart, which compares against a
stale window. The first reference frame of the first block is then the frame
two after the match. The guard frame covers the latency from the last training
window to the decision.

## Template, data decisions and early-late tracking

Once locked, frame roles cycle through NR references and ND data pulses.

**Sequential (`seq_demodulator`, `mac_unit`).**

* Reference frames: an adder accumulates `REF_PATTERN[r] · window` into a
  template memory of NW+2 entries. The template is the sum of the references,
  not their average; the missing scale factor changes no sign or comparison.
* Data frames: three `mac_unit`s work side by side, one sample per clock. Over
  NW clocks they correlate the template with the window shifted one sample
  early, on time and one sample late.
* The bit is the sign of whichever of the three correlations has the largest
  magnitude. A zero result counts as +1.

The unit takes NW clocks per window. At the defaults a frame lasts
NF/NAD = 100 clocks, so it is busy all the time. An `overrun` flag and an
assertion catch a window that arrives while the unit is still busy.

**Parallel (`par_demodulator`).** `tr_receiver_par` stores all NR+ND windows of
a block. After the last one, the demodulator forms the template with an adder
array. It computes every early, on-time and late correlation with
combinational multipliers and adder trees, and registers all ND bits one clock
later.

**Tracking.** The early and late correlation magnitudes are compared with the
on-time one:

* if the early one is largest, the next window starts one sample earlier;
* if the late one is largest, the next window starts one sample later;
* on a tie, on-time is preferred, then early.

The sequential receiver can move after every data pulse. The parallel receiver
moves once per block, using the decision of the last data pulse of the block.
During block synchronization, the differential correlation moves the window in
the same way.

A move reaches `window_capture` some frames after the window that asked for it
has been captured. `window_capture` keeps an epoch counter, bumps it on every
move, and tags each window with the current epoch. A request is accepted only
when its tag matches the current epoch and no other move is pending. The move
then takes effect at the next window start. Without this rule, windows still in
flight would apply the same correction two or three times.

## Controller

Both receivers run the same state machine, visible on `state_o`:

| Code | State | What happens |
|---|---|---|
| 0 | FILL | fill the acquisition buffer |
| 1 | CORR | run the synchronizer (sequential only takes time here) |
| 2 | WAIT | wait for the max search |
| 3 | CHECK | compare max S with `threshold`; below it, refill |
| 4 | ALIGN | compute the first window start |
| 5 | BSYNC | differential demodulation until the training pattern is found |
| 6 | DEMOD | template / data / tracking, indefinitely |

## Timing budgets

At NF=1000, NW=100, 1 GHz sampling and a 100 MHz clock:

* **Parallel acquisition** has 90 clocks before the next useful sample. It
  uses 2.
* **Sequential acquisition** would need about 825 MHz to lose no data. At
  100 MHz it loses roughly 33 frames, and the absolute sample count keeps the
  frame phase.
* **Sequential demodulation** needs f_clk ≥ f_s·NW/NF = 100 MHz. It uses exactly
  the 100 clocks of each frame.
* **Parallel demodulation** has 90 clocks after the last data window. It
  uses 1.

## Where this design departs from the published algorithm

* **Acquisition timing.** The sequential synchronizer runs off-line and drops
  samples while it works (one of two options the algorithm allows). A real-time
  version would need f_clk ≥ NP/(NP+1)·f_s.
* **Block start.** The block start is found with a training preamble, the
  differential mode and one guard frame. The preamble format and the
  differential mode are this design's own.
* **Template scale.** The template is the sum of the references, not their
  mean.
* **Ties.** On ties, the earlier k and the lower index win. Early-late ties
  prefer on-time, then early.
* **Parallel tracking.** The parallel receiver tracks once per block.
* **Buffer size.** The acquisition buffer is rounded up to a whole number of
  NAD-sample rows (4100 instead of 4099 samples).
* **Parallel adder network.** The parallel synchronizer shares adders through
  prefix sums. The exact adder network of the original parallel design is not
  reproduced; only its multiplier count is.
* **Not included.** The analog front end (LNA, filters, AGC, the multi-phase
  A/D clock generator) is outside this RTL. `adc_bank` only models the
  converters' transfer function. The testbenches scale their input as an AGC
  would.
* **Not built.** The mixed parallel/sequential variants (several sequential
  units in parallel, or a parallel two-window correlator reused NP times) are
  not built.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and stops, and a watchdog ends it if it
hangs. With Verilator 5:

    verilator --binary --timing -Wno-fatal --top-module tb_tr_uwb_receiver \
        rtl/tr_pkg.sv rtl/*.sv tb/tb_tr_uwb_receiver.sv -Mdir obj
    ./obj/Vtb_tr_uwb_receiver

Compile `rtl/tr_pkg.sv` first; listing it twice as above is harmless, or leave
it out of the glob. Replace the top name and testbench file to run another
testbench. Every module has one: `tb_<module>`.

`tb_tr_uwb_receiver` runs both receivers at the default sizes. It builds the
received signal itself: a fixed random multipath pulse at sample 337 of each
frame, plus low noise. The frame plan is:

1. noise-only frames, which the threshold must reject;
2. a +1 preamble;
3. the training frames and one guard frame;
4. six blocks of random data.

Part of the way through the blocks, the pulse is delayed by one sample and
later returned. The testbench checks:

* the acquired phase and every bit;
* the output rate: one bit every NF/NAD clocks in the sequential receiver, and
  one block every (NR+ND)·NF/NAD clocks in the parallel one;
* that rejection, acquisition, block lock, template building, late and early
  moves all happened in both receivers.

It takes well under a second. `tb_tr_receiver_seq` and `tb_tr_receiver_par`
test each receiver alone. The block testbenches compare against reference
models written independently in the testbench. `tb_seq_sync_correlator`
includes a small hand-worked case with S = (5, 6, 5, 1, 1).

The parallel blocks are large at the default sizes: the synchronizer has
3297 multipliers and a 1000-input comparator tree. Simulation compiles them in
about a minute. Logic synthesis of `par_sync_correlator` at full size takes
several minutes.

## Files

| File | Content |
|---|---|
| `rtl/tr_pkg.sv` | code mappings, demodulator operations, sample decoding |
| `rtl/adc_bank.sv` | behavioural A/D bank (clip, quantize, map) |
| `rtl/capture_buffer.sv` | shift-register acquisition buffer |
| `rtl/seq_sync_correlator.sv`, `rtl/seq_max_search.sv` | sequential synchronizer |
| `rtl/par_sync_correlator.sv`, `rtl/max_tree.sv` | parallel synchronizer |
| `rtl/window_capture.sv` | per-frame window extraction and timing moves |
| `rtl/mac_unit.sv`, `rtl/seq_demodulator.sv` | sequential template and demodulator |
| `rtl/par_demodulator.sv` | parallel block demodulator |
| `rtl/block_sync.sv` | training-pattern block synchronizer |
| `rtl/tr_receiver_seq.sv`, `rtl/tr_receiver_par.sv` | the two receivers |
| `rtl/tr_uwb_receiver.sv` | top: both receivers on one input |
| `tb/tb_*.sv` | one self-checking testbench per module |
