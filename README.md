# Multiuser DS/CDMA receiver with parallel interference cancellation

This is synthesizable SystemVerilog for a two-stage multiuser receiver. It
serves four direct-sequence CDMA users at 31.25 kbit/s each. Every user sends
differentially encoded BPSK (DBPSK) spread by its own 16-chip code. The
received signal is complex baseband, sampled at 2 MHz, four samples per chip.

In a conventional receiver, each user's correlator sees the other users as
noise (multiple-access interference). Parallel interference cancellation (PIC)
removes most of that noise in two stages:

1. Stage 1 despreads every user, finds each user's timing, and estimates its
   symbol amplitudes. It rebuilds ("regenerates") what each user contributed
   to the received signal and adds those contributions into an estimate of
   the whole received signal.
2. The error between the actual and estimated signals is scaled by a backoff
   factor c and added back to the delayed received signal:
   `r' = r + c · (r − ŝ)`.
3. Stage 2 is a conventional receiver that runs on this *revised* signal,
   where the other users' interference has been largely cancelled.

The architecture's key idea is that **users are processed serially, not in
parallel**:

- The processing clock (10 MHz) is five times the sample rate.
- Each 1024-sample block of input is replayed through one pipeline once per
  user.
- Each pass is preceded by a six-word *programming header* carrying that
  user's ID, timing, acquisition status, correlator configuration and code.
- Every module reconfigures itself from the header as it passes. Per-user
  state lives in small memories addressed by the user ID.

So one correlator, one tracking unit and one demodulator serve all users. The
serial processing replaces the large parallel wiring between per-user
receivers.

## Signal path

```
 rx_i ─ noise_gen ─ input_module ─┬─ mfc ─┐                         ┌─ regenerate ─ combine ─┐ (estimate)
 rx_q ─ noise_gen ─ input_module ─┼─ mfc ─┴─ acq_track (I and Q) ───┴─ regenerate ─ combine ─┤
                                  │                                                         │
                                  └──────────── stream_delay (actual) ─────────────── revised (I, Q)
                                                                                            │
   host ◄─ output_module ◄─ demod (I and Q) ◄─ mfc (I, Q) ◄─ buffer_module (I, Q) ◄─────────┘
```

| File | Function |
|---|---|
| `pic_pkg.sv` | Stream word, header, latencies, code table, helper functions |
| `stream_ctrl.sv` | Per-module stream interpreter: state machine, header capture, word counters |
| `input_module.sv` | Double-buffered block store; emits one stream per user |
| `mfc.sv` | 16-tap matched-filter correlator with a chip integrator |
| `acq_track.sv` | Magnitude, chip averaging, acquisition, early/late tracking, user detection; rewrites headers |
| `regenerate.sv` | Rebuilds each user's spread signal from its amplitude estimates |
| `combine.sv` | Sums the regenerated users per sample (read-modify-write store) |
| `stream_delay.sv` | Aligns the actual signal with the estimate (12 clocks) |
| `revised.sv` | `r' = r + c·(r − ŝ)` with c ∈ {0, ½, ¾, 1} |
| `buffer_module.sv` | Stores the revised block and its headers, replays them per user for stage 2 |
| `demod.sv` | DBPSK decision `Z = I·I₋₁ + Q·Q₋₁` |
| `output_module.sv` | Packs bits into 16-bit words; one FIFO per user; host status register |
| `sync_fifo.sv`, `ext_sram.sv` | FIFO and synchronous RAM (the board's external SRAM) |
| `noise_gen.sv` | Test noise source: central-limit Gaussian, four levels |
| `pic_receiver.sv` | Top level |

## The stream format

Modules pass one 16-bit word per clock:

| Bits | Field | Meaning |
|---|---|---|
| 15 | PROG | Programming (header) word |
| 14 | VALID | The word carries something to act on |
| 13:10 | RDY, INT, RES1, RES2 | Carried but unused |
| 9:0 | payload | Ten-bit two's-complement value |

A user's stream has 1103 words:

- 10 idle words;
- a 6-word header;
- 63 filter-initialisation words;
- 1024 data words.

Four streams take 4412 of the 5120 clocks available per block.

Header (ten-bit words):

| Word | Contents |
|---|---|
| 0 | `[9:4]` sample index (symbol timing, 0–63), `[3:0]` user ID |
| 1 | `[5]` last user of the block, `[4]` acquired, `[3:0]` correlator config 3..0 |
| 2 | correlator config 13..4 |
| 3 | `[1:0]` correlator config 15..14 |
| 4 | code bits 15..6 |
| 5 | `[5:0]` code bits 5..0 |

Each module has a `stream_ctrl` instance. It holds a four-state machine:

- IDLE: no valid word;
- BUSY: processing data words;
- PROGRAM: the first header word has arrived;
- PASS: later header words are passing through.

It also latches the header and counts words, so the module knows which user
it serves and which sample of the block it is on.

Header words and idle words always travel through a bypass pipeline as deep
as the module's datapath, so they stay in step with the data.

## Stage 1 in detail

**Input module.** Samples are written into one bank of a two-bank RAM. When a
bank fills (`block_start`), that block is read out once per user. Each readout
is preceded by the user's header, built from a table of codes, with sample
index 0 and acquired 0. The Acquisition/Tracking module later fills in the
real values.

**Correlator (`mfc`).** A 64-word delay line feeds 16 taps, every fourth sample
(one per chip). The taps go into a four-level tree of adder/subtractors,
8 → 4 → 2 → 1.

- Each node adds or subtracts according to one bit of the configuration
  word.
- A final bit selects a negation.
- The configuration comes from the code by a polarity rule: a node adds when
  its two inputs carry the same code sign, else it subtracts, and the result
  takes the sign of the first input.
- After the tree, a length-4 running sum integrates over one chip (the
  matched filter for rectangular chips).
- The top ten of its 16 bits are kept, which divides by 64.

The 63 initialisation words in front of each user's data are replaced by the
last 63 samples of the previous block. The module saves these while the last
user of each block passes. As a result, each user's 1024 outputs continue
seamlessly from the previous block. These words leave the correlator marked
invalid, so later modules see exactly 1024 data words per user.

**Acquisition and tracking.** This module is the one place where I and Q meet
in stage 1. For every sample it:

- forms the magnitude estimate `max(|I|,|Q|) + min(|I|,|Q|)/2`;
- averages it with the magnitude 64 samples earlier (chip averaging). The
  history is kept per user, across blocks.

The per-user state machine then works as follows:

- **Acquisition.** It looks for the largest value in each 64-sample window.
  When the peak lands in the same four-sample region in `ACQ_M` = 8
  consecutive windows, the user is locked at that sample index.
- **Tracking.** It sums the values at index−1, index and index+1 over the
  block. If either neighbour beats the on-time sum, the index moves one sample
  toward the larger neighbour, modulo 64.
- **Detection.** It sums the on-time value over `DET_BITS` = 256 symbols. If
  the average reaches `DET_THRESH` = 48, the user is marked acquired.
  Otherwise the user is cleared and returns to acquisition.

The module writes the current sample index and acquired bit into every header
it forwards. Downstream modules therefore learn the timing from the stream
itself.

**Window boundary.** This is the subtle part. The index is a position inside a
64-sample window. When tracking moves it across the window edge, one symbol
per user either vanishes or appears at the block boundary:

- **63 → 0.** The symbol now at sample 0 was already handled as sample 63 of
  the previous block, so it is skipped.
- **0 → 63.** The symbol that was at sample 0 would otherwise be lost, so
  sample 0 is also treated as a symbol.

The regenerator and the demodulator apply this rule. They each keep the last
index per user and report the two cases on their `events` outputs.

**Regeneration.** At each symbol position the correlator value becomes the
user's amplitude estimate, and a chip counter restarts. For the following 64
samples the output is `amplitude × code chip (counter / 4)`, which rebuilds
the user's spread waveform, or zero if the user is not acquired. The counter
and amplitude carry over across block boundaries.

**Timing alignment.** The correlator peak for a symbol that starts at sample
s falls at data index s + 63. The rebuilt symbol is therefore produced 63
samples after the samples it describes.

**Combine.** A one-word-per-sample store is read, added to and written back
on every data word:

- The first user of a block starts from zero instead of the stored sum.
- The pass of the last user carries the completed estimate, marked valid and
  saturated to ten bits.
- Earlier passes leave the module marked invalid.

**Revised.** `stream_delay` puts the input module's output 12 clocks later.
That is the latency of correlator, tracking, regenerator and combiner
together. Each estimate word then meets the actual-signal word of the same
stream position. Revised also keeps a 63-sample delay of the actual signal, so
the estimate is subtracted from the samples it describes. It forms

    r' = r + c·(r − ŝ)

with c = 0, ½, ¾ or 1 (selected by `backoff_sel`, built from shifts and adds).
The result is saturated to ten bits.

## Stage 2 in detail

**Buffer module.** It stores the revised block and the headers that arrived
with it. When the first header of the next block arrives (`stage2_trigger`),
it replays the stored block once per user, in the same stream format as the
input module. The headers already carry the index and acquisition status
found in stage 1.

**Correlator.** This is a second `mfc` instance per branch.

**Demodulator.** Decisions are taken at data index (sample index + 63) mod 64,
where the correlator peak falls. The same window-boundary rule applies. For
each decision it computes

    Z = I·I_prev + Q·Q_prev

using the user's previous decision values. The top ten bits of the 21-bit Z
go out, and a negative Z means a phase reversal, i.e. data bit 1. Only
decisions of acquired users are marked valid.

**Output module.** The decision sign bits of each user are shifted into a
16-bit register, with the oldest bit ending in bit 15. Every 16 bits the
word is pushed into that user's 128-word FIFO.

- `host_data` shows the head of the FIFO chosen by `host_sel`, and
  `host_rd_data` pops it.
- `host_status` holds, per user:
  - `[3:0]` empty;
  - `[7:4]` full;
  - `[11:8]` overflow (sticky).
- A word pushed into a full FIFO is dropped and sets that user's overflow
  flag. `host_rd_status` clears the flags.

## Noise generator

The noise source builds each Gaussian sample from the sum of 40 ten-bit
uniform numbers:

- Four LFSRs of 28, 29, 30 and 31 bits each give two numbers per clock.
- A sample arrives every five clocks, so 4 × 2 × 5 = 40 numbers go into each
  sample.
- Each LFSR advances ten steps per number, so successive numbers share no
  bits.

The sum, minus its mean, is scaled by 0, 1/16, 3/32 or 1/8 (`noise_level`),
added to the sample and clipped to ten bits. The measured standard deviations
are 117, 174 and 222 at levels 1–3. The two higher levels are reduced by
clipping.

## Latency and throughput

| Module | Clocks |
|---|---|
| input → stream | 1 (RAM) |
| mfc | 8 |
| acq_track | 1 |
| regenerate | 1 |
| combine | 2 |
| revised | 4 |
| demod | 3 |
| stream_delay | 12 (= 8 + 1 + 1 + 2) |

A decided bit reaches its FIFO about three blocks after its samples arrive:

1. One block to fill the input buffer.
2. One for stage 1.
3. One for stage 2.

Each stage is 86% busy (4412 of 5120 clocks). The `overrun` outputs flag a new
block starting before the previous one was fully streamed, which cannot
happen at these parameters.

## Parameters of `pic_receiver`

| Parameter | Default | Meaning |
|---|---|---|
| `K` | 4 | Users |
| `NB` | 1024 | Samples per block |
| `ACQ_M` | 8 | Windows that must agree before lock |
| `DET_BITS` | 256 | Symbols per detection decision |
| `DET_THRESH` | 48 | Mean on-time magnitude needed to count as acquired |
| `FIFO_DEPTH` | 128 | Words per user FIFO |

The code table in `pic_pkg` holds 16 codes, and the header's user ID has four
bits, so `K` up to 16 is representable. For more than four users the sample
rate must drop in proportion to keep `K × 1103 ≤ 5 × NB × (rate factor)`.
This has not been simulated.

## What follows the source design and what is this design's own

Taken from the source design:

- the stream word and header layout;
- the module state machine;
- the serial per-user processing and the block, symbol and chip sizes;
- the correlator tree and its configuration rule, and the four-sample chip
  integrator with divide-by-64 normalisation;
- the magnitude approximation and chip averaging;
- window-maximum acquisition, early/on-time/late tracking and threshold
  detection;
- regeneration from amplitude estimates;
- the revised-signal equation with four backoff settings;
- the DBPSK decision statistic;
- per-user 128-word output FIFOs with a status register;
- the noise generator structure and its four levels.

Choices made here, where the source gives no detail or is inconsistent:

- `ACQ_M` = 8 and `DET_THRESH` = 48.
- Lock requires agreement on the peak position divided by four.
- The chip-averaging delay is one symbol (64 samples). The source's formula
  reads as 63 samples, but its text expects a symbol every 64.
- All memories are synchronous RAM on the processing clock.
- The revised equation is applied literally as `r + c(r − ŝ)`.
- The estimate is aligned with the actual signal by a fixed 63-sample delay.
- Negating the most negative tree value saturates.
- All arithmetic saturates to ten bits at module outputs.
- The header's sample index and acquired bit are rewritten in place.
- The LFSR taps and seeds are this design's own.
- The FIFOs hold 128 words. The source's text gives 128 and 2048 bits, but
  its block diagram shows 256.
- Resets are asynchronous and active low.

Not included:

- the RF front end;
- the digital downconverter that supplies `rx_i` and `rx_q`;
- the FPGA board, its buses and switches;
- the host-bus protocol (the output module's registers are plain ports);
- the host software;
- the test transmitter. The testbenches model it behaviourally.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against a
reference computed in the testbench, has a watchdog, and ends with a line
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_stream_ctrl` | State sequence, word indices and every header field, for random packets |
| `tb_input_module` | Exact stream layout per user. Header fields. The configuration word is checked functionally: a tree driven by it must give the code-weighted sum |
| `tb_mfc` | Every output against the direct-form correlation `Σ w_j x(n−4j)`, summed over four samples, divided by 64; includes full-scale data and the initialisation words |
| `tb_acq_track` | A reference model predicts every header rewrite and event. Users: a fixed peak, a drifting peak that wraps 63→0, noise only, and a peak that disappears (acquired, then lost) |
| `tb_regenerate`, `tb_demod` | Every output word, both window-boundary cases and the event counts |
| `tb_combine`, `tb_revised` | Sums, saturation, the four backoff factors, pass-through of other words |
| `tb_buffer_module` | The replayed block and stored headers, trigger timing |
| `tb_output_module`, `tb_sync_fifo` | Bit packing, FIFO contents, full, overflow and sticky flag |
| `tb_stream_delay`, `tb_ext_sram` | Exact delay; read-during-write behaviour |
| `tb_noise_gen` | Bit-exact against an LFSR model; spread and mean per level |
| `tb_pic_receiver` | End to end with `DET_BITS` = 32 and `FIFO_DEPTH` = 8 |
| `tb_pic_full` | End to end at the default parameters, 240 blocks |
| `tb_pic_ber` | Bit-error-rate sweep at the default parameters: 2 carrier offsets × 4 noise levels × 4 backoff factors |

In the two end-to-end tests a behavioural transmitter sends four users with
different delays and carrier phases. One user drifts late and one drifts
early, so tracking must follow them across the window boundary. A host model
reads the FIFOs. The tests require that:

- every user is locked and acquired;
- the decoded bits match the transmitted data (fewer than 1% errors; in
  practice 0 to 6 in about 3500 bits);
- every mechanism occurs at least once: lock, index adjustment, index wrap,
  both boundary cases in both modules, detection, the second-stage trigger,
  all four backoff factors, noise, and FIFO overflow.

`tb_pic_full` runs in a few seconds of simulation time with Verilator.

### Bit-error-rate sweep

`tb_pic_ber` measures the receiver the way it is meant to be benchmarked:

- The four users have equal amplitude but different carrier phases.
- They slip by one extra sample every 8269, 8849, 9403 and 9973 samples, so
  the interference between them keeps changing.
- Every combination of noise level and backoff factor is held for 300 blocks.
  Bits are counted for users 1 to 3 away from the switching points.
- This is done once with no carrier offset and once with a common 500 Hz
  offset, which rotates every user's I/Q phase.

One run of the sweep, with about 14,200 counted bits per cell, gave these
error counts:

| Offset | Noise | Backoff 0 | Backoff 1/2 | Backoff 3/4 | Backoff 1 |
|---|---|---|---|---|---|
| 0 Hz | 0 | 13 | 0 | 0 | 0 |
| 0 Hz | 1 | 9 | 0 | 0 | 0 |
| 0 Hz | 2 | 39 | 10 | 15 | 6 |
| 0 Hz | 3 | 121 | 98 | 91 | 215 |
| 500 Hz | 0 | 10 | 0 | 0 | 0 |
| 500 Hz | 1 | 35 | 1 | 0 | 0 |
| 500 Hz | 2 | 40 | 6 | 9 | 24 |
| 500 Hz | 3 | 91 | 128 | 135 | 151 |

Where interference dominates, cancellation removes essentially every error.
In the noisiest setting, full cancellation does worse than partial
cancellation: decision errors feed wrong estimates back into the cancellation.
The test checks that at noise levels 0 and 1 the conventional receiver
(backoff 0) makes errors, and that full cancellation makes at most a quarter as
many. It takes about a minute with Verilator. These bit counts are far too
small to resolve error rates as low as those in the original measurements,
which used two million bits per setting.

To simulate a block with Verilator (the package first):

    verilator --binary --timing --assert -Wno-fatal rtl/pic_pkg.sv \
        $(ls rtl/*.sv | grep -v pic_pkg) \
        tb/tb_pic_full.sv --top-module tb_pic_full -o sim && ./obj_dir/sim

Verilator lint reports two classes of warnings, both intended:

- **Unused signals.** Several modules use only some of `stream_ctrl`'s
  outputs.
- **Mixed reset use.** One `rst_n` warning comes from the top-level assertion
  that disables itself during reset.
