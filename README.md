# Real-time frame synchroniser for a satellite PCM downlink

A remote-sensing satellite sends its image data as a continuous serial bit
stream. The ground station has a recovered bit clock, but it does not know
where each frame starts. Every frame begins with a fixed 64-bit *frame sync
code* (FSC). This design finds that code in the stream in real time, one bit
per clock. It tolerates up to three bit errors in the code. A *flywheel*
keeps the frame timing going when a code is corrupted or missing, so every
frame reaches the recorder whatever the sync state. The same design also holds
a test pattern generator. The station runs that generator daily to check the
whole receive chain.

This SystemVerilog follows the frame synchroniser described in the paper
"Auto-Correlation of a Real-Time Remote Sensing Satellite Data". That design
was written in AHDL for an Altera FLEX 10K and ran at up to 70 MHz per
channel. The structure, sizes and constants here come from that description.
Where the description was silent or contradictory, this implementation had to
make its own choices, and the section [Departures and choices](#departures-and-choices)
lists them.

## Frame format

| item | value |
|---|---|
| frame length | 2400 eight-bit words = 19200 bits |
| frame sync code | words 0..7: `0C 28 F2 2C EA 7D 0E 24` (64 bits, MSB first) |
| fixed test pattern | words 0..15: the FSC followed by `DA DE C6 97 73 2A FE 04` |
| video | words 16..2399 |

There are two channels, A and B. Each has its own clock and its own copy of
everything. Both use the same code by default. Each channel has a parameter
for its own code.

## Structure

```
frame_sync_top
 ├─ g_ch[0] (channel A, clk_a)          g_ch[1] (channel B, clk_b) — same
 │   ├─ pattern_gen      test frames → gen_sout
 │   └─ fs_channel       rx_din → status
 │        ├─ fsc_loader          8-byte code store, loads the reference serially
 │        ├─ correlator
 │        │    ├─ shift_reg  (64-bit input register)
 │        │    ├─ shift_reg  (64-bit reference register)
 │        │    ├─ ref_latch  (reference holding register)
 │        │    ├─ XNOR array (64 one-bit multiplications)
 │        │    ├─ pipelined_summer   (4 stages, score 0..64)
 │        │    ├─ threshold_detector (score >= 64 - thresh)
 │        │    └─ 10-bit delay line  (data to recorder)
 │        └─ flywheel
 │             └─ frame_window      (bit counter, 3-bit slip window)
 └─ fs_pkg: constants, fw_state_e, slip_e, chan_status_t
```

The generator is deliberately *not* wired to the receiver inside the top.
In the station, the generator output goes out through the link under test
and comes back on `rx_din`. The end-to-end testbench models that link.

## The correlator

Each clock, the received bit enters a 64-bit shift register. Bit 63 is the
oldest bit. Each position is compared with the reference, and a one marks a
position where they agree. A four-stage adder tree counts the ones. The tree
is eight 8-bit population counts, then three registered adder levels. That
count is the *correlation score*, from 0 to 64. The threshold detector
registers the 2-bit threshold code `thresh`. It raises `raw_detect` when
`score >= 64 - thresh`, so `thresh` is the number of code bit errors allowed.

| thresh | detects when score is |
|---|---|
| 0 | 64 |
| 1 | ≥ 63 |
| 2 | ≥ 62 |
| 3 | ≥ 61 |

The reference comes in through its own shift register and a holding
register. While `ref_load` is high, the holding register follows the shift
register. While it is low, the holding register keeps its value. So a new
code can be shifted in while the old one stays in use. `fsc_loader` keeps the
channel's code as eight bytes. After reset, and on each `reload` pulse, it
shifts the code in MSB first (64 clocks) and then pulses `ref_load` for one
clock. Until scores made against a loaded reference reach the detector,
`raw_detect` is masked. Without that mask, the cleared holding register would
match an all-zero line.

**Timing.** Counted from the clock edge that shifts in the last code bit:

- `score` is valid 4 clocks later.
- `raw_detect` is high for one clock 5 clocks later.
- `data_out` is `din` delayed by 73 clocks (64 + 10 − 1). The first code bit
  therefore appears on `data_out` 5 clocks after `raw_detect`.

## The flywheel

`frame_window` counts bits from 0 to 19199 and then wraps. An accepted sync
resets it, and the clock after an accepted sync reads count 0. So the next
sync is expected on the clock where the count is 19199. The window opens at
count 19198 (`fw`) and runs through a short delay chain to give three window
bits:

| window bit | count | meaning | `slip` |
|---|---|---|---|
| 0 | 19198 | one bit early | `SLIP_EARLY` |
| 1 | 19199 | on time | `SLIP_ZERO` |
| 2 | 0 (of the next frame) | one bit late | `SLIP_LATE` |

A detect inside the window realigns the counter to that detect. This is the
one-bit slip correction. Only one sync is accepted per window.

The state machine (`fw_state_e`) works as follows:

| state | detect in window | window without detect |
|---|---|---|
| `ST_SEARCH` | any detect, anywhere → `ST_VERIFY` (counter aligned) | stay |
| `ST_VERIFY` | count it; 2 consecutive → `ST_LOCK` | → `ST_SEARCH` |
| `ST_LOCK` | stay | → `ST_CHECK` |
| `ST_CHECK` | → `ST_LOCK` | → `ST_SEARCH` (2nd consecutive loss) |

`VERIFY_HITS` (2) and `CHECK_MISSES` (1) are parameters. In `ST_SEARCH`,
`slip` reports `SLIP_NONE` if the accepted detect was outside the running
window.

**Outputs.** All of these are registered and come one clock after the
deciding `raw_detect` or window end:

- `frame_sync` marks an accepted sync.
- `loss_pulse` marks a window that closed without a sync. It fires in every
  state, including search.
- `frame_mark` gives exactly one pulse per frame, on either of the two events
  above.

The counter never stops. So even with the channel in search, frame marks
continue at the last known frame rate, and the recorder keeps storing every
bit from `data_out`.

## Test pattern generator

`pattern_gen` sends 2400-word frames, one bit per clock while `en` is high,
MSB first. Words 0..15 come from the 16-byte pattern table. The other words
are taken from `video_i` on the clock where `video_rd` is high, and the source
must hold the byte valid on that clock.

- `lc` is the 12-bit word counter, modulo 2400.
- `fc` is the 24-bit frame counter.
- `word_out` is the word currently being sent.
- `word_start` is high while the first bit of a word is on `sout`.
- `frame_start` is high while the first bit of a frame is on `sout`.

## Top-level interface (`frame_sync_top`)

Index 0 of every array is channel A (`clk_a`) and index 1 is channel B
(`clk_b`). Each channel's signals belong to its own clock. `rst_n[c]` is an
asynchronous active-low reset. Release it synchronously to that channel's
clock.

| port | dir | meaning |
|---|---|---|
| `gen_en[c]`, `video_i[c]`, `video_rd[c]` | in/in/out | generator bit enable and video source |
| `gen_sout[c]`, `gen_word[c]`, `gen_lc[c]`, `gen_fc[c]`, `gen_frame_start[c]` | out | generator outputs |
| `rx_din[c]` | in | received bit from the bit synchroniser |
| `thresh[c]` | in | allowed code errors, 0..3 |
| `reload[c]` | in | pulse: load the channel's code into the reference again |
| `status[c]` | out | `chan_status_t`: `state`, `raw_detect`, `frame_sync`, `loss_pulse`, `frame_mark`, `slip`, `in_window`, `bit_count`, `score`, `data_out`, `ref_ready` |

The parameters are `FSC_A`, `FSC_B`, `TAIL_A` and `TAIL_B` (the last 8
pattern bytes), `FRAME_WORDS` (2400) and `WIN_START` (19198). `WIN_START`
should stay at `FRAME_WORDS*8 - 2` so that the window stays centred.

## Departures and choices

These points follow the original design:

- the 64-bit registers, latch, XOR array and four-stage summer
- the threshold rule for codes 0..3
- the 10-bit output delay
- 2400-word frames, the 16-byte pattern and the 8-byte code
- the 12-bit modulo-2400 word counter and the 24-bit frame counter
- the four flywheel states
- the window starting at bit 19198 and its 3-bit width
- two channels

These are this implementation's own choices:

- **Reference holding register.** The original uses a level-sensitive
  transparent latch. Here it is a clock-enabled register, which adds one clock
  but avoids a latch.
- **Clocking.** The original clocks the shift registers and the summer
  independently. Here each channel runs on one bit clock, and the reference
  register has a shift enable instead of its own clock.
- **Code byte 5** is `EA`. One listing of the code gives `ED` instead. The
  generated test pattern shows `EA` on both channels, and that is what is
  used. Change `FSC_A`/`FSC_B` and `TAIL_A`/`TAIL_B` if your link uses a
  different code.
- **Match polarity.** The summer counts agreeing bits (inverted XOR). That
  way the score is the number of matching positions, as the threshold rule
  requires.
- **Loss pulse.** The loss pulse is generated at the sync window, not on
  every bit whose score is under the threshold.
- **Transitions not fixed by the original.** The original's strategy diagram
  and its prose disagree in places. This implementation follows the diagram:
  search → verify → lock, with one loss to leave verify, and a return to
  search after two consecutive losses from lock. Check → lock on a detect is
  this implementation's reading of "reverts only if the pattern fails for a
  given number of frames".
- **Counter and window.** The original's window waveform shows the bit
  counter reaching 19201 before wrapping. This implementation wraps at 19199
  and lets the late window bit fall on count 0. That keeps an unslipped frame
  at exactly 19200 bits.
- **Generator details.** The status bits on the original generator's test
  waveform (word clocks, frame indicators) are not reproduced, since their
  meaning is not given. The video handshake is also this implementation's
  own.

Not included here:

- the bit synchroniser that recovers the clock and data
- the recorder that stores `data_out`
- anything specific to the FPGA device

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_shift_reg`, `tb_ref_latch` | against a bit-level model, random enables and loads |
| `tb_pipelined_summer` | counts for all-zero, all-one, one-hot and random vectors; latency of exactly 4 |
| `tb_threshold_detector` | every score under every threshold |
| `tb_correlator` | every clock's `raw_detect`, `score` and `data_out` against a recount; 0–4 code errors under each threshold; reference replaced without load, then loaded |
| `tb_frame_window` | counter, window position and realignment against a model (40-bit frames) |
| `tb_flywheel` | every state transition, early and late slips, detects outside the window, loss pulses in search (100-bit frames) |
| `tb_fsc_loader` | bit order, load timing, start while busy |
| `tb_pattern_gen` | every serial word, counters and markers (40-word frames) |
| `tb_fs_channel` | 400-bit frames through the whole channel: errors, slips, threshold changes, reload while locked, all-zero lead-in |
| `tb_threshold_sweep` | full size: every frame's code carries 3 errors while the threshold steps 0, 2, 3, 1, 3, 0; losses for 0–2, detects and lock for 3 |
| `tb_frame_sync_top` | **full size, default parameters**: both channels on different clocks, 13 frames each, through a link model with code errors and ±1-bit slips; counts each mechanism and fails if one never happened |

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal rtl/fs_pkg.sv rtl/*.sv \
    tb/tb_frame_sync_top.sv --top-module tb_frame_sync_top -Mdir obj
./obj/Vtb_frame_sync_top
```

The full-size run simulates about 250,000 clocks per channel and takes a few
seconds.

Assertions in the RTL check that the flywheel's bit counter stays in range
and that the summer and window parameters are legal. The RTL is synthesizable
and contains no latches. The pattern table and the code store become small
ROMs.
