# High-resolution FPGA TDC with wave-union delay lines

This is a time-to-digital converter (TDC) for 16 detector channels plus a
common stop. It resolves times to about 10 ps with nothing but ordinary FPGA
fabric. The time of an edge has two parts:

* **Coarse time.** A counter runs on a 375 MHz clock (2.667 ns per count).
* **Fine time.** Each input drives a *tapped delay line*, a carry chain of
  about 150 stages of roughly 18 ps each. At every clock edge a row of
  flip-flops takes a snapshot of the chain. How far the edge has travelled
  along the chain tells how long before the clock edge it arrived.

The carry-chain stages are far from equal: in the model they range from 4 to
32 ps. So a tap number cannot be turned into time by a fixed formula. Every
line has its own **calibration look-up table (LUT)** in a block RAM, built
inside the chip by a *code density test*. A calibration clock whose phase
drifts slowly against the 375 MHz clock is fed in. The number of its edges
that land in each bin is then proportional to that bin's width.

The resolution is doubled by a **wave-union launcher**. Each hit enters the
chain as a short fixed pulse, so the snapshot holds two edges. The sum of
their two tap positions is used as a *virtual bin*. This gives about 300
virtual bins per clock period instead of about 150.

Each channel has one line for its leading edge and one for its trailing edge.
Both feed a 256-hit **L1 buffer** that never stops writing. A hit on the
common-stop line searches every channel's buffer backwards. The hits found
are sent out relative to the stop time. At the defaults there are
16 × 2 + 1 = 33 delay lines.

## Timestamp format

All times are 26-bit values in units of 1/4096 of a clock period, that is
2.667 ns / 4096 ≈ 0.651 ps:

| bits   | meaning                                          |
|--------|--------------------------------------------------|
| 25..12 | coarse count (14 bits; wraps after 43.7 µs)      |
| 11..0  | fine time from the LUT                           |

A line's hit time is `ts = coarse × 4096 − LUT[bin]`. The LUT holds the time
from the hit to the clock edge that took the snapshot, so it is subtracted.
Each readout word (`tdc_pkg::tdc_word_t`) is `{ch[3:0], trailing, dt[25:0]}`,
where `dt = stop time − hit time`, modulo 2^26.

Every line has a constant offset: the delay up to its first tap, the launcher
pulse width and the pipeline. These offsets cancel between lines of equal
construction, but only to within a few tens of ps, as on real hardware. To
get absolute times, calibrate each channel's offset against the stop with a
common pulse.

## The delay line and the encoder

`tapped_delay_line` models the carry chain and its flip-flops. Tap 0 is
nearest the input. After a rising edge a snapshot reads `1..1 0..0`. After
the wave-union pulse has fully entered, it reads `0..0 1..1 0..0`.

`tdl_encoder` finds two positions in each snapshot:

* **rear:** the lowest tap that is set;
* **front:** the lowest tap `i` with `taps[i]=1, taps[i+1]=0`, plus one.

Taking the *lowest* 1→0 step matters. Further down the chain there may still
be older parts of the signal. A short input pulse on the trailing-edge line
shows this: beyond the new edge the chain still holds the level from before
the pulse.

A hit is reported once per edge:

* **plain** (`WAVE_UNION=0`): tap 0 is set and was clear in the previous
  snapshot. The bin is `front`.
* **wave union** (`WAVE_UNION=1`): tap 0 is clear, some tap is set, and the
  previous snapshot held only the pulse's front (tap 0 set) or nothing. The
  bin is `front + rear`, in the range ≈15 to ≈310.

The encoder takes one register stage. It passes along the coarse count that
belongs to the snapshot.

## Building the LUT (`lut_calibrator`)

One block RAM of 2^BIN_BITS words is used in place, in four passes. A pulse
on `cal_start` starts them:

1. **CLEAR** writes 0 to every word.
2. **ACCUM** adds one to `RAM[bin]` for each of 2^NCAL_LOG2 hits. This builds
   a histogram of H[b]. When two hits in a row hit the same bin, the word
   being written is forwarded, so both are counted.
3. **INTEGRATE** sweeps once and writes `2·S[b] + H[b]`. Here S[b] is the
   number of hits in all lower bins, so this is twice the integral at the
   middle of bin b. Bins above the last bin that received hits get 0.
4. **NORMALIZE** sweeps again and shifts each word right by
   `NCAL_LOG2 + 1 − 12`. The word now holds `(S + H/2) / N × 4096`, the time
   in 1/4096 periods.

After that each hit reads `RAM[bin]`, and the result comes one clock later.
The build takes 2^BIN_BITS clocks to clear, then as long as the calibration
hits take to arrive, then about 2 × 2^BIN_BITS clocks for the two sweeps. No
hits are reported while a LUT is being built.

The statistical error of the LUT is about T / (2·√N). With the default
N = 65536 calibration hits this is about 5 ps. With 2^14 hits it is about
10 ps, and that shows up directly in the measured resolution.

**Calibration clock.** The intended source is cascaded FPGA PLLs producing
26.4528 MHz. Its period is 14.176 clock periods, so its edges walk through
all phases of the sampling clock. The PLLs are not part of this RTL: the
calibration clock is the `cal_clk` port. While any line is building its LUT,
`hr_tdc_top` switches all 33 line inputs to `cal_clk`.

When calibration ends, a few calibration edges still in the pipeline, and the
switch of the input multiplexer itself, are recorded as ordinary hits. They
age out of the search window after `WINDOW_CYCLES` clocks. Wait that long
before the first real event.

## L1 buffer and the common stop (`l1_buffer`)

Each channel has one ring of `DEPTH` entries `{trailing, ts}` in a block RAM,
shared by the leading-edge and trailing-edge lines. It is written every
clock, with no dead time. When the ring is full the oldest entry is
overwritten. Both lines can report a hit in the same clock, so a 4-entry
merge queue sits in front of the RAM. If that queue overflows, the sticky
`lost` flag is set.

A stop hit starts a search in every channel that is idle. A stop that comes
during a search is ignored. The search begins 4 clocks after the stop, so
that hits still in the queue reach the RAM first. It then walks from the
newest entry to the oldest:

* an entry up to 64 clocks (`LATE_CYCLES`) later than the stop is skipped;
  these are hits that arrived while the stop was being processed;
* an entry with `dt < WINDOW_CYCLES × 4096` is sent out;
* the first older entry, or the end of the valid entries, ends the search.

Timestamps wrap after 43.7 µs, so a hit one whole range old would look
young again. A counter in each buffer therefore measures the quiet time since
the last write. An entry written after `WINDOW_CYCLES` or more of quiet gets
a *gap* mark, and the search stops after a marked entry. A search that starts
after that much quiet reads nothing. All entries examined are thus less than
2 × `WINDOW_CYCLES` old. That is at most one range, because the window may not
exceed half the range (elaboration fails otherwise).

Entries that new hits overwrite during the walk are not read. Each entry
takes two clocks to examine, and the output is a valid/ready handshake.
`readout_arbiter` merges the 16 channels round-robin into a single stream of
up to one word per clock.

## Files

| file | contents |
|------|----------|
| `rtl/tdc_pkg.sv` | widths and types (`ts_t`, `l1_hit_t`, `tdc_word_t`) |
| `rtl/hr_tdc_top.sv` | the TDC: coarse counter, stop line, N_CH channels, arbiter |
| `rtl/tdc_channel.sv` | one input: two launchers, two delay lines, two `tdc_line`s, L1 buffer |
| `rtl/tdc_line.sv` | encoder + LUT + timestamp of one delay line |
| `rtl/tdl_encoder.sv` | hit detection and bin encoding |
| `rtl/lut_calibrator.sv` | code density LUT build and look-up |
| `rtl/l1_buffer.sv` | multi-hit ring buffer with stop search |
| `rtl/readout_arbiter.sv` | round-robin channel merge |
| `rtl/coarse_counter.sv` | 14-bit clock counter |
| `rtl/sdp_ram.sv` | block-RAM-style simple dual-port RAM |
| `rtl/tapped_delay_line.sv` | **behavioural model** of the carry chain and flip-flops |
| `rtl/wave_union_launcher.sv` | **behavioural model** of the launcher |

The two behavioural models use real-valued delays and `$realtime`, so they
cannot be synthesized. On an FPGA they become placed carry-chain primitives
and flip-flops, with the launcher built from the chain's first cells. Any
port of this design has to replace these two files by its vendor's
primitives, with location constraints. Everything else is synthesizable.

## Parameters (`hr_tdc_top`)

| parameter | default | meaning |
|-----------|---------|---------|
| `N_CH` | 16 | input channels (each with two delay lines) |
| `N_TAPS` | 192 | taps per delay line (one period ≈ 148 taps + pulse) |
| `BIN_BITS` | 9 | bin id / LUT address width |
| `WAVE_UNION` | 1 | 1: wave-union launchers and virtual bins; 0: plain |
| `NCAL_LOG2` | 16 | log2 of calibration hits per LUT build |
| `DEPTH` | 256 | L1 entries per channel |
| `WINDOW_CYCLES` | 8192 | search window before the stop, in clocks (21.8 µs) |

The 375 MHz clock, the 256-hit depth, the 16 channels, the 33 wave-union lines
and the code density method are fixed by the design. The 43.7 µs timestamp
range is too. The following are this implementation's own choices:

* the 12-bit fine unit (one step per calibration phase, 4096 per period);
* the line length;
* the number of calibration hits and the mid-bin integration point;
* the launcher pulse shape (a fixed 300 ps pulse);
* the hit-detection rules;
* the merge queue, the search window and the stop search;
* the readout arbiter;
* a synchronous active-high reset throughout.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Build one with Verilator 5, for example the
end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_hr_tdc_top rtl/tdc_pkg.sv tb/tb_hr_tdc_top.sv
./obj_dir/Vtb_hr_tdc_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_hr_tdc_full` | the top at its defaults: all 33 LUTs built from 2^16 hits, one pulse on every channel, stop, all 32 words within 80 ps (about 1 minute) |
| `tb_hr_tdc_top` | a 4-channel wave-union TDC and a 2-channel plain one, 24 events. It counts and requires LUT build, overwrite of a full buffer, skipping a hit later than the stop, search ended by the window, stop ignored during a search, and channels competing for readout |
| `tb_lut_density` | a plain and a wave-union line at their defaults, calibrated with 2^16 hits: every LUT word against the formula, computed from the bins the encoders reported. Plain: 153 bins, 17.4 ps mean; wave union: 302 virtual bins, 8.8 ps mean |
| `tb_stop_resolution` | one-channel TDCs, wave union and plain, with calibration at the default 2^16 hits. 150 stops each at 1028 ns and 6002 ns after a hit. The spread of hit − stop must stay below 20 ps (measured ≈6 ps wave union, ≈10 ps plain) |
| `tb_tdc_channel` | width of random pulses (leading − trailing) within 60 ps |
| `tb_tdc_line` | wave-union and plain line after calibration; RMS error between hit pairs below 15 ps (measured ≈12 and ≈10 ps with 2^14 calibration hits) |
| `tb_lut_calibrator` | every LUT word against the formula above, computed from the hits sent |
| `tb_l1_buffer` | search results against a reference list, including overwrite, stalls, writes during a search and a stop after the timestamps have wrapped |
| `tb_tdl_encoder`, `tb_readout_arbiter`, `tb_coarse_counter`, `tb_tapped_delay_line`, `tb_wave_union_launcher` | block-level checks |

The testbenches drive inputs away from the sampling clock edge (on the falling
edge, or through the delay-line models) to avoid simulation races.

## Limits and known differences

* **Bin widths are modelled.** They are pseudo-random in 4–32 ps, seeded per
  line. A real chain has the 4-stage structure of the carry cells and
  systematic patterns. The model has no jitter and no metastability. So the
  resolutions above describe the LUT and quantization only, not the signal
  integrity at the input pins.
* **Wave union gives only a small gain at small calibrations.** In
  `tb_tdc_line`, at 2^14 calibration hits, it does not beat the plain line,
  because the statistical error of the LUT dominates. At the default 2^16
  hits, `tb_stop_resolution` shows the gain (≈6 ps against ≈10 ps).
* **Bursts.** The encoder reports at most one hit per edge type per clock.
  Two pulses closer together than about the launcher width plus a clock
  period merge into one.
* **Late hits.** A hit more than 64 clocks (171 ns) after the stop, but
  written before the search reaches it, looks older than one range minus the
  window. It ends the search, just like a hit older than the window. The
  search starts 4 clocks after the stop, so this needs a very long search.
* **Partial readout.** A stop during a running search is dropped, not queued.
  `busy` shows when a search is running.
