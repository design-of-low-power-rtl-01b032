# LPDDR4 memory controller core with adaptive 3-step eye detection

An LPDDR4 link at up to 4266 Mb/s per pin only works after training. The
controller must find, for the command bus, the read path and the write path,
the sampling time and the reference voltage (VREF) that sit in the middle of
the data eye. A full scan of a 256-step time axis by 72 VREF steps costs
18,432 test points for each training step. This design needs about 307.

It gets there in two stages:

1. **1x2y3x search.** It makes three one-dimensional sweeps instead of a
   two-dimensional scan:
   - sweep time at a fixed VREF;
   - sweep VREF at the resulting time center;
   - sweep time again at the VREF center.

   Only the four boundary codes are stored, and each center is the average of
   its two boundaries. This costs 256 + 72 + 256 = 584 tests.
2. **Adaptive gain.** While consecutive results agree (pass after pass, or
   fail after fail), the stride along the axis grows, up to 2 codes. When a
   result changes, the boundary must lie in the skipped gap. The engine
   bisects that gap down to the exact code, then drops the stride back to 1.
   The boundaries are therefore the same as a step-by-step scan would give,
   at roughly N/2 + 2 + 3 tests per axis: 133 + 41 + 133 = 307 for 256 x 72.

Around this engine sits the digital part of a low-power LPDDR4 controller for
one channel (16 DQ, 2 DMI, 2 DQS, CA[5:0]):
- the link-training sequencer;
- ZQ calibration, write leveling and per-lane write deskew;
- 16:1 serializers with de-emphasis;
- a two-stage strobe-domain deserializer;
- the ADPLL's loop filter, delta-sigma modulator and clock divider;
- a glitch-free gate that stops the transmit clock tree while the link is idle.

The strobe receiver model removes DQS glitches with an offset that flips with
the signal, so the read path needs no gate-timing training.

## The eye search engine

`agc_sweep` searches one axis. It asks for one test point at a time: it
raises `test_req` with `test_pos`, and whoever drives the link answers with
`test_ack` and `test_pass` after any latency. The rules:

- After `ALPHA` (1) results equal to the previous one, the gain rises by one,
  up to `K_MAX` (2). The first point counts as such a result.
- When a result differs from the previous one and the last step was longer
  than one code, the engine bisects the interval (last, current] until the
  two codes are adjacent. The boundary is then exact, and the gain is reset
  to 1.
- The last code of the axis is always tested, so a window that runs to the
  end of the axis is closed exactly.
- The result is the first contiguous pass window: `pass_start`, `pass_end`
  and `found`, plus the number of tests used.

One limit follows from the stride. A pass window narrower than `K_MAX`
codes can fall between two strided tests and be missed. For any wider window
the results equal those of a plain scan. The testbench checks this against a
brute-force scan on random windows.

`eye_detect_3step` runs the three sweeps on one `agc_sweep`. The first time
sweep uses `VREF_INIT` = 33. On the 10 % to 42 % of VDDQ VREF range in 0.4 %
steps, that is 23.2 % of VDDQ.

If a sweep finds no pass zone, the engine moves its fixed coordinate by
`RETRY_STEP` (8) codes and repeats the sweep:
- for a time sweep, the VREF moves;
- for the VREF sweep, the time moves.

After `MAX_RETRY` such moves it reports `fail`. `x_only` runs only the first
sweep; per-lane edge searches use it.

Measured test counts: 307 for a 256 x 72 eye with adaptive gain, 584
without, and at most 133 for a single 256-code sweep.

## Training sequence

`ltfsm` runs in SYS_CLK (PHY_CLK / 8) and walks through these states:

```
POWER_UP -> RESET -> DRAM_INIT -> MRW -> ZQ_START -> ZQ_LATCH -> CBT -> WLVL
  -> RD_EYE -> RD_LAT -> RD_CAL -> WR_DQS2DQ -> WR_EYE -> WR_CAL -> NORMAL
```

- **POWER_UP:** waits for PLL lock.
- **RESET and DRAM_INIT:** hold and then release the DRAM reset, and wait.
- **MRW:** writes four mode registers.
- **ZQ_START and ZQ_LATCH:** start ZQ calibration, run the local ZQ
  calibration logic, then send the latch command.
- **CBT (command bus training):** the eye engine's test points become
  sequences of the ten CA patterns 0-A-0-B-0-C-0-D-0-E:

  | Pattern | CA[5:0] |
  |---------|---------|
  | A       | 111001  |
  | B       | 000110  |
  | C       | 010001  |
  | D       | 101110  |
  | E       | 101101  |

  Each pattern is sent with a CS pulse while the CA timing/VREF codes are
  set to the point under test. The point passes if all ten come back
  unchanged on `cbt_fb`. The zero pattern between data patterns stops one
  pattern's error from aliasing into the next.
- **WLVL (write leveling):** steps the DQS phase code and records, per byte,
  the first code where the DRAM's CK sample turns from 0 to 1.
- **RD_EYE:** each test point is a WRITE of a 16-bit pattern word on every
  lane, then a READ, then a compare of the deserialised words. The write side
  uses the untrained nominal codes (time mid range, VREF code 33); the read
  side uses the codes under test.
- **RD_LAT:** sweeps the 4:16 deserializer's latency code 0..15 at the
  trained read point and keeps the middle of the passing range.
- **WR_DQS2DQ:** runs a time-only sweep for each of the 18 lanes, checking
  only that lane, to find where each lane's write eye begins. `wr_deskew`
  then subtracts the smallest of these codes from all of them. Each lane's
  transmit delay code is later the common trained time code plus its own
  offset.
- **WR_EYE:** a full 1x2y3x search on the deskewed transmit codes, all lanes
  checked.
- **RD_CAL and WR_CAL:** commit the trained codes.
- **NORMAL:** raises `train_done`. `train_fail` is set if any step found no
  eye.

Lane patterns: `dq_word(pat, lane)` repeats a 6-bit CA pattern to 16 bits and
inverts it on odd lanes, so neighbouring lanes carry opposite data.

Commands use a compact encoding of this design's own: one CA word per
SYS_CLK cycle, qualified by CS. The JEDEC multi-cycle LPDDR4 encoding is not
used.

## Clocks and the ADPLL logic

- `mmdiv` divides the DCO clock in two stages:
  - stage 1 gives PHY_CLK = DCO / 1, 2, 4 or 8 (266 MHz to 2133 MHz from a
    1333 to 2133 MHz DCO);
  - the divide-by-4 tap feeds stage 2 (/5, 6, 7 or 8), so the feedback clock
    is DCO / 20, 24, 28 or 32, which is 66.6 MHz at lock.
- A 3-bit counter on PHY_CLK gives SYS_CLK = PHY_CLK / 8 and the phase used
  to load the serializers.
- `adpll_dlf` is a proportional-plus-integral filter of the 6-bit phase
  error, with a lock detector.
- `adpll_dsm` is a first-order delta-sigma modulator that dithers the 10-bit
  DCO code, so its average carries the filter's fractional bits.

## Data path

**Transmit, per lane.** The training sequencer provides one 16-bit word per
SYS_CLK cycle. `tx_ser16` loads it at the SYS_CLK boundary and shifts out
two bits per PHY_CLK cycle, one for each clock edge, LSB first. `tx_deemph`
registers the main bits and a de-emphasis tap that carries the inverse of the
bit sent one unit interval earlier. The transmitter clock passes through
`clk_gate`: the enable is re-sampled on the falling clock edge, so the gated
clock only ever has whole pulses. The sequencer opens the gate only from a
WRITE command until the burst has left. Timing is set by the external
per-lane delay-line codes `tx_dcdl`.

**Receive.**
- `rx_enable_ctrl` decodes READ commands and, `rd_dly` PHY_CLK cycles later,
  turns the strobe receiver on for 12 cycles and starts the deserializer.
- `af_ctle` (behavioural model) is the strobe receiver:
  - it compares DQSP with DQSN plus an offset of ±40 mV, whose sign comes
    from an SR latch set by the positive output and reset by the negative one;
  - while the strobe idles with both pins at the same level, the offset keeps
    noise from toggling the output;
  - during a burst, the offset always opposes the next transition equally in
    both directions, so the duty cycle is kept;
  - in the model this is a set/reset latch with thresholds ±40 mV.
- `rx_des4` works in the strobe domain. It captures a bit on each strobe
  edge, divides the strobe by two and assembles 4-bit nibbles.
- `rx_des16` moves the nibbles into the PHY_CLK domain, one every two cycles,
  starting at the trained latency code, and assembles the 16-bit word.

A read burst has 10 rising strobe edges: 8 data beats and 2 postamble beats.
The even count keeps the divided strobe in phase from one burst to the next.

## Calibration blocks

- `zq_cal`:
  - raises the pull-down code from 0 until the comparator says the pad has
    reached the reference against the external 240 Ω resistor;
  - switches the comparator path and does the same for the pull-up code
    against a pull-down replica at the calibrated code;
  - `err` flags a reference outside the code range.
- `wr_leveling` steps a 7-bit DQS phase code. For each code it sends one DQS
  pulse, waits, and samples each byte's feedback through a two-flop
  synchroniser.
- `wr_deskew` finds the minimum of the 18 lane codes, one per cycle, and
  subtracts it. For example, 77 with a minimum of 53 gives 24.

## What is outside and what differs from the original design

These parts are analog, physical or external, so they are not in the RTL:
- the DCO and the phase/frequency TDC;
- the global and local DLLs, the phase interpolators and the delay lines;
- the VREF generators, the LVSTL drivers and the ZQ comparator;
- the clock trees, the I2C read-out and the DRAM itself.

The top module brings their codes and signals out as ports. The testbenches
contain a behavioural DRAM and channel model.

This design's own choices where the original is silent or different:
- **Command encoding and timing.** The single-word commands, all waiting
  times (cycle-count parameters, not JEDEC values), the MRW list, and the
  test procedure that writes and then reads a pattern.
- **Clock naming.** The original calls the /1-2-4-8 divider output the
  system clock; here it is PHY_CLK, and SYS_CLK is PHY_CLK / 8.
- **Receiver-enable delay.** The delay from READ to receiver-on (`rd_dly`) is
  an input here. In the original it is trained.
- **Not modelled:**
  - the CS-only training and the drop to a low clock rate around command
    training;
  - equalisation in the CTLE and its use in the DQ path;
  - the serializer latency code, which is present but tied to 0 at the top.
- **Chosen constants:**
  - gains and start code of the loop filter;
  - the ±40 mV offset;
  - `VREF_INIT` = 33;
  - the retry step and limit;
  - the 12-cycle receive window;
  - code widths of the ZQ (6 bits) and leveling (7 bits) searches.
- **No host interface.** The top has no host read/write port for normal
  operation. It ends once training is done.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5, from the directory
holding `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl --top-module tb_lp4_mcu \
    rtl/lp4_pkg.sv rtl/*.sv tb/tb_lp4_mcu.sv
./obj_dir/Vtb_lp4_mcu
```

(`lp4_pkg.sv` must come first. Listing it twice through the wildcard is
harmless, or list the files explicitly.) For one block, pass the package,
the block and any sub-blocks it uses, plus `tb/tb_<block>.sv`. For example,
`tb_ltfsm` also needs `eye_detect_3step.sv`, `agc_sweep.sv` and
`ca_pattern_gen.sv`.

`tb_lp4_mcu` runs the whole top at its default size (18 lanes, 256 x 72 grid)
from power-up to normal operation in a few seconds. It uses a channel model
that:
- closes the PLL loop;
- answers ZQ and write leveling;
- has rectangular CA, read and write eyes with per-lane write skews;
- drives read strobes as pin voltages with noise, so every mechanism runs.

It checks every trained code against the eye centers, the test counts, the
clock ratios, the strobe edge count per burst, the gated-clock pulse widths,
and that the transmit clock is stopped in normal operation.

## Files

- `rtl/lp4_pkg.sv` holds the shared constants, the command and state enums,
  and the pattern functions.
- Every other file in `rtl/` is one module, named after its file.
- `tb/tb_<module>.sv` is that module's testbench.
