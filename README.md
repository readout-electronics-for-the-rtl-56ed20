# Readout electronics for a spark-chamber / counter experiment

This is the digital part of the readout system for a fixed-target experiment at a 50 GeV proton synchrotron. The system has several parts:

- a magnetostrictive spark-chamber spectrometer (50 pick-up coils read through one X and one Y delay line);
- an 80-wire proportional-chamber plane;
- scintillation and Cerenkov counters;
- a set of slow test voltages.

The readout is synchronised with the accelerator cycle. Each accepted trigger is frozen into a fixed-format event of **336 sixteen-bit words**, which a small computer takes in by direct memory access.

The main idea is to digitize and transfer at the same time. The two delay lines are 2.4 ms long. Twelve scalers could never hold all 300 spark coordinates at once. So each coordinate channel is split into two identical halves that take turns:

- one half digitizes the pulse burst of the next chamber;
- the other half sends the previous burst to the computer.

A REGIME circuit swaps the halves at a fixed time after each burst starts. It uses 70 µs for small chambers and 150 µs for large ones. Twelve words take about 50 µs to transfer, so each transfer ends before the next swap.

Everything is synchronous to a single 100 MHz clock, with `CLK_MHZ` set in `readout_pkg`. The 20 MHz coordinate clock is a 1-in-5 clock enable. All times are parameters in µs or ns, and the RTL converts them to cycles.

## Block structure

```
readout_top
 ├─ master_control   accelerator-cycle sequencer
 ├─ dead_time_unit   trigger GATE, DEAD TIME, STROBE/START, CLEARING FIELD
 ├─ monitor_gen      monitor triggers + TEST pulse chain + light-diode pulse
 ├─ regime_ctrl      REGIME circuit (ping-pong timing, one for X and Y)
 ├─ coord_channel ×2 X and Y; each = 2 × (spark_switch + 6 × scaler)
 ├─ accumulators     16 gated 14-bit counters
 ├─ gated_latch ×2   32 counter latches (20 ns gate), 80 prop. wires (100 ns)
 ├─ fixed_data       16 ten-position switches → BCD
 ├─ dvm_scanner      32-point relay scanner, one DVM reading per cycle
 ├─ readout_unit     word scaler, group signals, ring counter, FLAG/ENABLE
 ├─ word_indicator   word display, stop at a selected word
 └─ tick_gen, pulse_sync (helpers), readout_pkg (shared constants/types)
```

Some parts are not logic and stay outside the design:

- the coil preamplifiers and discriminators;
- the delay lines;
- the proportional-chamber amplifiers;
- the fast trigger electronics;
- the HV pulsers;
- the light diodes;
- the DVM;
- the computer.

`readout_top` reaches them through plain ports: `amp_x/amp_y`, `dl_*_write/read`, `prop_in`, `fast_trigger`, `hv_fire`, `led_fire`, `dvm_*`, and the computer handshake.

## The accelerator cycle (`master_control`)

An `accelerator` pulse starts the sequence:

1. After `INT_DELAY_US` (100 µs), `intr` interrupts the computer so that it can enter DMA mode. **MONITOR TIME** opens at the same moment and lasts `MON_LEN_US` (20 ms).
2. After a gap of `BEAM_DELAY_US` (30 ms), **BEAM GATE** lasts `BEAM_LEN_US` (1 s). **SPILL TIME** is the beam gate extended by the SPILL END DELAY (10 ms).
3. Then a **CLEAR TRIGGER** is requested. The request is held until the dead-time unit accepts it, so it never overlaps a real event.
4. After acceptance, the READOUT RESET DELAY (10 ms) keeps **READOUT ENABLE** on a while longer.

**READY** is a flip-flop. The computer's ENABLE sets it, and CLEAR or the end of READOUT ENABLE clears it.

The times in steps 1 and 2 (interrupt delay, monitor time, gap, beam gate) are this design's defaults. Both 10 ms delays are the specified values.

## Triggers (`dead_time_unit`, `monitor_gen`)

A trigger passes the GATE only when all of these hold:

- READY is set;
- BEAM GATE is on (MONITOR TIME for monitor triggers);
- DEAD TIME is off;
- CLEARING FIELD is off;
- RESET is on.

Three trigger sources exist: real (the fast electronics), monitor, and the CLEAR TRIGGER. Real beats monitor, and monitor beats clear. An accepted trigger does the following:

- it fires the HV pulsers, but only for a real trigger;
- it starts DEAD TIME (1 ms) and STROBE (160 µs);
- it writes START into both delay lines one clock later;
- it turns CLEARING FIELD on exactly 0.5 ms after the trigger, for 1 ms.

STROBE gates the amplifier pulses into the delay-line write coils.

A monitor trigger also fires the light diodes and writes a test chain into the START coil: START, a fiducial 4 µs later, then six pulses 8 µs apart. The event then carries known coordinates. The computer can tell the trigger type from `trig_kind`. The CLEAR-TRIGGER event also carries a complementary pair of "magic" words for format checking.

## Coordinate digitization: ping-pong subchannels

This is the least obvious part. Each line's read coil gives this pulse chain:

- START;
- then one burst per pick-up coil: the coil's fiducial pulse followed by up to six spark pulses.

Bursts of small chambers are 80 µs apart and those of large chambers 160 µs apart. There are 25 bursts per line: 19 small then 6 large, set by the per-burst `large_jumpers`.

Each of the two `coord_channel`s (X, Y) holds subchannels 0 and 1. Each subchannel is a `spark_switch` with six outputs plus six 14-bit `scaler`s. The first pulse of a burst (its fiducial) turns all six switch outputs on, so every scaler counts the 20 MHz enable. Each following pulse turns off the next output, so scaler *k* stops at the arrival time of spark *k*. Scalers of missing sparks count up to the regime change.

`regime_ctrl` follows the pulses and moves through `S_START → S_WAIT → S_TIME`:

- The first pulse after the trigger is START. It is only used to synchronise.
- In `S_WAIT`, the first pulse of a burst starts a timer of 70 or 150 µs.
- If no pulse arrives within `WAIT_US` (20 µs) of START or of the previous regime change, the burst counts as empty. It is timed as if it had begun `GAP_US` (10 µs) after that moment. The bursts are 80 / 160 µs apart and the regimes last 70 / 150 µs, so the gap is always 10 µs. The change for an empty burst therefore still falls 10 µs before the next burst, and the chain never stalls.

When the timer runs out, `regime_change` pulses for one cycle. In that cycle:

- the subchannel that was digitizing gets **REGIME RESET**. Its switch is re-armed, but its scalers keep their counts.
- the other subchannel gets **SCALER RESET**. Its scalers were just read, so they go back to zero.
- the `readout_unit` starts the 12-word transfer of the block just digitized.

`sel` toggles one cycle after `regime_change`. That ordering matters: the resets must see the old `sel`, or the wrong scalers would be cleared.

Because every burst opens with its own fiducial, each coordinate is the spark time relative to that fiducial, with a resolution of one 20 MHz period. The coordinate does not depend on where the coil sits along the line. The 14-bit scaler holds 150 µs × 20 MHz = 3000 counts with room to spare.

## Event format and the READOUT unit

| words   | group     | contents |
|---------|-----------|----------|
| 0–299   | CHAMBERS  | 25 blocks of {X scaler 0..5, Y scaler 0..5} |
| 300–311 | ACCUM     | accumulators 0..11 |
| 312–316 | PROP      | wires 0..79, 16 per word, wire 0 in bit 0 |
| 317–321 | PROP      | zero |
| 322–323 | PROP      | `16'hA5C3`, `16'h5A3C` in the CLEAR-TRIGGER event, else 0 |
| 324–327 | FIXED     | 16 BCD digits, 4 per word, switch 0 in bits 3:0 |
| 328–329 | FIXED     | latches 0..31 |
| 330     | FIXED     | DVM reading |
| 331     | FIXED     | {reading valid, 10'b0, test point} |
| 332–335 | FIXED     | accumulators 12..15 |

The four groups, their order and the 336-word total follow the specification. Two things do not follow from it directly:

- **The layout inside the last three groups is this design's choice.** Each group is only twelve words long.
- **Accumulators 12–15 sit in the FIXED group.** Sixteen accumulators do not fit the 12-word ACCUM group, so the last four use spare words there.

`readout_unit` selects each word in three ways:

- a word scaler `word_count` counts up to 336;
- `group` is the group signal for the current word;
- `ring` is a one-hot 12-position ring counter.

The word signals from the ring go to every group in parallel. So the DATA BUS is an AND-OR of (group ∧ word). The handshake for each word runs as follows:

1. A READOUT pulse puts the word on the bus.
2. FLAG rises `FLAG_NS` (500 ns) later.
3. The computer stores the word and answers with ENABLE.
4. ENABLE drops FLAG and moves on to the next word.

In the chamber group, a block ends after twelve words, and the unit then waits for the next regime change. After the 300th chamber word, the remaining three groups follow without a pause. After word 336 the unit waits for the computer's CLEAR. CLEAR resets every subsystem and drops READY. The computer's next ENABLE re-arms the trigger GATE.

Assertions check these rules:

- the ring counter stays one-hot;
- a regime change never arrives while a chamber block is still being sent (this would be an overrun);
- the spark switch outputs turn off in order;
- the dead-time unit never re-triggers.

The regime change and the transfer run in parallel. The limit is 12 × (computer time per word + 0.5 µs) < 70 µs, so the computer may take up to about 5.3 µs per word. The end-to-end test uses 3 µs per word and measures 58 µs per block.

`word_indicator` shows every word and its number. When stopping is enabled, it holds FLAG back at the selected word until `ind_cont` is pressed.

## Other data sources

- **accumulators**: 16 counters of 14 bits, gated by BEAM GATE or MONITOR TIME. An operator switch picks one of two modes.
  - Count *till* the trigger: the trigger stops them.
  - Count *after* the trigger: they run until the READOUT unit reaches the accumulator group.

  They are cleared by the RESET after each event.
- **gated_latch**: the gate opens on the clock after the trigger and stays open for `GATE_NS`. Pulses seen while it is open set flip-flops. It is used twice: 32 latch channels with a 20 ns gate, and 80 proportional-chamber wires with a 100 ns gate.
- **fixed_data**: 16 one-hot switch inputs are coded as BCD, and the code is captured at the trigger. If two contacts are closed, the lowest one wins. If none is closed, the digit reads `F`.
- **dvm_scanner**: each accelerator pulse moves the relay scanner to the next of 32 test points. After `SETTLE_US` it triggers the DVM once. The reading and its point number are held for every event of that cycle.

## Assumptions and departures

These are the design's own choices:

- **Clock.** One 100 MHz clock with a 20 MHz enable, instead of a separate quartz oscillator. Coordinates therefore have a phase uncertainty of one 20 MHz period.
- **Input timing.** Inputs that are counted as pulses pass a two-flop synchroniser, which adds 3 clocks of latency: the delay-line chains, the accumulator inputs, the fast trigger and ACCELERATOR. The computer's ENABLE and CLEAR, the operator controls and the latch and wire inputs are treated as synchronous.
- **Durations with no specified value.** Interrupt delay 100 µs, MONITOR TIME 20 ms, gap 30 ms, BEAM GATE 1 s, DEAD TIME 1 ms, STROBE 160 µs, CLEARING FIELD length 1 ms, monitor period 5 ms, test-pulse spacing 8 µs, DVM settling 5 ms.
- **Counts with no specified value.** The X/Y split of the 50 coils (25 per line, 19 small + 6 large) and the number of latch channels (32).
- **Sparks.** Sparks after the sixth in a burst are ignored.
- **Regime timeout.** The 20 µs timeout for an empty burst is this design's own mechanism. So is the rule that times such a burst from 10 µs after the previous change.
- **Overflow and collisions.** Scalers and accumulators wrap on overflow. A trigger that arrives while the gate is closed is simply lost. Master-control ACCELERATOR pulses that arrive mid-sequence are ignored.
- **Magic word.** The value `16'hA5C3` and its position.
- **Not included.** The stand-alone test unit that exercises the control logic without accelerator or computer has no logic of its own here. Its role is taken by the testbenches.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one ends by printing `TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/readout_pkg.sv tb/tb_regime_ctrl.sv --top-module tb_regime_ctrl
./obj_dir/Vtb_regime_ctrl
```

Two testbenches cover the whole design:

- **`tb_readout_top`** runs it end to end at shortened cycle times, in about 15 s. The whole cycle runs at shortened times: 4 ms monitor time, 8 ms beam gate, 2 ms and 4 ms delays.
- **`tb_readout_top_full`** runs the same test at the top's default parameters. That is one whole 1.07 s accelerator cycle, which takes about 3 minutes of simulation.

Both testbenches use the same models:

- two delay lines that replay the written pulses 2.4 ms later;
- chambers that spark at random coordinates;
- counters and proportional wires;
- a DVM;
- a computer that takes 3 µs to store each word.

They check:

- every word of real, monitor and CLEAR-TRIGGER events against values worked out independently;
- the 0.5 µs FLAG delay and the 12-word block time;
- the CLEARING FIELD delay;
- blocking of triggers while the gate is closed.

They also count each mechanism and report a failure if one never occurred: each trigger type, HV and light-diode firing, blocked triggers, both ping-pong halves, coils with more and with fewer than six sparks, a silent coil whose burst is timed out (every regime change must also come at least 5 µs before the next burst), the CLEARING FIELD, the word-indicator stop, and READY being restored. The after-trigger accumulator mode is exercised in the `accumulators` bench.

Testbenches of slow blocks (`master_control`, `monitor_gen`, `dvm_scanner`) run them with `MHZ=1` so that millisecond times simulate quickly. The cycle counts are still checked against the same formulas.
