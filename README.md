# TDD synchronizer for a WiBro RF repeater

A WiBro (mobile WiMAX, TDD) repeater amplifies the base station's downlink (DL) towards the
terminals. It amplifies the terminals' uplink (UL) towards the base station on the same
frequency, in the other part of the same 5 ms frame. The repeater has to switch its power
amplifiers between the two directions in step with the base station. It does not demodulate
the signal, though, so nothing tells it where a frame starts or how the frame is split.

This RTL is the digital half of such a synchronizer. An analog front end (not included) detects
the envelope of the received downlink and clamps it to a TTL level: 1 while the base station
transmits. From that single bit, the logic here:

* cleans the envelope of fading drop-outs and noise spikes;
* measures the DL length and the frame period;
* decides which of the three DL:UL splits is in use;
* locks on to the frame start, and keeps the lock through missing or displaced edges;
* drives `tdd_out`, the repeater's DL/UL switch, with the output placed exactly where the
  repeated DL will be;
* lets an external processor program latencies and edge trims, and read back the state, over a
  3-wire serial port.

## Frame and output timing

| Split (DL:UL symbols) | DL length | `tdd_out` DL window |
|---|---|---|
| 30:12 | 3456 us | 3539 us |
| 27:15 | 3110 us | 3193 us |
| 24:18 | 2765 us | 2848 us |

A frame is 5000 us long and holds 42 OFDMA symbols of 115.2 us. The DL window of `tdd_out` is
the DL length plus half of each guard gap:

* half the receive/transmit gap, RTG/2 = 39 us, before DL;
* half the transmit/receive gap, TTG/2 = 44 us, after DL.

`tdd_out = 1` means DL. When locked, `tdd_out` rises 39 us before the repeated DL starts and
falls 44 us after it ends, so the switch settles inside the guard gaps.

All timing inside the design is counted in 1 us ticks from a divider (`TICK_DIV` clocks per
tick; the default of 10 assumes a 10 MHz clock). The edge accuracy is therefore 1 us.

## Signal path

```
tdd_in ─ input_interface ─ low_level_filter ─ high_level_filter ─┬─ duration_calculator ─ level_comparator ─ mode_selector ─┐
                                                                 └─ sync_generator ─ sync_regenerator ─ delay_controller ──┤
                                       serial_interface ─ offset_generator ─────────────────────────── tdd_signal_generator ─ tdd_out
main_controller, resync_controller: lock, loss and re-acquisition
```

### Input filters

The envelope is sampled once per tick after a two-flip-flop synchronizer. Each filter is a
64-sample window that counts the ones in it, and outputs 1 while the count reaches a
threshold:

* The **low-level filter** (threshold 40 of 64) runs first. It removes short logic-1 bursts in
  the UL part, where noise and terminal signals can trip the detector.
* The **high-level filter** (threshold 8 of 64) comes next. It fills short logic-0 drop-outs
  that fading punches into the DL.

Each filter delays rising and falling edges by different amounts. Together they make the
filtered DL `2*TAPS + 2 - 2*(LOW_TH + HIGH_TH)` = 34 us longer than the real one. The mode
selector subtracts this bias (`HIGH_BIAS_US`). The rising-edge delay, `LOW_TH + HIGH_TH` ticks,
is part of the digital latency below.

### Measuring and classifying

* `duration_calculator` measures the logic-1 time and the rising-edge-to-rising-edge period of
  every frame.
* `level_comparator` compares each frame with the previous one. Its tolerance is 10 us, twice the
  ±5 us edge wander expected under multipath fading. It only accepts periods within 10 us of
  5000 us. After `STABLE_N` (4) agreeing frames in a row, the signal is `stable`.
* `mode_selector` maps the stable DL length to a split, within ±100 us. The first mode is taken
  at once. A different mode is only taken once it has been seen on `CONFIRM_N` (200 frames,
  1 s) stable frames in a row, so a short disturbance cannot switch the repeater. A stable
  length that matches no split (an abnormal symbol rate) is never used.

### The signal mask

`sync_generator` is the part that makes the synchronizer robust against fading. Once it holds a
frame reference, it expects the next DL start one period later. It only looks at edges inside a
4 us *change-allowable window*, ticks P-2 to P+1 around the expected position P. There are three
cases:

* **Edge outside the window.** The edge is ignored (`ignored`). Typically a fade broke the DL
  and the high-level filter could not bridge it.
* **Edge inside the window.** The edge is passed on at once as the sync. The reference then
  moves one tick towards it, or stays put if the edge was on time. Moving only one tick is
  deliberate. Noise ahead of the DL makes filtered edges come early more often than late, and
  a reference that jumped to every accepted edge would walk out of the window. The one-tick
  step settles on the typical edge position and still follows a clock offset of up to one tick
  per frame (200 ppm).
* **No edge in the window.** The sync is forced at the end of the window (`forced`). The
  reference stays at the expected position, so a run of missing edges does not make the frame
  drift.

After `MISS_N` (8) forced syncs in a row, `lost` rises and the re-sync controller starts a fresh
acquisition.

### Flywheel and latency

`sync_regenerator` is a free-running 5000-tick frame counter. It is what keeps `tdd_out`
running while the sync generator re-acquires:

* A detected sync within `TOL_US` (8 us) of its own frame start pulls the counter onto it.
* `REALIGN_N` (4) syncs in a row at another position make it jump there. This is a new
  synchronization, for example after the base station's timing moved.
* If `HOLD_FRAMES` (1000 frames, 5 s) pass without any detected sync, it gives up. This is
  never sooner than the loss time below.

The detected edge is one whole pipeline late compared with the air interface:

* front end: `t_d,RF`;
* digital path up to the sync: `t_d,DIG`;
* path from the delayed sync to the output edge: `t_d,GEN`.

So `delay_controller` does not try to output the current frame. It waits for the same position
in the *next* frame, less the pipeline and less the 39 us lead:

```
t_d,TDD = 5000 - (t_d,DIG - t_d,RF) - t_d,GEN - 39      (limited to 1..4999)
```

`t_d,RF` enters with the sign above because the repeated DL at the antenna lags the received DL
by the RF chain's delay. The output therefore has to come that much later.

The defaults make the output exact on a clean envelope with `t_d,RF = 0`:

* `t_d,DIG = LOW_TH + HIGH_TH + 4`;
* `t_d,GEN = BASE_US + 2`.

With a real front end, program its delay into `T_RF`.

### Output and trims

`tdd_signal_generator` counts from the delayed sync. It opens the DL window at
`BASE_US + rise_off` and closes it `total + fall_off` later. The split used is latched at each
frame start, so a mode change takes effect on a frame boundary.

`offset_generator` combines three signed trims from the processor into the two edge offsets, in
1 us steps and limited to ±15 us (`TRIM_MAX = BASE_US - 1`):

* a common trim that moves both edges;
* a rise trim;
* a fall trim.

Until the design is locked (or while `CTRL.enable` is 0), `tdd_out` rests at DL and `dl_pa_en`
is 0. The repeater then starts in its DL position with the DL amplifier off.

### Supervision

* `main_controller` has two states, search and locked. It arms the sync generator only when
  frames are stable and a mode is known. It locks once the flywheel is valid. It falls back to
  search, and pulses `loss`, after `LOSS_US` (5 s) without a stable frame. It then stops
  driving the switch. A weak or absent downlink shows up here as frames that are never stable.
* `resync_controller` reacts to events:
  * on `loss`, it clears all measurements, the mode, the mask and the flywheel;
  * on `lost` from the sync generator while frames are still stable, it clears only the mask,
    so the generator takes the next edge as its new reference;
  * it counts these re-acquisitions.

## Serial port

SCK, SDA and SEN are synchronized to `clk`, so SCK must be slower than `clk/4`. SDA is split
into `sda_i`, `sda_o` and `sda_oe` for the pad. A transfer works like this:

* SEN is high for the whole transfer.
* It lasts 24 SCK periods, MSB first. The processor changes SDA on the falling edge and the
  port samples it on the rising edge.
* The first bit is R/W (1 = read), then a 7-bit address, then 16 data bits.
* On a read, the port drives the 16 data bits from the falling edge after the address bits.

| Address | Register | Access |
|---|---|---|
| 0x00 | bit 0: enable TDD output (reset 1) | R/W |
| 0x01 | `t_d,DIG`, us | R/W |
| 0x02 | `t_d,RF`, us (reset 0) | R/W |
| 0x03 | `t_d,GEN`, us | R/W |
| 0x04 / 0x05 / 0x06 | trim of both edges / DL start / DL end, signed us | R/W |
| 0x10 | `{locked, mode_valid, mode[1:0]}` | R |
| 0x11 / 0x12 | last stable DL length / period, us | R |
| 0x13 | `t_d,TDD` in use, us | R |
| 0x14 | number of re-acquisitions (8 bits) | R |

`mode` is 0 for 30:12, 1 for 27:15, 2 for 24:18 and 3 for none.

## Files

* `rtl/tdd_pkg.sv`: types, WiBro constants and the register map.
* `rtl/us_tick.sv`: the tick divider.
* `rtl/tdd_sync_top.sv`: wires the blocks together.
* Each block above is a module in its own file in `rtl/`.
* `tb/tb_<module>.sv` is the self-checking testbench of each block.
* `tb/tb_tdd_sync_top.sv` runs the whole design at a reduced configuration:
  * 2 clocks per tick, a 3-frame mode confirmation and a 100 ms loss time;
  * acquisition in 27:15;
  * a serial trim;
  * fading drop-outs, UL spikes and jitter;
  * a switch to 30:12;
  * late DL starts;
  * an abnormal DL length;
  * a 1000 us jump of the frame timing;
  * loss of signal, and re-acquisition in 24:18.

  It checks every `tdd_out` edge against the ideal position. It also counts each mechanism
  (spikes removed, drop-outs filled, forced and ignored syncs, mode changes, abnormal frames,
  re-syncs, realignments, losses, locks) and fails if one never happened.
* `tb/tb_tdd_sync_full.sv` uses every default parameter. It runs one noisy acquisition in 24:18
  and checks the output window edges.
* `tb/tb_tdd_sync_modes.sv` also uses every default. It covers about 7.5 s of noisy signal:
  * 30:12, then 27:15, then 24:18;
  * then no signal.

  It checks:
  * every output window against the ±5 us stability requirement;
  * first lock within 2 s;
  * each mode change between 1 and 2 s (measured: 1.025 s);
  * the output stopping after about 5 s without signal (measured: 5.000 s).

  It runs in about half a minute.

Every testbench prints `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_tdd_sync_top \
    rtl/tdd_pkg.sv rtl/*.sv tb/tb_tdd_sync_top.sv
./obj_dir/Vtb_tdd_sync_top
```

The full-size run covers about 22 frames (110 ms) of signal at 10 clocks per tick and runs in
about a second.

## How far to trust it, and where it is its own design

These parts follow the published design of this synchronizer:

* the block split;
* the 64-tap filters;
* the 4 us mask and its three cases;
* the latency equation;
* the WiBro numbers;
* the 5 s loss time, and a mode change taking effect after about a second.

These are this design's own choices:

* the filter thresholds (40 and 8). The published filters were tuned experimentally and their
  thresholds are not given; expect to retune them against a real front end.
* the comparator and mode tolerances;
* the counts `STABLE_N`, `MISS_N`, `REALIGN_N` and `HOLD_FRAMES`;
* the placement of the mask window around the expected edge;
* the flywheel in the sync regenerator;
* the re-sync rules;
* the serial frame format and register map;
* the trim range;
* the extra 39 us lead in the latency equation. The published equation has no guard term;
  the lead is added here so the output leads the DL as described.

Other differences:

* Only the DL start edge is masked. The DL end is regenerated from the mode. The published
  masking figure also masks the falling edge.
* The output stops after 5 s without a stable frame, which is the loss time given for the
  original. A desynchronization limit of under 3 s is also quoted for it. Here that is taken as
  the time to notice a lost frame position: 8 frames, 40 ms.
* Acquisition is much faster than the original's 2 to 3 s, about 7 frames (35 ms) at the
  defaults, because only 4 agreeing frames are required.
* Within the digital path, the two filters are placed low-level first, as the functional
  description orders them. One block diagram of the original draws them the other way round.
* The analog front end and the processor software are not part of this RTL. Testbenches stand
  in for both with a synthetic envelope and serial transactions. The fading in those testbenches
  is a simple random model, not a standard channel model. The ±5 us stability under the standard
  fading channels is therefore not demonstrated here.
* On a clean envelope the output edges are exact. With the synthetic noise, the DL start of the
  output is between 5 us early and 1 us late over about 1,500 frames at full size. It is
  between 3 us early and on time in the reduced test. The early bias comes from UL spikes just
  before the DL raising the low-level filter's count. The ±5 us requirement is met, but with no
  margin under this noise model.
