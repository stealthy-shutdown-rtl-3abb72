# Stealthy shutdown: a well-timed power attack circuit for shared FPGAs

When several tenants share one FPGA, they also share its core supply, VCCINT.
The board regulator that produces VCCINT has an under-voltage protection: if the
supply sags below a fixed fraction of nominal (about 0.91 V on a 1.0 V Artix-7
board), it switches the supply off and every tenant on the chip goes down until
the board is power-cycled.

An attacker could trip that protection by burning a lot of power on its own, but
a cloud operator watching per-tenant power would notice. This circuit does it
quietly instead. Compute-heavy neighbours, such as a bitcoin miner, already pull
the supply down, in bursts, close to the point where a little more load causes a
steep drop. The circuit watches VCCINT with ring-oscillator sensors. When it sees
one of those dips, it switches on a small bank of power-wasting oscillators for a
single 50 µs window. On the boards this design was characterised on, about 5–8%
of the slices were enough for that extra load. Without the neighbours' load,
tripping the regulator took 11–22%.

The RTL here is the attacker's circuit: sensors, counters, measurement window,
decision logic and load. The regulator and the victims are not part of it, but
the testbenches model them.

## How the parts fit

```
                 vccint_mv (the shared supply, from the board)
                     │
   ┌─────────────────▼─────────────────┐
   │ NUM_SENSORS × ro_sensor ─► ro_counter   (ring oscillator + 32-bit count)
   └───────────┬───────────────────────┘
        counts │   ▲ sensor_en / cnt_clr
   ┌───────────▼───┴───┐
   │   sensor_window    │  50 µs windows, captures C_RO of every sensor
   └───────────┬────────┘
   c_ro, valid │   ▲ run
   ┌───────────▼───┴────┐
   │ attack_controller   │  calibrate → monitor → inject (or sweep)
   └───────────┬────────┘
  active_cells │
   ┌───────────▼────────┐
   │     pw_array        │  NUM_PW_CELLS × pw_cell (4 self-oscillating NANDs)
   └───────────┬────────┘
               ▼  pw_cell_en → extra load on the same supply
```

`stealthy_shutdown_top` holds exactly this. The supply comes in as a number of
millivolts, `vccint_mv`, because in silicon it is the analog supply of the
sensors. The per-cell enables go out on `pw_cell_en` so that a board model can
turn them into load. That feedback loop (load lowers the supply, the supply
slows the sensors) closes only in the testbench.

## Sensing the supply: C_RO

**`ro_sensor`** is a four-stage ring of three inverters and one buffer, small
enough for one slice. A ring's frequency falls with its supply voltage. At
constant temperature the relation is close to a straight line. The model uses a
line through about 26,500 oscillations per 50 µs at 1.0 V and 15,000 at 0.8 V
(530 MHz and 300 MHz, i.e. 57.5 counts per mV per window):

```
f[kHz] = F_REF_KHZ − SLOPE_KHZ_PER_MV · (V_REF_MV − vccint_mv)      (530000, 1150, 1000)
stage delay = 1 / (8 f)
```

The first inverter is a NAND gated by `en`, so the ring can be stopped with every
node static. The model does not include temperature. In real silicon, heat from
the attacker's own load also slows the ring, so it reads lower than the voltage
alone would give.

**`ro_counter`** is a 32-bit counter clocked by the ring output, one per sensor.
On the FPGA it would go in the DSP block nearest the sensor.

**`sensor_window`** turns the free-running rings into one number per sensor per
window, called C_RO. It handles the clock-domain crossing by stopping the rings
rather than synchronising the counts:

| phase   | cycles          | what happens                                              |
|---------|-----------------|-----------------------------------------------------------|
| CLEAR   | 2               | `cnt_clr`=1: every counter is cleared asynchronously      |
| RUN     | `WINDOW_CYCLES` | `sensor_en`=1: rings run, counters count                  |
| SETTLE  | `SETTLE_CYCLES` | rings stopped; the last edges die out                     |
| CAPTURE | 1               | counts copied into `c_ro`, `c_ro_valid` pulses            |

Because the counters are static when they are read, no Gray code or synchroniser
is needed. The cost is a gap of 7 cycles between windows. A window therefore
completes every `WINDOW_CYCLES + SETTLE_CYCLES + 3` cycles: 5007 cycles, or
50.07 µs at the assumed 100 MHz. `sensor_en` and `cnt_clr` come straight from
flip-flops, because `cnt_clr` is an asynchronous clear and must not glitch.
Verilator points out that these two signals are used both synchronously and
asynchronously. That is intended.

## Deciding when to strike: `attack_controller`

This is the hardest part to get right. It has two modes.

**Attack mode** (`mode = MODE_ATTACK`) runs in three phases:

1. **CALIBRATE**, for `CAL_WINDOWS` windows (default 64, i.e. 3.2 ms), with all
   cells off. The controller keeps the minimum and maximum C_RO of the sensor
   chosen by `sensor_sel`. This profiles how far the neighbours' own load moves
   the supply.
2. **MONITOR**. It sets
   `threshold = cal_min + ((cal_max − cal_min) >> THR_SHIFT)`, i.e. one eighth
   of the observed range above the lowest reading. Any window whose C_RO falls
   below the threshold means the supply is in one of its deepest dips. Those
   dips are the moments closest to the regulator's critical point.
3. **INJECT**. The controller enables `level` power-wasting cells for
   `INJECT_WINDOWS` windows (default one window, 50 µs), then switches them off
   and returns to MONITOR. Each trial raises `level` by `FINE_STEP_CELLS`. The
   first trial uses `FINE_STEP_CELLS`, and `level` saturates at the array size.

The attacker never learns directly whether an injection worked. Success means the
whole chip, this circuit included, loses power. So the controller escalates
slowly and uses only as much load as the board needs. Decisions are made in the
cycle after `c_ro_valid`, during the CLEAR phase, so a new load is in place
before the next window starts counting. The window measured during an injection
is never used as a trigger.

**Sweep mode** (`mode = MODE_SWEEP`) characterises a board without any victim
timing. It enables `COARSE_STEP_CELLS` at start and adds that many after every
`STEP_WINDOWS` windows for the first `COARSE_STEPS` (5) steps. From then on it
adds `FINE_STEP_CELLS` per step, until the whole array is on (state DONE) or the
board shuts down. The default step sizes, 380 and 48 cells, are 2.4% and 0.3% of
the 15,850 slices of an XC7A100T.

`halt` returns the controller to IDLE with every cell off, from any state. An
assertion checks that cells are never on in IDLE, CALIBRATE or MONITOR.

## The load: power-wasting cells

**`pw_cell`** is one slice: four LUTs, each a two-input NAND with its output
wired back to one input and the shared Enable on the other. With Enable low every
output is 1. With Enable high each NAND inverts itself continuously and burns
dynamic power. **`pw_array`** switches on cells 0 … n−1 when the controller asks
for n (thermometer code). Its default size of 1268 cells is 8% of an XC7A100T,
the largest share the attack needed on any of the boards it was tried on.

## What is synthesizable and what is a model

Two blocks are combinational loops and cannot be written as synthesizable RTL:
`ro_sensor` and `pw_cell`. They are behavioural models with `#` delays, marked as
such in their headers. On an FPGA they are built from LUT primitives placed by
hand, with the combinational-loop design-rule check waived. Everything else
(`ro_counter`, `sensor_window`, `attack_controller`, `pw_array`, `ssd_pkg`) is
ordinary synthesizable SystemVerilog.

## Parameters

| parameter | default | where it comes from |
|---|---|---|
| `NUM_SENSORS` | 41 | the sensor floorplan of the XC7A100T: 8 clock regions × 5, plus one beside the on-chip ADC |
| counter width `CRO_W` | 32 | the DSP counter of the design |
| `WINDOW_CYCLES` | 5000 | 50 µs window from the design; **100 MHz clock is an assumption** |
| `SETTLE_CYCLES` | 4 | chosen |
| `NUM_PW_CELLS` | 1268 | 8% of 15,850 slices, from the reported ≤ 8% overhead |
| `INJECT_WINDOWS` | 1 | a 50 µs attack window, as reported |
| `COARSE_STEPS` | 5 | from the design |
| `COARSE_STEP_CELLS` / `FINE_STEP_CELLS` | 380 / 48 | midpoints of the reported 1.8–3.0% and 0.1–0.5% of slices |
| `CAL_WINDOWS`, `THR_SHIFT`, `STEP_WINDOWS` | 64, 3, 4 | chosen; the design gives no values |
| sensor line 530 MHz at 1.0 V, −1.15 MHz/mV | | read from the measured C_RO-versus-voltage line |
| `pw_cell` gate delay | 1 ns | chosen |

The cell counts assume an XC7A100T. For larger parts, raise `NUM_PW_CELLS` and
the step sizes: about 8,660 cells reach 8% of an XC7VX690T, and 2,880 reach 5%
of an XCZU7EV. At the default size the sweep mode can only reach 8%. The
voltage-drop sweeps that tripped the regulators with no victim load went to
11–22%.

## Where this departs from the design, and other limits

- **Counter use.** The design speaks of an accumulating counter. Here each
  counter is cleared at every window, so C_RO is the count within one window
  (the quantity the measurements use). The sensors are also stopped between
  windows.
- **Trigger policy.** The threshold formula, the calibration length, the
  per-trial step and returning to MONITOR after a failed trial are this design's
  choices. The design says only "below a certain threshold" and "gradually
  increasing" the load. Triggering uses one selectable sensor. The other 40
  counts are brought out for characterisation only.
- **Temperature.** The sensor model includes no temperature effects. Heating
  lowers C_RO in silicon, so a real threshold would need margin.
- **Reset, handshake, clock.** The synchronous active-low reset, the `start`
  pulse, `halt` and the 100 MHz clock are all choices made here.
- **Not built.** The board regulator, its capacitors, the on-chip ADC and the
  victim miner are outside the attacker's circuit. The regulator and victim
  exist only as the testbench model `tb/pdn_model.sv`. Countermeasures are
  discussed for this attack but are not hardware of it.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog:

- `tb_ro_sensor`: counts per 50 µs at 1000–800 mV against the line (±1%). It also
  checks that the count is monotonic and that a disabled ring is quiet.
- `tb_ro_counter`: counts, asynchronous clear with no clock running, and wrap on
  an 8-bit instance.
- `tb_sensor_window`: counts against pulses the testbench generates itself,
  exact RUN length, window period, the enable and clear never high together,
  and stopping when `run` drops.
- `tb_pw_cell`, `tb_pw_array`: quiet when disabled, one toggle per gate delay
  when enabled, and the thermometer enables.
- `tb_attack_controller`: calibration min/max and threshold, no trigger at or
  above the threshold, one-window injections, level growth and saturation,
  `halt`, and the exact coarse/fine sweep sequence.
- `tb_stealthy_shutdown_top`: end to end at reduced size (4 sensors, 40 cells,
  2 µs windows). The design is closed in a loop with `pdn_model`. The model's
  supply follows the measured Artix-7 curve: 1.002 V unloaded, a knee at
  0.99 V / 17% load and shutdown at 0.91 V / 22%. The victim load is bursty
  (10%, rising to 17.4%).
  - It checks every window's C_RO against the sensor law and the window period.
  - It requires each mechanism to occur at least once: calibration, trigger,
    failed trial, level saturation, shutdown during an injection at a victim
    peak, coarse and fine sweep steps, sweep DONE, `halt`, and sweep shutdown at
    the level worked out from the load model.
- `tb_stealthy_shutdown_top_full`: every parameter at its default (41 sensors,
  1268 cells, 50 µs windows). It runs one complete sweep operation with the
  victim steady at 15%: 380, 760, then 1140 cells. The board must cut out at
  1140 cells, the first level where the load reaches 22%. It checks all 41
  counts in every window and the 5007-cycle window period. The run takes about
  4.5 minutes in Verilator, roughly half a minute per window once hundreds of
  cells oscillate.
  - The attack mode needs 64 calibration windows before its first trigger. At
    full size that would take well over 15 minutes, so attack mode is verified
    end to end only at the reduced size above.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_stealthy_shutdown_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/ssd_pkg.sv tb/tb_stealthy_shutdown_top.sv -o sim
./obj_dir/sim
```

Replace the top module to run another testbench. `--timing` is required,
because the sensor and power-wasting models use delays. All files use
`timescale 1ps/1ps`. Simulation is two-state, so everything that is read is
reset or initialised explicitly.
