# Discrete-time digital LDO with adaptive sampling clock

A digital low-dropout regulator (LDO) supplies a local voltage domain from a
higher supply through a bank of PMOS switches. It works as a sampled control
loop. On each clock edge a small flash ADC compares the output voltage with
the reference. A shifter register then switches a few more or a few fewer
PMOS devices on. The difficulty is the load. A digital block can change its
current draw by two or three orders of magnitude, and that moves the pole of
the output node, `a ≈ 1/(R_L·C_L)`, by the same factor. The sampled loop
behaves according to `exp(-a·T)`, with `T` the sampling period. A sampling
clock that suits a heavy load leaves a light load badly under-damped, and it
also wastes clock power. A clock that suits a light load is too slow for a
heavy one.

This design tracks the load with the regulator's own state. The number of
PMOS devices that are on is a direct measure of the load current. Two bits
of the shifter word are watched for about 1024 cycles, and the design then
moves the sampling clock between three frequencies 3x apart (33, 100 and
300 MHz). The effect is to hold `exp(-a·T)` within a band.

## Structure

```
            vref, delta1, delta2                   k (gain)
                    |                                 |
 vout --> flash_adc (3 clocked comparators) --> shift_ctrl (Table I)
                                                      |
                                                      v
            clk_gen <-- fsel -- adaptive_ctrl <-- barrel_shifter (128 b) --> pmos_gate
           (ring osc)          (bits 80, 40)           |                        |
               |                                       |                  pmos_dac --> iout
               +--- clk_s: clocks ADC, shifter, adaptive_ctrl               (vin -> vout)
```

| module | kind | what it is |
|---|---|---|
| `dldo_pkg` | package | sizes, `fsel_e` (F_NOMINAL / F_LOW / F_HIGH), `shift_ctrl_t` {d, mux_1, mux_2} |
| `flash_adc` + `sense_amp` | behavioural | 3 latched comparators on real voltages |
| `shift_ctrl` | RTL | error code and gain → shift direction and amount |
| `barrel_shifter` | RTL | 128-bit thermometer register, shifts by 0–3 per cycle |
| `adaptive_ctrl` + `load_counter` | RTL | two 10-bit run counters, frequency selection |
| `clk_gen` | behavioural | ring oscillator, three taps |
| `pmos_dac` | behavioural | PMOS bank as switched resistors |
| `dldo_top` | top | all of the above; the load is outside |

The analog parts are `sense_amp`/`flash_adc`, `clk_gen` and `pmos_dac`.
They are written as behavioural models with `real` signals and delays, so a
closed-loop simulation runs in plain Verilator. The control logic is
ordinary synthesizable RTL: `shift_ctrl`, `barrel_shifter`, `adaptive_ctrl`
and `load_counter`. The load and grid, `R_L ∥ C_L` plus an optional
pull-down noise current, live in the testbench as `tb/load_grid.sv`. The top
takes `vout` as an input and gives the PMOS current `iout` as an output.

## The error code and the gain (shift_ctrl)

The ADC has three thresholds: `b[2]` at `V_REF+Δ1`, `b[1]` at `V_REF−Δ1`
and `b[0]` at `V_REF−Δ2`, with `Δ2 > Δ1`. A bit is 1 when `V_OUT` is above
its threshold. Each code maps to one shift of the gate word:

| b | where V_OUT is | d | mux_1 | mux_2 | shift |
|---|---|---|---|---|---|
| 000 | below V_REF−Δ2 | 1 (up) | k1 | k0 | up by gain |
| 001 | between V_REF−Δ2 and V_REF−Δ1 | 1 | 0 | 1 | up by 1 |
| 011 | within ±Δ1 | 0 (down) | 0 | 1 | down by 1 |
| 111 | above V_REF+Δ1 | 0 | k1 | k0 | down by gain |

The gain `k = {k1,k0}` is 11 → 3, 10 → 2 and 01 → 1. The result is a
non-linear controller: small errors move the word by one step and large ones
by up to three. Note that no code means "hold". Inside the ±Δ1 band the loop
still steps down by one, so in steady state it settles into a small limit
cycle around `V_REF−Δ1`. The testbench measures the average at about
`V_REF − 10 mV` with `Δ1 = 10 mV`. Setting `Δ1` very small turns this into a
bang-bang regulator. Two choices here are this design's own. With `k = 00`
the two outer rows do not shift at all. A code that is not a thermometer
code (010, 100, 101, 110) holds the word.

## The shifter word (barrel_shifter)

The PMOS gates are active-low. The 128-bit word `A` is kept as a thermometer
code with ones at the top and zeros at the bottom, so the number of zero bits
counted up from bit 0 is the number of devices on (`n_on`). "Up" moves the
word towards bit 127 and fills zeros at bit 0, which turns more devices on.
"Down" moves it towards bit 0 and fills ones at bit 127.

Each bit has two 4:1 multiplexers in front of its flip-flop:

```
level 1: B[n] = mux_1 ? (d ? A[n-2] : A[n+2]) : A[n]
level 2: F[n] = mux_2 ? (d ? B[n-1] : B[n+1]) : B[n]
A[n] <= F[n]
```

One edge therefore moves the word by 0, 1, 2 or 3 positions. Positions that
fall off the ends take the fill value, so the word stays a thermometer code
and saturates at all-on (128) or all-off (0). This is the integrator
`D(n) = D(n−1) + K·e(n)` of the loop, with the leak factor α = 1.

The following are this design's choices: which select code picks which mux
input, the end fill, the reset value (`RESET_ON` devices on, default 0) and
the `n_on` observation output.

## Adaptive sampling clock (adaptive_ctrl, clk_gen)

Two `load_counter`s watch the shifter word:

* **Heavy:** counts while `A[80] = 0`, meaning more than 80 devices are on.
  It clears whenever `A[80] = 1`.
* **Light:** counts while `A[40] = 1`, meaning at most 40 devices are on. It
  clears whenever `A[40] = 0`.

Each counter is 10 bits wide and saturates at all ones. A full heavy counter
selects `F_HIGH`. A full light counter selects `F_LOW`. If neither is full,
the selection is `F_NOMINAL`. The selection is registered.

Timing: a sustained heavy load shows up as `F_HIGH` on `fsel` exactly 1024
sampling edges after it starts, which is 1023 counts plus the register.
When the load leaves the band, the counter clears on the next edge and
`fsel` returns to `F_NOMINAL` one edge later. The counters run on the
sampling clock they control. The adaptation loop is therefore more than
1000x slower than the regulation loop, which keeps the two loops from
interacting.

`clk_gen` models a ring of inverting stages. A multiplexer closes the ring
after 10, 30 or 90 stages of 1/6 ns each. That gives 300, 100 and 33.3 MHz.
The model samples `fsel` at each rising edge, so the clock period after a
change is always a whole period of one of the three frequencies, with no
runt pulses. Put together, the selection made at edge *n* sets the length of
the period that starts at edge *n+1*.

## Loop timing

* The ADC latches its code on the rising edge.
* The shifter uses that code on the next rising edge, so there is one cycle
  of loop delay between sampling and the new PMOS setting.
* `pmos_dac` turns the gate word into a current combinationally:
  `I = (D/R_ON + (N−D)/R_OFF)·(V_IN − V_OUT)`. Defaults are
  `R_ON = 6 kΩ` (50 µA per device at 0.3 V dropout) and `R_OFF = 1 GΩ`.

## Parameters

| parameter | default | where |
|---|---|---|
| `N` | 128 | shifter width, number of PMOS devices |
| `HI_TAP`, `LO_TAP` | 80, 40 | watched shifter bits |
| `CNT_W` | 10 | load counter width (≈1024-cycle window) |
| `RESET_ON` | 0 | devices on after reset |
| `clk_gen.STAGE_NS`, `STAGES_HIGH/NOM/LOW` | 1/6 ns, 10/30/90 | clock frequencies |
| `pmos_dac.R_ON`, `R_OFF` | 6 kΩ, 1 GΩ | device model |

The following come from the regulator's published description: the
shifter width, the taps, the counter width, the three frequencies and the
3-comparator ADC with its thresholds. The stage delay, tap lengths and
device resistances are this design's own choices, picked to hit those
frequencies and a 5 mA full load.

## How far to trust it, and where it departs

* The analog blocks are idealised. Comparators have no offset, delay or
  metastability. The ring oscillator has exact periods and no jitter. The
  PMOS devices are linear resistors. Their purpose is to close the loop in
  simulation, not to predict analog performance. Power, efficiency and
  stability margins are outside what this RTL can show.
* Loop delay: the sampled error moves the shifter one clock later. The
  idealised model `D(n) = D(n−1) + K·e(n)` has no delay.
* The load-to-frequency mapping depends on the device size. With 50 µA per
  device, a 500 µA load turns on about 10 devices, which is below bit 40, so
  it runs at `F_LOW`. A load of roughly 2–4 mA runs at `F_NOMINAL`. To move
  the bands, change `R_ON` or the taps.
* The on-chip clock offers only the three frequencies. A continuous sweep (1 MHz to
  1 GHz) needs different `clk_gen` parameters.
* The synthesizable part is shift_ctrl, barrel_shifter, adaptive_ctrl and
  load_counter. `dldo_top` contains the behavioural models, so for
  implementation, replace `flash_adc`, `clk_gen` and `pmos_dac` with the
  real comparators, oscillator and PMOS array.

## Assertions

Three concurrent assertions run in every simulation with `--assert`:

* `barrel_shifter.a_thermometer`: the gate word is always the thermometer
  code of `n_on`.
* `adaptive_ctrl.a_exclusive`: the heavy and light counters are never full
  together.
* `dldo_top.a_dac_count`: the PMOS bank and the shifter agree on the
  number of devices on.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. For example, the closed-loop test at full
size:

```
verilator --binary --timing --assert -Wno-fatal --top-module dldo_top_tb \
    -Irtl -Itb rtl/dldo_pkg.sv tb/dldo_top_tb.sv -o sim
./obj_dir/sim
```

For a unit test, substitute any of `shift_ctrl_tb`, `barrel_shifter_tb`,
`adaptive_ctrl_tb`, `flash_adc_tb`, `clk_gen_tb` or `pmos_dac_tb`.

* **`dldo_top_tb`** (about 70 µs of simulated time, a couple of seconds)
  - Uses `V_IN = 1 V`, `V_REF = 0.7 V`, `Δ1 = 10 mV`, `Δ2 = 30 mV` and
    `C_L = 1 nF`.
  - Steps the load: nominal 3 mA, then heavy 5 mA, then light 0.5 mA, then
    nominal again. It injects a roughly 200 mV droop in the heavy and light
    phases and uses gains 3, 2 and 1.
  - On every sampling edge it checks the ADC code against `V_OUT`, the
    device count against the Table I shift of the previous code, and the
    clock period against the selected frequency.
  - In each phase it checks the average output, the device count for that
    load, the selected frequency and droop recovery.
  - It fails if any mechanism never occurs: each of the four shift rows,
    gains 2 and 3, the switches to F_HIGH, to F_LOW and back to F_NOMINAL,
    and droop recovery.
* **`load_range_tb`** covers 50 µA, 350 µA, 500 µA, 3.5 mA and 5 mA
  (a few seconds of wall time). For each load it resets the design and lets
  it settle and adapt. It checks the selected frequency against the device
  count for that load, checks regulation, then applies a 200 mV droop and
  reports the 90 % settling time. A typical run settles in 72 ns at 5 mA
  (F_HIGH), 115 ns at 3.5 mA (F_NOMINAL) and 200–470 ns at the light loads
  (F_LOW).
* **`fsweep_tb`** runs the regulation loop without adaptation (ADC, decoder,
  shifter and PMOS bank on a testbench clock). It uses 1 MHz, 10 MHz,
  100 MHz and 1 GHz at a fixed 3.5 mA load, then steps the load to 5 mA. It
  checks regulation, and it checks that recovery gets faster as the
  sampling rate rises. A typical run recovers 90 % of the step droop in
  27.5 µs, 2.7 µs, 310 ns and 58 ns respectively. The droop is 87 mV at
  1 MHz and 24 mV at 1 GHz.
* **`barrel_shifter_tb`** runs the full-width shifter against an integer
  reference, including both saturation ends.
* **`adaptive_ctrl_tb`** checks the 1024-edge latency and random load runs
  against a cycle-accurate reference.
* **`flash_adc_tb`, `clk_gen_tb` and `pmos_dac_tb`** check the behavioural
  models against their equations.
