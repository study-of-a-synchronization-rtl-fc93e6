# Communication-free PWM synchronisation for parallel inverters

When several inverters feed one load in parallel, any difference between
their output voltages drives a *circulating current* from one inverter into
another. It adds losses and stress without delivering power to the load. The
usual cures need a link between the inverters: a master–slave bus, shared
timing, or droop control with measured power. This design does without one.
Each inverter has its own small controller. It sees only that inverter's
output current and its own crystal clock, and it forces its PWM to switch
whenever that current leaves a fixed window.

The coupling comes from the physics. All inverters drive the same load, so in
normal operation their currents rise and fall together. When one inverter's
current crosses a bound, the others' currents cross the same bound at the
same moment, and each controller flips its own PWM. The PWM edges stay aligned
because every controller reacts to the same shared waveform, not because of
any timing signal passed between them. Adding an inverter means adding one
more identical controller, with the bounds recomputed for the new count.

The RTL implements the controller of one inverter (`fpga_controller`) and the
logic section of an N-inverter system (`parallel_inverter_sync`). The
testbenches add a behavioural model of the power stage, so the closed loop can
be simulated.

## One controller

```
 i_meas ──► range_comparator ──out_of_range──► reset_edge_detector ──sync_reset──► pwm_fsm ──► pwm_out
            (> UB, < LB)                        (1-cycle delay, rising edge)       (S0 high / S1 low,
                                                                                    1000-cycle time-out)
```

**Comparators** (`range_comparator`). The current sample is compared with an
upper bound UB and a lower bound LB. `out_of_range` is high while either
`i_meas > UB` or `i_meas < LB` holds. This part is combinational.

**Edge detector** (`reset_edge_detector`). The out-of-range level is stored
for one clock. `sync_reset = level & ~level_delayed` is a single-cycle pulse
when the current first leaves the window. A current that stays outside the
window therefore produces one reset, not one per cycle.

**PWM state machine** (`pwm_fsm`). There are two states. In S0 the PWM is high
and the bridge puts +VDC/2 on the line; in S1 the PWM is low and the bridge
puts −VDC/2. The machine leaves reset in S0. It toggles on either of two
events:

- **time-out:** it has spent `HALF_PERIOD` = 1000 cycles in the state. At
  100 MHz that is 10 µs, so a free-running controller produces 50 kHz.
- **resynchronisation:** `sync_reset` is high and at least `RESET_HOLDOFF` = 1
  rising edge has passed since the state was entered. A pulse in the first
  cycle of a state is ignored and reported on `reset_ignored`. This stops a
  single current excursion from flipping the PWM twice.

Either event clears the cycle counter. When both coincide the state toggles
once.

**Timing.** `i_meas` is taken to be synchronous to `clk`. A sample that is
out of range before rising edge *t* changes `pwm_out` at edge *t*. The only
registers are the one-bit delay in the edge detector and the state and
counter in the FSM. A controller is 12 flip-flops and about 30 word-level
cells.

### Closed-loop behaviour

With the window narrower than the free-running current swing, the comparators
set the switching, not the time-out. While the PWM is high the current ramps
up to UB and the controller switches low. While it is low the current ramps
down to LB and the controller switches high. The PWM frequency is then
`slope / (2 · (UB − LB))`.

With the reference load, the share of one inverter out of two rises at
0.15 A/µs. The window is 6.49 − 5.01 = 1.48 A, so each half period lasts
about 9.87 µs. The PWM therefore runs a little above the 50 kHz that the
time-out alone would give. The time-out only acts as a back-stop, when the
current stays in range or stays out of range for a whole half period.

## Choosing the bounds

The load current of the reference operating point ramps between 10 A and
13 A. Each of N inverters carries 1/N of it, so its window is
`[min(I0)/N, max(I0)/N]`. The comparators are taken to resolve 10 mA. Each
bound is therefore moved strictly inside the window, onto the 10 mA grid:

- `LB = (floor(min_mA / (10·N)) + 1) · 10 mA`
- `UB = (ceil(max_mA / (10·N)) − 1) · 10 mA`

`invsync_pkg::lower_bound_ma` and `upper_bound_ma` compute these bounds from
`N_INV`, `LOAD_MIN_MA` and `LOAD_MAX_MA`:

| N        | 2    | 3    | 4    | 5    | 6    |
|----------|------|------|------|------|------|
| LB [A]   | 5.01 | 3.34 | 2.51 | 2.01 | 1.67 |
| UB [A]   | 6.49 | 4.33 | 3.24 | 2.59 | 2.16 |

Explicit bounds can be given instead with `LB_MA` / `UB_MA` on
`range_comparator` or `fpga_controller`.

**Current encoding.** `i_meas` is a signed 20-bit number with a 1 mA LSB, a
range of ±524 A. The sample is finer than the 10 mA bound grid. This lets the
comparator trip at 6.491 A rather than at the next 10 mA step, so it behaves
like a comparator on the continuous current.

## The system

`parallel_inverter_sync` instantiates `N_INV` (default 2) identical
controllers. Controller k has its own `clk[k]`, `rst_n[k]` and `i_meas[k]`,
and drives `pwm_out[k]` plus per-inverter status bits (`above_ub`,
`below_lb`, `resync`, `timeout`, `reset_ignored`). No signal passes between
controllers. The following stay outside the RTL:

- each inverter's power bridge;
- the line impedances and the load;
- the current sensors;
- the clock oscillators.

## What simulation shows, and how far to trust it

The system testbenches connect the controllers to a model of the reference
power stage:

- a 600 V DC link, with bridges switching ±300 V;
- 250 nH + 1 mΩ per line;
- a 1 mH + 1 mΩ load;
- each current sampled with 1 mA resolution on the falling clock edge.

**Lock-step clocks.** Every controller runs from the same 100 MHz clock. The
loop behaves as intended:

- each current stays within 2 mA of `[LB, UB]`;
- the circulating current stays at numerical noise (about 1e-16 A RMS);
- the PWM frequency is within 0.4 % of the rate the window predicts:

| N                         | 2      | 3      | 4      | 5      | 6      |
|---------------------------|--------|--------|--------|--------|--------|
| f_PWM, this RTL [kHz]     | 50.54  | 50.34  | 51.19  | 51.53  | 50.81  |
| f_PWM, reference [kHz]    | 50.668 | 50.500 | 51.365 | 51.720 | 51.017 |

The small shortfall comes from the sensor's sampling and one cycle of
reaction time, which add a few mA of overshoot per half period.

**Independent clocks.** Inverter 1 runs at 100 MHz; the others run at
100.1 MHz (0.1 % fast, a pessimistic crystal tolerance) and start 1–5 ns
late. In this case the model does **not** stay synchronised: the circulating
current grows without bound. Two properties combine to cause this:

1. The lines are very stiff. While one inverter is at +300 V and the other
   at −300 V, each line current changes at 300 V / 250 nH = 1.2 A/ns. The
   controllers react only on their own clock edges, and these can be up to
   10 ns apart. In that gap the currents separate by far more than the
   1.48 A window.
2. Once the two currents have been pushed apart by more than the window,
   one of them sits above UB and the other below LB while the shared ramp
   goes on. Each controller's out-of-range level stays high, so its edge
   detector gives no further reset. Both controllers then free-run on their
   time-outs, with clocks that drift 10 ns apart per half period. Nothing
   within the 250 µs L/R time constant removes the circulating current that
   builds up. In the two-inverter run the first split happens at the very first
   upper-bound crossing: the two controllers see 6.491 A on clock edges
   about 4 ns apart, and by the time the second has switched the line
   currents stand at 12.5 A and 0.5 A.

The reset pulses, hold-off and time-out in this run still match the
cycle-level reference model exactly. The divergence is a property of the
control scheme on this idealised plant, not a logic fault. The model has no
output filter, dead time, sensor bandwidth or current limit, and any of these
changes the picture. Use the lock-step figures as a check of the logic and of
the bound arithmetic, not as evidence that the scheme tolerates clock skew.

## Parameters

| Parameter       | Default | Meaning |
|-----------------|---------|---------|
| `N_INV`         | 2       | number of parallel inverters; sets the bounds |
| `LOAD_MIN_MA`   | 10000   | minimum load current in mA (steady operating point) |
| `LOAD_MAX_MA`   | 13000   | maximum load current in mA (operating point plus ripple) |
| `LB_MA`, `UB_MA`| derived | bounds in mA (`range_comparator`, `fpga_controller` only) |
| `HALF_PERIOD`   | 1000    | clock cycles per PWM half period without resets |
| `RESET_HOLDOFF` | 1       | rising edges in a state before a reset is accepted |

## Where the RTL fills gaps

The following follow the reference design:

- the two comparators on the inverter's own current;
- the one-cycle delay used to turn their output into a reset;
- the two-state PWM machine with S0 high, S1 low and start in S0;
- the 1000-cycle time-out at 100 MHz;
- the one-edge hold-off on resets;
- the bound formulas and the bound values for 2–6 inverters;
- the absence of any connection between controllers.

The following are this design's own choices:

- **Rounding of the bounds.** The rule is to move each bound strictly inside
  the window, onto the 10 mA grid. It is chosen to reproduce the bound table
  above exactly. A plain "round LB up, round UB down" would give 5.00/6.50 A
  for two inverters.
- **Combining the comparators.** The two comparator outputs are merged into
  one out-of-range level before the edge detector. Resets are detected on the
  rising edge of that level.
- **Direction of a resync.** Every accepted reset toggles the state. The
  state is not chosen by which bound was crossed.
- **Current format.** Width, LSB and sampling (20 bits, 1 mA, synchronous to
  the controller clock).
- **Reset.** An asynchronous, active-low reset.
- **Status outputs.** The event strobes (`resync`, `timeout`,
  `reset_ignored`) exist for observation only.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. To build and run one:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/invsync_pkg.sv tb/tb_parallel_inverter_sync.sv \
    --top-module tb_parallel_inverter_sync -Mdir obj -o sim
./obj/sim
```

Verilator finds the other modules through `-Irtl -Itb`.

| Testbench | What it checks |
|-----------|----------------|
| `tb_range_comparator` | bounds for N = 2..6 against the table above, explicit bounds, strict comparisons at ±3 mA around each bound |
| `tb_reset_edge_detector` | single-cycle pulse only on rising edges, including across a reset |
| `tb_pwm_fsm` | starts high; free-running period of exactly 2000 cycles; random resets against a reference model, including resets ignored in the first cycle |
| `tb_fpga_controller` | closed loop with a ramp current model: frequency within 1 % of 50.668 kHz, current held in the window; a held excursion gives one reset, then time-outs exactly 1000 cycles apart |
| `tb_parallel_inverter_sync` | default two-inverter system, lock-step and independent clocks side by side, 1 ms: cycle-level scoreboard on every PWM output, each mechanism (upper and lower resync, ignored reset, time-out) seen, lock-step frequency and current window |
| `tb_inverter_count_sweep` | 2–6 inverters, lock-step and independent clocks: scoreboard, lock-step frequency within 1 % of the reference values |

`tb/power_section_model.sv` is the plant model. It is behavioural and not
synthesizable. It treats bridge k as an ideal ±VDC/2 source and solves the
load voltage algebraically for equal lines. It then integrates each line
current with forward Euler at 0.1 ns steps. `tb/inverter_bench_harness.sv`
adds around a system:

- clocks, resets and current sensors;
- the reference model of the controllers;
- counters for each mechanism;
- frequency and circulating-current measurements.

Each run takes a few seconds.

## Files

- `rtl/invsync_pkg.sv` — current type, PWM state enum, default operating
  point, bound functions
- `rtl/range_comparator.sv`, `rtl/reset_edge_detector.sv`,
  `rtl/pwm_fsm.sv` — the three stages of a controller
- `rtl/fpga_controller.sv` — one inverter's controller
- `rtl/parallel_inverter_sync.sv` — top: N independent controllers
- `tb/` — testbenches, the harness and the power-stage model
