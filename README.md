# Multiplying DLL clock source for a self-adjusting processor clock

A self-adjusting clock generator makes a processor's clock track its own supply voltage. Each
clock half-period is produced by a replica of the processor's critical path, and that replica
runs on the processor supply. When the supply droops, the replica slows and the clock stretches
with it, so timing margin is not lost. The replica's delay is quantised to the nearest edge of a
multi-phase reference, and that reference is normally built as a delay-locked loop (DLL) fed
with a fast input clock.

This design replaces that DLL with a **multiplying DLL (MDLL)**. The MDLL takes a 500 MHz
reference and produces the 16 phases of a 2 GHz clock, so no 2 GHz input has to be distributed.
Its core is an eight-stage differential ring oscillator. On every reference rising edge, a pair of
multiplexers in front of the first stage injects the reference, which realigns the ring and
discards the jitter it has built up. A small digital controller compares each reference edge
with the fourth ring edge after the previous one. From that comparison it drives a charge pump,
and the charge pump sets an LDO that supplies the ring, which closes the loop on frequency.

The repository holds:

- synthesizable SystemVerilog for every digital part: the MDLL controller and the output-clock
  controller;
- behavioural models for the analog parts: the ring, the pulse generators, the charge pump and
  filter, the LDO and the tunable replica circuits;
- self-checking testbenches for every module.

## Block structure

```
                   +------------------------------ mdll ------------------------------+
 ref_clk --+-----> | pulse_gen (inj) --> ring_oscillator --16 phases--+-----------------+--> phases
           |       |                        ^ vrail                   | phases[0]       |
           |       |                       ldo <-- charge_pump_filter |                 |
           |       |                                  ^ up/dn         v                 |
           +-----> | ------------------------> mdll_controller <-- pd_rst <-- pulse_gen |
                   |                      (gray_edge_counter, phase_detector,   (reset) |
                   |                       recovery_reg)                                |
                   +--------------------------------------------------------------------+
 clock_generator:  phases --> clock_controller --> clk_out --> trc (TRC1) --> tp1 --> trc (TRC2) --> tp2
                               ^ tp1 (falling edge)              ^ tp2 (samples phases, rising edge)
```

| Module | Kind | Role |
|---|---|---|
| `mdll_pkg` | package | 8 stages, 16 phases, default multiplication 4, 4-bit counter, Gray helpers |
| `clock_generator` | top (contains models) | MDLL, two TRCs and the output-clock controller |
| `mdll` | contains models | ring, injection, controller, charge pump, LDO |
| `mdll_controller` | RTL | counter, phase detector and recovery register; forms UP and DN |
| `gray_edge_counter` | RTL | 4-bit Gray counter of ring edges, with the `>= MULT-1` enable |
| `phase_detector` | RTL | first-edge detector with lockout and self-reset request |
| `recovery_reg` | RTL | false-lock recovery: a one-reference-period UP |
| `clock_controller` | RTL | edge detector, edge selector, output flip-flop, watchdog |
| `ring_oscillator` | model | 8-stage differential ring with reference injection |
| `pulse_gen` | model | fixed-width pulse on each rising edge |
| `charge_pump_filter` | model | constant-slew integrator driven by UP/DN |
| `ldo` | model | first-order rail regulator, limited by the 1 V supply |
| `trc` | model | tunable replica circuit: three multiplexer stages of buffer chains |

The digital calibration that picks the TRC settings is not built. Its settings are the top's
`trc1_sel` and `trc2_sel` inputs.

## The MDLL controller: how one comparison works

The timing rules of this controller are the subtle part of the design.

The ring must produce exactly `MULT` (4) rising edges on `phases[0]` per reference period.
Injection makes one of those edges line up, one stage delay after the reference edge. The
controller therefore checks where the *fourth* edge falls relative to the next reference edge:

1. **Counting.** `gray_edge_counter` counts rising edges of `phases[0]` in Gray code. The count
   starts again from zero each time the phase detector resets. It saturates at 15 rather than
   wrapping, so the enable cannot drop because of an overflow. A plain comparator, `count >=
   MULT-1`, raises `pd_en`. It is 3 for the ×4 configuration and 4 for a ×5 configuration. Any
   `MULT` up to 16 fits the 4-bit counter.
2. **Detecting.** Once `pd_en` is high, `phase_detector` arms two flip-flops:
   - the one clocked by the reference loads `en & !det_mdll`;
   - the one clocked by the ring loads `en & !det_ref`.

   Whichever edge comes first sets its flip-flop and locks out the other.
   - `det_ref`: the reference came first, so the ring is slow. This drives **UP**.
   - `det_mdll`: the ring came first, so the ring is fast. This drives **DN**.

   An assertion checks that the two are never high together.
3. **Resetting.** The losing input's rising edge ends the comparison. Two extra flip-flops
   record that edge (`seen_ref`, `seen_mdll`). Then `rst_req` goes to an external pulse
   generator, and its 70 ps pulse `pd_rst` clears the detector and the counter asynchronously.
   The width of the UP or DN pulse is therefore the measured phase error.
4. **Recovery.** If the ring is much too slow, fewer than `MULT-1` edges have arrived when the
   reference edge comes, so the detector is still disabled and would report nothing. Every
   reference edge clocks `recovery_reg`, with `D = !(pd_en | recover)`. A reference edge that
   finds the detector disabled sets it, and the next reference edge clears it. The result is an
   UP that lasts one full reference period. `UP = recover | det_ref`, `DN = det_mdll`.

Two timing choices make this work, and they are this design's own:

- **Reset waits for an edge, not a level.** If the reset fired on the losing input's *level*,
  it would come at once whenever that signal was already high. The resulting zero-width UP
  pulses would leave a dead zone around lock. Waiting for the rising edge removes it.
- **Reset pulse longer than one stage delay (70 ps against about 25 ps).** Injection places a
  ring edge just after every reference edge. When the detector resets at that reference edge,
  the pulse must still be active when the injected edge arrives, so that the injected edge is
  not counted. The reference edge itself stands for the first of the `MULT` edges.

The flip-flop outputs feed back, through `rst_req` and the pulse generator, to their own
asynchronous clear. Lint reports this as a signal used both as data and as an asynchronous
reset. It is how this detector is meant to work.

## The output-clock controller

`clock_controller` builds `clk_out` from the 16 phases and the two TRC pulses:

- **Falling edge.** A TRC1 pulse (`tp1`) resets the output flip-flop. TRC1 is the replica delay
  after the rising edge of `clk_out`.
- **Rising edge.** A TRC2 pulse (`tp2`, the replica delay after `tp1`) samples the 16 phases.
  The edge detector then marks the single phase that is low while its predecessor is high:
  `s[n] = q[n-1] & !q[n]`. That is the next phase to rise. The edge selector passes that phase,
  while `tp2` is high, as `ci`, which sets the flip-flop. The sampled phases are cleared while
  `tp2` is low, the way a precharged selector behaves. An assertion checks that the selection
  is one-hot.
- **Watchdog.** While `clk_out` is low, the watchdog counts rising edges of `phases[0]`. After
  `WD_LIMIT` (8, that is 4 ns at 2 GHz) it fires an extra set pulse, so the clock cannot stay
  stuck low.

## Behavioural models and their constants

None of the constants below come from the source design. They are chosen so that the loop
behaves realistically at 1 V, and each is a parameter.

| Model | Law | Constants |
|---|---|---|
| `ring_oscillator` | stage delay `td = 25 ps * 0.7 / (vrail - 0.3)`; 16 stage-delays per period | 25 ps at 1 V (2.5 GHz free-running, faster than 4× the reference), floor 0.35 V |
| `pulse_gen` | pulse of `WIDTH_PS` on each rising edge | 60 ps injection, 70 ps reset |
| `charge_pump_filter` | `dV/dt = 1e-5 V/ps * (up - dn)`, clamped to 0.3-1.0 V, starts at 1 V | updated at each UP/DN change and every 10 ps |
| `ldo` | `vrail` approaches `min(vctrl, 1 V)` with a 200 ps time constant | |
| `trc` | delay `45 ps + (16a + 4b + 2c) * 20 ps * 0.7 / (vproc - 0.3)`, with `sel = {a[1:0], b[1:0], c}` | 80 ps output pulse |

The ring is modelled by the position of its travelling wavefront (0 to 15), not by 16
separately delayed nets. That keeps it in its fundamental mode. A network of delayed inverters
in a two-state simulator falls into harmonic modes. Injection is modelled as a pull:
- if the ring lags the reference, one stage delay after the reference edge it is moved so that
  `phases[0]` rises there;
- a ring that leads the reference is left alone.

## What was verified

Each testbench computes the expected values itself and prints
`TB_RESULT checks=N failures=M`. Highlights:

- `tb_mdll`:
  - the ×4 loop starts with the ring at 2.5 GHz on a 500 MHz reference and locks to a
    500.2 ps period;
  - after a jump to 286 MHz it locks to 873.9 ps;
  - after a jump to 556 MHz it locks to 449.6 ps, with the recovery register used along the way;
  - it then returns to 500 MHz;
  - a ×5 instance locks to 2 GHz on 400 MHz;
  - each check requires 4 (or 5) ring edges per reference period, averaged over 40 periods.
- `tb_clock_generator` (every parameter at its default) runs the whole chain:
  - the watchdog starts the output clock, which is low after reset;
  - the MDLL locks;
  - every rising edge of `clk_out` lies on a phase edge;
  - the high time equals the TRC1 delay, and the period lies within one phase step above the
    sum of the two TRC delays;
  - lowering `vproc` to 0.8 V stretches the clock as the delay law predicts;
  - the MDLL relocks after the jumps to 286 MHz and then 556 MHz.

  It counts DN, UP, recovery, injection pulls and watchdog events, and fails if any of them
  never happens.

Simulate a block with Verilator 5, for example:

```
verilator --binary --timing --assert rtl/mdll_pkg.sv rtl/*.sv tb/tb_clock_generator.sv \
          --top-module tb_clock_generator -o sim && ./obj_dir/sim
```

Each testbench has a watchdog that ends the run with a failure if the run hangs. The testbenches pass with every signal started at a random value (`+verilator+rand+reset+2`): each testbench pulses `rst_n` once at the start, and the built-in assertions only start checking after that first reset.

## Departures and limits

- **UP/DN polarity.** The source material contradicts itself on which detector output means UP.
  This design follows the physically consistent reading: reference first means the ring is
  slow, which means UP.
- **Reset rule, reset width and injection width.** These are this design's choices, explained
  above.
- **Power-on reset.** `rst_n` is an addition that clears the controller's flip-flops.
- **Saturating counter.** The counter saturates at 15 instead of wrapping.
- **TRC chain lengths and watchdog limit.** Both are this design's choices.
- **Model accuracy.** The models are first-order:
  - they have no supply noise, no jitter and no device mismatch;
  - the LDO has no offset between control and rail voltage;
  - the charge pump currents are ideal;
  - process and temperature corners and power are not modelled.
- **Slow lock from below.** Locking after a jump to a higher reference frequency is slow. While
  injection holds a slow ring in place, the detector's UP pulse is only about one stage delay
  wide. Most of the correction comes from the recovery register.
- **Not synthesizable.** The real-valued ports and delays of the models keep `mdll` and
  `clock_generator` from being synthesized. The RTL modules (`mdll_controller` and below, and
  `clock_controller`) are synthesizable.
