# Reconfigurable vector control for a tandem-converter induction motor drive

A vector (field-oriented) controller for an induction motor can change its
whole control structure at run time. The drive here is fed by a *tandem
converter*. A current source inverter (CSI), controlled in current, and a
voltage source inverter (VSI), controlled in voltage, share the load. If the
VSI fails, the CSI has to carry on alone, and it needs a different control
structure to do so. The two structures do not even produce the same kind of
output: one gives current references and the other voltage references. The
state of a PI controller in one structure therefore cannot be handed over to
the other.

The answer is **context switching** ("ping-pong"). Both control structures are
built in hardware and compute on every sample, side by side. A small state
machine decides which one is in charge, and a multiplexer passes on only that
structure's references. At the moment of reconfiguration the incoming
structure's integrators are already charged, because that structure has been
running all along. Nothing needs to be transferred, and the switch takes
effect within one clock.

The RTL is a small library of modules for building such controllers from
16-bit fixed-point parts. Each module can be synthesised on its own. The d and
q components are computed in parallel, and all modules run concurrently.

## Structure

```
                 ref_i, fb_i (d,q)    cos_i, sin_i (flux direction lambda)
                        |                  |
          +-------------+------------------+-------------+
          |                                              |
   vc_structure u_cfg1 (STATE1, tandem)        vc_structure u_cfg2 (STATE2, CSI alone)
     pi_controller d (flux controller)           pi_controller d
     pi_controller q                             pi_controller q
     coot_inv  CooT[D(-lambda)]                  coot_inv
          | ab (stator frame)                          | ab
          +--------------------+   +-------------------+
                               |   |
   reconf_req --> reconfig_fsm --> cfg_mux --> out_valid, ab_o, out_state_o
                     state_o, switch_o
```

| file | what it is |
|---|---|
| `rtl/vc_pkg.sv` | shared types: `sample_t` (16-bit signed), `dq_t`, `ab_t`, `cfg_state_e`, `sat16()` |
| `rtl/pi_controller.sv` | PI controller: the flux controller and the other channel controllers |
| `rtl/coot_inv.sv` | inverse coordinate transformation CooT[D(-lambda)] |
| `rtl/vc_structure.sv` | one configuration: d and q PI controllers in parallel, followed by CooT |
| `rtl/reconfig_fsm.sv` | configuration state machine (STATE1 / STATE2) |
| `rtl/cfg_mux.sv` | configuration multiplexer |
| `rtl/vc_reconfig_top.sv` | top: two structures, the state machine and the multiplexer |

## Number format

Every signal between modules is a 16-bit two's complement word. The position
of a signal's binary point is a scaling the user chooses; the hardware does
not fix it. One workable scaling for a 5.5 kW, 14 A r.m.s., 220 V r.m.s.
motor is 1/256 A per LSB for currents, which covers ±128 A, and 1/8 V per LSB
for voltages, which covers ±4096 V.

Controller gains are 16-bit words as well. Their binary point sits `K_FRAC`
bits from the right, a parameter chosen to suit the motor's parameters. With
`K_FRAC = 12`, the value 4096 means a gain of 1.0.

The flux direction arrives as its unit phasor: `cos_i` and `sin_i` in Q1.15,
where 32767 ≈ +1.0.

## PI controller (`pi_controller`)

On every `in_valid` the controller computes:

```
e      = sat16(ref_i - fb_i)
I      = clamp(I + KI*e, OUT_MIN*2^K_FRAC, OUT_MAX*2^K_FRAC)
y_o    = clamp(floor((KP*e + I) / 2^K_FRAC), OUT_MIN, OUT_MAX)
```

- **Integrator resolution.** The integrator `I` is 48 bits wide and sits on
  the gains' scale. An error too small to move the output by one LSB in a
  single sample is still accumulated.
- **Anti-windup.** The integrator is clamped to the output limits.
- **Flags.** `windup_o` reports that the integrator was clamped on this
  sample. `sat_o` reports that the output was clamped.
- **Rounding.** Right shifts truncate toward minus infinity.
- **Clear and latency.** `clr_i` empties the integrator. The latency is one
  clock, and the controller accepts one sample per clock.

## Inverse coordinate transformation (`coot_inv`)

This module rotates the field-oriented references into the stator frame:

```
sd = d*cos(lambda) - q*sin(lambda)
sq = d*sin(lambda) + q*cos(lambda)
```

- **Datapath.** Four 16×16 multipliers work in parallel. Each sum is shifted
  right by 15 (floor) and saturated to 16 bits.
- **Latency.** One clock.
- **Alignment in `vc_structure`.** The structure delays `cos_i`/`sin_i` by
  one clock. This way the rotation uses the phasor of the same sample that
  produced the controller outputs.

## Reconfiguration (`reconfig_fsm`, `cfg_mux`)

- **After reset:** the state machine starts in `STATE1`, the tandem converter.
- **On a rising edge of `reconf_req`:** it moves to the next configuration,
  `STATE1 → STATE2` or `STATE2 → STATE1`. `state_o` changes one clock after
  the edge, and `switch_o` pulses for that clock.
- **If the request is held high:** there is no further switch. A persistent
  fault signal therefore does not make the state toggle.

`cfg_mux` registers the sample of the selected structure. `out_state_o` tells
which configuration that sample came from. Selection 1 (`STATE1`) is the
tandem converter.

## Top (`vc_reconfig_top`)

| port | dir | meaning |
|---|---|---|
| `sample_en` | in | one control sample |
| `ref_i`, `fb_i` (`dq_t`) | in | d: rotor-flux reference and feedback; q: reference and feedback of the q-channel controller |
| `cos_i`, `sin_i` | in | unit phasor of the rotor-flux direction (Q1.15) |
| `reconf_req` | in | reconfiguration condition, e.g. VSI failure (edge-acting) |
| `out_valid`, `ab_o` (`ab_t`) | out | stator-frame references of the active configuration |
| `state_o`, `switch_o` | out | active configuration; pulse on a change |
| `out_state_o` | out | configuration the current `ab_o` came from |
| `ctrl_valid_o`, `ctrl1_o`, `ctrl2_o` | out | field-oriented outputs of each structure |
| `sat_o[1:0]`, `windup_o[1:0]` | out | output and integrator clamping, per structure |

- **Latency.** `ab_o` follows `sample_en` by three clocks: PI, then CooT,
  then the multiplexer. A new sample may be given on every clock.
- **Assertion.** The two structures' valid flags must always agree.
- **Parameters.** The gains and limits of each structure are parameters
  (`C1_*`, `C2_*`, `K_FRAC`, `TRIG_FRAC`).
- **Default gains.** Configuration 1 uses KP = 1.0 and KI = 0.05.
  Configuration 2 uses KP = 0.5 and KI = 0.02. Both have limits of ±8192
  LSB. These are example values; real ones depend on the motor.

## What is not here, and where this departs from the source design

- **Not built: the inverters, the motor and the flux identifier.** The CSI,
  the VSI and the induction motor are power and electromechanical parts. The
  flux identifier is the block that computes the rotor-flux phasor. The
  source names it but does not give its equations, so it is not built
  either. Its outputs
  (`cos_i`, `sin_i`, the flux feedback) are ports of the top.
- **Generic q channel.** The source describes the two configurations only in
  outline. Both structures are therefore built as the same chain: flux (d) PI, q-channel PI, CooT. They differ only in gains
  and limits.
  - The quantity the q-channel controller regulates is left to the user.
  - Whether a structure's outputs mean current or voltage references is a
    matter of scaling.
  - Any further modules inside the original configurations (for example a
    speed controller) are not included.
- **Only two configurations.** The general scheme allows further
  configurations (STATE3 … STATEn). Only the two-state tandem-converter case
  is built.
- **Own choices.** All cycle timing is this design's own. The source gives
  only FPGA pin delays, not cycle counts. The following are also this
  design's own: error saturation, the rounding mode, clamping anti-windup, the
  48-bit integrator, the unit-phasor input of CooT, the edge-acting request
  and the registered multiplexer.
- **Resource comparison.** No FPGA resource comparison was possible. The
  reference implementation mapped the flux controller onto a small Virtex-II
  device (24 slices). Generic synthesis of `pi_controller` gives 51
  word-level cells and 67 flip-flop bits.

## Verification

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. The testbenches compare the RTL with real-
arithmetic reference models in `tb/vc_ref_pkg.sv`.

| testbench | what it covers |
|---|---|
| `tb_pi_controller` | random samples with gaps, output and integrator clamping, clear, 1-clock latency |
| `tb_coot_inv` | random angles, saturation corner, 1-clock latency |
| `tb_vc_structure` | both channels plus rotation, with different d/q gains |
| `tb_reconfig_fsm` | reset state, both transitions, held request, random requests |
| `tb_cfg_mux` | selection, held data, source tag |
| `tb_vc_reconfig_top` | whole design at default parameters (see below) |
| `tb_reconfig_run` | 1 s run at an assumed 10 kHz sample rate, reconfigured at 0.5 s (below) |

`tb_vc_reconfig_top` runs the whole design at its default parameters in
three phases:

1. A closed loop in STATE1, with a first-order plant and a turning flux phasor.
2. A reconfiguration to STATE2, after which the loop must settle again.
3. Random samples with random requests in both directions.

It also counts the switches, the switches onto already charged integrators,
and the clamping events in each structure. It fails if any of these never
happens.

`tb_reconfig_run` models 1 s of operation at an assumed 10 kHz sample rate,
with the flux phasor turning at 50 Hz. The reconfiguration to STATE2 comes
at 0.5 s. The testbench checks that the switch happens at exactly that
sample, that the loop settles in both states, and that the stator-frame
references keep the magnitude of the field-oriented ones.

To simulate one of them with Verilator (the packages go first):

```
verilator --binary --timing -Irtl -Itb rtl/vc_pkg.sv tb/vc_ref_pkg.sv \
  rtl/pi_controller.sv rtl/coot_inv.sv rtl/vc_structure.sv rtl/reconfig_fsm.sv \
  rtl/cfg_mux.sv rtl/vc_reconfig_top.sv tb/tb_vc_reconfig_top.sv \
  --top-module tb_vc_reconfig_top
./obj_dir/Vtb_vc_reconfig_top
```

Simulation cannot produce x or z here, so every register that is read is
reset.
