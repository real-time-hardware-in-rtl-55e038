# Real-time FPGA models of a buck converter and a three-phase inverter

A hardware-in-the-loop (HIL) simulator replaces a power converter with a model that runs in real time. The controller under test sends its gate signals to an FPGA, not to real switches. The FPGA computes the converter's currents and voltages fast enough to feed them back through analog outputs as if they had been measured. The method here is deliberately plain:

- write the converter's differential equations for each switching state;
- discretise them with forward Euler, `y(k+1) = y(k) + h * f(y(k))`;
- evaluate them in fixed point in a short pipeline that finishes one time step every few clocks.

The key idea is that **the time step `h` is the loop's clock count**. The buck model here closes one Euler step every 6 clocks, so at 40 MHz it integrates with `h = 150 ns`. The constants `h/L` and `h/C` that the host loads must be computed for exactly that `h`.

The RTL contains two independent models that sit side by side in `hil_top`:

| model | state | step | clocks per step at 40 MHz |
|---|---|---|---|
| buck converter (switch with R_DS(on), diode with forward drop, RL inductor, capacitor with ESR, resistive load) | `iL`, `vC` | 150 ns | 6 |
| three-phase voltage source inverter with a star-connected RL load | `i_a`, `i_b`, `i_c` | 750 ns | 30 |

Both models have helpers around them:

- a loop-rate meter;
- a DAC output stage;
- synchronizers for the external gate signals;
- for the buck, an on-chip PWM generator that can stand in for the controller.

## Structure

```
                 pwm_gen ──pwm_out──┐
 pwm_ext_async ─ din_sync ──────────┤ pwm_src_ext
                                    ▼
 buck_prm, buck_init ─► buck_hil_core ──► buck_state / buck_res ──► dac_output (0.5·vo, iL) ─► buck_ao*
                        ├ hil_step_timer (go every 6 clocks)
                        └ buck_model_pipe (Euler step, 5 pipeline registers)
                        go ─► loop_rate_meter ─► buck_loop_rate

 vsi_sw_async ─ din_sync ─► vsi_hil_core ──► vsi_state ──► dac_output (i_a, i_b) ─► vsi_ao*
                            ├ hil_step_timer (go every 30 clocks)
                            └ vsi_model_pipe (Euler step, 3 pipeline registers)
                            go ─► loop_rate_meter ─► vsi_loop_rate
```

All files are in `rtl/`, one module or package per file. `hil_fxp_pkg` holds the fixed-point types, the parameter and state structs and `fx_fit()`, the resize function used after every operator.

## Fixed-point convention

Formats are written `<sign, word length, integer bits>`. The integer bits include the sign.

| format | type | fraction bits | used for |
|---|---|---|---|
| `<+/-,32,6>` | `s32_6_t` | 26 | iL, Vs, -Vd, differences, ic |
| `<+,32,6>` | `u32_6_t` | 26 | vC, h/L, 1/R |
| `<+,32,5>` | `u32_5_t` | 27 | vo, io, h/C, R/(R+ESR) |
| `<+,32,3>` | `u32_3_t` | 29 | RL, RDS(on), ESR |
| `<+/-,33,7>` | `s33_7_t` | 26 | clamped iL |
| `<+/-,32,10>` | `s32_10_t` | 22 | VSI currents and voltages, VDC |
| `<+,32,2>` | `u32_2_t` | 30 | VSI h/L |
| `<+,32,8>` | `u32_8_t` | 24 | VSI load resistance |

A real value `x` is loaded as `floor(x * 2^fraction_bits)`. For example, `h/L = 3e-4` in `<+,32,6>` is `floor(3e-4 * 2^26) = 20132`. Every operator result is truncated toward minus infinity to its format and saturated at the format's limits. An unsigned result saturates at zero.

## The buck converter step (`buck_model_pipe`)

### Equations

With the inductor current clamped at zero first, `iLc = max(iL, 0)`:

```
vo   = R/(R+ESR) * (iLc*ESR + vC)
io   = vo * (1/R)
ic   = iLc - io
vL   = Vsel - iLc*Rsel - vo          switch on : Vsel = Vs,  Rsel = RL + RDS(on)
                                     switch off: Vsel = -Vd, Rsel = RL
iL(k+1) = iLc + (h/L) * vL
vC(k+1) = vC  + (h/C) * ic           (saturates at 0)
```

These equations cover all three switching states of the converter:

- **Switch on** (`pwm = 1`): the input source drives the inductor through the switch and the inductor resistance.
- **Switch off, diode conducting** (`pwm = 0`, `iL > 0`): the inductor current freewheels through the diode. The diode is modelled as a fixed forward drop `Vd`.
- **Discontinuous conduction** (`pwm = 0`, `iL <= 0`): the clamp makes `iLc = 0`. The output voltage is then `vC*R/(R+ESR)`, and the capacitor discharges into the load.

In that third state the computed `iL(k+1)` comes out slightly negative. It is passed on as it is, and the next step clamps it again. No reverse current ever reaches the capacitor or output equations. `out_mode` reports which of the three states a step used.

### Pipeline and timing

| cycle | work | registered into |
|---|---|---|
| 0 | clamp iL; select Vsel and Rsel by `pwm`; `a = Vsel - iLc*Rsel`; `iLc*ESR` | stage 1 |
| 1 | `iLc*ESR + vC` | stage 2 |
| 2 | `vo = R/(R+ESR) * (...)` | stage 3 |
| 3 | `io = vo/R`; `vL = a - vo` | stage 4 |
| 4 | `ic = iLc - io`; `(h/L)*vL` | stage 5 |
| 5 | `(h/C)*ic + vC`; `iLc + (h/L)*vL` | the caller's state register |

`out_valid` rises 5 clocks after `in_valid`. The last stage is combinational so that the state register in `buck_hil_core` is the sixth register of the loop. A step that starts in cycle 0 therefore has its result in the state at the end of cycle 5, and the next step can start in cycle 6.

The pipeline accepts a new input every clock, so it can also evaluate independent operating points back to back. A single converter cannot use this, because each step needs the previous step's result. The converter constants in `prm` are read at several stages and must be held steady while steps are in flight.

### The loop (`buck_hil_core`)

`buck_hil_core` works as follows:

- `load_init` copies the initial `iL` and `vC` into the state registers.
- While `run` is high, `hil_step_timer` pulses `go` every `STEP_CYCLES` clocks (default 6). Each pulse starts a step with the current state and the current `pwm` value.
- When the step leaves the pipeline, the new `iL` and `vC` are written back. All results of the step (`iL(k+1)`, `vC(k+1)`, `vo(k)`, `io(k)`, `ic(k)`) are latched on `res`, and `step_done` pulses.

`STEP_CYCLES` may be raised to run a longer time step, but not below 6; an elaboration check enforces this. An assertion checks that a step never starts while another is finishing.

### Host constants for the measured converter

The constants below give the steady state checked in the testbenches (`h = 150 ns`):

| input | value |
|---|---|
| RL | 0.75 Ω |
| RDS(on) | 0.04 Ω |
| ESR | 2 Ω |
| Vs | 24 V |
| -Vd | -0.1 V |
| h/L | 150 ns / 500 µH = 3e-4 |
| h/C | 150 ns / 10 µF = 0.015 |
| 1/R | 0.095 S |
| R/(R+ESR) | 0.8403 |

With a 50 % PWM at 40 kHz (period 1000 clocks, duty 500), the average output voltage settles at 11.135 V. This matches the averaged circuit equations, `vo = (D*Vs - (1-D)*Vd) / (1 + (RL + D*RDS)/R)`.

## The three-phase inverter step (`vsi_model_pipe`, `vsi_hil_core`)

The switches are ideal and the inductor resistance is neglected. Each upper switch command `sx` puts `sx*VDC` on its leg, measured from the negative rail. The load neutral sits at the common-mode voltage `(s1+s2+s3)*VDC/3`. The phase voltage is therefore

```
v_xn = (3*sx - (s1+s2+s3)) * VDC/3          ∈ {0, ±VDC/3, ±2VDC/3}
i_x(k+1) = i_x + (h/L) * (v_xn - R*i_x)
```

The eight switch vectors V0 to V7 give the familiar table. For example, vector V1 (`s = 100`) gives `v_an = 2VDC/3` and `v_bn = v_cn = -VDC/3`.

The datapath works in four cycles. `VDC/3` and the three `R*i_x` products are formed first, then the phase voltages and inductor voltages, then the `h/L` products, and finally the currents are added. It could close a step every 4 clocks. `vsi_hil_core` paces it at `STEP_CYCLES = 30` (750 ns), the step at which this inverter model is meant to run. Set `h/L` for that step: 750 ns / 7 mH = 1.071e-4. The phase voltages of each step are reported on `v_ph`, and the vector used on `last_sw`.

## Support blocks

- **`hil_step_timer`**: a counter that pulses `go` every `STEP_CYCLES` clocks while `run` is high. The first pulse comes in the first cycle of `run`.
- **`loop_rate_meter`**: a free-running 32-bit tick counter. At every `go` it reports the ticks since the previous `go` on `loop_rate`. It reads 6 for the buck loop and 30 for the inverter. The first reading after a pause covers the pause.
- **`pwm_gen`**: a 16-bit counter that wraps after `period-1`. The output is high while the count is below `duty`, registered one clock late. `load` sets the count to `counter_init`, which sets the carrier phase. With period 1000 and duty 500 it gives 40 kHz at 50 %.
- **`dac_output`**: every `sample_time × TICKS_PER_UNIT` clocks (1 µs units at 40 MHz by default), it latches `GAIN0*ch0` and `GAIN1*ch1` on `ao0`/`ao1` and pulses `ao_strobe`. For the buck, `ch0` is `vo` with gain 0.5, so that a 12 V output stays inside the analog output's full-scale range, and `ch1` is `iL(k+1)`. For the inverter, `i_a` and `i_b` are sent with gain 1. The analog-output module that turns the words into volts is outside this RTL.
- **`din_sync`**: a two-flop synchronizer for the external gate lines. It adds 2 clocks (50 ns) of delay ahead of the model.

## Top level (`hil_top`)

The ports are plain signals and packed structs from `hil_fxp_pkg`. They fall into two groups:

- **Controls** (set by a host processor): `buck_prm`, `buck_init`, `buck_load_init`, `buck_run`, the PWM controls, the DAC sample times, and the corresponding `vsi_*` inputs.
- **Indicators** (read back by the host): states, results, switching state, loop rates and the analog-output words.

`pwm_src_ext` chooses what drives the buck model's switch:

- `0`: the on-chip PWM, which is also driven out on `pwm_out`;
- `1`: the external line `pwm_ext_async`.

The inverter always takes its three gate signals from `vsi_sw_async`.

The top has no parameters. Its defaults are the sizes described above.

## Verification

Each block has a self-checking testbench in `tb/`. Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog. `tb/hil_tb_pkg.sv` holds double-precision reference models of both Euler steps, written straight from the equations above. It also has real/fixed-point conversion helpers.

| testbench | what it establishes |
|---|---|
| `tb_buck_model_pipe` | 400 random operating points streamed one per clock, including negative iL; all five outputs within 2e-6 of the double-precision step; the switching state; 5-clock latency; one result per clock |
| `tb_buck_hil_core` | 45,000 steps: from rest to steady state at 10.5 Ω, then discontinuous conduction at 200 Ω. Checks a step every 6 clocks, each write-back against the reference step, a free-running double model within 5e-3 (4.5e-5 observed), average vo 11.135 V, all three switching states, `load_init` |
| `tb_vsi_model_pipe` | random currents and all eight vectors; phase voltages against the vector table; currents against the reference; 3-clock latency |
| `tb_vsi_hil_core` | sinusoidal PWM (10 kHz carrier, 60 Hz) at modulation index 0.5 then 0.9. Checks a step every 30 clocks, each step against the reference, currents summing to zero, fundamental amplitude of i_a within 3 % of the phasor solution (1.779/3.208 A against 1.781/3.205 A) |
| `tb_pwm_gen`, `tb_loop_rate_meter`, `tb_dac_output`, `tb_din_sync` | on-time and period, reported tick spacing, 0.5 gain and 1 µs spacing, two-clock delay |
| `tb_hil_top` | both models at once at the default sizes, about 2.7 million clocks. Buck: on-chip PWM to steady state, then external 25 % PWM through the synchronizer with a light load (discontinuous conduction); the model sees the switch on in 25.0 % of steps. Inverter: modulation index step 0.5 → 0.9. Also checks loop rates of 6 and 30, DAC channel contents and spacing, and every mechanism counted at least once |

Running a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl +libext+.sv \
    rtl/hil_fxp_pkg.sv tb/hil_tb_pkg.sv tb/tb_hil_top.sv \
    --top-module tb_hil_top --Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_hil_top` with any other testbench name. The end-to-end run takes about 20 s, and the others a few seconds or less. Lint a module with `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/hil_fxp_pkg.sv rtl/<module>.sv`. The remaining lint warnings are:

- unused package constants;
- the unused PWM carrier count in `hil_top`.

## Where this RTL departs from, or goes beyond, the published method

The published implementation was built graphically in LabVIEW FPGA. Its buck step is given as a dataflow graph with a printed fixed-point format on every operator. This RTL follows that graph's operator order and formats. The points below are its own choices or readings:

- **Register placement.** The published graph has six registers on the capacitor-voltage path, with the last adder after them. Here there are five pipeline registers, and the `(h/C)*ic + vC` multiply-add shares the last cycle with the state register. That makes the iteration exactly the reported 6 clocks (150 ns at 40 MHz).
- **Third switching state.** The published FPGA graph handles the third state with a `<= 0` clamp on iL, and this RTL follows it. The published off-line simulation instead forces `iL(k+1) = 0`, and its flow chart labels the branches of the `iL <= 0` test the other way round from the text; neither of those was followed.
- **Rounding.** The rounding and overflow rule (truncate, saturate) is assumed; it is not specified. The formats of `Vs` and `-Vd` are not printed and are taken as `<+/-,32,6>`.
- **Host-supplied R/(R+ESR).** `R/(R+ESR)` is a host-supplied input, like `h/L` and `h/C`. The host must recompute it whenever the load changes.
- **Diode drop.** The measured diode drop is 0.1 V, and the testbenches use it. Some published run settings show `-Vd = 0`. The RTL takes `-Vd` as an input, so either can be loaded.
- **Inverter datapath.** Only the inverter's equations and step time are published. Its datapath, stage split and fixed-point formats here are this design's own. The load voltage is taken as `R*i` of the resistive load.
- **PWM generator.** Only its name and its Duty/Period/Counter controls are published. Its counting rule is assumed: one count per clock, high while the count is below the duty.
- **DAC sample time.** The unit of the sample time is assumed to be 1 µs. The inverter's analog outputs (i_a, i_b, gain 1) are this design's choice.
- **Digital inputs.** In the published system, digital inputs were read through the I/O module's own interface. The synchronizer and the on-chip/external PWM selection are this design's.
- **Not included.** The DAC's conversion to volts (and its roughly 4 µs conversion delay), the digital-I/O module and the host user interface are commercial parts. They are not included; their signals are top-level ports.

## How far to trust it

Both models match double-precision Euler steps to within a few fixed-point LSBs per step, and they stay within 1e-4 of free-running double-precision models over tens of thousands of steps. The buck model reproduces the averaged steady-state output voltage to 20 µV. The inverter model reproduces the phasor-predicted fundamental current within 0.2 %.

The RTL has not been compared against a physical converter. Forward Euler is only as accurate as `h` is small against the circuit's time constants. `h` is 150 ns against an LC period of about 440 µs for the buck converter, and 750 ns against L/R = 200 µs for the inverter, so both are comfortable.

The design has not been synthesized for a particular FPGA. The 32×32 and 33×32 multipliers in the buck pipeline each sit alone in a cycle, except in the first and last stages, which chain one multiplier and one adder. Whether that meets 40 MHz depends on the target.
