# Real-time FPGA model of a grid-connected three-phase inverter

This is synthesizable SystemVerilog for a real-time simulator. It runs a
three-phase, two-level voltage source inverter (VSI) connected to the grid
through an RL filter, together with the digital control that a real inverter
would carry:

- a synchronous-frame PLL;
- a DC-voltage / reactive-power outer loop;
- a current inner loop;
- a sinusoidal PWM modulator.

The simulator advances the power circuit by one 10 µs time step every 500
clock cycles at 50 MHz. It does all arithmetic in IEEE-754 single precision.

The part worth understanding first is how the switches are modelled. Once that
is clear, everything else is a fixed pipeline.

## The switch model: a switch as a constant conductance

Re-factorising a circuit matrix every time an IGBT or diode changes state is
what makes switched circuits expensive to simulate. This design avoids it with
the associated discrete circuit (ADC) model. Every switch and every diode is
modelled in both of its states as one conductance `G` in parallel with a
history current source `J`:

- **ON:** a small inductor `Ls`. Discretised with the trapezoidal rule, this
  gives `i(k) = G·u(k) + J(k)`, where `J(k) = A1on·u(k-1) + A2on·i(k-1)`,
  `G = Δt/2Ls`, `A1on = G` and `A2on = 1`.
- **OFF:** a series `Rs–Cs` branch. This gives `i(k) = G'·u(k) + J(k)`, where
  `J(k) = A1off·u(k-1) + A2off·i(k-1)`, `G' = 2Cs/(2CsRs+Δt)` and
  `A2off = (2CsRs-Δt)/(2CsRs+Δt)`.

`Ls`, `Cs` and `Rs` are chosen so that `G = G'`. A state change then only
changes which `A1`/`A2` pair forms `J`. The circuit's nodal matrix never
changes, so its inverse is computed once by a host and stored as 25 constants.
Each time step then needs only multiply-adds.

The stored `A1off` word already carries its minus sign (`A1off = −G'`). With
that, both states use the same form `J = A1·u + A2·i`, and a single datapath
serves both.

The values built in are:

| Quantity | Value |
|---|---|
| Switch inductance `Ls` | 1 µH |
| Switch capacitance `Cs` | 100 µF |
| Switch resistance `Rs` | 0.15 Ω |
| Conductance `G` | 5 S |
| `A1on` / `A2on` | 5 / 1 |
| `A1off` / `A2off` | −5 / 0.5 |

These values are my own choice. Any set with `Δt/2Ls = 2Cs/(2CsRs+Δt)` works.
The host can rewrite them.

## The circuit and its nodal equations

The circuit has five unknowns: `V = [v0, vLa, vLb, vLc, idc]`.

- `v0` is the positive DC rail. The negative rail is the 0 V reference.
- `vLx` are the leg midpoints, which are the filter input voltages.
- `idc` is the current drawn from the DC source. The source is an extra
  unknown, so the equation `v0 = Vdc` forms the last row.

The devices are indexed 0..5 = S1..S6 (IGBTs) and 6..11 = D1..D6 (the
anti-parallel diodes). Each diode sits across its IGBT with the opposite
polarity.

| Phase | Upper device (v0 → vLx) | Lower device (vLx → 0) |
|---|---|---|
| a | S1 / D1 | S4 / D4 |
| b | S3 / D3 | S6 / D6 |
| c | S5 / D5 | S2 / D2 |

The source vector collects the history currents at each node:

```
I1 = JD1 − JS1 + JD3 − JS3 + JD5 − JS5
I2 = JS1 − JD1 + JD4 − JS4 − iLa(k−1)     (and likewise for phases b and c)
I5 = Vdc
```

The total conductance between two nodes is `Gt = Gs + Gd = 10 S`. With that,
the inverse is small enough to write out:

- `v0 = I5`
- `vLx = Ix/(2Gt) + I5/2`
- `idc = −I1 − (I2+I3+I4)/2 + 1.5·Gt·I5`

The hardware still performs a general 5×5 matrix-vector product
(`node_solver`: 25 multipliers and a 3-level adder tree per row). A host that
changes the switch parameters only has to rewrite the matrix words.

The filter current in the source vector is the one from the previous step,
`iL(k−1)`. The filter equation needs `vL(k)` to produce `iL(k)`. Using the
previous value keeps the order of work free of a loop, at the price of a
one-step delay in the coupling.

The RL filter uses backward Euler:

```
iL(k) = a1·(vL(k) − vg(k)) + a2·iL(k−1)
a1 = Δt/(RΔt+L),  a2 = L/(RΔt+L)
```

The defaults are L = 5 mH and R = 0.1 Ω (my own choice).

## One time step

`vsi_rts_top` starts a step every `STEP_CYCLES` = 500 clocks. Each stage
starts when the one before raises `out_valid`:

| Cycle | Action |
|---|---|
| 0 | `switch_states` latches the IGBT states from the six gate signals. It updates each diode from the previous step: an OFF diode turns ON when its voltage is positive; an ON diode stays ON while its current is positive. The grid voltages `vg` and `Vdc` are sampled. |
| 1 | `adc_history` forms the 12 history currents J (two multiplies and one add per device, 13 cycles). The PLL starts on the sampled grid voltages at the same time. |
| 14 | `node_solver` builds I and computes `V = Ginv·I` (48 cycles). |
| 62 | `device_update` computes `u` and `i = G·u + J` for all 12 devices (20 cycles) and writes them into `hist_ram` for the next step. `rl_filter` computes `iL(k)` in parallel. |
| 82+ | When the filter and the PLL have both finished, `dq_controller` runs (121 cycles). `spwm` then loads the new modulation indices. |

A step takes 240 of its 500 cycles. If a step is still busy when the next one
is due, that step is skipped and the sticky `overrun` output is set. The
reduced-period test drives this case on purpose.

The SPWM carrier runs on the clock, independent of the step. The circuit model
sees the gate signals as they are at the start of each step.

## Number formats and arithmetic units

Every physical quantity is an IEEE-754 binary32 word (`fp32_t`). There are
two arithmetic units, and every block is built from them:

- **`fp_add`:** adds or subtracts with a 7-cycle latency. `add_sub = 1` means
  a+b.
- **`fp_mul`:** multiplies with a 5-cycle latency.

Both round to nearest-even. Both flush subnormal inputs and results to zero.
Overflow gives infinity, and NaN is not produced. Each unit is one
combinational stage followed by pipeline registers, so a synthesis tool with
retiming can spread the logic. The design uses 106 multipliers and about 105
adders.

There are two fixed-point conversions:

- The PLL angle is turned into a 24-bit phase for a 22-iteration CORDIC
  (`sincos_cordic`). Its sine and cosine are accurate to about 5e-6.
- The modulation indices are turned into Q1.15 for comparison with the
  triangular carrier in `spwm`.

## Control: PLL, outer loops, inner loop

**PLL (`pll`).** The grid voltages go through Clarke (amplitude-invariant),
then through Park with the PLL's own angle, using:

- `d = α·cos + β·sin`
- `q = −α·sin + β·cos`

A PI loop filter drives `Uq` to zero. Its output is added to the 628 rad/s
centre frequency to give ω. The angle is integrated as `θ += Δt·ω` and
wrapped into [0, 2π). At lock, `Ud` is the grid amplitude and the d axis lies
on the grid voltage, which the active-power loop needs.

The PI is the discrete trapezoidal form `u(k) = A1·x(k) + A2·x(k−1) + A3·u(k−1)`,
with `A1 = Kp + KiΔt/2`, `A2 = KiΔt/2 − Kp` and `A3 = 1`. It uses Kp = 2.85
and Ki = 1268.35.

**Controller (`dq_controller`).**

1. The filter currents go to dq on the PLL angle.
2. `Q = 1.5·(Uq·id − Ud·iq)`.
3. A DC-voltage PI turns `Vdc − Vdc*` into `id*`.
4. A reactive-power PI turns `Q − Q*` into `iq*`.
5. Proportional current loops with gain `kp_i` turn `id* − id` and
   `iq* − iq` into the dq voltage references.
6. The references go back to abc and are scaled by `kmod = 2/Vdc*` into
   modulation indices.

The Q error is `Q − Q*` rather than `Q* − Q`. A positive `iq` lowers Q in the
expression above, so the other sign would be positive feedback.

The outer and inner gains are my own choice:

| Loop | Gains |
|---|---|
| DC voltage | Kp 0.5, Ki 10 |
| Reactive power | Kp 5e-4, Ki 0.05 |
| Inner current | P 10 |

The controller has no grid-voltage feed-forward, no output limits and no
anti-windup.

**SPWM (`spwm`).** A symmetric triangle carrier with a period of
`CARRIER_PERIOD` = 20000 clocks (2.5 kHz) is compared with the three indices.
This gives the complementary pairs PHA/PLA (S1/S4), PHB/PLB (S3/S6) and
PHC/PLC (S5/S2). There is no dead time.

## Coefficients and the host port

All constants live in `coef_bank`, a 45-word register file. Reset loads the
built-in defaults. A host can overwrite any word through `coef_wr_en`,
`coef_wr_addr[5:0]` and `coef_wr_data`; writes outside the map are ignored.

| Word | Contents |
|---|---|
| 0–4 | `A1on`, `A2on`, `A1off` (negative), `A2off`, `G` |
| 5–6 | RL filter `a1`, `a2` |
| 7–8 | `Δt`, PLL centre frequency ωn |
| 9–11 | PLL PI `A1..A3` |
| 12–14 | DC-voltage PI `A1..A3` |
| 15–17 | reactive-power PI `A1..A3` |
| 18 | inner-loop gain `kp_i` |
| 19 | `kmod` = 2/Vdc* |
| 20 + 5·row + col | inverse nodal matrix, rows and columns in the order v0, vLa, vLb, vLc, idc |

The defaults are the hex literals in `COEF_DEFAULT` in `rtl/vsi_pkg.sv`.

## Top-level interface

| Group | Signals |
|---|---|
| Inputs | `clk` (50 MHz), `rst_n`, `vg[3]` (grid voltages at the filter terminals), `vdc`, `vdc_ref`, `q_ref`, the host port |
| Step outputs | `step_done` (pulse), `overrun` |
| Circuit results | `v_node[5]`, `il[3]`, `u_dev[12]`, `i_dev[12]`, `dev_state[12]` |
| Control results | `theta`, `omega`, `id`, `iq`, `q`, `m[3]` |
| Gate outputs | `pha`, `pla`, `phb`, `plb`, `phc`, `plc` |

The grid and the DC source are not part of the model. Their voltages are
inputs, sampled at each step start. A testbench or a surrounding system
closes those loops.

## Choices made beyond the source description

This list is for judging the design. The published description of this
simulator gives the switch model, the nodal equations, the filter equation,
the PI form, the PLL structure, the control structure, the 10 µs step, the
50 MHz clock, Kp, Ki, ωn = 628 rad/s and Vdc = 380 V. Everything below is my
own choice:

- **Circuit values:** the switch and filter values above.
- **Controller gains:** the outer and inner gains above.
- **Carrier and dead time:** a 2.5 kHz carrier and no dead time.
- **Diode rule:** the diode switching rule described under "One time step".
- **Filter current timing:** `iL(k−1)` is used in the nodal source vector.
- **PLL error:** the loop filter acts on `Uq`, with the d axis aligned with
  the grid. The original block diagram labels the detector error as a d-axis
  quantity.
- **Q-loop sign:** `Q − Q*`, as explained under the controller.
- **Sine and cosine:** a CORDIC.
- **Angle integration:** a forward rectangle, with wrap by subtracting 2π.
- **Modulation scaling:** `2/Vdc*`, with no feed-forward.
- **Coefficient memory:** one register file with a host write port. The
  description spreads these constants over several on-chip memories.
- **Parallelism:** twelve device lanes in parallel. The amount of parallel
  hardware is not specified.

**Known limitation of the control.** The intended operating point is a
250 V phase amplitude against a 380 V DC link. A two-level SPWM inverter
cannot reach that in its linear range, because it needs `Vdc ≥ 500 V`. In the
end-to-end run the modulation indices therefore sit well beyond ±1 (up to
about ±10), and the DC voltage and Q are only loosely regulated. The circuit
model and the PLL are unaffected and are checked exactly. Treat the outer and
inner gains as placeholders to be tuned for a real operating point.

## Verification

Each block in `rtl/` has a self-checking testbench `tb/tb_<block>.sv`. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog. They compare against
real-valued models (`tb/tb_fp_pkg.sv` has the float helpers):

- **Arithmetic:** random and edge-case operands for the float units.
- **Blocks:** the equations above for each block.
- **PLL:** lock within 2e-3 in frequency and 0.02 rad in phase.
- **Modulator:** gate timing against the carrier.

`tb_vsi_rts_top` runs the whole design at its default parameters for 5000
steps (50 ms) against a 250 V, 628 rad/s grid:

- **Test circuit:** the grid neutral is taken at the DC-link midpoint. The DC
  link is a 2 mF capacitor fed by 20 A.
- **Per-step check:** every step is compared with a double-precision model of
  the inverter, fed with the simulator's own previous results. The model
  covers device states, history currents, nodal solution, device currents
  and filter currents.
- **Timing, lock and bounds:** the run checks the 500-cycle step period and the
  absence of overrun, PLL lock, and bounded controller outputs.
- **Mechanisms:** it counts IGBT switchings, diode turn-on and turn-off,
  angle wrap-arounds and a host coefficient write, and fails if any of them
  never happens.

`tb_vsi_rts_overrun` shortens the step period to force and detect overruns.

One run passed all 2.69 million checks. The mechanism counts were 161 IGBT
switchings, 76 diode turn-ons, 73 diode turn-offs, 4 angle wraps and 1 host
write.

## Simulating with Verilator

Each testbench is a top of its own. The package files must come first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/vsi_pkg.sv tb/tb_fp_pkg.sv $(ls rtl/*.sv | grep -v vsi_pkg) \
    tb/tb_vsi_rts_top.sv --top tb_vsi_rts_top -Mdir obj
./obj/Vtb_vsi_rts_top
```

Replace `tb_vsi_rts_top` with any other `tb/tb_*.sv` to run that block's test.
The full-size run takes about 8 s of simulation time on a desktop machine. The
end-to-end testbench prints a state line every 1000 steps: Vdc, θ, grid angle, ω, vLa, iLa, id,
iq, Q and ma.

## File map

| Files | Contents |
|---|---|
| `rtl/vsi_pkg.sv` | types, constants, coefficient record and defaults |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv` | float units |
| `rtl/delay_line.sv` | pipeline alignment |
| `rtl/coef_bank.sv`, `rtl/hist_ram.sv`, `rtl/switch_states.sv` | storage and states |
| `rtl/adc_current_pe.sv`, `rtl/adc_history.sv`, `rtl/node_solver.sv`, `rtl/device_update.sv` | switch and circuit model |
| `rtl/rl_filter.sv` | filter |
| `rtl/clarke.sv`, `rtl/park.sv`, `rtl/dq_to_abc.sv`, `rtl/pi_ctrl.sv`, `rtl/sincos_cordic.sv`, `rtl/pll.sv`, `rtl/dq_controller.sv` | control |
| `rtl/spwm.sv` | modulator |
| `rtl/vsi_rts_top.sv` | top and step sequencer |
