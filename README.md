# FPGA emulator for a modular multilevel converter with integrated batteries

A modular multilevel converter (MMC) has three phase legs, each split into an upper arm
(p1, p2, p3) and a lower arm (n1, n2, n3). Every arm is a chain of 20 submodules. In this
converter each submodule is a *power electronic storage block* (PESB): a full bridge in front
of a 14s14p lithium-ion battery module (51.8 V, 65 Ah), 120 modules and 100 kW in all.

Testing the converter's control and battery management on real hardware is slow and risky.
This RTL instead emulates the converter and its batteries in real time on an FPGA, so that
an unmodified controller can be run against it in closed loop. Two ideas carry the design:

* **The converter is a small linear system.** An averaged state-space model,
  `x(n+1) = A x + B u + F z`, `y = C x`, stepped at 10 MHz, turns the six arm reference
  voltages from the controller into six arm currents and three AC currents.
* **Battery modules are many but alike.** Modules share one set of look-up tables (LUTs) and
  one datapath, and are computed one after another. Only the integrators, which hold the state
  of each individual cell, are replicated. Twenty modules then cost about the same block RAM
  as one and update at 500 kHz each, still 62.5 updates per 8 kHz PWM period.

Everything runs on one 100 MHz clock with enable strobes.

## Block overview

| File | Role |
|---|---|
| `rtl/hil_top.sv` | The emulator: converter model, batteries of all six arms, PWM, extended PESB, in-arm SoC balancing |
| `rtl/mmc_statespace.sv` | State-space converter model, 10 MHz step |
| `rtl/battery_arm.sv` | Serializer, shared battery module model and deserializer for the modules of one arm |
| `rtl/pesb_serializer.sv`, `rtl/pesb_deserializer.sv` | Vector-to-stream and stream-to-vector conversion |
| `rtl/battery_module_model.sv` | Scales a cell up to a module: `I_cell = I/Np`, `U = Ns*U_cell - R_bat*I` |
| `rtl/battery_cell_model.sv` | 1RC equivalent-circuit cell: LUT interpolation, Coulomb counting, per-module integrators |
| `rtl/lut_index_calc.sv` | One index calculation shared by all tables |
| `rtl/cell_lut_mem.sv` | One block-RAM table, multi-dimensional data stored flat |
| `rtl/pesb_cap_bms.sv` | PESB with a buffer capacitor and a BMS disconnect switch |
| `rtl/pwm_modulator.sv` | 8 kHz carrier PWM for the full bridges |
| `rtl/soc_balancer.sv`, `rtl/seq_div.sv` | PI-based SoC balancing inside an arm, with its sequential divider |
| `rtl/hil_pkg.sv` | Types, number formats, grid definition and default table contents |

## How the emulator is wired (`hil_top`)

```
 u_arm_ref[6], z_grid[4] ──► mmc_statespace ──► i_arm[6], i_ac[3]
                                   │ i_arm[0]                 │ i_arm[1..5]
  duty_p1 ─► pwm_modulator ─► s_m ─┤                          │ × duty_avg
                                   ▼ s_m·i_arm (or d_m·i_arm)  ▼
              [PESB 1: pesb_cap_bms]                 battery_arm (5 channels,
              battery_arm (20 channels, arm p1)      one averaged module per arm)
                      │ U_PESB, SoC                        │ U, SoC
                      ▼                                    ▼
              soc_balancer (20 PESBs)              5 × soc_balancer (1 module)
                      └──── duty_p1 ───► PWM        └──── duty_avg
```

* Arm p1 models all of its 20 modules individually. The other five arms are each
  represented by one averaged module, and all 20 of its PESBs are taken to behave alike.
* With `pwm_en = 1` a module's current is the arm current times its switching state
  (+1, 0 or -1). With `pwm_en = 0` it is the arm current times the module's duty cycle
  (averaged operation).
* With `cap_en = 1`, PESB 1 of arm p1 is extended by the capacitor and BMS model. That
  model then decides how much of the PESB current the battery carries.
* The converter model is driven by `u_arm_ref` directly, as in an averaged model. The
  battery voltages act on the loop only through the controller's duty cycles.
* Timebases: converter step every 10 clocks, battery frame every 200 clocks, PWM period of
  12 500 clocks. The balancers run once per PWM period.
* Not built:
  * the controller link (a serial transceiver);
  * the processor with its configuration and monitoring software;
  * the operator interface;
  * the balancing *between* arms.

  Their signals are plain ports of `hil_top`: the reference voltages come in, coefficient and
  table writes come in, initial states come in, and all results go out.

Sign conventions: battery module currents are positive when **discharging**. Arm currents
are positive towards the AC grid. `pesb_cap_bms` counts currents *into* the PESB (charging
positive), and the top negates at its ports.

## The battery cell model in detail

This is the most involved block. Each cell is modelled as

```
U_cell  = U_OCV(T,SoC) - R_i(T,I,SoC)·I - U_p
dU_p/dt = (R_p(T,I,SoC)·I - U_p) / tau(T,I,SoC)       (R_p‖C_p, forward Euler)
dSoC/dt = -eta(T, sign I)·I / Q                       (Coulomb counting)
```

Tables: OCV is 2D (temperature, SoC). `R_i` and the polarization pair `{R_p, 1/tau}` are 3D
(temperature, current, SoC). The charge and discharge efficiencies are two 1D tables over
temperature.

**Index calculation, once for all tables.** `lut_index_calc` finds the lower breakpoint and
the fraction on each axis. It then produces, in one step, the flat addresses of all adjacent
entries: 8 for the 3D tables, 4 for the 2D table and 2 for the 1D table. For a 3D table the
flat address is `a = (it*NI + ii)*NS + is`, and corner `k` raises the temperature index by
`k[2]`, the current index by `k[1]` and the SoC index by `k[0]`. Points outside the grid are
clamped to its edge.

**Interpolation by eight sequential reads.** Each table sits in its own block RAM with a
synchronous read. In clock `k` of an 8-clock slot the datapath reads corner `k` of every
table. The trilinear weight `w_k` is the product of `f` or `1-f` on each axis; it travels one
clock behind with the read and is multiplied into an accumulator. The 2D OCV table uses only
the reads with `k[1] = 0` (weight `w_T·w_SoC`). The 1D efficiency table uses only `k[1:0] = 0`
(weight `w_T`), and the sign of the current picks the charge or the discharge half. Eight
reads per cell limit the cell rate to 100 MHz / 8 = 12.5 MHz.

**Three-stage pipeline, one channel per slot.**

| Slot | Stage |
|---|---|
| 1 | capture channel, current, temperature and current SoC; index calculation |
| 2 | 8 table reads, multiply-accumulate |
| 3 | `R_i·I`, `eta·I`, `R_p·I`, `ts/tau` → `U_cell`, `ΔSoC`, `ΔU_p` → write back integrators |

A new channel enters every 8 clocks (`in_ready` is high in the last clock of a slot). Its
result appears 20 clocks after it was accepted. The SoC and `U_p` integrators are arrays with
one entry per channel. With fewer than 3 channels, the SoC used to address the tables can be
one update old; the SoC integrator itself always uses the current value. `init` loads the
initial SoCs, clears `U_p` and drops the channels still in the pipeline.

**Per-module constants.** `k_soc[ch] = ts / (3600·Q_cell)` is an input per channel, so
modules of different capacity (state of health) can share the tables. `ts` is the update
period of one channel: 2 µs at the 500 kHz frame rate.

**Module scaling.** `battery_module_model` feeds `I_PESB/14` into the cell. It outputs
`14·U_cell - R_bat·I_PESB`, with the module current carried through the pipeline as side
data.

## Serialized modules and frame timing (`battery_arm`)

On `start` the serializer captures the current and temperature vectors of all `NCH` modules.
It streams them into the module model in index order, one per slot. The deserializer writes
each result into the output vectors and pulses `frame_done` after the last one. `frame_done`
follows `start` by `8·NCH+15` to `8·NCH+22` clocks; the spread comes from where in the 8-clock
slot the start falls. For 20 modules that is at most 182 clocks, inside the 200-clock frame. A
`start` during a running frame is refused and counted in `overrun`.

## Converter model (`mmc_statespace`)

The matrices A (6×6), B (6×6), F (6×4) and C (3×6) are registers loaded through
`cfg_we/cfg_sel/cfg_row/cfg_col/cfg_data`. Their format is Q8.24. They depend on the
converter's inductances, resistances and sample time, and none are built in.

* The state vector is output directly as the arm currents. Any transformation between
  physical and state variables must be folded into the matrices.
* `z` holds the three AC phase voltages and the DC voltage.
* Schedule: inputs are sampled in the `step_tick` clock. One row of `[A B F]` is evaluated per
  clock with 16 parallel multipliers, then `x` is committed and `y = C·x` is formed. Outputs
  change with `out_valid` 9 clocks after the tick.

## Extended PESB (`pesb_cap_bms`)

The PESB has two branches between its terminals. One is a capacitor `C` (6 mF) with a
parallel leakage resistance `R_p`, in series with `R_s`. The other is the BMS switch, `R_bat`
and the battery. With `u_c` the capacitor voltage:

```
I_bat = (u_c + R_s·I_PESB - U_bat)/(R_bat + R_s)   (switch closed)
I_C   = I_PESB - I_bat
U_PESB = u_c + R_s·I_C
u_c  += Ts/C·(I_C - u_c/R_p)
```

`U_bat` is the battery model output of the previous frame. `R_bat` of that module is set to
zero in the module model, because `pesb_cap_bms` already contains it.

The BMS opens the switch on overcurrent (`|I_bat| > i_max`), overvoltage or undervoltage. The
switch stays open until `clear_fault`, and `cause` reports the reason. While the PESB is
bypassed, the battery recharges the capacitor, so the capacitor buffers the current pulses
that the battery sees.

## SoC balancing (`soc_balancer`)

For each PESB `m` of an arm:

```
d_m = (u_arm_ref/N) · (1 - PI(SoC_avg - SoC_m)) / U_PESB,m
```

A module above the arm's mean SoC gets a larger share of the arm voltage, so it discharges
faster. The formula holds for power flowing into the AC grid; in other cases the signs must
be switched, and this RTL does not do that.

* Gains `kp`, `ki = Ki·Ts` and the integrator limit `pi_lim` are inputs.
* The modules are processed serially, 52 clocks each; most of that is the 48-step division.
* With `NCH = 1`, used for the averaged arms, the PI term is zero and the block divides the
  arm voltage evenly.

In the original setup this control is software on the controller under test. It is included
here so that the loop can be closed inside one simulation.

## Number formats

Most signals are signed Q16.16 (`hil_pkg::fix_t`, 32 bit): volts, amperes, °C, ohms, and SoC
and duty cycles with 1.0 = 65536. The integrators need more fraction bits:

| Quantity | Format | Reason |
|---|---|---|
| SoC state, `U_p` state | 64 bit, 48 fraction bits | per-step SoC changes are ~1e-10 |
| capacitor voltage | Q32.32 | — |
| `ts`, `k_soc` | unsigned Q0.48 in 32 bits | `ts` must stay below 15 µs |
| `Ts/C`, `1/R_p` | unsigned Q0.32 | — |
| converter coefficients | Q8.24 | — |

## Table contents

The real tables are measured data and are not part of this RTL. `hil_pkg::lut_default` fills
the memories with a synthetic 4.64 Ah cell (one of the 14 parallel cells of a 65 Ah module):

* OCV 3.2 to 4.1 V
* `R_i` of 20 to 45 mΩ
* `R_p` about 15 mΩ
* `tau` about 20 s
* 98 % charging efficiency

The tables are chosen multilinear in each axis, so interpolation reproduces them exactly,
which the testbenches use. The grid is 4 temperatures (-10 to 50 °C) × 5 cell currents
(-20 to 20 A) × 11 SoC points. Load measured tables at run time through `lut_we/lut_sel/
lut_addr/lut_wdata`:

| `lut_sel` | Table | Word layout |
|---|---|---|
| 0 | OCV | Q16.16 volts |
| 1 | `R_i` | Q16.16 ohms |
| 2 | polarization | `{R_p, 1/tau}`, both Q16.16 |
| 3 | efficiency | discharge table in words 0..3, charge table in 4..7 |

## Where this RTL departs from the original setup

* **Generated code.** The original models were generated from a graphical model into VHDL.
  This is a hand-written datapath with its own number formats, pipeline and handshakes.
* **Latencies.** The converter model outputs 90 ns after sampling, where the original
  reports 2.6 µs. A cell result takes 200 ns, where the original reports 270 ns.
* **Table edges.** Tables are clamped at the grid edge, not extrapolated.
* **RC branches.** Only the first-order (1RC) cell model is built. A second RC branch would
  need one more table, one more integrator array and one more subtraction.
* **BMS.** It trips only on the three named conditions.
* **Output equation.** The converter model has no `D` matrix, because `D` is all zeros in
  the original converter model.
* **Switching states.** A converter controller would normally pick which PESBs of an arm are
  active with a sorting algorithm, plus PWM on top of that. Here each PESB gets its own carrier
  PWM from its duty cycle, with all carriers in phase. The duty cycles come from the built-in
  balancer, not from outside.
* **Not included:**
  * balancing between arms, and a controller that produces `u_arm_ref`;
  * the sorting algorithm;
  * a PESB that is only a capacitor with no battery;
  * logging of fast signals to a host;
  * the converter matrices;
  * the measured battery tables;
  * the transceiver link, processor interface and monitoring.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* **Cell, module and arm** (`tb_battery_cell_model`, `tb_battery_module_model`,
  `tb_battery_arm`): compared sample by sample with a floating-point model
  (`tb/tb_ref_pkg.sv`). The reference evaluates the cell equations directly at the operating
  point, with no tables. Also checked: the 8-clock initiation interval, the 20-clock latency
  and the 500 kHz frame budget.
* **Converter model**: checked against a floating-point state-space model with random inputs.
  The step period and latency are checked too.
* **PESB extension**: checked against a floating-point circuit model, including all three
  BMS trips.
* **PWM and balancer**: checked against their formulas.
* **`tb_hil_top`**: runs the whole emulator at its default size for 1 ms of emulated time,
  with decoupled R-L arms in the converter matrices and sped-up SoC integration. It counts
  each mechanism: PWM active and bypassed states, averaged mode, control rounds, capacitor
  recharge, BMS trip and clear, table reload, balancing and SoC drop. It fails if any of them
  never happens.

Simulate a testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/hil_pkg.sv tb/tb_ref_pkg.sv tb/tb_hil_top.sv --top-module tb_hil_top -o sim
./obj_dir/sim
```

The same command works with any other `tb_*` module in place of `tb_hil_top`. The full-size
top-level run takes about 10 s.
