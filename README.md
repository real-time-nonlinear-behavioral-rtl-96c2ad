# Real-time IGBT emulation: ANN device model, electro-thermal network, converter control

A device-level IGBT model normally uses a nonlinear behavioural circuit model:
a 5-node admittance matrix with voltage-dependent capacitors, a three-region
channel current and a tail current. It is solved by Newton iteration and a
matrix inversion at every time step, which is too slow for real time. This
design instead uses a small neural network for the switching transient. It
takes five numbers describing a switching event: the voltage and the current
at its start and at its end, and the gate signal. One pass of an
8-32-80 multilayer perceptron then gives the 80 outputs of the trained model,
with no iteration. Next to it sit the electro-thermal network that turns the
device's power loss into junction temperature, and the dq control of the
grid-side converter from the system-level case study (a 2-level VSC feeding
four DC loads, 5 µs time step).

All arithmetic is signed fixed point. The network this RTL is modelled on ran
in single-precision floating point on vector processors. Trained weights must
be quantised to the formats below before they are loaded.

## Blocks

| module | role |
|---|---|
| `igbt_emu_top` | top: the three engines side by side |
| `minmax_norm` | scales the 5 raw inputs to (−1, 1) and pads them to 8 |
| `igbt_ann` | 8 → 32 (ReLU) → 80 network: two `col_mac` and a `relu_vec` |
| `col_mac` | Y = W·X + b, column by column on 8 lanes |
| `relu_vec` | max(x, 0) on 32 elements, also the buffer between the layers |
| `foster_thermal` | 4-stage R-C thermal network, junction temperature per step |
| `vsc_control` | DC-voltage and dq current loops, transforms, PWM |
| `pi_ctrl` | PI with clamped integrator (3 instances) |
| `pwm_3ph` | triangular-carrier PWM for three legs |
| `igbt_ann_pkg` | sizes, number format, load-port select enum |

## The ANN datapath

### Column-wise multiply-accumulate (`col_mac`)

Both layers use the same unit. The unit does not take dot products row by
row. It keeps LANES = 8 accumulators, one per row of an 8-row block. The
accumulators start from the bias. Each clock, the next column of the block's
weights (8 values) is multiplied by one element of X, which is broadcast to
all lanes, and added in. After the last column the 8 sums are rounded and
written to Y, and the next row block begins. The loop therefore runs over
columns, and the bias costs no separate add pass.

- The weights sit in 8 banks. Bank `l` holds the rows `r` with
  `r % 8 == l`, at address `(r / 8) * COLS + col`. One address thus reads a
  full column slice of a row block.
- Products are exact: 64 bits, 32 fractional bits. The sum is exact too.
  Only the final result is rounded to nearest (ties up) and saturated to
  32 bits.
- A run takes `(ROWS/8)·COLS` MAC clocks. `done` rises
  `(ROWS/8)·COLS + 1` edges after the edge that samples `start`: 33 for the
  hidden layer (32 × 8) and 321 for the output layer (80 × 32).

### Network (`igbt_ann`)

`start → mac1 (33) → relu (1) → mac2 (321) → done`, 355 clocks per pass.
`busy` is high from start to done, and a `start` while busy is ignored. The
four coefficient sets are written one element per clock through one port.
`ld_sel` picks LD_W1, LD_B1, LD_W2 or LD_B2, and `ld_row`/`ld_col` give the
element. Writing while `busy` is high is illegal (assertion). The
coefficients stay in place between passes.

The meaning of the 80 outputs is fixed by the training data, not by the
hardware. The datapath treats them as a plain vector.

### Input scaling (`minmax_norm`)

`x_n = (x − x_min) · scale − 1` with `scale = 2 / (x_max − x_min)`. Both
values are written per channel, so there is no divider. The three padding
inputs are constant 0, so whatever the matching weight columns hold adds
nothing to the hidden layer.

Number format of the ANN path: 32-bit Q16.16 (`DATA_W`, `FRAC` in
`igbt_ann_pkg`).

## Electro-thermal network (`foster_thermal`)

The junction-to-ambient thermal impedance is four parallel R-C pairs in
series, fed by a current source equal to the power loss. Each capacitor
becomes its trapezoidal companion: a conductance `G_i = 2·C_i/Δt` with a
history current `I_i`, where `C_i = τ_i / R_i`. Each step is then closed
form:

```
P    = v_ce · i_c
u_i  = (P + I_i) · K_i            K_i = 1 / (G_i + 1/R_i)
T_j  = T_e + Σ u_i
I_i <= 2·G_i·u_i − I_i
```

`K_i` and `2·G_i` are computed off-line from R_i, τ_i and Δt, and written
through `cfg_*`. A step takes 3 clocks (power, stage solve, sum and history
update). Steps must be at least 3 clocks apart. Reset puts the network at
rest at T_e.

Precision is the delicate part. With Δt = 5 µs and τ up to 1.1 s, the stage
poles `2·G_i·K_i − 1` lie within about 5·10⁻⁶ of 1. `K_i` (about 2·10⁻⁶ K/W)
must therefore be held to about 10⁻¹³ relative accuracy, or the slow stages
drift. Temperatures, powers and history currents are Q32.32. `K_i` alone is
Q2.62 (parameter `FK`).

Two published cooling systems for a 1600 V / 300 A module are used in the
testbenches:

| | R1..R4 (K/kW) | τ1..τ4 (s) |
|---|---|---|
| cooling system 1 | 2.1, 9.2, 42.6, 6.3 | 0.0008, 0.013, 0.05, 0.063 |
| cooling system 2 | 1.33, 7.05, 5.23, 2.8 | 0.00147, 0.034, 0.168, 1.11 |

## Converter control (`vsc_control`)

```
i_d* = PI_v(v_dc* − v_dc)
v_d* = PI_d(i_d* − i_d) + v_d − ωL·i_q
v_q* = PI_q(i_q* − i_q) + v_q + ωL·i_d
```

The currents and voltages go through amplitude-invariant Clarke and Park
transforms. The angle enters as `sin_t`/`cos_t`, since the angle source is
outside this design. The references are transformed back to abc and compared
by `pwm_3ph` with a triangular carrier scaled by v_dc/2. The pipeline takes
6 clocks per step. The PWM runs all the time on the latest references. Gains,
limits and ωL are static inputs. `pi_ctrl` clamps both the integrator and the
output to ±lim.

## Top level (`igbt_emu_top`)

The three engines are not wired to each other. In a full converter emulation
a network solver and converter models would pass ANN results to the thermal
network as v_ce/i_c, and gate signals to the converter. Those parts are not
in this RTL, so every engine's inputs and outputs are top-level ports:
`ann_*`/`norm_cfg_*`, `th_*`, `vc_*`. An event that arrives while the ANN is
busy is dropped, and `ann_drop` pulses.

## Where this design departs from its source, and what is missing

- Fixed point instead of single-precision floating point throughout.
- The trapezoidal conductance is taken as `2C/Δt`, the form that keeps the
  junction-temperature formula dimensionally consistent.
- Power loss is taken as `v_ce · i_c`.
- The following are this design's own choices: the banked weight memory,
  the start/busy/done handshakes, the load-port format, the PI anti-windup,
  the transform scaling, and the PWM carrier (its frequency is the parameter
  `HALF_PERIOD`; there is no dead time).
- Latencies in clocks: 33 (hidden layer), 1 (ReLU) and 321 (output layer).
  At 200 MHz these are 165 ns, 5 ns and 1605 ns. The vector-processor
  version took 136 ns, 68 ns and 1706 ns.
- Not included:
  - the iterative behavioural IGBT/diode model, which the ANN replaces;
  - the network solver and the converter/load models of the case study;
  - the DMA, external memory, host processor and on-chip network of the
    platform.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb_igbt_emu_top` runs the whole design at
its default sizes. It loads the normalisation settings and random ANN
coefficients, and runs five switching events against an integer model,
including a dropped event. It runs 1000 thermal steps with cooling system 1
at 5 µs against a double-precision model, and 100 control steps that drive
a PI to its limit while the PWM switches.

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv -Irtl \
    rtl/igbt_ann_pkg.sv tb/tb_igbt_emu_top.sv --top-module tb_igbt_emu_top -o sim
./obj_dir/sim
```

`tb_thermal_workload` runs the thermal network for 0.25 s of simulated time
(50,000 steps of 5 µs) at 200 A and 333 A conduction current with both
cooling systems. It checks that the fixed-point history currents do not drift
away from the closed-form step response.

Replace `tb_igbt_emu_top` with `tb_col_mac`, `tb_igbt_ann`, `tb_foster_thermal`,
`tb_vsc_control` and so on for the single blocks. Each testbench has a
watchdog and runs in seconds.
