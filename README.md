# PWM convolution chip: analog multiply, digital accumulate

This design computes the layer-to-layer convolutions of a hierarchical
convolutional neural network (feature detection and feature pooling layers,
as used for face and object detection) with a small array of analog
pulse-width-modulation (PWM) neurons and a digital accumulation path.

The multiplications are done in the analog domain. A pixel value travels as a
pulse whose width is the value. Each synapse of a neuron has two transistors
in series between a current source and the neuron's integrating capacitor:

- M1 has a DC gate voltage `V_w` that sets the weight.
- M2 has a shared, time-varying gate voltage `V_F` whose shape is the
  derivative of the nonlinear activation `f`.

While the input pulse is high, the synapse charges the capacitor at a rate
proportional to `g(V_w) * g(V_F(t))`. A pulse of width `p` therefore adds
`w * f(p)`. One switching event does both the multiplication and the
nonlinearity. A linear ramp `V_ref` then turns the capacitor voltage back
into a pulse width.

Everything else is digital. A counter (the WDC, PWM/digital converter)
measures the output pulse. An adder-subtracter (the DAS) accumulates the
result into an SRAM that holds one 6-bit value per output pixel.

At its default sizes, the design has:

- 81 neurons of 20 synapses each;
- 81 WDCs and 81 DASs;
- 20 weight setting circuits;
- a 39,366-bit result memory.

One call convolves a 100 x 100 input with a 20 x 20 kernel into an 81 x 81
output, with 6-bit values.

## Time-sharing schedule

There are far fewer neurons than connections, so the neurons are reused over
many *operation cycles*. Sizes:

- N = 81: neurons, and the output is N x N.
- M = 20: synapses per neuron, and the kernel is M x M.
- NP = N + M - 1 = 100: the input is NP x NP.

In one operation cycle, all N neurons work on output column `j` and kernel
column `c` together:

- Neuron `i` gets rows `i .. i+M-1` of input column `j+c` on its M synapses.
- The M weight setting circuits drive kernel column `c`, `w[0..M-1][c]`. All
  neurons share them, because every neuron of a feature class uses the same
  kernel.

The result of one operation cycle is therefore the contribution of one kernel
column to the N pixels of output column `j`:

    y[i][j] += sum_k w[k][c] * f(x[i+k][j+c])          for all i in parallel

A synapse cannot change the sign of its current. So every `(j, c)` is run
twice: once with the positive weights, whose count the DAS adds, and once with
the magnitudes of the negative weights, whose count it subtracts. The
sequencer (`ts_ctrl`) loops over `j` outermost, then `c`, then the sign. A
convolution is N * M * 2 = 3240 operation cycles.

The input includes a border of M-1 rows and columns that the external
controller holds at zero. This keeps the output the same size as the input
feature class. A kernel smaller than M x M is run by setting the unused
weights to zero. Two kinds of work take several calls with `accum = 1`:

- a larger kernel, split into tiles;
- an FD-layer neuron that sums over all feature classes of the previous layer.

With `accum = 1`, the first pass adds to the stored sums instead of
replacing them.

## One operation cycle

With `W = 6` there are `T = 2^W - 1 = 63` slots in each PWM window, one
clock per slot:

| phase      | clocks | what happens |
|------------|--------|--------------|
| `PH_RESET` | 1      | capacitors discharged, WDCs cleared, weight codes latched for the pass sign |
| `PH_INTEG` | 63     | input pulses high for `x` slots from slot 0; charge integrated under `V_F(slot)` |
| `PH_CONV`  | 63     | each neuron's output is high while `V_ref(slot)` < capacitor voltage; the WDC counts |
| `PH_READ`  | 1      | SRAM word `j` (the N partial sums of output column `j`) read |
| `PH_WRITE` | 1      | N DAS results written back |

An operation cycle is 129 clocks. With an 80.6 MHz clock it lasts 1.6 us, and
a whole convolution takes 5.18 ms. That is 81 x 20 synapses x 2 operations
per 1.6 us, about 2 GOPS.

On the first pass of a convolution (`c = 0`, positive sign, `accum = 0`) the
DAS loads the count instead of adding it. The SRAM therefore never needs
clearing. The partial sums are 6-bit two's complement and saturate at -32 and
+31. The `ovf` output reports that some partial sum saturated in the last
convolution. The counts are unsigned, 0 to 63, so the analog scale must be
set by the `V_ref` ramp slope so that sums stay in range.

## What the chip expects from outside

The input pulses, the kernel and the two analog waveforms come from an
external controller. That controller also builds the multi-layer network by
reading results back and feeding them in as the next layer's input. The chip
tells the controller what it needs through its status outputs:

- `phase`, `slot`: where the operation cycle is.
- `in_col`: the input column whose pulses it wants. Drive
  `in_pwm[r] = (phase == PH_INTEG) && (slot < x[r][in_col])`, with border rows
  at zero.
- `rf_col`, `neg`: the kernel column and sign of the pass. Drive
  `w_code[k] = w[k][rf_col]` (signed, W bits). It is sampled in `PH_RESET`.
  The chip selects the magnitude for the sign itself.
- `vf`: the `V_F` waveform as a function of `slot` during `PH_INTEG`.
  `VF_OFF` (2.7 V) gives no conduction and `VF_FULL` (0 V) gives full
  conduction. Holding it at `VF_FULL` makes `f` linear. Making the conductance
  follow the increments of a sigmoid makes `f` a sigmoid. Switching it off
  after `K` slots gives `f(x) = min(x, K)`.
- `vref`: the ramp during `PH_CONV`, for example `(slot + 0.5) * step`.

Control and readout:

- `start`, taken while `busy` is low, begins a convolution.
- `done` pulses one clock after the last write.
- While idle, `rd_en` with `rd_addr = j` returns output column `j` on
  `rd_data` one clock later. `rd_data[i]` is pixel `(i, j)`.

## Analog models

`pwm_neuron` and `weight_setting` are behavioural models with `real`-valued
voltages. They simulate in Verilator but are not synthesizable. In silicon they
are analog circuits. The device behaviour is reduced to linear, clamped
factors:

    g_w(V_w) = clamp((2.8 V - V_w) / (2.8 V - 1.6 V), 0, 1)
    g_f(V_F) = clamp((2.7 V - V_F) / 2.7 V,            0, 1)
    per slot: V_cap += DV_SLOT * sum over high inputs of g_w * g_f

The weight setting circuit maps a weight magnitude `|w|` out of 32 to
`V_w = 2.8 V - 1.2 V * |w| / 32`. That spans the measured 1.6 V (largest
weight) to about 2.7 V (smallest weight) range.

These laws, the 2.8 V zero-weight point, the 2.7 V threshold of `V_F` and
`DV_SLOT = 1 mV` are modelling choices. Real transistors give a smooth,
saturating curve. Replace the two clamp functions to model measured curves.
The digital blocks do not depend on them.

## Files

Written to be synthesizable:

| file | role |
|------|------|
| `rtl/cnn_pkg.sv` | default sizes, `phase_e`, analog reference voltages |
| `rtl/conv_chip.sv` | top: wiring of neurons, WDCs, DASs, SRAM, weight setting circuits, `ovf` |
| `rtl/ts_ctrl.sv` | time-sharing sequencer |
| `rtl/wdc.sv` | PWM/digital converter (saturating slot counter) |
| `rtl/das.sv` | saturating adder-subtracter with load |
| `rtl/conv_sram.sv` | N words of N x W bits, single port, synchronous read |

Behavioural models (analog):

| file | role |
|------|------|
| `rtl/pwm_neuron.sv` | M-synapse PWM neuron |
| `rtl/weight_setting.sv` | weight latch and `V_w` driver |

Parameters of `conv_chip`: `N` = 81, `M` = 20, `W` = 6. `NP` is derived from
them. Neuron `i` is wired to `in_pwm[i +: M]`.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>`:

- `tb_wdc`: random pulses in and out of the window, saturation, clear and
  hold.
- `tb_das`: exhaustive over all inputs for W = 6.
- `tb_conv_sram`: full-size random write and read-back, read latency and hold.
- `tb_ts_ctrl`: N=4, M=3, W=3. Compares phase, slot, columns, sign, `first`,
  `busy` and `done` on every clock with an independent count.
- `tb_weight_setting`: all codes and both signs.
- `tb_pwm_neuron`: random inputs with a sigmoidal `V_F`. Predicts the
  capacitor voltage and the output pulse width. Also checks the sigmoidal
  input-output curve and the control inputs.
- `tb_conv_chip`: end to end at N=6, M=3, over four convolutions:
  - from zero;
  - accumulated;
  - saturating;
  - from zero over saturated contents.

  It checks every pixel against an independent model, checks `ovf` and
  N*M*2*129 clocks per convolution, and counts each mechanism: both pass
  signs, loading first passes, accumulate mode, zero border, nonlinearity,
  full-scale WDC counts, DAS saturation and readout.
- `tb_conv_chip_full`: one complete convolution at the default sizes (3240
  operation cycles, 81 x 81 pixels checked). It takes a few seconds of
  simulation.

Two further testbenches exercise the design the way it is meant to be used:

- `tb_neuron_curve`: the neuron characterisation. All 20 inputs of a
  20-synapse neuron carry the same pulse width (0 to 63). `V_w` is stepped
  from 1.6 V to 2.7 V in 0.1 V steps. The test checks each output width,
  that every curve is monotonic and sigmoidal, and that a larger weight
  never gives a shorter pulse.
- `tb_feature_layers`: a three-stage network at N=12, M=3, built by
  external feedback. Results are read back, rectified and doubled into the
  next input between stages. The stages are:
  - FD1: vertical- and horizontal-edge kernels on a bright rectangle. The
    vertical-edge response must appear only at the rectangle's side edges,
    with both polarities.
  - FP1: positive, centre-weighted pooling of each class.
  - FD2: one class summing both pooled classes, using `accum`.

  Every pixel of every stage is checked against the model.

Run one with Verilator, for example:

    verilator --binary --timing --assert -Irtl --top-module tb_conv_chip \
        rtl/cnn_pkg.sv rtl/*.sv tb/tb_conv_chip.sv
    ./obj_dir/Vtb_conv_chip

## Where this design departs from or adds to the source design

Built as described:

- array sizes;
- sign-split time-sharing schedule and its N*M*2 cycle count;
- neuron-WDC-DAS-SRAM data path;
- shared weight setting circuits;
- 6-bit precision;
- SRAM size.

This design's own choices:

- the pin protocol towards the external controller;
- the phase timing and 63-slot windows;
- the loop order;
- the SRAM word layout (one output column per word);
- saturating rather than wrapping accumulation;
- the load-on-first-pass and `accum` mode;
- the `ovf` flag;
- the WDC as a slot counter;
- the linear analog laws.

Not built:

- the `V_F` and `V_ref` waveform generators, which are off-chip analog
  sources and are driven here by the testbenches;
- the external controller that sequences layers.

The source gives no clock frequency. The 80.6 MHz figure only follows from
this design's 129-clock cycle and the 1.6 us cycle time.
