# A fully parallel 4-4-1 neural network with a division-based sigmoid

This is synthesizable SystemVerilog for a small feed-forward neural network in which
every neuron has its own multipliers, adders and activation circuit, so all neurons of a
layer work at the same time. Four one-bit inputs feed four hidden neurons. The four hidden
outputs feed one output neuron, which gives a one-bit decision. The weights are trained
off-line and loaded into registers through ports.

The main idea is the activation function. A sigmoid is usually built from a lookup table.
Here each neuron computes a rational approximation instead:

    F2(x) = 1/2 * ( x / (1 + |x|) + 1 )

Like the logistic sigmoid 1/(1+e^-x), F2 rises steadily from 0 at minus infinity to 1 at
plus infinity and passes through 0.5 at x = 0. Its tails approach 0 and 1 more slowly:
F2(5) is about 0.92, where the sigmoid gives 0.99. It needs no exponential and no table:
only an absolute value, two adders, one divider and a shift.

The arrangement follows a published FPGA design (Virtex-II, schematic entry). That design
fixes the layer sizes, the 9-bit weight buses, the block structure of a neuron, the
activation function and the trained weights. It leaves the number format, the divider,
the sequencing and the rounding open. Those choices are this design's own; they are marked
in each file's header and collected under "Departures and own choices" below.

## Number format

Everything depends on how the 9-bit buses are read. None of this is stated in the source,
so this design takes it from the published waveforms of a single neuron.

| signal | format |
|---|---|
| hidden-layer inputs I1..I4 | 1 bit, 0 or 1 |
| weights, biases | 9-bit two's complement **integers** (-256 .. 255) |
| hidden net input x | signed integer, 14 bits |
| neuron output (9-bit bus) | unsigned, 8 fraction bits: 0x100 would be 1.0 |
| output-neuron net input X | signed, 8 fraction bits, 22 bits |
| network output OUTN | 1 bit |

The transfer function resolves 4 fraction bits (parameter `FB`). Its result
`floor(16 * F2(x))` (0 .. 15) is placed in bits [7:4] of the output bus. So a neuron output
is always a multiple of 0x010, between 0x000 and 0x0F0. Bits [3:0] and bit 8 of every
neuron output are constant zero. Synthesis reports these as idle outputs; they are
expected.

This reading reproduces all four single-neuron results that were published, with every
input at 1 unless noted:

| weights W, WW, WWW, WWWW | bias | x | output |
|---|---|---|---|
| 020 020 020 020 | 010 | 144 | 0F0 |
| 074 199 1EE 114 | 0EC | -5 | 010 |
| 1FE 1FE 1FE 1FE | 1FF | -9 | 000 |
| 040 040 030 1FE, with I1 = I2 = 0 | 1FF | 45 | 0F0 |

The -9 row settles the rounding. Truncating the quotient toward zero would give 010, not
000. So both roundings below are toward minus infinity.

## How the activation circuit computes F2

`transfer_function.sv` works on a net input x that has XF fraction bits. XF is 0 in the
hidden layer and 8 in the output layer.

1. **Absolute value:** `mag = |x|`.
2. **First adder:** `den = 2^XF + mag`. This is 1 + |x| at the scale of x.
3. **Divider:** `q = floor(mag * 2^FB / den)`. The dividend is always smaller than the
   divisor, so the quotient has no integer part. `divider.sv` is a restoring divider that
   makes one quotient bit per clock, FB cycles in all. It also reports whether the
   remainder is non-zero.
4. **Sign and rounding:** for a negative x the quotient is negated. If the division was
   inexact, one more unit is subtracted, so that `floor(x * 2^FB / den)` is rounded down.
5. **Second adder:** add 1.0, which is `2^FB`. The sum lies in 0 .. 2^(FB+1) - 1.
6. **Divide by two:** shift right by one and drop the bit. This rounds down again.

Since `floor((floor(a) + c) / 2) = floor((a + c) / 2)` for an integer c, the result is
exactly `floor(2^FB * (x + d) / (2 d))` with `d = 2^XF + |x|`. The testbenches use this
single-division closed form as their independent reference.

A sample of the resulting curve (hidden layer, integer x):

| x | <= -8 | -7 | -3 | -1 | 0 | 1 | 3 | 6 | >= 7 |
|---|---|---|---|---|---|---|---|---|---|
| output | 000 | 010 | 020 | 040 | 080 | 0C0 | 0E0 | 0E0 | 0F0 |

## One neuron

`neuron.sv` is the processing element. Its default parameters make it the hidden-layer
neuron: ports I1..I4 are `p[0..3]`, W..WWWW are `w[0..3]`, B is `b` and OUTPUT is `y`.
It is built from five blocks:

- `weights_block`: weight and bias registers.
- `activation_block`: input register, one multiplier per input, an adder chain, and the
  net-input register. Inputs are unsigned and weights signed. The bias is shifted left by
  XF so that it has the scale of the products.
- `transfer_function`: F2, as described above.
- `neuron_state`: the output register, with a one-cycle `y_valid` pulse after each write.
- `control_unit`: a five-state sequencer driven by CLK, CLR and CE.

```
state:   IDLE  LOAD  SUM  DIV  WAIT WAIT WAIT WAIT WAIT | LOAD ...
strobe:   ce?  load  sum  start  (divider, FB cycles) we |
```

- **IDLE** waits for `ce`.
- **LOAD** captures the weights, bias and inputs.
- **SUM** registers the sum of products.
- **DIV** starts the divider.
- **WAIT** lasts until the divider's `done`. In that cycle the result is written to the
  state register.

Timing with FB = 4:

- y changes 3 + FB = 7 rising edges after the edge that sampled the inputs.
- Started from IDLE by a one-cycle CE pulse, the result appears 9 cycles after the pulse.
- With CE held high, the unit goes from WAIT straight back to LOAD. It then samples its
  ports every 4 + FB = 8 cycles and follows changing inputs and weights.
- When CE drops, the operation under way completes. The neuron then stops in IDLE and
  holds y.
- CLR is synchronous and zeroes every register.

`outputn.sv` uses the same neuron with 9-bit inputs that have 8 fraction bits (the hidden
outputs). It adds the decision `NOUT = value >= 0.5`, which is bit 7 of the value. That
is the same as asking whether the output neuron's net input is non-negative.

## The network

`nn_top.sv` connects the neurons as follows:

- INP1..INP4 (`inp[0..3]`) go to I1..I4 of all four hidden neurons.
- Hidden neuron n drives input n of the output neuron.
- The output neuron's NOUT is `outn`.

The hidden neurons share CLK, CLR and CE, so they run in lockstep. The output neuron does
not use CE. It is started by the hidden layer's result pulse, so every result belongs to
exactly one input pattern.

Timing:

- A result (`outn`, `out_value`) changes 16 rising edges after inp was sampled.
- Measured from a one-cycle CE pulse, `out_valid` arrives 18 cycles later.
- With CE held high, a new pattern is taken and a new result given every 8 cycles. The
  output neuron finishes in exactly the cycle in which the next hidden result pulse
  arrives, and its control unit accepts that pulse directly.

| port | width | meaning |
|---|---|---|
| clk, clr, ce | 1 | clock; synchronous clear; enable (hold high to run continuously) |
| inp[4] | 1 each | INP1..INP4 |
| hid_w[4][4], hid_b[4] | 9 each | hidden weights (`hid_w[n][j]` = weight of input j+1 of neuron n+1) and biases |
| out_w[4], out_b | 9 each | output-neuron weights and bias |
| hid_out[4] | 9 each | hidden outputs, for observation |
| out_value | 9 | output neuron's F2 value |
| outn | 1 | network output |
| out_valid | 1 | pulse in the cycle after outn/out_value change |
| busy | 1 | some neuron is working |

Synthesized, the network has about 560 flip-flop bits and 370 word-level cells. Most of the
flip-flops are the 25 weight/bias registers and the per-neuron input, sum and divider
registers. The original schematic used far more flip-flops (about 3,100 on a Virtex-II),
so its divider and pipeline were evidently built differently.

## Trained weights and what they give

`nn_pkg` holds the published trained weights and biases (9-bit hex):

| neuron | W1 | W2 | W3 | W4 | b |
|---|---|---|---|---|---|
| hidden 1 | 17E | 1DE | 1DE | 028 | 025 |
| hidden 2 | 058 | 020 | 020 | 1DD | 1F0 |
| hidden 3 | 17C | 1E9 | 1EA | 060 | 031 |
| hidden 4 | 1BF | 198 | 1A0 | 034 | 1BF |
| output | 011 | 040 | 1EE | 020 | 060 |

The network was trained for the function OUTN = X3 OR X4, with INP1 = X4 ... INP4 = X1.
With these weights and the number format above, the hardware gives OUTN = 1 for all 16
patterns. That is 12 of the 16 target outputs: the four patterns with X3 = X4 = 0 come out
wrong. The cause is the output bias 0x060 = 96, which outweighs every hidden
contribution. No other scale or input order that was tried reproduces the target table
either. So the published weights and the published number format cannot both be what the
original hardware used. A further mismatch: the weights were trained for a tansig transfer
function, whose range is -1 .. 1. The hardware's F2 has range 0 .. 1, so trained weights do not carry
over to the hardware unchanged.

A second published waveform of the whole network shows several weights slightly different
from the table (for example 17D instead of 17E, 057 instead of 058, 006 instead of 060). The
table values are used here. Because the weights are ports, a retrained set can be loaded
without changing the RTL.

## Departures and own choices

- **Number format and FB = 4:** inferred from the single-neuron waveforms, as above.
  Changing `FB` (at most 8) gives finer outputs, at FB cycles per division.
- **Rounding down** in the quotient and in the halving is chosen to match those waveforms.
- **Divider:** a sequential restoring divider. The source names a divider but not its
  structure.
- **Control unit:** the states, the 8-cycle period and the synchronous clear are this
  design's own. The source names only clock, clear, enable and "control parameters";
  here the control parameters are CE and CLR.
- **Output neuron start:** the output neuron is started by the hidden result pulse,
  rather than sharing CE as the original schematic shows.
- **NOUT:** defined as value >= 0.5. The source shows a one-bit output without saying how
  it is formed.
- **Output-layer fixed point:** 8 fraction bits on the inputs and a bias aligned by << 8.
- **Weight buffers:** the original schematic places a buffer (register) in front of every
  weight port and also gives each neuron a weights block. Here the two are one register,
  inside the neuron.
- **Pad buffers:** the FPGA input/output pad buffers are not modelled. The top-level
  ports are the pads' inner side.
- **Piecewise-linear sigmoid:** the 5-region approximation (0; (8-|x|)/64; x/4+0.5;
  1-(8-|x|)/64; 1) that the source compares against is not built. F2 is the function
  used.
- **Weight ROM:** the ROM the source mentions as an option for larger weight sets is not
  built.

## Simulating

Each testbench checks its block and prints one line `TB_RESULT checks=N failures=M`. The
end-to-end test runs the network at its default size:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
  rtl/nn_pkg.sv tb/nn_ref_pkg.sv tb/tb_nn_top.sv --top-module tb_nn_top -o sim
./obj_dir/sim
```

It prints each pattern's hidden outputs, the output value and OUTN, and how many patterns
agree with the training target. It then runs 500 continuous operations with random
weights reloaded every 16 results, then CE-low hold and a mid-operation clear. It counts
how often each of these happened. The other testbenches work the same way (replace
`tb_nn_top` with `tb_neuron`, `tb_outputn`, `tb_transfer_function`, `tb_divider`,
`tb_activation_block`, `tb_weights_block`, `tb_neuron_state` or `tb_control_unit`):

- `tb_neuron` replays the four published single-neuron results and checks both latency
  and period.
- `tb_transfer_function` sweeps x from -300 to 300, plus the extremes, at both XF = 0
  and XF = 8.

Simulation is two-state, and every register that is read has a reset through CLR. Drive
CLR for at least one clock before use.

## Files

- `rtl/nn_pkg.sv`: sizes, types, control states and trained weights.
- `rtl/nn_top.sv`: the network.
- `rtl/outputn.sv`: the output neuron.
- `rtl/neuron.sv`: the neuron.
- `rtl/weights_block.sv`, `rtl/activation_block.sv`, `rtl/transfer_function.sv`,
  `rtl/divider.sv`, `rtl/neuron_state.sv`, `rtl/control_unit.sv`: the neuron's blocks.
- `tb/nn_ref_pkg.sv`: the reference arithmetic.
- `tb/tb_*.sv`: one testbench per module.
