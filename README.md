# On-chip back-propagation trainer for a small neural network

This design trains a small neural network in hardware. The network is a fully connected
perceptron with one hidden layer: 2 inputs, 2 hidden neurons and 1 output by default, the
smallest net that can learn the XOR function. The network, its weights and the whole
learning loop live in the FPGA fabric:

- feed-forward;
- back-propagation of the error;
- gradient-descent weight update;
- a validation pass after every epoch;
- a stopping decision.

A PC only sends the training and validation patterns over an RS-232 serial line. It then
reads the result back. Nothing in the loop needs a processor.

The architecture follows the paper *Reduction of Resource Usage in FPGA by Implementing Back
Propagation Algorithm* (Vijayaragavan, Deepa, Yuvaraju). That paper splits the FPGA design
into three blocks:

- a **pattern block**, the PC link;
- a **control block**, which sequences learning;
- an **architecture block**, the network itself.

It also fixes the network shape, the learning rate (0.5) and the use of an LFSR for the
initial weights. The paper gives no number format, activation circuit, serial protocol or
stopping rule. Those are this design's own choices, and each one is marked below and in the
header comment of the file concerned.

## How a training run goes

```
 PC ──RS-232──► pattern block ──data_setting──► control block ◄── s_train, s_error, error ──┐
                 │  ▲                             │  (LFSR, validation unit)                │
                 │  └── training, validation, ────┘                                          │
                 │       pat_idx                  └── start, train, weight init ──►  architecture block
                 └──────────── x (inputs), t (targets) of the selected pattern ───────────►  (2-2-1 net)
```

1. **Load.** The PC writes up to 16 training and 16 validation patterns. Each pattern is a
   set of binary inputs plus a binary target. The PC then sends *start* with the two pattern
   counts. The pattern block pulses `data_setting`.
2. **Initialise.** The control block writes every weight and bias, one per clock. Each value
   comes from a 16-bit LFSR (taps 16,14,13,11). The low 12 bits of the LFSR state are read as
   a signed number, which gives a value uniform in [-0.5, 0.5).
3. **Train one epoch.** The control block goes through the training patterns in stored order.
   For each one it:
   - raises `training` with the pattern index;
   - starts a training pass of the architecture block (forward, deltas, update);
   - waits for `s_train`.
4. **Validate.** It goes through the validation patterns. For each one it raises `validation`,
   runs a forward-only pass and adds the pattern's squared error `(t − y)²` in the validation
   unit.
5. **Decide.** Training stops when the summed validation error is at or below `ERR_GOAL`
   (0.05 by default). It also stops after `MAX_EPOCHS` epochs (20 000 by default).
   - `converged` tells which of the two ended it.
   - `done` and `epoch` give the outcome.
   - Otherwise the design goes back to step 3.
6. **Recall.** At any time outside a training run, the PC can send an input. The network
   answers with a forward pass. A recall sent during training is held and answered when
   training ends.

Training restarts from fresh random weights each time *start* is received. The LFSR moves on
between runs, so a run that sticks in a poor minimum can simply be started again.

## The network datapath (architecture block)

This is the part of the design that needs the most care. All numbers are signed fixed point:
**18 bits, 12 of them fraction bits**. That gives a range of ±32 in steps of 1/4096. 18 bits
is one operand width of the FPGA's DSP multipliers.

- Every product is rounded to nearest.
- Every sum and product saturates instead of wrapping.
- The inputs and targets are binary (0/1). So an input times a weight is just a selection:
  the input layer needs no multipliers.

Weight naming follows the usual back-propagation notation:

- `v_ij` goes from input *i* to hidden neuron *j*, and `v_0j` is that hidden neuron's bias.
- `w_jk` goes from hidden neuron *j* to output *k*, and `w_0k` is that output's bias.

A pass steps through one state per layer, with every neuron of a layer working at once:

| state | work done (all neurons of the layer in parallel) |
|---|---|
| `A_HIDDEN` | `zin_j = v_0j + Σ_i x_i·v_ij`,  `z_j = f(zin_j)`,  `f'_j = z_j(1−z_j)` |
| `A_OUTPUT` | `yin_k = w_0k + Σ_j z_j·w_jk`,  `y_k = f(yin_k)`,  `error = Σ_k (t_k − y_k)²` |
| `A_DELTA`  | `δ_k = (t_k − y_k)·f'(yin_k)`,  `δ_j = f'(zin_j)·Σ_k δ_k·w_jk` |
| `A_UPDATE` | `w_jk += α δ_k z_j`, `w_0k += α δ_k`, `v_ij += α δ_j x_i`, `v_0j += α δ_j` |

- The hidden deltas use the output weights *before* the update.
- The learning rate α is `2^-ALPHA_SHIFT`, 0.5 by default. It is applied as a rounding right
  shift.
- A forward-only pass (recall or validation) stops after `A_OUTPUT`.

**Timing.** Count the clock edge that samples `start` as edge 0.

- At edge 2, `y`, `y_bit` and `error` are updated and `s_error` pulses.
- In a training pass, the weights are written at edge 4 and `s_train` pulses.

So a training pattern takes 4 clocks of network time, and a forward pass takes 2. With the
control block's own start cycle and handshakes, each training pattern costs 6 clocks, each
validation pattern 4 clocks, and the verdict 2 clocks. One XOR epoch (4 training and 4
validation patterns) therefore takes 42 clocks, 0.42 µs at 100 MHz.

**The activation function** (`sigmoid_unit`) is the logistic function `1/(1+e^-x)`. For
`x ≥ 0` it is approximated by the *lowest* of four straight lines:

```
x/4 + 0.5,   x/8 + 0.625,   x/32 + 0.84375,   1          and f(−x) = 1 − f(x)
```

These lines need only shifts, adds and compares. They are the lines of the well-known PLAN
approximation. PLAN's usual table switches from the second to the third line at 2.375, which
leaves a small downward step there. Taking the minimum moves that breakpoint to 7/3, so the
curve is continuous and never decreases. Back-propagation needs this: the paper asks for an
activation that is monotonic and differentiable. The worst error against the true logistic
function is about 0.02. The derivative is computed as `f(1−f)` from the activation itself.

**Hard limiter.** The network learns through the sigmoid. Its 0/1 answer is the sigmoid
output passed through a hard limiter: `y_bit = (y ≥ 0.5)`. The paper names both a hard
limiter and a sigmoid. A hard limiter alone has a zero derivative and could not be trained,
so the design uses each one where it can work.

**Weight port.** Weights are loaded one at a time through `w_init_we / w_init_idx /
w_init_val`. Index `j·(N_IN+1)+i` holds `v_ij` (i = 0 is the bias). Index
`N_HID·(N_IN+1) + k·(N_HID+1) + j` holds `w_jk` (j = 0 is the bias). The `wts` output shows
them all in the same order.

## Serial protocol (pattern block)

The serial format is 8N1 with the least significant bit first. The default `CLKS_PER_BIT = 868`
gives 115 200 baud from a 100 MHz clock. Every command is two bytes: a header
`{op[1:0], set, index[4:0]}` followed by a data byte.

| op | command | data byte | answer |
|---|---|---|---|
| 0 | write pattern `index` of `set` (0 training, 1 validation) | `{target bits, input bits}` (input in bit 0 upward) | none |
| 1 | start training | `{n_valid−1 [7:4], n_train−1 [3:0]}` | none |
| 2 | recall | input bits | one byte per output: `{y_bit, 7 fraction bits of y}` (`7F` for y = 1.0) |
| 3 | status | ignored | `{done, converged, training, validation, 0000}`, `epoch[15:8]`, `epoch[7:0]` |

Some commands are dropped:

- a pattern write to an index beyond the memory;
- a recall or status command that arrives while an answer is still pending;
- a *start* sent while a run is going.

Example, training XOR on itself:

```
00 00  01 05  02 06  03 03     training patterns 00->0, 01->1, 10->1, 11->0
20 00  21 05  22 06  23 03     same four as validation patterns
40 33                          start, 4 training and 4 validation patterns
80 01                          recall input 01 -> answer byte with bit 7 = 1
```

## Files

| file | contents |
|---|---|
| `rtl/bp_pkg.sv` | number format, default sizes, opcodes, state encodings |
| `rtl/bp_fpga_top.sv` | top level: the three blocks wired together |
| `rtl/pattern_block.sv` | serial command decoder, pattern memory, answer buffer |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | serial receiver and transmitter |
| `rtl/control_block.sv` | learning sequencer; holds the LFSR and the validation unit |
| `rtl/validation_unit.sv` | validation error sum and stop decision |
| `rtl/lfsr.sv` | random source for the initial weights |
| `rtl/architecture_block.sv` | the network: weights, forward pass, deltas, update |
| `rtl/sigmoid_unit.sv` | activation and its derivative |

Top-level parameters:

- `N_IN`, `N_HID`, `N_OUT`: network shape. The datapath is written for any shape with one
  hidden layer.
- `W`, `F`: number format.
- `ALPHA_SHIFT`: learning rate.
- `N_PAT`: patterns per set, at most 16 through the serial protocol.
- `CLKS_PER_BIT`: serial bit time in clocks.
- `MAX_EPOCHS`, `ERR_GOAL`: stopping rule.
- `SEED`: LFSR seed.

Top-level ports:

- `clk`, `rst_n` (active low, asynchronous);
- the serial lines `uart_rxd` and `uart_txd`;
- the status outputs `training`, `validation`, `done`, `converged`, `epoch` and `val_err`.

The status outputs are optional. Only the first four ports are needed on a board.

**Size.** At the default shape the design has about 660 flip-flops and 13 multipliers. None of
the multipliers needs more than 18×18 significant bits, so each maps to one DSP slice. It
uses no block RAM.

## Where this design departs from, or fills in, the paper

- **Number format, rounding and saturation.** Not given in the paper; this design's choice
  (see above).
- **Activation.** The paper's procedure says the net inputs go through a hard limiter, while
  its comparison section speaks of computing a sigmoid. Here the sigmoid is used for learning
  and the hard limiter for the 0/1 answer.
- **Biases.** The paper's text gives every hidden and output neuron a bias, but its network
  drawing shows one bias node feeding only the first hidden neuron. The text (and its
  equations) is followed.
- **Delta and update rule.** The paper only says that deltas are computed and used. The
  standard gradient-descent rule is used, with `f' = f(1−f)`.
- **Learning rate.** The paper's FPGA procedure gives 0.5, while its MATLAB example uses 0.25.
  The default is 0.5; `ALPHA_SHIFT = 2` gives 0.25.
- **Stopping rule.** The paper runs validation after every epoch to prevent over-fitting but
  gives no criterion. Here it is an error goal or an epoch limit.
- **Pattern order.** Patterns are presented in stored order, not shuffled.
- **Serial link.** The serial protocol, baud rate and pattern memory size are this design's
  own. The paper only says the PC and FPGA exchange data over RS-232. The clock is taken as
  100 MHz, from the 10 ns period of the paper's simulation.
- **Signal names.** The names between the blocks (`training`, `validation`, `data_setting`,
  `s_train`, `s_error`, `error`) come from the paper's block diagram. Their widths and
  handshakes are this design's.
- **Loading given weights.** There is no serial command to load given initial weights. The
  paper's hardware initialises them from an LFSR. Given weights can still be loaded through
  the architecture block's weight port, as one testbench does.
- **Number of layers.** The network has exactly one hidden layer, as in the paper's design.
  The number of neurons per layer is a parameter; the number of layers is not.

## Verification

Each testbench in `tb/` prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **`tb_bp_fpga_top`** runs the whole design at its default parameters, acting as the PC on
  the serial line at 115 200 baud.
  - It first trains XOR against a contradictory validation set (input 00 with both targets),
    so training must run to the 20 000-epoch limit without converging.
  - It then trains with XOR as validation set. This converges after 1365 epochs with the
    default seed.
  - It recalls all four inputs and checks the XOR truth table, with the high outputs above
    0.75 and the low ones below 0.25.
  - It checks status answers, and a recall held back until training ends.
  - It counts every mechanism: weight initialisation, training steps, validation patterns,
    weight updates, both ways of stopping, the held recall and status answers.
  - About 1.2 million clocks; under a second of simulation.
- **`tb_architecture_block`** compares every output, error and weight after 300 random
  passes with a bit-exact integer model written independently in the testbench. Some of those
  passes use very large weights, so that saturation is exercised. It also checks a training
  step worked out by hand, the 2/4-clock latencies, that `start` is ignored while busy, and
  that XOR is learned.
- **`tb_matlab_example`** runs a published worked example. The network is 2-2-1 with
  input (0,1), target 1, learning rate 0.25 and given initial weights, for three iterations.
  It compares every weight with a floating-point back-propagation step within 0.001, and
  checks the direction of change against the example's printed results. The hardware gives
  second-row input weights of −0.1968, −0.1936, −0.1904 over the three iterations. The
  example prints −0.1961, −0.1915, −0.1871. The example's own figures are not those of
  textbook back-propagation either: they leave the first hidden bias unchanged. So only the
  direction of change is checked against them.
- **`tb_sigmoid_unit`**, **`tb_lfsr`**, **`tb_validation_unit`**, **`tb_control_block`** and
  **`tb_pattern_block`** check their blocks alone:
  - the sigmoid is swept over its whole input range;
  - the LFSR runs its full 65 535-state period;
  - the validation unit sees all four stop verdicts;
  - the control block is run against a stand-in network with a scripted error;
  - the pattern block is driven over the serial protocol.

Concurrent assertions in the control, architecture and pattern blocks check the handshakes
whenever a simulation runs with assertions on (`--assert` in Verilator):

- training and validation requests never overlap;
- `s_train` and `s_error` arrive only while the control block waits for them;
- weights are loaded only while the network is idle;
- a recall request is held until it is answered.

## Simulating

Any testbench builds with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/bp_pkg.sv tb/tb_bp_fpga_top.sv \
          --top-module tb_bp_fpga_top -o sim
./obj_dir/sim
```

Replace `tb_bp_fpga_top` by any other testbench name. The simulator is two-state, and every
register that is read is reset.

To try another problem:

1. Change `N_IN` / `N_HID` / `N_OUT` on the top. The pattern byte holds `N_IN + N_OUT ≤ 8`
   bits.
2. Send its patterns.
3. Adjust `ERR_GOAL`, which is the summed squared error of a validation pass in units of
   1/4096.
