# Self-tuning PID controller with an on-line BP neural network

A PID controller works well only when its three gains suit the plant, and a nonlinear or
drifting plant has no single best set. This design lets a small back-propagation (BP) neural
network choose the gains anew at every sample. The network sees the reference, the plant output
and the error. It outputs Kp, Ki and Kd, and after each sample it adjusts its own weights so that
the squared tracking error falls. Everything runs in one clocked fixed-point datapath, the plant
model included: given a clock, a reset and the reference sequence, the block runs the closed loop
on its own for a set number of control cycles (2000 by default).

The structure follows a published FPGA design. That design splits the work into an input-layer
module, hidden-layer modules, output-layer modules, two weight-adjustment modules, a control
state machine and five memories. The published text gives the insides of the input layer and the
hidden layer. It names the remaining parts and the state machine's phases without detailing them.
Where it is silent, this RTL makes its own choices, and the section
[Departures and own choices](#departures-and-own-choices) lists them.

## One control cycle

Cycle `k` does the following, in this order.

1. **Plant and errors** (`input_layer`). The controlled object is the nonlinear first-order model

       y(k) = a(k) * y(k-1) / (1 + y(k-1)^2) + u(k-1)

   It gives the error e(k) = r(k) - y(k) and the three PID terms

       x1 = e(k) - e(k-1)      x2 = e(k)      x3 = e(k) - 2 e(k-1) + e(k-2)

2. **Hidden layer** (`hidden_input`, `hidden_output`). There are five neurons with four inputs
   each, `xi = {r(k), y(k), e(k), 1}`. Net input I(h) = sum_i wi(h,i) * xi(i). Output
   O(h) = f(I(h)), where f is the piecewise-linear sigmoid described below.
3. **Output layer** (`output_input`, `output_output`). Three neurons give
   net(o) = sum_h wo(o,h) * O(h) and K(o) = (f(net(o)) + 1) / 2, which lies in [0, 1]. Then
   K = {Kp, Ki, Kd}.
4. **PID law** (`pid_incr`). This is the incremental form,
   u(k) = clamp(u(k-1) + Kp*x1 + Ki*x2 + Kd*x3).
5. **Hidden-to-output weights** (`wo_update`). The output deltas are

       s         = sign(y(k) - y(k-1)) * sign(u(k) - u(k-1))      (sign of du taken as +1 if du = 0)
       delta3(o) = e(k) * s * x(o) * 2 K(o) (1 - K(o))

   `s` stands in for the unknown plant gain dy/du. Each weight is then updated with momentum:

       wo(o,h) <- wo(o,h) + XITE * delta3(o) * O(h) + ALFA * (wo(o,h) - wo_prev(o,h))

6. **Input-to-hidden weights** (`wi_update`). The deltas are propagated back through the
   already-updated output weights, and each weight is updated the same way:

       delta2(h) = (1 - O(h)^2) * sum_o delta3(o) * wo(o,h)
       wi(h,i)  <- wi(h,i) + XITE * delta2(h) * xi(i) + ALFA * (wi(h,i) - wi_prev(h,i))

The learning rate `XITE` is 0.2 and the momentum `ALFA` is 0.05. These are the values of the
published design.

## Number format and arithmetic

Every value is a signed 24-bit fixed-point number with 4 integer bits (sign included) and 20
fraction bits (Q4.20), so the range is [-8, 8). In hex, 1.0 is `100000` and -1.0 is `F00000`.
The rules are in `bpid_pkg`:

* A product is formed at 48 bits (Q8.40) and brought back with an arithmetic shift right by 20.
  This floors the result.
* Sums and products saturate at the Q4.20 limits instead of wrapping.

These rules reproduce the published hidden-layer waveforms bit for bit. With r = 0,
y = `002926`, e = `FFD6DA` and the printed weight words, the net inputs of the first two neurons
are `EF0C62` and `01A313`. The activation maps `180000`, `E70000`, `080000`, `000000` and
`00A000` to `100000`, `F00000`, `079980`, `000000` and `0097FE`.

**Piecewise-linear sigmoid.** The tanh-like sigmoid is replaced by

    f(x) = 1 for x >= 1,   0.95 x for -1 < x < 1,   -1 for x <= -1

`pwl_sigmoid` builds it the published way. Four comparisons (x < -1, x = -1, x < 1, x = 1) form
a 5-bit one-hot code, and the code drives a multiplexer that picks -1, the scaled input or +1.
The slope is 0.95 rounded down to 12 fraction bits, 3891/4096 = 0.949951171875. With that slope,
0.5 maps to exactly `079980` (0.4749755859375).

**The plant's division.** To keep precision, the dividend a(k)·y(k-1) is shifted left 30 bits
before it is divided by 1 + y(k-1)^2. Both operands keep full product precision, with 40
fraction bits. The integer quotient therefore carries 30 fraction bits, and it is then floored
to 20. `seq_divider` does the division bit-serially, one quotient bit per clock: a 78-bit
dividend, a 48-bit divisor, truncation toward zero. This makes it the longest step of the cycle
(78 clocks).

## Schedule: the control state machine

`control_fsm` has the states idle, st0 to st20 and stop. They fall into four phases. Loops over
neurons and weights re-visit states, and index counters `h`, `o` and `i` step through them. Each
enable is high for the one clock the machine spends in its state. Each datapath block registers
its result on that edge.

| phase | state | work | clocks per cycle |
|---|---|---|---|
| cycle assignment | st0 | stop after CYCLES cycles, else k++; shift y, u, e history (except in the first cycle) | 1 |
| | st1 | sample r(k), a(k); start the plant block | 1 |
| | st2 | wait for the plant block | 80 |
| forward pass | st3, st4 | hidden net input of neuron h, store in memory 1 | 5 x 2 |
| | st5, st6 | hidden output of neuron h, store in memory 2 | 5 x 2 |
| | st7, st8, st9 | output net input, activation, store gain in memory 3 | 3 x 3 |
| | st10 | PID law, u(k) | 1 |
| hidden-to-output weights | st11 | sign of dy/du | 1 |
| | st12 | delta3(o) | 3 |
| | st13, st14, st15 | learning term, new weight, write (15 weights) | 15 x 3 |
| input-to-hidden weights | st16, st17 | back-propagated sum and delta2(h) | 5 x 2 |
| | st18, st19, st20 | learning term, new weight, write (20 weights) | 20 x 3 |

A control cycle takes **231 clocks**, and the default run of 2000 cycles takes 462,000 clocks
plus 36 clocks of start-up. One multiplier set per layer is shared across the neurons, and one
update datapath per weight set is shared across the weights. This sharing is why the schedule is
this long.

## Storage

* **Memory 1, memory 2, memory 3** (`data_memory`, 5, 5 and 3 words) are plain registers. They
  hold the hidden net inputs, the hidden outputs and the gains. All words can be read in
  parallel, because the next stage's multiplexer takes every word at once.
* **Memory 4, memory 5** (`weight_memory`) hold the 15 hidden-to-output and 20
  input-to-hidden weights. The store keeps a current and a previous copy of every word, so a
  write moves the current value to `prev`. The momentum term needs both copies. The hidden layer
  reads the input-to-hidden weights as five pairs of 48-bit words. Word `wi1[h]` packs
  {w(h,r), w(h,y)} and word `wi2[h]` packs {w(h,e), w(h,bias)}, high half first.
* **`init_module`** runs after reset. It loads all 35 weights, one per clock, with
  pseudo-random values in [-0.5, 0.5) from a 32-bit Galois LFSR (taps `A3000000`, seed
  `SEED`), setting both copies. The controller waits in idle until it is done.

## Top-level interface (`bpid_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock (rising edge); asynchronous reset, active high |
| `rin`, `ak` | in | 24 | reference r(k) and plant coefficient a(k), Q4.20 |
| `k` | out | 16 | number of the control cycle in progress, 1..CYCLES |
| `kp`, `ki`, `kd` | out | 24 | current gains (memory 3) |
| `u`, `du` | out | 24 | control u(k) and its increment |
| `y`, `err` | out | 24 | plant output y(k) and error e(k) |
| `u_sat` | out | 1 | u(k) was clamped |
| `dyu` | out | 2 | sign of dy/du used for learning (-1, 0, +1) |
| `cycle_done` | out | 1 | one-clock pulse: u(k), gains, y(k), e(k) of cycle k are valid |
| `finished` | out | 1 | all cycles run, machine parked in stop |
| `state` | out | 5 | controller state (`bpid_pkg::state_t`) |

`rin` and `ak` are sampled one clock after `k` changes, so they can be driven as
combinational functions of `k`.

Parameters:

| parameter | default | meaning |
|---|---|---|
| `CYCLES` | 2000 | number of control cycles |
| `XITE` | 0.2 | learning rate |
| `ALFA` | 0.05 | momentum factor |
| `U_LIM` | largest Q4.20 value | limit on u(k) |
| `SEED` | `0001847E` | seed of the start weights |

The network size (4-5-3) and the word format are fixed in `bpid_pkg`.

## Behaviour in simulation

`tb_bpid_top` runs the whole loop at the default parameters. The reference is
r(k) = sin(2·pi·k·0.001), two periods over the run. The plant coefficient is
a(k) = 1.2·(1 - 0.8·e^(-0.1k)).

* The testbench holds its own cycle-by-cycle model of the algorithm, written on 64-bit integers.
  y(k), e(k), Kp, Ki, Kd and u(k) match the model bit for bit in all 2000 cycles.
* The plant follows the sine. The mean |e| over the last 500 cycles is about 0.0045, and e(2000)
  is `FFF51E` (about -0.0027).
* The gains keep moving with the phase of the reference. At k = 2000 they are Kp ≈ 0.39,
  Ki ≈ 0.47 and Kd ≈ 0.09.

The published run reports a similar final error. Its gains at k = 2000 differ from these
(Kp ≈ 0.156, Ki ≈ 0.528, Kd ≈ 0.181). That is expected, because its start weights and its
output-layer details are not known.

The run also confirms that hidden neurons work in their linear region and saturate at both +1
and -1, that output neurons saturate, and that both signs of the dy/du estimate occur.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. Shared reference arithmetic is in `tb/tb_fx_pkg.sv`, written
independently of `bpid_pkg`.

| testbench | what it checks |
|---|---|
| `tb_hidden_input` | published values `EF0C62`, `01A313`; random weights and inputs; one-clock latency |
| `tb_hidden_output` | the five published activation values, exact ±1 thresholds, random inputs |
| `tb_input_layer` | plant, error and x terms on random operands; one case against real arithmetic; `done` in the 79th clock after `start` |
| `tb_output_input`, `tb_output_output` | output net input and the [0, 1] activation |
| `tb_pid_incr` | PID law and clamp in both directions (with a lowered limit) |
| `tb_wo_update`, `tb_wi_update` | every learning step against the reference, all sign cases |
| `tb_data_memory`, `tb_weight_memory` | writes, parallel reads, the current/previous copies |
| `tb_init_module` | load order, addresses and LFSR values of the 35 start weights |
| `tb_control_fsm` | per-cycle strobe counts, every weight index written once, phase order, k, stop |
| `tb_bpid_top` | the full 2000-cycle closed loop against the model (above) |

Assertions in the RTL check the handshake rules while any testbench runs with `--assert`:
the divider is never restarted while busy, the controller raises at most one strobe per clock
and never leaves stop, a weight store never sees a load and an update write together, and
in the top every memory write and consumer strobe lines up with its producer's `valid`.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/bpid_pkg.sv tb/tb_fx_pkg.sv tb/tb_bpid_top.sv --top-module tb_bpid_top -o sim
    ./obj_dir/sim

The full-loop test takes well under a second. To lint the design alone:

    verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/bpid_pkg.sv rtl/bpid_top.sv

## Departures and own choices

The published design fixes the following:

* the Q4.20 format
* the 4-5-3 network
* the structure of the plant and input-layer block, including the 30-bit pre-shift of the dividend
* the hidden-layer datapaths and the piecewise sigmoid with slope 0.95
* the pairing of weights in 48-bit words
* the five memories
* the state names and their grouping into four phases
* 2000 cycles
* the learning rate and the momentum factor

The following are this design's own:

* **Learning equations.** The published design does not print them. The usual
  gradient-descent-with-momentum rule of BP-network PID tuners is used. The plant gain is
  replaced by sign(dy)·sign(du). The activation derivatives are taken from the outputs: 2K(1-K)
  and 1-O².
* **Output activation.** The gains must not be negative, so the output layer uses (f(x)+1)/2.
  This reuses the hidden layer's comparator chain.
* **Weight-update order.** The published text gives the order in two conflicting ways. The
  state-machine description wins: hidden-to-output weights first, then input-to-hidden.
* **Work per state.** Only the phases are published. The work each state does and the
  transitions between states follow the table above.
* **Divider.** A bit-serial divider replaces the parallel one. It gives the same result at 78
  clocks per sample.
* **Start weights.** The start weights are LFSR-generated. The published values are not known.
  The default seed is one for which the test run shows every saturation case.
* **Reset, overflow and the u limit.** Reset is asynchronous and active high, as in the published waveforms, where the reset
  signal sits at 0 while the loop runs. Results saturate
  instead of wrapping. u is clamped at ±`U_LIM`.
* **Reference and plant coefficient.** r(k) and a(k) are inputs of the top, not generated
  inside.
* **Memory numbering.** Memory 4 holds the hidden-to-output weights and memory 5 the
  input-to-hidden weights. The published text and its block diagram number them the other way
  round from each other, and the text is followed here.

The published open-loop variant (the forward pass alone, with its own state machine) is not
built. The closed-loop controller contains its function.

## Files

* `rtl/bpid_pkg.sv`: format, sizes, arithmetic helpers, state type
* `rtl/bpid_top.sv`: the top level
* `rtl/control_fsm.sv`, `rtl/init_module.sv`: the controller and the start-up weight loader
* `rtl/input_layer.sv`, `rtl/seq_divider.sv`: the plant and the input layer, with its divider
* `rtl/hidden_input.sv`, `rtl/hidden_output.sv`, `rtl/pwl_sigmoid.sv`: the hidden layer
* `rtl/output_input.sv`, `rtl/output_output.sv`: the output layer
* `rtl/pid_incr.sv`: the PID law
* `rtl/wo_update.sv`, `rtl/wi_update.sv`: learning
* `rtl/data_memory.sv`, `rtl/weight_memory.sv`: storage
