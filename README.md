# PL-QDI: clocked logic mapped to quasi-delay-insensitive gates

This design takes a circuit written and synthesised as ordinary clocked logic and runs it
without a clock. Each gate of the clocked netlist becomes a self-timed dual-rail gate. Each
flip-flop becomes a special "barrier" gate. Acknowledge wires run back from every reader to its
driver. The result computes the same sequence of values as the clocked circuit, whatever the
gate delays are.

The method is called PL-QDI. It combines two ideas:

* **Phased Logic (PL):** a clocked netlist is treated as a marked graph of tokens. This view
  says where the initial tokens go and which feedback wires keep the system safe.
* **Quasi-delay-insensitive (QDI) gates:** precharged half-buffer (PCHB) style gates with
  four-phase dual-rail handshakes.

The RTL here contains:

* the gate library (through gate, barrier gate, constant generator, C-element and
  feedback-concentrator tree);
* four counters mapped gate by gate;
* a 64-bit floating-point clipper and its three-stage pipelined version, mapped by the same
  rules;
* the wrapper that lets a clocked ROM sit inside a PL-QDI netlist;
* `plqdi_top`, which holds all of them side by side.

## Signals and the four-phase protocol

Every data bit is a dual-rail pair `{t, f}` (type `plqdi_pkg::dr_t`):

| t f | meaning                          |
|-----|----------------------------------|
| 1 0 | logic 1                          |
| 0 1 | logic 0                          |
| 0 0 | null (spacer between two words)  |
| 1 1 | illegal (assertions catch it)    |

Each gate has an input acknowledge `le` and an output acknowledge `re`. Both are single-rail and
**active low**. `le` low means: "all my inputs have arrived and my output is valid".

A gate's `re` is the `le` of its reader. When there are several readers, their `le` wires are
joined by a Muller C-element, so `re` changes only once all readers agree.

One cycle of a through gate runs in four phases:

1. **Evaluate.** While its own `le` and its `re` are both high, the gate sets an output rail.
   It does so as soon as the inputs seen so far decide the value. An OR with one input at 1
   fires at once; this is *early evaluation*.
2. **Acknowledge.** `le` falls only when *every* input is valid and the output is valid. An
   early output therefore never lets a late input go unacknowledged.
3. **Precharge.** When both `le` and `re` are low, the output returns to null.
4. **Release.** `le` rises again once all inputs and the output are null.

Dual-rail inversion is just a swap of the two rails (`plqdi_pkg::dr_inv`), so NAND, NOR and
XNOR cost nothing extra, and an inverted flip-flop output needs no gate.

## The barrier gate and the initial token

A flip-flop holds a value at reset. Its PL-QDI stand-in, `plqdi_barrier`, must therefore show a
valid word on its output as soon as reset is released: the *initial token*. If it simply started
in the evaluate phase, two problems would follow:

* its own `re` would also hold a token, and the loop through it would carry two tokens. This
  breaks the one-token-per-loop safety rule, and the system either deadlocks or overwrites data;
* a plain PCHB gate cannot make an output out of nothing.

The barrier solves this with two flags:

* **`forced`** (set by reset) drives the reset value onto the output rails (`INIT_ONE` picks
  the rail). It stays until the first time the readers pull `re` low, which means the token
  has been consumed.
* **`armed`** (cleared by reset) keeps the gate from evaluating its real input until that
  first `re` low has happened. This removes the token that would otherwise sit on the output
  acknowledge.

After that, the barrier behaves as a one-input buffer gate. The forced token never takes part in
the input completion: `le` still reports the real input and the evaluated output.

Two more rules come from the same safety argument. Both appear in the counter and clipper
netlists:

* **Splitters:** a barrier may not feed another barrier directly, so a buffer ("splitter")
  through gate is placed between them.
* **Loop buffers:** a four-phase ring needs at least three gates. A loop such as barrier →
  next-state gate → barrier gets an extra buffer gate.

## Constant generators

`plqdi_const` stands for a tied-off input of the clocked design. It has no data inputs. Its
output is the valid code of `VALUE` while `re` is high and null while `re` is low, so it takes
part in the handshake like any other gate. Its unused rail is constant 0 by construction.

## Feedback concentration

`plqdi_celem` is a C-element of 1 to 4 inputs:

* the output rises when all inputs are high;
* it falls when all inputs are low;
* otherwise it holds.

`plqdi_fbcon` builds a tree of these for any number of acknowledges. Each level groups the
inputs in fours from index 0, so a join of N wires takes ceil(log4 N) clock edges. When a
fixed four-input C-element joins fewer than four wires, the spare inputs repeat a used wire.

## How time is modelled

A real PL-QDI circuit has no clock. To make it simulate and synthesise with standard tools, every
state node is a flip-flop on `clk` with an asynchronous active-low reset `rst_n`. This covers a
gate's output rails, its `le`, the barrier flags and the C-element outputs.

A gate may change state only on a `clk` edge where its **`step`** enable is high:

* holding `step` at all ones gives the fastest schedule;
* driving it with random bits gives every gate random, independent delays.

Each step bit is one gate's "delay". The circuits are correct only if the values they produce do
not depend on these patterns, and the testbenches check exactly that. C-elements have no step
input; their delay is folded into the gates around them.

Large netlists (the clippers) do not give each gate its own port. They take an 8-lane `step`
bundle, and gate k of an instance with salt S uses lane `(k + S) mod 8`
(`plqdi_pkg::lane`). Neighbouring gates thus get different delays.

The clock here is only a simulation device. The handshake is what orders events: no block
assumes any step pattern, and each has been run under random ones.

## The blocks

### Through gate — `plqdi_gate #(FN)`

This is a two-input dual-rail gate. `FN` selects BUF, INV, AND2, NAND2, OR2, NOR2, XOR2 or
XNOR2. The t and f "set" terms are sum-of-products of the input rails. This is the dual-rail
form of a pull-down network, and it gives early evaluation for AND and OR for free. The output
is held until precharge, domino fashion.

Timing: with step held high, an output goes valid one clock after its inputs, and `le` falls on
the next edge.

### Counters — `plqdi_counter #(WIDTH, HAS_EN)`

These are the four small test cases: 2- and 4-bit, each with and without a count enable. The
clocked source is `state <= state + en`, and its gate netlist is a ripple carry chain:

* `next_i = d_i XOR c_i`
* `c_{i+1} = d_i AND c_i`
* `c_0` is the enable word (`cnt_en`).

In the counter without enable, bit 0's next state is `NOT d_0`. That inverter is a buffer with
swapped rails, and it also acts as the splitter.

Each state bit is mapped to:

* a barrier (reset token 0);
* its next-state gate;
* a loop buffer (the two-gate loop needs a third gate);
* a carry AND where one is needed;
* four-input C-element joins on every signal with several readers.

Gate totals (the clocked counts include the flip-flops; the counters without enable take bit 0's
inverse from the flip-flop's inverted output):

| counter           | clocked gates | PL-QDI gates |
|-------------------|---------------|--------------|
| 2-bit with enable | 5             | 7            |
| 2-bit             | 3             | 6            |
| 4-bit with enable | 11            | 15           |
| 4-bit             | 9             | 14           |

Interface:

* `cnt_en` is one dual-rail word per count, acknowledged on `cnt_en_ack`.
* `dout` is the state, one word per count: word n is the state after n−1 enabled counts.
* `ext_re` is the acknowledge of `dout`.
* `step` has one bit per gate (see the module header for the index map).

### Clocked ROM wrapper — `plqdi_rom_wrapper #(ADDR_W=8, DATA_W=54)`

This lets a synchronous ROM (here sized for a 160 × 54-bit microcode store) live inside a PL-QDI
netlist. The wrapper:

1. waits until every address bit is valid;
2. pulses the ROM's read enable `rom_en` with the single-rail address;
3. captures `rom_data` one clock later and drives it as dual rail;
4. handshakes on both sides like a gate: `le` for the address, `re` for the data.

Like a barrier, it shows an initial token (`INIT_WORD`, default 0) after reset. It also does not
read the ROM until that token has been acknowledged. With step high, address to data takes three
clock edges.

The ROM itself is outside the wrapper. `plqdi_top` brings its port out, and the tests use a
behavioural ROM, `tb/tb_ucode_rom.sv`, filled by the formula in that file.

### Floating-point clipper — `plqdi_clipper #(W=64)`

This block passes a stream of IEEE-754 doubles and limits each value to `[lo, hi]`. The clocked
source is a four-state machine with a datapath:

| state   | action                    | next    |
|---------|---------------------------|---------|
| LOAD_LO | `lo <= din`               | LOAD_HI |
| LOAD_HI | `hi <= din`               | CMP_LO  |
| CMP_LO  | `t <= din < lo ? lo : din` | CMP_HI  |
| CMP_HI  | `t <= hi < t ? hi : t`    | CMP_LO  |

`dout = t`.

One comparator is shared by the two compare states:

* the operands are `X = is_lo ? din : t` and `Y = is_lo ? lo : hi`;
* the result is `pick ? Y : X` with `pick = XNOR(X < Y, is_lo)`.

Because every barrier fires once per word, each register has a hold multiplexer. The design takes
one input word per state, so a value is sent as two words: the value, then a filler that the
CMP_HI state ignores. Its clipped result appears two words later.

`plqdi_fpcmp` is the comparator. It is a ripple chain over the magnitude bits (`x_i < y_i`,
equal, carry-in), followed by a small sign stage:

`lt = (sa & ~sb) | (~sa & ~sb & |x|<|y|) | (sa & sb & |x|>|y|)`

NaNs are not treated specially, and −0 counts as smaller than +0. `plqdi_wmux` is a bitwise
dual-rail 2:1 multiplexer made of AND/AND/OR gates.

### Pipelined clipper — `plqdi_clipper_pipe #(W=64)`

This version has three stages:

1. takes a word and an opcode (`op`: 0 data, 1 load lower bound, 2 load upper bound, 3 no
   operation);
2. clips against `lo`;
3. clips against `hi`.

A dual-rail valid flag travels with each value. Every input word yields one output word, and a
data value comes out three words after it went in, with `dvalid` = 1.

### Top — `plqdi_top`

The top instantiates:

* the four counters;
* both clippers;
* the ROM wrapper (ROM port brought out);
* a logic-1 and a logic-0 constant generator.

They share only `clk` and `rst_n`. Ports are plain vectors. A dual-rail bus of W bits is 2W
bits wide, with bit i at `[2i+1:2i]` = `{t, f}`.

## Departures and limits

* **Clipper datapaths are reconstructions.** The clipper's function, its four states (two load
  and two compute) and the three-stage pipeline split are as specified. The datapath drawings
  were not available, so both datapaths are reconstructions. The published gate counts (1964
  for the non-pipelined clipper; 9180 clocked / 9308 PL-QDI for the pipelined one) are therefore
  not reproduced.
* **Netlists were mapped by hand.** The original flow used a separate mapping program on a
  synthesised netlist. Here the counter and clipper netlists were mapped by hand with the same
  rules: barriers, splitters, loop buffers and C-element joins. The 2-bit enable counter
  follows the published netlist. The other counters are mapped the same way and reach the
  published gate totals.
* **The picoJava-II FPU is not included.** Its microcode ROMs are not included either; only
  the wrapper around such a ROM is.
* **Gates are clocked cell models.** A gate is a cycle-level model with clocked state and a
  step enable, not a transistor-level PCHB cell. Isochronic forks and analogue timing are
  outside this model.
* **Reset** is asynchronous and active low.
* **Initial values:** the barriers of the counters and clippers reset to a 0 token, and the ROM
  wrapper's initial word is zero.

## Simulating

All files are in `rtl/` (design) and `tb/` (testbenches and test environments). Every testbench
prints `TB_RESULT checks=<n> failures=<n>` and ends with `$finish`. Each has a watchdog. With
verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_plqdi_top \
    rtl/plqdi_pkg.sv rtl/*.sv tb/tb_counter_env.sv tb/tb_clipper_env.sv \
    tb/tb_clipper_pipe_env.sv tb/tb_ucode_rom.sv tb/tb_plqdi_top.sv
./obj_dir/Vtb_plqdi_top
```

(`-y rtl -y tb` also finds the files by module name.) The tests are:

| testbench                 | what it checks |
|---------------------------|----------------|
| `tb_plqdi_gate`           | all eight functions against truth tables under random step and handshake timing; early firing of AND/OR; `le` waiting for every input |
| `tb_plqdi_barrier`        | initial token value, its removal on the first `re` low, no evaluation before that, then buffer behaviour |
| `tb_plqdi_const`          | null in reset, valid value while `re` is high, null while it is low |
| `tb_plqdi_celem`, `tb_plqdi_fbcon` | C-element hold/switch rules; trees of 3, 16 and 257 inputs |
| `tb_plqdi_counter`        | the four counters (random and all-ones step) against a clocked reference, including wrap-around and held counts |
| `tb_plqdi_rom_wrapper`    | initial token, data of random addresses, three-edge latency, no ROM read before the first acknowledge |
| `tb_plqdi_clipper`, `tb_plqdi_clipper_pipe` | bounds −5/+5 and 1000 random doubles in [−15, 15], against a clocked model and against clip(x) in real arithmetic; pipeline latency of three words |
| `tb_plqdi_top`            | everything together at full size; counts each mechanism (counter wraps and held counts, values clipped low/high/passed, pipeline no-ops, ROM reads and initial token, constant-generator words, early evaluations) and fails if any never occurs |

The full top test takes about three minutes to build and under a minute to run.
