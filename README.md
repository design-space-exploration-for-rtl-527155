# Generated cryptographic building blocks: a 192-bit digit-serial adder and an AES control FSM

Public-key hardware spends most of its area and time on arithmetic over
large numbers, and the best way to build such an operator depends on
whether area or speed matters more. The approach behind this RTL is to
write one description of an operator, generate several hardware
architectures from it, synthesise all of them, and keep the one that meets
the requirements. That works best when the generated code stays at a high
level, so the synthesis tool can still optimise it.

This repository holds the generated hardware for the two examples of that
flow, written as parameterised SystemVerilog:

* a **192-bit sequential adder** (192 bits is a common field size in
  elliptic-curve cryptography). It works through the operands one W-bit
  digit per clock. The digit width W is 8, 16, 32 or 64, and the W-bit adder
  core is one of four architectures: ripple-carry, carry-select, Sklansky
  parallel-prefix, or a plain `+` that leaves the structure to synthesis.
  That gives 16 variants.
* a **17-state Moore FSM that sequences an AES-128 datapath**, in two
  architectures: *Comb*, whose outputs are decoded from the state register,
  and *Sync*, whose outputs come from their own flip-flops. Sync feeds those
  flip-flops from a look-ahead output function, so its outputs are not
  delayed.

The two examples are unrelated circuits. The top module `crypto_dse_top`
puts them side by side. It holds all four adder architectures at one digit
width and both FSM versions.

## The digit-serial adder (`seq_adder`)

```
            start/load                                  shift (busy)
  a[191:0] ──► [ operand shift reg A ] ──digit a_i (W)──┐
                                                        ▼
                                                 ┌─────────────┐  sum digit  [ result shift reg ] ──► sum[191:0]
                                                 │ W-bit adder │───────────► (digits enter at top)
                                                 │    core     │
  b[191:0] ──► [ operand shift reg B ] ──digit b_i (W)──►      │──► carry flip-flop ──► cin (next digit)
                                                 └─────────────┘         │
                                                                         └──► cout
                          [ digit counter: 192/W cycles, busy, last ] ──► done
```

* **Operand registers** (`digit_shift_reg`, used twice) take `a` and `b` in
  parallel on `start`. They then shift right by W bits per clock, so the
  core sees the least significant digit first.
* **The core** (`adder_core`) adds the two digits and the carry left from
  the previous digit. The **carry flip-flop** stores the core's carry-out.
  It is cleared when new operands are loaded, and its final value is the
  sum's carry-out `cout`.
* **The result register** (also `digit_shift_reg`) takes each sum digit in
  at its top. After 192/W shifts the first digit has reached bit 0 and the
  register holds the whole sum.
* **The counter** (`digit_counter`) makes the operation last exactly 192/W
  cycles.

### Timing

| W  | cycles per addition | digits |
|----|---------------------|--------|
| 8  | 24                  | 24     |
| 16 | 12                  | 12     |
| 32 | 6                   | 6      |
| 64 | 3                   | 3      |

The handshake works as follows:

* While `busy` is low, a one-cycle `start` pulse loads the operands on its
  clock edge.
* Each of the next 192/W edges processes one digit.
* `done` pulses for one cycle right after the last of those edges, that is,
  192/W cycles after the start edge.
* From then on `sum` and `cout` hold the result until the next `start`.
* A `start` pulse while `busy` is high is ignored.

A wider digit means fewer cycles, but a longer carry path inside the core
and therefore a lower clock. The area is dominated by the three 192-bit
registers, so it changes little with W. The design-space search trades
these two effects against each other.

### The four cores

All four share one port list: `a`, `b` and `cin` in; `sum` and `cout` out.
All are purely combinational. `adder_core` selects one of them with the
`ARCH` parameter (`dse_pkg::adder_arch_e`).

* **`rca_adder`** (`ARCH_RCA`) is W full adders written as explicit gates.
  The carry ripples through every bit.
* **`csa_adder`** (`ARCH_CSA`) cuts the digit into 4-bit blocks:
  * the lowest block is a ripple-carry adder fed by `cin`;
  * every other block computes its sum twice, for a carry-in of 0 and of 1;
  * a multiplexer then picks one of the two sums, using the carry from the
    block below;
  * so the carry crosses each block through a single multiplexer.
* **`sklansky_adder`** (`ARCH_SKLANSKY`) is a parallel-prefix adder:
  * each bit forms a generate/propagate pair, and `cin` is folded into
    bit 0's generate;
  * a tree of log2(W) levels combines the pairs with the prefix operator
    `(g1,p1)∘(g0,p0) = (g1 | p1&g0, p1&p0)`;
  * at level *l*, every bit whose index has bit *l* set combines with the
    top bit of the 2^l-bit group directly below it;
  * the tree's depth is logarithmic, and the fan-out doubles at each level.
* **`behavioral_adder`** (`ARCH_BEHAVIORAL`) is `{cout,sum} = a + b + cin`.
  On an FPGA it maps onto the dedicated carry chain. In the reference
  FPGA results it came out best overall on clock rate and area, which is
  why it is the default.

The first three are written out of gates on purpose. They pin the structure
down, so synthesis cannot re-optimise it, and comparing them with the `+`
version shows how much that costs.

## The AES controller (`aes_ctrl_fsm`, `aes_fsm_pkg`)

### Two ways to build a Moore machine

`aes_fsm_pkg` holds the whole behaviour of the controller in two functions:

* `aes_next_state(state, in)` is the transition function;
* `aes_output(state)` is the Moore output function.

`aes_ctrl_fsm` decides only where the registers sit. The parameter
`SYNC_OUTPUTS` chooses between the two versions:

* **Comb** (`SYNC_OUTPUTS = 0`, default): state register, then
  `ctrl = aes_output(state_q)`. The outputs are combinational logic behind
  the state flip-flops, so they can glitch. Their delay also adds to the
  delay of whatever logic they drive.
* **Sync** (`SYNC_OUTPUTS = 1`): the outputs get their own register. If that
  register simply re-timed `aes_output(state_q)`, every output would arrive
  one cycle late. Instead it is loaded with `aes_output(state_d)`: the
  output function applied to the *next* state, the value about to enter the
  state register. Each output then appears in the same cycle as its state,
  straight from a flip-flop.

The two versions behave identically at their ports, cycle for cycle, and
the testbenches check this. Sync costs a few flip-flops. It pays off only
when the output decoding plus the logic the FSM drives would otherwise set
the critical path.

The state type is an enum without explicit values. A synthesis tool's FSM
extraction can therefore pick the encoding (binary, one-hot, Gray), and
exploring those encodings is a synthesis option rather than an RTL change.

### States and control word

The controller sequences an iterative AES-128 encryption. Its 17 states are:

| state | meaning | active outputs |
|-------|---------|----------------|
| `S_IDLE` | wait for `start` | none |
| `S_LOAD` | load plaintext and key | `load_en` |
| `S_ARK0` | initial AddRoundKey | `ark_en` |
| `S_RND1` … `S_RND9` | full rounds | `sub_en mix_en ark_en key_en`, `round` = 1…9 |
| `S_RND10` | final round, no MixColumns | `sub_en ark_en key_en`, `round` = 10 |
| `S_OUT0` … `S_OUT3` | present ciphertext word 0…3; advance on `out_ready` | `out_valid`, `out_sel` = 0…3 |

`busy` is high in every state except `S_IDLE`. The first output word
appears 13 cycles after the start edge.

## Top level (`crypto_dse_top`)

Parameters: `N = 192` (operand width) and `W = 32` (digit width).

* The four `seq_adder` instances share `add_start`, `add_a` and `add_b`.
* Each adder has its own `add_sum[k]`, `add_cout[k]`, `add_busy[k]` and
  `add_done[k]`, where k is the `adder_arch_e` value: 0 RCA, 1 CSA,
  2 Sklansky, 3 behavioural.
* The Comb and Sync FSMs share `fsm_in` (`start`, `out_ready`).
* Each FSM brings out its control word (`fsm_ctrl_comb`, `fsm_ctrl_sync`)
  and its state (`fsm_state_comb`, `fsm_state_sync`).
* Clock and reset are shared. Every register uses the rising edge and an
  asynchronous active-low reset `rst_n`.

For a single configuration, instantiate `seq_adder #(.W(..), .ARCH(..))` or
`aes_ctrl_fsm #(.SYNC_OUTPUTS(..))` directly.

## What follows the reference design, and what was chosen here

These parts follow the reference design:

* the 192-bit width and the digit widths 8/16/32/64;
* the four core architectures;
* the adder built from two input shift registers, an output shift register
  and a cycle counter;
* the latency of 192/W cycles;
* the two Moore FSM architectures, including the look-ahead output
  function;
* the 17-state count of the AES controller;
* leaving the state encoding open.

These parts are this implementation's own choices:

* the start/busy/done handshake, the parallel operand load and
  least-significant-digit-first order, and the carry flip-flop between
  digits;
* the reset style (asynchronous, active low) and the rising clock edge;
* the 4-bit block size of the carry-select core;
* **the AES state graph, the FSM inputs and the control-word fields**. Only
  the state count is fixed; the states listed above are one plausible
  controller with 17 states. Treat this block as an example of the two FSM
  architectures, not as a ready controller for a particular AES datapath;
* the defaults W = 32 and `ARCH_BEHAVIORAL`. 32 bits is the behavioural
  core's fastest width in the reference FPGA results;
* putting all architectures in one top.

Not included:

* the gate-level FSM netlist produced by earlier functional-HDL tools. It
  served only as a baseline to compare against;
* the AES datapath itself, which is not specified;
* the area and clock figures behind the design-space selection. Those come
  from FPGA synthesis runs and are not reproduced here.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_rca_adder`, `tb_csa_adder`, `tb_sklansky_adder`, `tb_behavioral_adder` | 8-, 32- and 64-bit cores against wide integer addition: corner cases (full-width carry ripple, all ones, alternating bits, single bits) and 2000 random vectors |
| `tb_digit_shift_reg` | parallel load, hold, digit order out and in, load priority over shift |
| `tb_digit_counter` | busy length, a single `last` in the right cycle, count sequence, start ignored while busy; COUNT = 6 and 24 |
| `tb_seq_adder` | all 16 variants (4 cores × 4 widths) on the same operands: exact sum and carry, latency exactly 192/W, single-cycle `done`, start ignored while busy |
| `tb_aes_ctrl_fsm` | Comb and Sync against an independent model of the state graph every cycle, same-cycle agreement, 13-cycle latency to the first word, all 17 states visited, output stalls |
| `tb_crypto_dse_top` | the whole top at default parameters: 202 additions on all four architectures, random FSM traffic |

`tb_crypto_dse_top` also counts each mechanism and fails if one never
occurs:

* carries between digits;
* carry-out of the full word;
* ignored starts on the adders and on the FSM;
* complete encryptions;
* output stalls;
* visits to each of the 17 states.

Running a testbench with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/dse_pkg.sv rtl/aes_fsm_pkg.sv tb/tb_crypto_dse_top.sv \
    --top-module tb_crypto_dse_top -o sim
./obj_dir/sim
```

Swap in any other testbench name for a single block. Each testbench runs in
well under a second.

## Changing it

* **Digit width**: set `W` on `seq_adder` or `crypto_dse_top`. It must
  divide `N`, and for the carry-select core it must also be a multiple of 4
  (elaboration assertions catch violations).
* **Core**: set `ARCH` on `seq_adder`.
* **Operand width**: set `N`. The design is generic, and 192 is just the
  reference size.
* **AES controller**: edit the states and control word in `aes_fsm_pkg`
  only. Both FSM architectures pick up the change, because they share the
  two functions.
