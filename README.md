# A programmable sequential controller with built-in fault handling

This is a synchronous state machine whose hardware does not depend on the flow table it runs.
The next-state logic of every state variable is the same circuit: a full decoder tree over the
present state, whose leaves carry constants. The flow table exists only as those constants. The
constants are held in a register, so one circuit runs any flow table with up to 2^N states and
M input states. The same register is how the controller is made reliable:

- unused states can be sent back to a legal state (safe operation);
- with an even-parity state assignment, a one-gate detector flags every single fault;
- a cycle-test line lets the detector itself be tested;
- fault states can be made absorbing, with safe outputs (fail-safe operation);
- transitions can be moved off a faulty path (adaptive operation);
- n+1 fail-safe copies merged by one gate per output tolerate n faults.

None of these needs extra next-state hardware. They are all ways of programming the same
circuit.

## How a next state is formed

Each state variable y_k has its own circuit (`state_variable_cell`). It has three stages:

1. **Input switch matrix** (`input_switch_matrix`). The matrix has one row per present state
   S_s and one column per input state I_j. The cell at (s, j) holds bit k of the code of
   N_sj, the next state of S_s under I_j. The input state is one-hot. The active I_j picks
   column j in every row, so each row carries the bit of the next state that S_s would take
   under the current input.
2. **Binary-tree (BTS) network** (`bts_network`). This is a full binary tree over the present
   state. Each node has two branches: one enabled by a variable, the other by its complement.
   Exactly one leaf-to-root path is open, and it belongs to the present state. That path
   passes its row's bit to the root. The next-state value Y_k is
   `row_bits[state]`.
3. **D flip-flop**. It loads Y_k on the rising clock edge.

So the input picks a column of the flow table, the present state picks a row, and the table
entry at that point is loaded one clock later. `sm_core` puts N of these cells side by side.
Cell k takes bit k of every destination code. No logic is shared between state variables, so
a fault inside one cell can corrupt at most one bit of the next state. The fault handling
below depends on that.

Bit order: `state[N-1]` is y_1, the variable at the root of the tree, and `state[0]` is y_N,
the variable at the leaves. A state code is therefore read as a binary number with y_1 as its
most significant bit. In a pass-transistor layout every tree branch is one transistor. The RTL
writes each node as `(x & upper) | (~x & lower)`, one term per transistor, so that the
one-path-per-state structure stays visible. It synthesises to an ordinary multiplexer tree.

## Programming

`program_store` holds `dest_codes[s][j]`, the next state of S_s under input I_(j+1), and
`out_table[s]`, the output word of S_s. Both are read in parallel every cycle. There are two
write ports, and each writes one entry per clock at the rising edge:

| port | writes |
|---|---|
| `dc_we, dc_state, dc_col, dc_code` | next-state code of row `dc_state`, column `dc_col` (writes with `dc_col >= M` are ignored) |
| `ow_we, ow_state, ow_data` | output word of state `ow_state` |

`rst_n` (asynchronous, active low) clears every entry to 0. This means "go to S_0, outputs 0",
which is the fail-safe default. It also loads `RESET_STATE` into the state flip-flops. `init`
(synchronous, active high) reloads `RESET_STATE` without touching the program. Hold `init`
while you load or change a program, then release it.

Outputs (`output_logic`) are Moore outputs. Each output bit has one more BTS network over the
present state, with `out_table` as its constants.

Example, the six-state, three-input table used in the testbenches:

| state | I_1 | I_2 | I_3 |
|---|---|---|---|
| A | C | B | A |
| B | D | C | B |
| C | E | D | C |
| D | F | E | D |
| E | A | F | E |
| F | B | A | F |

With A=000 … F=101 on three variables, row A gets the codes 010, 001, 000. Bit y_3 of all
entries, row by row, is 010, 101, 010, 101, 010, 101, 000, 000, and those are the constants of
the y_3 cell. Codes 110 and 111 are unused and hold 000 here. So this program is also *safe*:
if the machine ever lands in an unused state, it returns to A on the next clock.

## Fault detection, and testing the detector

A single fault inside one cell changes at most one next-state bit. So the machine lands at
Hamming distance 1 from the intended state. Now take a **distance-two state assignment**, for
example all specified states of even parity: then every such landing is an odd-parity state
that no fault-free run ever reaches. `fault_detector` flags odd parity over the present state,
combinationally, in the same cycle the fault state is held. There are two ways to build it,
with the same function:

- `DET_XOR` is one XOR over the state (smallest; the default).
- `DET_BTS` is one more BTS network over the state, with constant 1 at the odd-parity leaves.
  It has the same layout as a state-variable circuit, so it costs no new design.

Going from a minimum-variable assignment to a distance-two one costs one state variable.
Together with the detector, that is two more circuits of the same kind.

The detector only ever sees states the machine never enters when it works, so it has to be
tested off-line. The unused rows are free, so program the fault states to cycle through one
another, for example on four variables:

    0001 → 0010 → 0100 → 0111 → 1101 → 1110 → 1000 → 1011 → 0001

Then raise `cycle_test`. This line inverts one single constant: row `TEST_STATE`, column
`TEST_COL`, in the cell of bit `TEST_BIT`. The next time the machine takes that transition,
it lands in the fault cycle and walks through all eight odd-parity states, and the detector
must flag each of them. The defaults (row 0101, column I_1, bit y_N) match the seven-state
example below: state 0101 then goes to 1110 instead of 1111.

## Fail-safe operation

A fail-safe program sends any fault to a fixed set of states whose outputs are safe, and never
back into the specified states. It needs four things:

- a distance-two assignment;
- S_0 (all zeros) and every state at distance 1 from it left unspecified;
- every unspecified state programmed to go to S_0;
- safe outputs (here 0) in every unspecified state.

The reference example is a seven-state cycle on four variables:

| state | code | next |
|---|---|---|
| 1 | 0101 | 2 |
| 2 | 1111 | 3 |
| 3 | 1100 | 4 |
| 4 | 1010 | 5 |
| 5 | 1001 | 6 |
| 6 | 0110 | 7 |
| 7 | 0011 | 1 |

Here is what each kind of fault does:

- A wrong bit in the next-state network: S_j becomes S_j⊕e, which goes to S_0, which goes to
  S_0.
- A stuck output of one network: the machine holds at S_0 or at a neighbour of S_0, and both
  are absorbing.
- A state flip-flop stuck at 1: the tree sees a fault state, the other variables go to 0, and
  the machine rests at the single-bit code of the stuck flip-flop (for y_1, 1000). That is
  again a fault state with safe outputs.

Note that S_0 itself has even parity, so the XOR detector does not flag it. Its safety comes
from its programmed outputs.

## Fault tolerance and adaptive repair

There are two ways to tolerate faults.

**By programming alone.** Use a state assignment with an error-correcting distance. Then give
every fault state next to a specified state the same row (and outputs) as that state. A single
fault then lands next to the intended state, and the machine carries on as if it had arrived
there. For example, take two states 0101 and 1010, which are four bits apart, and program all
eight neighbours this way. A fault that turns 0101→1010 into 0101→1011 still leads to the
right successor of 1010.

**By redundancy.**

`rsc_top` holds K = NF+1 controller copies. All copies get the same input state, the same
writes and the same `cycle_test`. Each output bit of the copies goes through one gate
(`safe_combiner`): OR when the safe output value is 0, AND when it is 1. A copy that has
failed safe drives the safe value, which cannot override a fault-free copy, so up to NF
faulty copies are masked. Each copy's state, fault flag and outputs are brought out, so a
supervisor can see which copy failed.

Because the program is a register, a transition path found faulty can be retired. Give a spare
non-fault code S_j the role of S_i. To do that, write S_j as the next state of every
predecessor of S_i, and copy the row and outputs of S_i to S_j. After that the pass path that
decodes S_i is never used again. This needs a spare code, so use a program that leaves one,
for example the six-state table on a distance-two assignment with 0011 spare.

## Modules

| module | role |
|---|---|
| `rsc_pkg` | `det_mode_e`, `comb_mode_e`, `odd_parity()` |
| `bts_network` | N-variable full binary decode tree over 2^N constants |
| `input_switch_matrix` | picks the active input column for every state row |
| `state_variable_cell` | matrix + tree + D flip-flop for one state variable |
| `sm_core` | N cells, plus the cycle-test constant inversion |
| `fault_detector` | odd-parity flag, XOR or BTS form |
| `program_store` | destination-code and output-word registers, write ports |
| `output_logic` | one BTS network per output bit |
| `reliable_controller` | store + core + detector + outputs; one-hot input assertion |
| `safe_combiner` | OR/AND merge of redundant outputs |
| `rsc_top` | NF+1 controllers and the combiner |

Top-level parameters of `rsc_top` and their defaults:

| parameter | default | meaning |
|---|---|---|
| `N` | 4 | state variables; 2^N states |
| `M` | 3 | input states (one-hot) |
| `P` | 2 | output bits |
| `NF` | 1 | faults tolerated (K = NF+1 copies) |
| `DET_MODE` | `DET_XOR` | detector form |
| `COMB_MODE` | `COMB_OR` | output gate |
| `RESET_STATE` | 5 (0101) | state after `rst_n` / `init` |
| `TEST_STATE`, `TEST_COL`, `TEST_BIT` | 5, 0, 0 | constant inverted by `cycle_test` |

Timing: the next state, the fault flag and the outputs are all combinational from the
registered state. A transition appears on `state` exactly one clock after its input. A
program write takes effect from the next rising edge. Series pass-transistor delay grows with
the square of the tree depth. A silicon BTS machine is therefore best kept to about five state
variables, and larger controllers split into several small machines. The RTL itself accepts
any N.

## Where this RTL makes its own choices

These points are not fixed by the architecture. They were chosen here:

- Reset and `init`, the reset state 0101, and clearing the program to all zeros.
- The one-hot input encoding, with "no input asserted" treated as passing code 0. In silicon
  an open network floats.
- The register-based program store and its two write ports.
- Moore outputs built from BTS networks. The architecture only requires that outputs be
  programmable and safe in fault states.
- Which constant `cycle_test` inverts. The inversion is set by parameters.
- The default size N=4, M=3, P=2, NF=1.
- Pairing OR with safe value 0 and AND with safe value 1.

What a logic model cannot show: the transistor-level effects. These are charge held on a
floating node (so some stuck-open faults go unseen while a bit does not need to change), the
value that wins when a stuck-on transistor connects two constants, and stuck-at-0 on a state
flip-flop (which can leave a tree input floating). The fail-safe arguments for those cases
rest on electrical behaviour, and the RTL does not reproduce them.

## Simulating

Each `tb/<module>_tb.sv` checks itself and ends with `TB_RESULT checks=… failures=…`. For
example, the whole design at its default parameters:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/rsc_pkg.sv tb/rsc_tb_pkg.sv tb/rsc_top_tb.sv --top-module rsc_top_tb -o sim
    ./obj_dir/sim

`-y rtl -y tb` lets verilator find each module in the file of its name. The two packages are
named first so they are read before the modules that import them. `-Wno-fatal` is needed for
the testbenches that inject faults with `force` on a flip-flop: verilator warns that the
flip-flop then has a second driver. Replace the testbench name to run any other block.

`rsc_top_tb` takes the two-copy design through the following, and fails if any of them never
happened:

- random runs of the six-state table, using all three inputs;
- a safe return from an unused code;
- an adaptive remap onto a spare code;
- the fail-safe cycle, with a fault sent into S_0;
- the full eight-state checker cycle;
- single-fault correction under the neighbour program;
- a stuck-at-1 state flip-flop in one copy, masked at the outputs.

`reliable_controller_tb` covers the same programs on one copy. It also forces the y_1 and
y_2 next-state networks stuck at 1 in state 0110, and checks that the machine passes through
1011 (resp. 0111) and comes to rest in 1000 (resp. 0100). It runs a second copy with the
BTS-form detector in lock step. `sm_core_tb` runs the
three-variable version of the six-state table. The smaller testbenches check each block
exhaustively or with random stimulus against values they compute independently.
`tb/rsc_tb_pkg.sv` holds the reference tables.
