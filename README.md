# Fuzzy flip-flops and fuzzy memory elements

Binary flip-flops store 0 or 1. A *fuzzy* memory stores a truth value
anywhere in [0, 1] and updates it with fuzzy logic operators instead of
Boolean ones. This design has three kinds of such storage, all in
synthesizable SystemVerilog:

1. **Fuzzy flip-flops (D, T, SR).** These generalize the binary flip-flops.
   Their next-state equations are the Boolean ones with AND, OR and NOT
   replaced by a fuzzy t-norm, s-norm and negation. Each one can be built
   under any of four common fuzzy operation systems.
2. **Fuzzy memory elements.** Instead of a fixed next-state equation, a small
   control code tells the register what to do with its input this cycle:
   hold, load, minimum or maximum, and in the larger variant also negation,
   bounded product and bounded sum. This fits the min/max work of fuzzy
   inference better than any fixed flip-flop equation, and it is cheaper.
3. **A membership memory for Mamdani inference.** A row of slightly extended
   memory elements holds one fuzzy set, with one element per point of the
   universe of discourse. Every element executes the same command in the
   same cycle. A small sequencer drives the row through one inference rule:
   - match the input against the rule's condition
   - find the matching degree (a maximum over the whole row)
   - clip the consequent to that degree
   - merge the outputs of other rules

The three kinds are independent. The top module `fuzzy_memory_top` places
them side by side, sharing only the clock and reset.

## Coding of fuzzy values

A fuzzy value is an unsigned code `x` that stands for `x / ONE`. The code 0
means false and `ONE` means true.

| where | width `W` | `ONE` | why |
|---|---|---|---|
| flip-flops, logical / bounded / drastic | 4 | 15 (`1111`) | all codes used |
| flip-flops, algebraic | 5 | 16 (`10000`) | the product `a*b/ONE` becomes a shift |
| memory elements and the array | 8 | 128 (`1000_0000`) | a power of two; 129..255 are unused |

These constants are in `rtl/fuzzy_pkg.sv`. Every module takes `W` and `ONE`
as parameters, so other resolutions need only a parameter change. Inputs
above `ONE` are outside the coding. Assertions in the memory elements report
one that is used.

## Operation systems

`fuzzy_tnorm` and `fuzzy_snorm` are combinational. Their parameter
`OPSYS` (`op_sys_e`) selects one of four operation systems. Negation is
always `ONE - x`.

| `OPSYS` | t-norm (fuzzy AND) | s-norm (fuzzy OR) | hardware |
|---|---|---|---|
| `OPS_LOGICAL` | min(a, b) | max(a, b) | one comparator and a mux |
| `OPS_ALGEBRAIC` | a·b | a + b − a·b | multiplier |
| `OPS_BOUNDED` | max(0, a + b − 1) | min(1, a + b) | adder and compare |
| `OPS_DRASTIC` | a if b = 1, b if a = 1, else 0 | a if b = 0, b if a = 0, else 1 | compares with constants only |

The algebraic product is truncated, `floor(a*b/ONE)`. The algebraic sum uses
that same truncated product.

## Fuzzy flip-flops

All three flip-flops update on the rising clock edge. An asynchronous,
active-low `rst_n` clears them to 0.

- **`d_fff`**: `Q(t+1) = D(t)`. This is a plain W-bit register, and it is
  the same under every operation system.
- **`t_fff`**: a fuzzy toggle. `FORM` picks one of two forms, which agree for
  binary values but not in general:
  - minterm (`T_MINTERM`): `Q+ = (T ∧ ¬Q) ∨ (¬T ∧ Q)`
  - maxterm (`T_MAXTERM`): `Q+ = (T ∨ Q) ∧ (¬T ∨ ¬Q)`

  Here ∧ and ∨ are the t-norm and s-norm of `OPSYS`. With T = 1 it inverts
  Q; with T = 0 it holds.
  - Under max-min the two forms are identical.
  - Under the bounded system they reduce to `|T − Q|` (minterm) and
    `min(T+Q, 2−T−Q)` (maxterm).
  - Known limit under max-min: once Q = ½, the flip-flop stays at ½ whatever
    T is.
- **`sr_fff`**: `SRTYPE` picks one of two types:
  - set type (`SR_SET_TYPE`): `Q+ = S ∨ (¬R ∧ Q)`. Set wins when S = R = 1.
  - reset type (`SR_RESET_TYPE`): `Q+ = ¬R ∧ (S ∨ Q)`. Reset wins when
    S = R = 1.

  Under max-min the set type is never below the reset type. Example in
  tenths: S = 0.5, R = 0.9, Q = 0.9 gives 0.5 (set type) and 0.1 (reset
  type).

Each flip-flop is built from `fuzzy_tnorm` / `fuzzy_snorm` instances and
`ONE - x` negations. There are no extra registers or pipelining.

## Fuzzy memory elements

The state Q is stored in an 8-bit register and is also the output. I is the
data input and C the control code. Everything is sampled on the rising edge.

| C | `fmem_maxmin` (C is 2 bits) | `fmem_bounded` (C is 3 bits) |
|---|---|---|
| 0 | hold | hold |
| 1 | Q ← I | Q ← I |
| 2 | Q ← min(Q, I) | Q ← min(Q, I) |
| 3 | Q ← max(Q, I) | Q ← max(Q, I) |
| 4 | — | Q ← 1 − Q |
| 5 | — | Q ← max(0, Q + I − 1) |
| 6 | — | Q ← min(1, Q + I) |
| 7 | — | hold (not defined by the source) |

The max-min element needs only one comparator (`I < Q`) and a 4-way
multiplexer. The same compare result chooses the operand for both min and
max. In the bounded element, a 9-bit adder forms Q + I. That sum can exceed
1 for a moment, and the bounded results are formed from it before they are
stored.

## The membership memory and its maximum search

This is the least obvious part of the design.

### The element (`fmem_cell`)

Each element extends the max-min memory element with three things:
- a *buffer* register
- a one-bit *state* (active / inactive)
- input links: the broadcast bus, its own peer-to-peer lane, and the buffers
  of its left and right neighbours

All elements receive one shared command word (`cell_cmd_t`) with three
fields:
- `ctrl`: `CTRL_HOLD` (nothing changes) or `CTRL_OPERATION`
- `is` (input select): where the operand comes from. `IS_BUS`, `IS_P2P`,
  `IS_LEFT` or `IS_RIGHT`.
- `op`: what to do

| `op` | effect |
|---|---|
| `OP_LOAD` | memory ← operand |
| `OP_MIN` | memory ← min(memory, operand) |
| `OP_MAX` | memory ← max(memory, operand) |
| `OP_COPY` | buffer ← memory |
| `OP_SCAN` | buffer ← max(buffer, operand) |
| `OP_MARK` | state ← (memory == buffer) |

One comparator does all the comparing. For `OP_SCAN` it compares against
the buffer; for everything else it compares against the memory.

### The array (`fmem_array`)

Element k holds the membership grade at point k of the universe. With
`N = 128` the array holds one fuzzy set over 128 points. A whole membership
function goes in or out in one cycle: it is written through the `N`
peer-to-peer lanes (`p2p_in`) and read on `mem_out`.

- With the `OP_LOAD`, `OP_MIN` and `OP_MAX` commands, a host can combine a
  stored function pointwise with another function, or with one value on the
  bus. Each such combination takes one cycle.
- Neighbour links at the two ends read 0, the neutral value for max.

### Finding the maximum grade

The maximum grade over the whole row is the height of a fuzzy set, and the
matching degree of a rule. The array finds it with local operations only,
in four steps:

1. **Copy.** `OP_COPY` copies every memory into its buffer.
2. **Scan right.** `OP_SCAN` from `IS_LEFT`, repeated N−1 times. Each
   element takes the max of its buffer and its left neighbour's buffer.
   Afterwards buffer k holds the maximum of elements 0..k.
3. **Scan left.** `OP_SCAN` from `IS_RIGHT`, repeated N−1 times. Afterwards
   every buffer holds the maximum of the whole row.
4. **Mark.** `OP_MARK` makes each element whose memory equals the maximum
   active.

Several elements may be active if several points reach the maximum. A
combinational *state chain* runs from element 0 upwards and picks the first
active element. When `bus_src` is 1, that element drives its memory onto the
bus; otherwise the bus carries `ext_bus`. An `OP_LOAD` from `IS_BUS` then
copies the value into every element. `bus_valid` tells whether any element is
active. If none is, the bus carries 0.

The search takes 2N cycles. Its hardware grows only linearly: one buffer, one
state bit and one OR-gate stage per element. A comparator tree or a wired-OR
bus would be faster but larger. The state chain and the bus mux are the
array's only long combinational paths, N elements deep.

## Mamdani inference sequencer (`mamdani_seq`)

A start pulse runs one rule. The sequencer issues one command per cycle:

| step | cycles | command | peer-to-peer lanes must carry (`p2p_sel`) |
|---|---|---|---|
| LOAD | 1 | memory ← input | 0: input membership function |
| MATCH | 1 | memory ← min(memory, condition) | 1: the rule's condition |
| COPY | 1 | buffer ← memory | — |
| SCANR | N−1 | scan from the left neighbour | — |
| SCANL | N−1 | scan from the right neighbour | — |
| MARK | 1 | mark elements at the maximum | — |
| BCAST | 1 | first marked element drives the bus, every memory loads it; captured as `match_degree` | — |
| CLIP | 1 | memory ← min(memory, consequent) | 2: the rule's consequent |
| MERGE | `n_other` | memory ← max(memory, other rule j) | 3: output of rule `other_idx` = j |
| DONE | 1 | `done` high; `mem_out` holds the result | — |

- **Latency.** From the start cycle to the `done` cycle is `2N + 5 + n_other`
  clock cycles. With N = 128 and no other rules that is 261 cycles.
- **Who supplies the data.** The sequencer does not hold membership functions
  itself. Whatever drives `p2p_in` must present, in the same cycle, the vector
  named by `p2p_sel` and `other_idx`.
- **Ignored inputs.** `start` is ignored while `busy` is high.
- **Arbitration in the top.** In `fuzzy_memory_top`, the sequencer owns the
  array command while it is busy. The rest of the time the host's
  `host_cmd`, `host_bus_src` and `host_bus` control the array directly. This
  is how membership functions are loaded, combined and inspected outside
  inference.

## Top-level ports (`fuzzy_memory_top`)

- `dff_d`, `dff_q`: the D fuzzy flip-flop (4 bits).
- `tff_t[k]`, `tff_q[k]`, `tff_max_q[k]`: the minterm and maxterm T fuzzy
  flip-flops under operation system k (0 logical, 1 algebraic, 2 bounded,
  3 drastic). Both forms are driven by the same T input.
- `srff_s[k]`, `srff_r[k]`, `srff_set_q[k]`, `srff_rst_q[k]`: the set-type
  and reset-type SR fuzzy flip-flops under operation system k.
- Width of the flip-flop ports: they are 5 bits wide. Only the algebraic
  system uses bit 4; for the others it is driven 0.
- `fmm_*` and `fmb_*`: the max-min and bounded memory elements.
- `host_*`, `p2p_in`, `mem_out`, `active_out`, `bus`, `bus_valid`: the
  membership memory array.
- `inf_*`: the inference sequencer.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one:
- compares the module against a reference model written independently of it
- prints `TB_RESULT checks=<n> failures=<m>` and stops
- has a watchdog

`tb/tb_fuzzy_ref.svh` holds the reference t-norms and s-norms.

With Verilator 5, run from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module tb_fuzzy_memory_top rtl/fuzzy_pkg.sv tb/tb_fuzzy_memory_top.sv
./obj_dir/Vtb_fuzzy_memory_top
```

Replace the top module name to run another testbench.
`tb_fuzzy_memory_top` runs the whole design at its default size (N = 128)
and takes well under a second. It checks:
- every flip-flop under every operation system against reference models
- both memory elements under every control code
- host-mode loading and combining of membership functions
- four inference rules at full size, including a rule whose matching degree
  is reached at many points, a host command that must be ignored during
  inference, and the latency `2N + 5 + n_other`

It counts how often each mechanism occurred and fails if any never did. The
mechanisms are: toggle, hold, the two T forms disagreeing, set, reset,
S = R = 1, each memory-element
code, scans in both directions, marking, ties, broadcast, clip, merge, and
host override.

The block testbenches run smaller arrays (N = 8) so that random command
sequences can be checked against a model element by element.

`tb_sr_fff_bits` builds the set-type SR flip-flop at widths from 1 to 16
bits under all four operation systems and checks all 36 instances against
a 64-bit model. It uses `ONE = 2^W − 1`, except for the algebraic system,
which uses `2^(W−1)`.

## Origin of the design, and choices made here

These parts follow the source description directly:
- the value coding
- the four operation systems
- the D, T (both forms) and SR (both types) next-state equations
- the control codes 0–6 of the two memory elements
- the element's parts: memory, active/inactive state, comparator, broadcast bus,
  neighbour links, peer-to-peer path, shared control
- the order of the inference steps: match by min, broadcast the matching
  degree to all elements, clip by min, merge other rules by max, output

These are this design's own choices, because the source does not give them:
- **Internal circuits of the memory elements.** The source gives only their
  behaviour, so the simplest structure that does the job is used.
- **Command word of the extended element.** The encoding, and the copy /
  scan / mark operations, are this design's own. The source shows the parts
  and the steps (`Ctrl ← Hold`, `IS ← Peer-to-peer`, `Ctrl ← Operation`,
  `Op ← min`) but not the element's port list, state diagram or circuit.
- **How the maximum is found.** The two scans, marking by equality, and the
  choice of the first marked element are this design's interpretation of
  the matching procedure.
- **Array size N = 128.** The source gives no size for this array. 128 is the
  number of processing elements of the SIMD fuzzy processor it is compared
  with.
- **Reset.** The asynchronous reset to 0 is an addition.
- **Rounding.** The algebraic product is truncated.
- **Control code 7** of the bounded element holds.
- **Host/sequencer arbitration** and the peer-to-peer request protocol
  (`p2p_sel`, `other_idx`) are this design's own.
- **SR example.** One worked example in the source gives a set-type result
  below the reset-type result for S = 0.5, R = 0.1, Q = 0.9. That
  contradicts the set-type equation, which gives 0.9. The equation is
  implemented.

Not included:
- the JK fuzzy flip-flop and the other circuits the design is compared
  against
- the purely algebraic classification of flip-flop logic forms, which has no
  hardware of its own
- gate-level area and delay figures. The source's numbers come from its own
  FPGA synthesis runs and are not targets of this RTL.
