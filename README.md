# Adaptive parallel prefix adder with run-time topology selection

A carry only ripples through the bit positions where the two operands differ,
that is where the propagate bit `P = A ^ B` is one. This adder looks at that
run of propagate bits before each addition. It sorts the addition into one of
three classes and takes the result from the prefix adder that suits the
class:

| class  | condition on `P` (LSB first)      | run of ones in `P` from the LSB | adder       | flag |
|--------|-----------------------------------|---------------------------------|-------------|------|
| SHORT  | `~P[0] \| (P[0] & ~P[1])`         | 0 or 1                          | Brent-Kung  | `BA` |
| MEDIUM | `P[0] & P[1] & ~P[2]`             | exactly 2                       | Sklansky    | `SA` |
| LONG   | `P[0] & P[1] & P[2]`              | 3 or more                       | Kogge-Stone | `KA` |

The operands are 4 bits wide. The three adders work in parallel on the same
operands. A small FSM makes the choice, raises exactly one of `BA`, `SA` and
`KA`, and registers the chosen sum and carry-out.

## Structure

```
 A, B ──► carry_classifier ── cls ──► appa_fsm ── BA/SA/KA ─────────────┐
  │        (P = A^B, class)           capture│ load│ clear│ valid        │
  │                                          ▼     │      │              ▼
  └──────────────► operand regs ──► brent_kung_adder ──► topology_mux ──► result regs ──► sum, cout
     (A, B, cin)    (a_q,b_q,cin_q) ─► sklansky_adder  ──►  (one-hot      (sum, cout)
                                    ─► kogge_stone_adder ─►   AND-OR)
```

| file | contents |
|------|----------|
| `rtl/appa_pkg.sv` | the `gp_t` generate/propagate pair, the prefix operator `prefix_op()`, the `carry_class_t` and `appa_state_t` enums, and `classify()` |
| `rtl/carry_classifier.sv` | `P = A ^ B` and the class of the three low propagate bits |
| `rtl/brent_kung_adder.sv`, `rtl/sklansky_adder.sv`, `rtl/kogge_stone_adder.sv` | the three prefix adders, combinational, any power-of-two width |
| `rtl/topology_mux.sv` | picks the (sum, cout) of the flagged adder |
| `rtl/appa_fsm.sv` | the control FSM |
| `rtl/adaptive_adder_fsm.sv` | the top: operand and result registers around the above |

## The prefix adders

All three adders work in the same three phases:

1. **Pre-processing.** `G_i = A_i & B_i` and `P_i = A_i ^ B_i`. The carry-in
   is folded into bit 0 (`G_0 := G_0 | P_0 & cin`). As a result, every group
   generate `G[i:0]` that comes out of the tree is already the carry into bit
   `i+1`.
2. **Prefix tree.** Pairs are merged with
   `(Gk,Pk) o (Gj,Pj) = (Gk | Pk&Gj, Pk&Pj)`, with the more significant group
   on the left.
3. **Post-processing.** `S_i = P_i ^ C_i` with `C_0 = cin`, and
   `cout = C_WIDTH`.

The adders differ only in the shape of the tree. Each tree is described by a
constant function `partner(k, i)`. It gives the position that node `i` merges
with at level `k`, or -1 if the node passes through unchanged. Generate loops
then build the tree. The trees at the default 4-bit width:

| adder | level 1 | level 2 | level 3 | cells | levels | largest fan-out |
|-------|---------|---------|---------|-------|--------|-----------------|
| Kogge-Stone | 1:0, 2:1, 3:2 | 2:0, 3:0 | – | 5 | log2 n = 2 | 2 |
| Sklansky | 1:0, 3:2 | 2:0, 3:0 (both from 1:0) | – | 4 | log2 n = 2 | n/2 |
| Brent-Kung | 1:0, 3:2 | 3:0 | 2:0 | 4 | 2 log2 n − 1 = 3 | 2 |

At 4 bits, Sklansky and Brent-Kung have the same cells. They differ only in
whether `2:0` is formed at level 2 (Sklansky, fan-out 2 on `1:0`) or at level
3 (Brent-Kung, the down-sweep). The generic rules, with span `d`:

* Kogge-Stone, level `k`, `d = 2^(k-1)`: every `i >= d` merges with `i-d`.
* Sklansky, level `k`: every `i` with bit `k-1` set merges with
  `((i >> (k-1)) << (k-1)) - 1`, the top node of the lower half-block.
* Brent-Kung, up-sweep `k = 1..log2 n`, `d = 2^k`: `i` with
  `(i+1) mod d = 0` merges with `i - d/2`. Down-sweep
  `k = log2 n + 1 .. 2 log2 n − 1`, `d = 2^(2 log2 n − k)`: `i >= d` with
  `(i+1) mod d = d/2` merges with `i - d/2`.

## Control FSM and timing

The FSM has six states:

* `IDLE` clears the outputs.
* `CHECK` classifies the live inputs.
* `SHORT`, `MEDIUM` and `LONG` each select one adder.
* `OUTPUT` presents the result.

The sequence is `IDLE → CHECK → {SHORT|MEDIUM|LONG} → OUTPUT → CHECK → …`.
There is no start input, so `IDLE` moves to `CHECK` on the first clock edge
after reset. After that, operations follow each other every three cycles:

| cycle | state | what happens at the rising edge that ends the cycle | visible during the cycle |
|-------|-------|------------------------------------------------------|--------------------------|
| 0 | `CHECK` | `A`, `B`, `cin` are captured. `BA`/`SA`/`KA` are set from the class of the live `A ^ B`. | previous result, previous flag |
| 1 | `SHORT`/`MEDIUM`/`LONG` | the flagged adder's `sum`/`cout` are registered | new flag |
| 2 | `OUTPUT` | – | new `sum`, `cout`; `valid` = 1 |

What this means for a user:

* `A`, `B` and `cin` only have to be stable at the edge that ends `CHECK`.
  The design ignores them at all other times.
* The latency from that edge to the result is two edges.
* The result and the flag are held until they are replaced.
* `rst` is synchronous and active high. It clears `sum`, `cout` and the three
  flags. The first rising edge at which `rst` is low moves the FSM from `IDLE`
  to `CHECK`, and the next edge captures the first operand.
* `valid` can be used to find the phase: the cycle after `valid` is always
  `CHECK`.

`appa_fsm` has concurrent assertions for two rules: at most one flag is set
at any time, and each select state carries its own flag.

## Interface of `adaptive_adder_fsm`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous reset, active high |
| `A`, `B` | in | `WIDTH` | operands |
| `cin` | in | 1 | carry in |
| `sum` | out | `WIDTH` | registered sum |
| `cout` | out | 1 | registered carry out |
| `BA`, `SA`, `KA` | out | 1 each | Brent-Kung / Sklansky / Kogge-Stone selected; one-hot after reset |
| `valid` | out | 1 | high in `OUTPUT`: a new result is on `sum`/`cout` |

The only parameter is `WIDTH`, which defaults to 4. It must be a power of two
and at least 4. Only `P[2:0]` is classified, whatever the width.

## What is taken as given and what is chosen here

These parts follow the published description:

* the classification conditions;
* the mapping from class to adder;
* the three-phase prefix-adder structure and the prefix operator;
* the FSM state list and the order `CHECK → select → OUTPUT`;
* the 4-bit width;
* the port names `A`, `B`, `cin`, `clk`, `rst`, `sum`, `cout`, `BA`, `SA`,
  `KA`, and the top-level name `adaptive_adder_fsm`.

These are this implementation's own choices:

* folding the carry-in into bit 0;
* the exact tree wiring (the standard Brent-Kung, Sklansky and Kogge-Stone
  shapes);
* the unconditional `IDLE → CHECK` and `OUTPUT → CHECK` steps, which give
  continuous three-cycle operation;
* the operand capture in `CHECK`;
* registered flags that are held until the next selection;
* a synchronous reset;
* the zero output of the multiplexer when no flag is set;
* the `valid` output;
* the generic widths.

Points a user should know before relying on the design:

* **The choice never changes the result.** Every adder is a correct adder,
  so `sum`/`cout` are the same whichever one is flagged. The flags report the
  classification; they do not affect the arithmetic.
* **No speed gain in this synchronous form.** All three adders are built and
  all of them settle within the same clock period, so the critical path is
  that of the slowest adder (Brent-Kung) plus the multiplexer. On top of that,
  an operation takes three cycles. Any average-delay benefit from the
  selection would need clocking or completion detection that depends on the
  selected path, and that is not described here.
* **The conditions and the usual examples disagree.** `00001111 + 00000001`
  is usually given as a long carry chain, yet it has `P = 00001110`, so
  `P[0] = 0` and the class is SHORT. `10101010 + 01010101` is usually given as
  a short one, yet it has `P = 11111111` and is classed LONG. The conditions
  measure how far a carry *could* propagate from bit 0. They ignore where
  carries are generated. The RTL implements the conditions as written, and
  `tb/tb_carry_examples.sv` shows the outcome.

## Verification

Each testbench checks against values it computes its own way: integer
addition for the adders, and the length of the run of ones for the classes.
Each one ends by printing `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| `tb_brent_kung_adder`, `tb_sklansky_adder`, `tb_kogge_stone_adder` | 4-bit and 8-bit widths exhaustively (a, b, cin); 16 bits with random operands plus the full-length chain |
| `tb_carry_classifier` | all 256 4-bit pairs and random 8-bit pairs, against the run length; every class occurs |
| `tb_topology_mux` | every legal selection with random data |
| `tb_appa_fsm` | random classes and random resets, against a cycle-level reference model; three-cycle spacing of results; every state visited |
| `tb_adaptive_adder_fsm` | default parameters, end to end. All 512 operations, 300 random ones, and a reset in the middle of an operation. Checks flags, result, latency and reset values, with junk on the inputs outside `CHECK`. Every class and every mechanism must occur. |
| `tb_carry_examples` | the two 8-bit examples above, on an 8-bit instance |

To run one with Verilator 5 (the package must come first):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_adaptive_adder_fsm \
    rtl/appa_pkg.sv rtl/carry_classifier.sv rtl/appa_fsm.sv rtl/brent_kung_adder.sv \
    rtl/sklansky_adder.sv rtl/kogge_stone_adder.sv rtl/topology_mux.sv \
    rtl/adaptive_adder_fsm.sv tb/tb_adaptive_adder_fsm.sv
./obj_dir/Vtb_adaptive_adder_fsm
```

Every testbench finishes in well under a second.
