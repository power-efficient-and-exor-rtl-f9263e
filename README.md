# AND-EXOR-Inverter networks for Achilles' heel functions

An *Achilles' heel function* is a read-once sum of products:

    f = c_1 + c_2 + ... + c_q,    c_i = AND of p literals on p inputs of its own

No input appears in more than one cube, so the function has n = p*q inputs.
Because of this, algebraic factoring has nothing to share between cubes. The
complement of f has p^q prime cubes. Written as an EXOR of products (a
two-level AND-EXOR form), f needs 2^q - 1 products. That form is what the
inclusion-exclusion expansion a + b = a ^ b ^ ab gives when applied to every
subset of cubes. EXOR-based networks are attractive for testability: a
fan-out-free tree of EXOR gates passes any single fault to the output
whatever the input vector. But the product count grows exponentially.

This RTL builds the cheaper alternative. Two identities are used:

* disjoint cubes may be EXORed instead of ORed, since a + b = a ^ b when ab = 0;
* a + b = a ^ (~a & b).

Used together, they give

    f = t_1 ^ t_2 ^ ... ^ t_q,    t_i = c_i & ~c_1 & ~c_2 & ... & ~c_(i-1)

Term t_i is true exactly when c_i is the first true cube, so the terms are
disjoint and their EXOR equals their OR. The network needs only q products and
q-1 *cube inversions* (an inverter on a whole cube output). The conventional
form needs 2^q - 1 products and no cube inversions. Input inverters are the
same in both forms: none for the positive variant, one per input for the
negative variant, and one per cube for the pure-horn variant.

| Variant | Literals of a cube | Input inverters | Products | Cube inverters |
|---|---|---|---|---|
| PAH (positive) | all true | 0 | q | q-1 |
| PHAH (pure horn) | one complemented, the rest true | q | q | q-1 |
| NAH (negative) | all complemented | n | q | q-1 |

Everything is combinational. There are no clocks, registers or reset.

## The network of one function (`ah_paei`)

```
 x[P-1:0] ──► ah_cube ──c_1──┬──────────────────────────► t_1 ─┐
 x[2P-1:P] ─► ah_cube ──c_2──┼─┬─► AND(c_2, ~c_1) ──────► t_2 ─┤ EXOR tree
   ...                       │ │                                ├─(≤3-input)──► f
 x[QP-1:..]─► ah_cube ──c_Q──┼─┼─► AND(c_Q, ~c_1..~c_Q-1) ► t_Q ─┘
                            inverters on c_1 .. c_(Q-1)
```

* **`ah_cube`**: the variant's input inverters, then an AND of the P literals.
  In a pure-horn cube the complemented literal is the cube's lowest input
  (`x[i*P]`). That choice is this design's own. `ah_pkg::cube_inv_mask`
  gives the polarity of each literal.
* **`ah_disjoint_terms`**: the Q-1 cube inverters and the Q product terms. Term
  `t_1` is cube `c_1` itself, so `term[0]` is a plain wire from `cube[0]`. Term
  `t_i` is a separate AND tree over `c_i` and the `i-1` earlier inverted cubes.
  The terms share no AND gates. Only the cube outputs and their inversions fan
  out.
* **EXOR tree**: a `gate_tree` of EXOR gates over the Q terms.

Cube `i` reads the inputs `x[i*P +: P]`. Cube `c_1` (index 0) has the highest
priority. Another order would give the same function with a different
arrangement of inverters.

## Fan-in limits (`gate_tree`)

The networks are meant for a standard-cell library. In that library no AND
gate has more than four inputs and no EXOR gate more than three. `gate_tree`
reduces N signals with gates of at most `MAX_FANIN` inputs. Each level takes
the signals of the level below in groups of `MAX_FANIN`, from left to right.
The last group may be smaller, and a group of one is just a wire. The tree
has `ceil(log_MAX_FANIN(N))` levels, and every gate output feeds exactly one
gate. The limits are `ah_pkg::AND_MAX_FANIN = 4` and `XOR_MAX_FANIN = 3`. The
left-to-right grouping is a choice of this design. Other balanced groupings
are equally valid.

A synthesis tool is free to restructure these trees. The RTL describes the
intended gate network; it does not force one.

## The benchmark set (`ah_suite`, top level)

The top holds 30 independent functions: p = 2..6 literals per cube, q = 2..3
cubes, and all three variants. A function is named by p, its variant and its
input count n = p*q: 2PAH4, 2PAH6, 3PAH6, 3PAH9, ..., 6NAH18.

| Parameter | Default | Meaning |
|---|---|---|
| `P_MIN`, `P_MAX` | 2, 6 | range of literals per cube |
| `Q_MIN`, `Q_MAX` | 2, 3 | range of cubes per function |

Ports, as unpacked arrays indexed `[v][p-P_MIN][q-Q_MIN]`, where `v` is 0 for
PAH, 1 for PHAH and 2 for NAH:

* `x[v][pi][qi]`, `P_MAX*Q_MAX` bits (18). Bits `p*q-1:0` are the function's
  inputs; the bits above are unconnected.
* `f[v][pi][qi]`: the function's output.

For example, 4PHAH12 reads `x[1][2][1][11:0]` and drives `f[1][2][1]`. At the
defaults, synthesis gives about 200 word-level cells, and no flip-flops.

A single function of any size comes from `ah_paei` with parameters `VARIANT`
(`ah_pkg::ah_variant_e`), `P` and `Q` (Q >= 2). The testbench also builds the
32-input case P = 2, Q = 16.

## Files

| File | Contents |
|---|---|
| `rtl/ah_pkg.sv` | variant and gate-type enums, fan-in limits, literal mask and tree-size functions |
| `rtl/gate_tree.sv` | fan-in-limited AND/EXOR tree |
| `rtl/ah_cube.sv` | one cube with its input inverters |
| `rtl/ah_disjoint_terms.sv` | cube inverters and disjoint product terms |
| `rtl/ah_paei.sv` | one function |
| `rtl/ah_suite.sv` | the 30-function benchmark set (top) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench computes its expected values directly from the definitions
(for example, the OR over cubes of the AND of their literals). No testbench
re-uses the EXOR form. Each one prints `TB_RESULT checks=N failures=M`.

* `tb_gate_tree`: AND trees of 1, 4, 6 and 17 inputs and EXOR trees of 2, 7
  and 18 inputs, against `&` and `^`. Trees of up to 7 inputs get every input
  vector; the wider trees get random vectors and corner vectors.
* `tb_ah_cube`: all variants with P = 2..6, every input vector.
* `tb_ah_disjoint_terms`: K = 2..6, every cube pattern. It checks three
  things:
  * that the first true cube selects its term;
  * that at most one term is true;
  * that the EXOR of the terms equals the OR of the cubes.
* `tb_ah_paei`: 18 functions (p = 2..4, q = 2..3) with every input vector,
  plus p = 2, q = 16 with 20,000 random vectors per variant.
* `tb_ah_suite`: runs the full top at its default parameters. All 30
  functions see all of their input vectors (2^18 steps). For each function it
  counts three kinds of vector:
  * no cube true;
  * two or more cubes true, the case in which the cube inversions matter;
  * vectors where term i carries the output. This count is checked against
    its exact value, 2^(p(q-i)) * (2^p - 1)^(i-1) for term i = 1..q.

Each of these testbenches was also run against a copy of its module with one
deliberate defect, and every defect was caught. The defects were:

* OR instead of EXOR in the tree;
* the input inverters removed;
* the cube inverters removed;
* the EXOR fed with the cubes instead of the terms;
* the variants swapped.

All of the testbenches finish within seconds.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ah_pkg.sv tb/tb_ah_suite.sv \
          --top-module tb_ah_suite -Mdir obj_suite
./obj_suite/Vtb_ah_suite
```

Replace `tb_ah_suite` with any other testbench name. `--lint-only -Wall` on
`rtl/ah_pkg.sv rtl/<module>.sv` lints a module on its own. The only warnings
are about package constants that the module does not use.

## Scope and limits

* Only the proposed network is built. The conventional AND-EXOR form with
  2^q - 1 products is the reference design it is measured against, and it is
  not included.
* The networks were characterised for power in a 130 nm standard-cell process
  at three corners (typical 1.2 V/25 °C, worst 1.08 V/125 °C, best
  1.32 V/0 °C), with inputs switching at 100 MHz. In that study the network
  used about half the total and dynamic power of the conventional
  decomposition. It saved 42-44 % of the leakage power at each corner. The
  cell library and the power flow are outside this RTL, so none of these
  figures can be reproduced from it.
* The following are choices of this design, not given by the method:
  * the tree shape;
  * which literal of a pure-horn cube is complemented;
  * the assignment of inputs to cubes;
  * the cube priority order.

  Each of them leaves the function unchanged.
* Input reordering to lower switching power is a possible further
  optimisation. It needs the input signal probabilities and is not done here.
