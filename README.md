# Fault-tolerant combinational circuit: one self-checking copy plus one plain copy

Triple modular redundancy masks a faulty copy of a circuit by running three
copies and voting. It costs three copies, and the voter itself is a single
point of failure. This design masks faults with two copies of the function:

* **`tsc_cs1`** is a *totally self-checking* copy. Besides its outputs `Y1`, it
  drives check bits `Z1`, and `(Y1, Z1)` is a code word whenever the copy works.
  A fault inside it either leaves the output correct or produces a word that
  is not in the code.
* **`cs2`** is a cheap copy with no checking at all.
* **`tsc_checker`** reads `(Y1, Z1)` and reports on two rails `(u1, u2)`: `01`
  or `10` for a code word, `00` or `11` for an error. Its own faults also show
  up as `00`/`11`.
* **`ft_mux`** passes `Y1` to the output while everything about `Y1` looks
  valid. Otherwise it passes `Y2` from the plain copy.

The fault model is transient or intermittent faults that come **one at a
time**: a new fault appears only after the previous one has gone. Under that
model, exactly one part can be faulty at any moment, and each case is covered:

* **Checked copy faulty:** its error is flagged, or its output is still right.
  When the error is flagged, the plain copy is fault-free and is used.
* **Plain copy faulty:** the checked copy is right and is passed.
* **Checker or multiplexer faulty:** both copies are right, so it does not
  matter which one reaches the output.

There is no clock anywhere. The whole circuit is combinational, and `Y`
follows `X` after gate delays only.

```
              +---------+  Y1        +-------------+ u1
      X1 +--->| tsc_cs1 |----o(2)--->| tsc_checker |---------+
         |    |         |  Z1 |      |             | u2      |
 X --(1)-+    |         |-----|----->|             |-------+ |
         |    +---------+     |      +-------------+       | |
         |                    +-- Y1 ----------------+     | |
         |                    +-- NOT Y1 = Y1* ----+ |     | |
         |                                         v v     v v
         |    +---------+  Y2                    +-----------+
      X2 +--->|   cs2   |----------------------->|  ft_mux   |---> Y
              +---------+                        +-----------+
```

Point (1) splits the inputs between the two copies. Point (2) splits `Y1`
three ways: into the checker, straight into the multiplexer, and inverted into
the multiplexer as `Y1*`. Each line of `Y1` therefore reaches the multiplexer
as a two-rail pair, so a stuck line between point (2) and the multiplexer can
also be seen.

## The multiplexer rule

For output line `i`, with `u = (u1, u2)`:

| u      | y1_i, y1*_i | y_i    |
|--------|-------------|--------|
| 01, 10 | 1 0         | 1 (= y1_i) |
| 01, 10 | 0 1         | 0 (= y1_i) |
| 01, 10 | 0 0 or 1 1  | y2_i   |
| 00, 11 | any         | y2_i   |

So `sel_i = (u1 XOR u2) AND (y1_i XOR y1*_i)`, and `y_i = sel_i ? y1_i : y2_i`.
By default (`PER_LINE = 1`), a broken pair moves only its own line to `Y2`. With
`PER_LINE = 0`, `Y1` is passed only if the flag and *every* pair are valid, and
otherwise the whole word comes from `Y2`. Both settings keep the output correct
under a single fault. `ft_top` uses the per-line default.

## The self-checking copy

A self-checking circuit needs a code, and a way of building the circuit so that
any single fault can only turn a code word into a non-code word. This design
uses the simplest code, **odd parity** over `(Y1, Z1)` with one check bit
(`Z1` is the inverted predicted parity of `Y1`). Odd rather than even means
that all-zero and all-one words are never valid.

A parity code sees only an odd number of flipped bits. The circuit is therefore
built so that **no gate is shared between outputs**. Each output has its own
logic cone: each sum bit, the carry-out, and the parity bit. Each cone has a
private copy of the carry chain it needs, so one internal fault can disturb at
most one output bit. The parity cone predicts the output parity from the
inputs and its own carry chain:

```
parity(sum, cout) = XOR(a) ^ XOR(b) ^ XOR(c[0..N-1]) ^ c[N]
z                 = NOT parity
```

This makes `tsc_cs1` larger than a plain adder: it has N+2 carry chains
instead of one. That is the price of self-checking, and the reason the second
copy is a plain one.

The two copies use different gate families to make a common-mode defect less
likely. `tsc_cs1` uses only NOR gates and `cs2` uses only NAND gates. The gates
are the functions in `ftc_pkg`.

**Keep the cones apart in a netlist.** A synthesis tool sees that the N+2 carry
chains are logically identical and merges them, and with them goes the
fault-secure property. A real implementation must stop that sharing, for
example with keep/dont-touch attributes or a hand-placed netlist. The RTL
describes the structure; it cannot enforce it.

## The checker

`tsc_checker` is the classic self-checking parity checker. The word is split
into two halves, and each half has its own XOR tree:
`u1 = XOR(cw[K-1:0])`, `u2 = XOR(cw[W-1:K])`, with `K = W/2`.
A code word (odd parity) gives `u1 != u2`, and a single-bit error gives
`u1 == u2`. Over the code words, each tree output takes both values. So a
stuck-at fault on either output, or inside either tree, shows up as `00`/`11`
for some normal input, and the checker tests itself during normal operation.

## The example function

The scheme works for any combinational function. These files need one, so the
protected function here is an **N-bit adder with carry-in**:

| port | width  | meaning |
|------|--------|---------|
| `x`  | 2N+1   | `{cin, b[N-1:0], a[N-1:0]}` |
| `y`  | N+1    | `{cout, sum[N-1:0]} = a + b + cin` |

The default is N = 4: 9 inputs, 5 outputs and 1 check bit. `ft_top` has only
the ports `x` and `y`. The checker flag stays internal, as in the original
scheme.

To protect a different function:
1. Rewrite `tsc_cs1` so that each output and the parity bit come from separate
   cones. Keep `z` as the inverted predicted parity.
2. Rewrite `cs2` in any cheap form.
3. Adjust the widths in `ft_top`.

`tsc_checker` and `ft_mux` are generic in their widths.

## Limits

* **Faults on the input lines of the checked copy are not caught.** Suppose an
  input line between point (1) and `tsc_cs1` is stuck. Every cone then sees
  the same wrong input and produces a correct code word for that wrong input.
  No parity code can tell. The end-to-end test measures this: with each of the
  9 input lines stuck at 0 and at 1, 4608 of the 9216 (input, fault) pairs
  give a wrong `Y`. Those are exactly the cases where the stuck value differs
  from the applied bit. Covering these faults needs coded inputs or a
  comparison with `Y2`, and this design has neither.
* Faults on the primary inputs `X` (before point 1) and outputs `Y` are outside
  the fault model, as are two faults at the same time.
* The single-fault behaviour is verified by forcing nets of the RTL, not on a
  gate-level netlist (see "Keep the cones apart in a netlist" above).

## Reliability compared with TMR

This comes from the analytic model that motivates the scheme; it is not a
property of these files. Let the interface (voter or multiplexer) have
reliability R. The plain function is T times as complex as the interface, so
its reliability is R^T. A self-checking copy is δ times as complex again,
giving R^(δT).

* TMR: `(3·R^(2T) − 2·R^(3T))·R`
* Two self-checking copies with a masking interface: `(2·R^(δT) − R^(2δT))·R`
* This scheme, which fails only if both copies fail or the multiplexer fails:
  `(R^T + R^(δT) − R^((δ+1)T))·R`

At R = 0.99:

| δ   | T   | single copy | TMR   | two self-checking | this scheme |
|-----|-----|-------------|-------|-------------------|-------------|
| 1.2 | 50  | 0.605       | 0.649 | 0.787             | 0.813       |
| 1.2 | 150 | 0.221       | 0.124 | 0.298             | 0.345       |
| 1.8 | 50  | 0.605       | 0.649 | 0.639             | 0.757       |
| 1.8 | 150 | 0.221       | 0.124 | 0.127             | 0.270       |

The example adder's own size has nothing to do with these T values.

## Files

| file | contents |
|------|----------|
| `rtl/ftc_pkg.sv`     | default width, NOR-only and NAND-only gate functions |
| `rtl/tsc_cs1.sv`     | self-checking adder with a parity bit, independent NOR cones |
| `rtl/cs2.sv`         | plain NAND ripple-carry adder |
| `rtl/tsc_checker.sv` | two-rail parity checker |
| `rtl/ft_mux.sv`      | output multiplexer (`PER_LINE` selects the rule) |
| `rtl/ft_top.sv`      | the scheme, with branch points as named nets |
| `tb/tb_*.sv`         | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends. For
example, for the whole scheme:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/ftc_pkg.sv rtl/tsc_cs1.sv rtl/cs2.sv rtl/tsc_checker.sv rtl/ft_mux.sv \
  rtl/ft_top.sv tb/tb_ft_top.sv --top-module tb_ft_top -o sim
./obj_dir/sim
```

For a single module, name that module's file (with `rtl/ftc_pkg.sv` first) and
its testbench in the same way.

You need `-Wno-fatal` because Verilator prints an `UNOPTFLAT` warning for each
carry chain. Each chain is held in one vector, and each bit depends on the bit
below it. The warning is only about simulation speed: there is no real
combinational loop.

What the testbenches check, all exhaustively over every input word at N = 4:

* **`tb_tsc_cs1`:** the sum and the odd parity, fault-free. Then each carry
  that reaches an output, and each output line, is stuck at 0 and at 1. Every
  result must be either the correct code word or a non-code word, and each
  fault must produce a non-code word for at least one input.
* **`tb_cs2`:** the sum, at N = 4 and at N = 1.
* **`tb_tsc_checker`:** code words and non-code words, at W = 6 and W = 2. It
  also checks that both rails toggle over the code words.
* **`tb_ft_mux`:** the table above, for every combination of inputs, with both
  `PER_LINE` settings.
* **`tb_ft_top`:** runs at the default parameters. It applies every input with
  no fault, then with a single stuck-at fault on each line of every covered
  class:
  * carries and outputs of the checked copy;
  * checker inputs and rails;
  * inputs, internal nets and outputs of the plain copy;
  * both lines of each two-rail pair into the multiplexer;
  * each select of the multiplexer.

  The output must stay correct in every case. It also counts how often each
  mechanism fired: `Y1` passed, checker flag raised, pair broken, plain-copy
  error masked, and select fault masked. Each must fire at least once.

Faults are injected with `force`/`release` on the named nets. That is why
`ft_top` keeps separate wires for every branch line (`x1`, `x2`, `y1_chk`,
`y1_mux`, `y1n_mux`).

## What is fixed by the scheme and what is chosen here

These come from the scheme:
* the four blocks and their wiring;
* the two-rail checker output and its meaning;
* the inverted second copy of `Y1`;
* the multiplexer truth table;
* the single-fault model;
* the suggestion of parity checking and of different gate families.

These are choices made for these files:
* the adder as the example function, and N = 4;
* the single odd-parity check bit;
* separate carry chains per output;
* the split-tree checker;
* per-line selection by default, with the word-wide rule as an option;
* a purely combinational design with no clock or reset.
