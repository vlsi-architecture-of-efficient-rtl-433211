# Hybrid multiplier: an 8 x 8 multiplier built on hybrid carry-select adders

The time a multiplier takes is mostly set by the carry chains of the adders
that sum its partial products. This design is an 8 x 8 unsigned multiplier.
It sums the eight partial-product rows with a small tree of *hybrid adders*.
Each hybrid adder is cut into groups. The lowest group is a plain adder. Each
higher group is a carry-select stage, and each stage uses one of three fast
adder styles:

* **Ling**, for low logic depth in the carry;
* **Han-Carlson**, a parallel-prefix tree;
* **Weinberger**, a carry-lookahead adder.

A carry-select stage adds its slice once, with carry-in 0. A Binary to
Excess-1 Converter (BEC) makes the carry-in-1 result from that sum by adding
one. A multiplexer then picks one of the two results with the carry arriving
from below. Only the multiplexers lie on the long carry path.

All logic is combinational. The product is ready one adder-tree delay after
the operands change. There are no registers, clock or reset.

## The multiplier tree (`hybrid_multiplier`)

The rows are C_i = A AND B[i] (i = 0..7). Row i has weight 2^i. Three stages
of hybrid adders sum them:

| stage | adders | inputs of one adder | result |
|---|---|---|---|
| 1 | four 8-bit | `C(2k+1)` and `{0, C(2k)[7:1]}` | `pair_k = {cout, sum, C(2k)[0]}`, 10 bits, = 2*C(2k+1) + C(2k) |
| 2 | two 12-bit | `{pair_(2j+1), 00}` and `{00, pair_2j}` | `quad_j`, 12 bits, = 4*pair_(2j+1) + pair_2j |
| 3 | one 16-bit | `{quad_1, 0000}` and `{0000, quad_0}`, cin = 0 | product P[15:0] |

Stage 1 does not add the lowest bit of the lower row. That bit has nothing
to add to, so it passes beside the adder and becomes bit 0 of the pair. In
stages 2 and 3, the operand alignment puts the upper value in the high bits
and zero-extends the lower one.

Two carry-outs are redundant:

* A quad is at most 3825, so the 12-bit adders never carry out.
* 255 * 255 < 2^16, so the 16-bit adder never carries out.

These carry-outs are left unconnected. The testbench checks that they stay 0.

## The hybrid adders

Each adder extends the next smaller one with one more carry-select group. The
exception is the 16-bit adder, which is a square-root carry-select adder of
its own.

| adder | bits and how they are added | carry-in |
|---|---|---|
| `hybrid_adder6`  | 0-3: 4-bit Han-Carlson; 4-5: 2-bit Ling + BEC + MUX | none (0) |
| `hybrid_adder8`  | 0-5: `hybrid_adder6`; 6-7: 2-bit Weinberger + BEC + MUX | none (0) |
| `hybrid_adder12` | 0-7: `hybrid_adder8`; 8-11: 4-bit Ling + BEC + MUX | none (0) |
| `hybrid_adder16` | 0-1: 2-bit ripple (takes cin); 2-3: 2-bit ripple; 4-6: 3-bit Weinberger + BEC + MUX; 7-10: 4-bit Han-Carlson + BEC + MUX; 11-15: 5-bit Ling + BEC + MUX | `cin` port |

The group widths in the 16-bit adder grow by one per group (2, 2, 3, 4, 5).
This is the square-root carry-select rule. A wider group has more time to
finish its own addition, because the carry from below reaches it later.

### One carry-select group (`csel_group`)

`csel_group #(W, KIND)` builds the selected adder (`hm_pkg::adder_kind_e`)
with carry-in 0. Its (W+1)-bit result `{cout0, sum0}` feeds a (W+1)-bit `bec`
and one side of a (W+1)-bit `csel_mux`. The mux select is the incoming
carry. The carry-out passes through the mux too, so it is selected the same
way as the sum. The BEC can never wrap: a W-bit add with carry-in 1 always
fits in W+1 bits.

### The three fast adders

All three take the same inputs (`a`, `b`, `cin`) and give the same outputs
(`sum`, `cout`). In this design their `cin` is always tied to 0. The port is
there so that each module is a complete adder on its own. All three use
generate g = a&b and propagate p = a^b.

* **`ling_adder`** works with Ling's pseudo-carry h[i] = g[i] | c[i] in place
  of the carry. Since g[j] implies t[j] = a[j]|b[j], each product term of
  h[i] needs one transmit signal fewer than the true carry. An example:
  h[i] = g[i] | g[i-1] | t[i-1]g[i-2] | ...
  Each h[i] is a flat sum of products of the inputs. The true carry
  c[i+1] = t[i]&h[i] is formed only where a sum bit needs it.
* **`hancarlson_adder`** is a Han-Carlson prefix tree. The odd bits first
  combine with their even neighbours. A Kogge-Stone tree then runs over the
  odd bits only. One final level gives each even bit the prefix of the odd
  bit below it. The carry-in is folded into bit 0's generate.
* **`weinberger_adder`** expands the carry recurrence c[i+1] = g[i] | p[i]c[i]
  into full lookahead form. Every carry is then computed in parallel. The
  design uses 2- and 3-bit instances, so the whole adder is one lookahead
  group. No multi-level group structure is built for wider adders.

The other leaf modules are simple:

* `ripple_carry_adder` is a chain of full adders.
* `bec` computes dout[i] = din[i] XOR (AND of all lower bits).
* `csel_mux` is a 2:1 multiplexer.

## Where this RTL makes its own choices

The published architecture fixes the tree, the adder widths, the group
boundaries, and the adder style of each group. These points are this
design's own reading:

* **Partial products.** The rows are named but not defined. They are built as
  AND rows C_i[j] = A[j] & B[i]. This is the only reading under which the
  tree computes A*B.
* **Signedness.** The operands are unsigned. The tree pads with zeros, which
  only suits unsigned operands.
* **Timing.** There are no pipeline registers. The architecture shows none.
  The clock in the original FPGA test set-up belongs to the on-board probes,
  not to the multiplier.
* **16-bit adder carry-in.** The `cin` port exists, as in the published
  16-bit adder. The multiplier ties it to 0.
* **Adder internals.** The internals of the Ling, Han-Carlson, Weinberger,
  BEC and MUX units are not given. The standard textbook forms described
  above are used.
* **Gate counts.** No attempt is made to match the published gate-count
  estimate for the multiplier. That estimate lists 88 2:1 multiplexers. This
  RTL has 61 multiplexer bits: 6 in each 8-bit adder, 5 more in each 12-bit
  adder, and 15 in the 16-bit adder. The estimate is not broken down, so its
  counting rule is unknown.
* **Test set-up not included.** The original FPGA test set-up used vendor
  virtual-I/O and logic-analyser cores, with the clock on package pin Y9 and
  LVCMOS33 I/O. That set-up is not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each one compares the module's outputs with values computed independently in
the testbench. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each has a cycle watchdog.

| testbench | what it applies |
|---|---|
| `tb_hybrid_multiplier` | all 65536 operand pairs, checked against a*b |
| `tb_ripple_carry_adder`, `tb_ling_adder`, `tb_hancarlson_adder`, `tb_weinberger_adder` | widths 2, 3, 4, 5 and 8, every 8-bit operand pair with both carry-in values |
| `tb_csel_group` | every group configuration used in the design, all inputs |
| `tb_hybrid_adder6`, `tb_hybrid_adder8` | all operand pairs |
| `tb_hybrid_adder12`, `tb_hybrid_adder16` | full-length carry cases, then 300000 random pairs (with random carry-in for the 16-bit adder) |
| `tb_bec`, `tb_csel_mux`, `tb_partial_product_gen` | all inputs |

`tb_hybrid_multiplier` also does more than check products. From the operands
alone it works out the carry entering every carry-select group of every
adder in the tree. It counts how often each group position takes its BEC
path. A position that is never exercised counts as a failure. It also
confirms that the redundant carry-outs stay 0.

All testbenches pass. Each has also been run against a deliberately broken
copy of its module, and each failed as it should.

## Simulating

Run from the repository root. `rtl/hm_pkg.sv` must come first, because the
adders import it:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/hm_pkg.sv tb/tb_hybrid_multiplier.sv --top-module tb_hybrid_multiplier
./obj_dir/Vtb_hybrid_multiplier
```

Swap in any other `tb/tb_<module>.sv` in the same way. Each run takes well
under a second.

## Changing it

* The leaf adders, `bec`, `csel_mux` and `partial_product_gen` take a width
  parameter. `csel_group` also takes the adder style as an `adder_kind_e`.
  Trying another style in a group means changing one `KIND` parameter in the
  hybrid adder that holds the group.
* The hybrid adders and the multiplier have fixed widths, as in the published
  architecture. A wider multiplier would need a new tree and new hybrid
  adders.
* `hancarlson_adder` needs W >= 2.
