# Reversible multipliers from Toffoli gates

A reversible circuit computes a bijection: no information is lost, so it has
as many outputs as inputs and can run backwards. Such circuits are built as a
cascade of multiple-control Toffoli (MCT) gates on a fixed set of *lines*. A
gate flips its target line when all of its control lines are 1 and passes
every other line through. There is no fanout and no feedback. Multiplication
is not reversible (`2*3 = 3*2 = 1*6 = ...`), so a multiplier has to keep its
factors. It also needs extra lines that start as constant 0 and are left over
as *garbage* at the end.

This RTL models three ways of building such a multiplier, plus a small
worked example:

| module | what it is | lines for N-bit factors |
|---|---|---|
| `rev_mult_hier` | hierarchical multiplier: one controlled adder per bit of `a` | exactly 4N |
| `rev_mult_kara` | Karatsuba multiplier: three half-size products per level, hierarchical below a turning point | more lines, fewer gates at large N |
| `rev_mult_subminimal` | sub-minimal *specification*: a zero flag saves garbage lines | 2N + 1 + G (9 for N = 3) |
| `toffoli_example` | a 3-line, 6-gate example cascade | 3 |

`rev_mult_top` puts the four side by side. Its defaults are 32-bit
multipliers, turning point 8, and a 3-bit sub-minimal specification.

Everything is combinational. The RTL describes the gate cascade line by line,
so it simulates and synthesises as ordinary logic. The intended target is
reversible or quantum hardware, where each gate would become a physical
reversible gate. Here the SystemVerilog serves as an executable, checkable
netlist of that cascade.

## Cost model

Four figures describe a reversible circuit:

- **Line count (LC):** the number of lines, or qubits on a quantum machine.
- **Gate count (GC):** the number of gates.
- **Quantum cost (QC):** per gate, 1 for NOT and CNOT, 5 for C2NOT and 13 for
  C3NOT. Larger gates cost more, but no gate in this library has more than
  three controls.
- **Transistor cost (TC):** 8 per control line.

`rev_pkg` computes these figures for each construction from the same gate list
and composition rules that the modules use:

- `hier_lines`, `hier_gc`, `hier_qc`, `hier_tc`;
- `kara_lines`, `kara_gc`, `kara_qc`, `kara_tc`.

## The building block: an adder without helper lines (`rev_adder`)

`rev_adder #(N, CONTROLLED)` computes, in place:

```
y := (y + x) mod 2^N      x unchanged      z := z XOR carry_out
```

It has 7N-6 gates (5N-5 CNOT and 2N-1 C2NOT) and uses no helper line. It runs
in six phases:

1. XOR `x` into `y`.
2. Form the differences of neighbouring `x` bits.
3. Ripple the carries into the `x` lines with a C2NOT chain, and put the carry
   out into `z`.
4. Add the carries into `y` and uncompute them again, from the top down.
5. Undo the differences of phase 2.
6. XOR `x` into `y` again.

The exact gate order is in `rev_pkg::ttk_gate()`.

In the RTL, gates that act on disjoint lines are written as one vector
operation. The two chained phases are bit loops. The testbench compares the
module against the gate list applied one gate at a time.

Two properties matter to the multipliers:

- **Controlled adder (`CONTROLLED = 1`).** Adding the control line `ctl` to
  every gate gives a *controlled increaser*. With `ctl = 0` every gate is
  idle, and with `ctl = 1` the sum is formed. The gates become C2NOT and C3NOT.
- **Wide sums.** The carry is XORed into `z`, not written into it. If `z` is
  bit N of the target, the adder therefore performs an (N+1)-bit modular sum
  of an N-bit operand. The Karatsuba step uses this trick everywhere.

## Hierarchical multiplier (`rev_mult_hier`)

The hierarchical multiplier sums the partial products `a_i * b * 2^i`. Its
lines are `a` (N), `b` (N) and the product `c` (2N), and `c` must enter as 0.

- **Stage 0** is a controlled duplication, `c_j ^= a_0 & b_j`. Adding `b` to a
  zero product is the same as copying it, and the copy costs N C2NOT gates.
- **Stage i (1..N-1)** is an N-bit adder controlled by `a_i`. It adds `b` into
  the window `c[i+N-1:i]` and puts its carry into `c[N+i]`. That line is still
  0 at this point. Bits below `i` are final and are never touched again, so
  each stage works on a window shifted by one place, and no shifter is needed.

Totals: 4N lines, 5N²-9N+5 C2NOT and 2N²-3N+1 C3NOT gates. Quantum cost is
51N²-84N+38 and transistor cost 128N²-216N+104. For every width from 1 to
1024, these figures equal the published figures for this method. The
testbench checks that.

## Karatsuba multiplier (`rev_mult_kara`)

With N = 2K, `a = ah*2^K + al` and `b = bh*2^K + bl`:

```
a*b = ah*bh * 2^2K + ((ah+al)*(bh+bl) - ah*bh - al*bl) * 2^K + al*bl
```

A 2K-bit product therefore needs three products of K or K+1 bits plus a few
additions. The module is recursive and picks its construction by width:

- **N < T** (the turning point, default 8): use `rev_mult_hier`. At small
  widths the extra lines of a Karatsuba step do not pay off.
- **N odd:** add a zero bit to each factor and two zero product lines, then
  use the N+1 construction.
- **N even:** one Karatsuba step. The helper lines `d`, `e` (K+1 bits each)
  and `f` (2K+2 bits) start at 0. The step runs in this order:
  1. `c[2K-1:0] = al*bl` and `c[4K-1:2K] = ah*bh` (recursive).
  2. `d = ah + al` and `e = bh + bl`. Each sum copies the first summand onto
     the zero lines with CNOTs, then adds the second with `rev_adder`.
  3. `f = d*e` (recursive, K+1 bits).
  4. `f -= ah*bh`, then `f -= al*bl`. Module `rev_sub` computes each as
     `~(~f + x)`: a column of NOT gates, an adder, and NOT gates again.
  5. `c[4K-1:K] += f`. After the subtractions, `f < 2^(2K+1)`, so its top
     line is 0 and it fits the adder.

Adder operands narrower than their target are widened with max(1, K-2) shared
zero lines per step. The adders return those lines as 0. At the end, `d`, `e`
and `f` hold garbage. The factors come back unchanged, and the product is in
`c`.

`T` must be at least 4. With T ≤ 3, a 3-bit product pads to 4 bits, whose
middle product is 3 bits again, and the recursion never ends. An elaboration
`$error` catches this.

### How far the Karatsuba costs follow the published ones

The structure follows the published method:

- the three sub-products;
- the order of the steps;
- copy-then-add for the sums;
- the odd-width padding;
- the turning-point rule.

Two details are not pinned down there, and this design chose its own:

- how the subtractions are done;
- how operands of unequal width are added.

Its counts are therefore close to the published ones but not equal, as the
table shows.

One Karatsuba step here adds 4K+4+max(1, K-2) helper lines. The published
figure is 4K+5. The difference is the zero lines used to widen the adder
operands. LC and GC go as N^1.58 for Karatsuba and N² for the hierarchical
method.

| N (T = 8) | LC here / published | GC here / published | QC here / published | TC here / published |
|---|---|---|---|---|
| 8 | 54 / 54 | 538 / 517 | 2482 / 2437 | 7248 / 7032 |
| 16 | 181 / 176 | 2423 / 2304 | 9951 / 9696 | 30576 / 29352 |
| 32 | 584 / 554 | 8975 / 8492 | 35035 / 34000 | 110264 / 105296 |
| 1024 | 160117 / 144992 | 2927345 / 2752590 | 10752081 / 10377606 | 34878816 / 33081336 |

The comparison between the methods comes out the same as in the published
figures:

- Below the turning point, Karatsuba equals the hierarchical method, because
  it is the hierarchical method there.
- From 8 bits on, Karatsuba has the lower quantum cost (2482 against 2630 at
  8 bits).
- From 32 bits on, it also has the lower transistor cost.
- It always needs more lines.

## Sub-minimal specification (`rev_mult_subminimal`)

Embedding a function into a reversible one needs ceil(log2 μ) garbage outputs,
where μ is how often the most frequent output value occurs. For a multiplier
that value is 0, which occurs 2^(N+1)-1 times, so N+1 garbage lines are
needed. The adjusted specification adds an indicator output `zero_o`, which
is 1 iff `a*b = 0`:

- For a zero product, the primary outputs are free and carry `{a, b}`.
- Otherwise they carry the product. The garbage outputs only need to tell
  apart the factor pairs that share a non-zero product. For 3 bits, the
  products 6 and 12 occur 4 times each, so 2 garbage outputs suffice.

This gives 2N+1+G lines: 3, 6 and 9 for N = 1, 2 and 3, against 4, 7 and 10
for the conventional embedding. This design encodes the garbage as the rank of
`a` among the factors of the same product. The block is the specification as
combinational logic. The Toffoli cascade realising it would come from a
truth-table synthesis tool and is not part of this design. The logic grows as
4^N, so the block is meant for N ≤ 4.

## Example cascade (`toffoli_example`) and the gate (`toffoli_gate`)

`toffoli_gate #(W, CTRL, TGT)` is the MCT gate on W lines. The control lines
are given as a bit mask and the target as an index. `toffoli_example` is a
three-line cascade of six of these gates:

```
l2→l0, l0→l1, (l0,l1)→l2, l1→l0, l0→l1, l2→l1
```

It has 3 lines, 6 gates, quantum cost 10 and transistor cost 56. It maps
(l0, l1, l2) = (0, 1, 0) to (1, 0, 0).

## Files

| file | contents |
|---|---|
| `rtl/rev_pkg.sv` | gate type, adder gate list, cost and line-count functions |
| `rtl/toffoli_gate.sv` | MCT gate |
| `rtl/rev_adder.sv` | ancilla-free adder, optionally controlled |
| `rtl/rev_sub.sv` | in-place subtractor (invert, add, invert) used by Karatsuba |
| `rtl/rev_mult_hier.sv` | hierarchical multiplier |
| `rtl/rev_mult_kara.sv` | Karatsuba multiplier (recursive) |
| `rtl/rev_mult_subminimal.sv` | sub-minimal specification |
| `rtl/toffoli_example.sv` | example cascade |
| `rtl/rev_mult_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. It has a watchdog. The package must come first on the command
line:

```
verilator --binary --timing -Wno-fatal -Mdir obj \
  rtl/rev_pkg.sv rtl/toffoli_gate.sv rtl/rev_adder.sv rtl/rev_sub.sv \
  rtl/rev_mult_hier.sv rtl/rev_mult_kara.sv rtl/rev_mult_subminimal.sv \
  rtl/toffoli_example.sv rtl/rev_mult_top.sv tb/tb_rev_mult_top.sv \
  --top-module tb_rev_mult_top
./obj/Vtb_rev_mult_top
```

What the testbenches cover:

- **`tb_rev_mult_top`:** runs the whole design at its default parameters.
  - 5000 random and corner 32-bit products go through both multipliers.
  - The 3-bit specification gets all 64 inputs, and the example its published
    vector.
  - It counts these events and fails if one never happens: a carry into the
    top product bit, a zero factor, the zero indicator, and a non-zero
    garbage output.
- **`tb_rev_mult_kara`:** exhaustive at N = 4 and N = 5 (T = 4) and at N = 8
  (T = 8); random at N = 32. It prints the Karatsuba costs from 8 to 1024 bits.
- **`tb_rev_mult_hier`:** exhaustive at N = 1, 2, 3 and 8, random at N = 32.
  It compares LC/GC/QC/TC with the published figures for 1 to 1024 bits.
- **`tb_rev_adder`:** exhaustive at N = 2 and 4, random at N = 32. It checks
  the gate-list equivalence and the counts 5N-5 and 2N-1.
- **`tb_rev_mult_subminimal`, `tb_toffoli_gate`, `tb_toffoli_example`:**
  exhaustive.

Lint notes:

- The Verilator linter reports the outputs of the recursive instances inside
  `rev_mult_kara` as undriven. It does not follow ports through a recursive
  instantiation. The signals are driven, and the exhaustive simulations
  depend on them.
- Verilator also rejects recursion that passes through a second module.
  That is why the whole Karatsuba step lives in `rev_mult_kara`.

## Limits and departures

- **Karatsuba costs:** the line and gate counts differ from the published
  ones by a few percent (see the table above).
- **Sub-minimal block:** only the specification is built. The reversible
  cascade for it is not.
- **Product lines:** they must enter as 0. For any other value the
  multipliers are still reversible, but `c_o` is not the product. The top
  ties these lines to 0.
- **Garbage lines:** they are kept inside the modules and are not ports. A
  model that traces every qubit would bring them out.
- **Default width:** both scalable multipliers are built 32 bits wide by
  default. Any width is available through the `N` parameter; published
  results go up to 1024 bits.
