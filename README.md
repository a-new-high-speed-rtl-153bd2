# Booth / Wallace multiply-accumulate unit with a carry-select final adder

A signed multiplier is three steps in sequence: produce the partial
products, add them down to two numbers without propagating carries, and add
those two numbers with one carry-propagate adder. This RTL implements the
high-speed multiplier described in "A New High-Speed Multiplier Using
Modified Partial Product Reduction Algorithm" (P. Asadee), with one choice
for each step:

| step | what is built | module |
|---|---|---|
| partial product generation | radix-8 Booth recoding: 11 rows for a 32-bit multiplier instead of 32 | `pp_generator`, `booth_encoder` |
| partial product reduction | regular tree of 4:2 compressor rows and full adder rows | `pp_reduction_tree`, `compressor_row`, `csa_row`, `compressor_4to2`, `full_adder` |
| final addition | carry-select adder whose segments are 16-bit carry lookahead adders | `final_adder`, `cla16`, `cla_block4`, `incrementer` |

The three steps make up `mac_unit`, which computes **R = P × Q + L** on two's
complement operands. L is either an input or the unit's own result register,
so the unit is also an accumulator. A second, small design is a 5 × 5
two's complement **array multiplier with NAND-generated partial products**
(`nand_array_multiplier`). The top level, `multiplier_top`, holds both side by
side. They share no signals.

The source leaves many details open. The sections below say what is taken
from it and what is this implementation's own choice. The last section
lists where the two differ.

## Radix-8 Booth partial products (`pp_generator`)

Most of the arithmetic subtlety is here.

**Recoding.** The m-bit multiplier P is read in windows of four bits that
overlap by one:
`{p[3k+2], p[3k+1], p[3k], p[3k-1]}`. Bit −1 is 0, and bits above m−1 repeat
the sign. Each window is the digit

    d_k = −4·p[3k+2] + 2·p[3k+1] + p[3k] + p[3k−1]   ∈ {0, ±1, ±2, ±3, ±4}

and P = Σ d_k · 8^k. There are floor((m+2)/3) digits: 11 for m = 32, 16 for
48, 18 for 54 and 22 for 64. `booth_encoder` turns a window into a one-hot
magnitude select (`x1`..`x4`) and a `neg` bit. To find the magnitude it
inverts the low three bits when the digit is negative. The all-ones window
(−0) gives `neg = 0`, so a zero digit always gives an all-zero row.

**Multiples.** Q, 2Q and 4Q are shifts of the multiplicand. 3Q is the only
"hard" multiple. It is formed once, before the multiplexers, by a
carry lookahead adder (`cla_adder`, built from `cla16` groups). Every
multiple is n+2 bits wide: the multiplicand plus two extra bits at the top
for the sign and for ×4.

**Negative digits.** The multiplexer output is inverted when `neg` is set.
The "+1" that completes the two's complement is not added in the row
itself. Row k needs its +1 at bit 3k, and no two rows share that bit, so all
the `neg` bits go into one extra row, the NEG row.

**Sign extension without wide rows.** Each row is n+2 bits with sign bit s.
Its value is −s·2^(n+1) + (low bits). Writing ¬s in place of s adds
2^(n+1) to that value. So each row keeps only its n+2 bits, with the sign
bit complemented, and one constant row adds back Σ_k −2^(n+1+3k) (mod 2^Y).
The constant is computed when the design elaborates. No row has to be
sign-extended to the full result width.

In total the generator produces G + 2 rows (G Booth rows, the NEG row and
the constant row). All are Y bits wide and already shifted into place.
Modulo 2^Y they sum to P·Q.

## Reduction tree (`pp_reduction_tree`)

The tree treats whole rows, not single columns. At each level the rows are
taken four at a time into a row of 4:2 compressors. Three rows left over go
into a row of full adders. One or two rows left over are passed on unchanged
(the "buffers" of the architecture). This repeats until two rows are left.
`mult_pkg::rows_at` and `tree_levels` compute the row count of every level
during elaboration. In `mac_unit` at 32 × 32 the tree gets 14 rows (11 Booth
rows, NEG, constant, L) and reduces them as 14 → 8 → 4 → 2 in three levels of
4:2 compressors. At 64 × 64 there are 25 rows: 25 → 13 → 7 → 4 → 2.

A 4:2 compressor (`compressor_4to2`) is two full adders in a chain. The
first adds i1, i2 and i3 and produces the horizontal carry `cout`. The
second adds that sum, i4 and the horizontal carry-in from the bit below.
`cout` does not depend on `cin`, so in `compressor_row` the carry moves
exactly one bit to the left and never ripples.

`full_adder` is written the way a transmission-gate full adder works. An
XOR/XNOR pair of x and y controls two multiplexers. The sum multiplexer
passes z or its complement. The carry multiplexer passes z when x and y
differ, and x otherwise.

Because every level works on full-width rows, many cells in the high and
low corners have constant-zero inputs. Synthesis removes them.

## Final adder (`final_adder`)

The two rows left by the tree are added by a carry-select adder made of
16-bit segments.

* Each segment has a `cla16` that adds its slice with carry-in 0. `cla16` is
  four 4-bit blocks (`cla_block4`). Each block reports a group propagate P
  and generate G, using bit propagate x|y and bit generate x&y. The carry
  into each block comes from AND-OR lookahead logic:
  C1 = G0 + P0·Cin, C2 = G1 + P1·C1, C3 = G2 + P2·G1 + P2·P1·C1,
  Cout = G3 + P3·C3.
* Every segment except the lowest also runs its sum through an
  `incrementer`. The incrementer carries an "all lower bits are one" signal
  K two bits per step:
  S_i = x_i ⊕ K_{i−1}, S_{i+1} = x_{i+1} ⊕ x_i·K_{i−1},
  K_{i+1} = x_{i+1}·x_i·K_{i−1}.
* When the carry from the segment below arrives, a multiplexer picks the
  plain or the incremented sum. The carry out of the segment is
  `cout0 | (carry_in & all_ones)`.

Only that one-gate carry chain crosses segment boundaries. The operands are
padded to whole segments: a 72-bit result uses five segments.

## The multiply-accumulate unit (`mac_unit`)

```
 p,q ──► pp_generator ──► G+2 rows ─┐
 l ─┐                               ├─► pp_reduction_tree ─► [buffer] ─► final_adder ─► R
    └─ acc_mode ? R : l ────────────┘                         (PIPE=1)                 │
                     ▲─────────────────────────────────────────────────────────────────┘
```

The addend L enters the tree as one more row. The addition therefore costs
no extra carry-propagate step.

| parameter | default | meaning |
|---|---|---|
| `M` | 32 | multiplier (P) width |
| `N` | 32 | multiplicand (Q) width |
| `Y` | 72 | width of L and R; must exceed M + N (checked by an assertion) |
| `PIPE` | 1 | register between the tree and the final adder |

The source gives the 32 × 32 size. It does not give Y or the default of PIPE.

**Interface and timing.** An operation is accepted at a rising edge where
`in_valid && in_ready`. Its operands are `p`, `q`, and either `l`
(`acc_mode = 0`, a load) or the result register (`acc_mode = 1`, an
accumulate).

* `PIPE = 1`: the tree's two rows are registered at the accepting edge. The
  result is written to `r` at the next edge, and `out_valid` is high for the
  one cycle that follows. Counting the accepting edge, the latency is two
  rising edges. A new operation can be accepted every cycle.
* `PIPE = 0`: the whole datapath is one combinational path from the inputs
  to `r`. The result is written at the accepting edge itself (latency one
  edge).

With the buffer, an accumulate offered right behind another operation would
read R before the earlier result lands. In that case `in_ready` is low for
one cycle, so the accumulate always sees the previous result. Loads are
never held up, and without the buffer nothing stalls. `rst_n` is an
active-low synchronous reset that clears R and the valid flags. Results
wrap modulo 2^Y.

The handshake, the stall rule, the reset and the choice of PIPE = 1 as
the default are this implementation's own. The source says only that a
buffer can be placed between two steps when high speed is needed, and that
the computed value is stored in a register and returned.

## NAND array multiplier (`nand_array_multiplier`)

This is a combinational N × N two's complement multiplier (default N = 5,
with outputs P0..P9).

* Bit a0·b0 comes from an AND gate and is P0. Every other partial product
  bit comes from a NAND gate.
* For bits of negative weight (exactly one index is N−1), the NAND output is
  exactly the value needed, because −a·b = ¬(a·b) − 1. The collected −1
  terms reduce to a 1 added at column N and an inversion of the top product
  bit (the inverter on P_{2N−1}).
* For bits of positive weight, the adder cell takes the NAND output
  complemented. Here that complement is an explicit inverter at the cell
  input; the original circuit folds it into the polarity of each adder
  cell.
* A carry-save array of full adders adds the rows: one row per multiplier
  bit b1..b_{N−1}, and row j gives P_j. A final ripple row of N−1 full
  adders gives P_N..P_{2N−2}.

The original labels its cells with polarity types that this RTL does not
reproduce. Only the arithmetic is reproduced.

## Files

| file | content |
|---|---|
| `rtl/mult_pkg.sv` | shared types (`booth_sel_t`) and elaboration-time functions (digit count, tree row counts, segment padding) |
| `rtl/multiplier_top.sv` | top: `mac_unit` and `nand_array_multiplier` side by side |
| `rtl/mac_unit.sv` | R = P·Q + L with result register, optional buffer, handshake |
| `rtl/pp_generator.sv`, `rtl/booth_encoder.sv` | radix-8 Booth partial products |
| `rtl/pp_reduction_tree.sv`, `rtl/compressor_row.sv`, `rtl/csa_row.sv`, `rtl/compressor_4to2.sv`, `rtl/full_adder.sv` | reduction tree and its cells |
| `rtl/final_adder.sv`, `rtl/cla16.sv`, `rtl/cla_block4.sv`, `rtl/cla_adder.sv`, `rtl/incrementer.sv` | adders |
| `rtl/nand_array_multiplier.sv` | NAND-based array multiplier |
| `tb/tb_<module>.sv` | one self-checking testbench for each of the modules above except `compressor_row`, `csa_row` and `cla_block4`, which are tested through their parents |
| `tb/tb_multiplier_top.sv` | whole design at its default parameters |
| `tb/tb_mac_unit_nopipe.sv` | `mac_unit` with `PIPE = 0` |
| `tb/tb_mac_unit_sizes.sv` | `mac_unit` at 48 × 48, 54 × 54 and 64 × 64 |

## Simulating

Every testbench checks itself and ends with one line
`TB_RESULT checks=<n> failures=<n>`. A watchdog stops a testbench that hangs
and counts that as a failure. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_multiplier_top \
  -y rtl -y tb +libext+.sv rtl/mult_pkg.sv tb/tb_multiplier_top.sv
./obj_dir/Vtb_multiplier_top
```

Replace the top module and the file for any other testbench. What they
cover:

* `tb_multiplier_top`, `tb_mac_unit` and `tb_mac_unit_nopipe` send random
  streams of loads and accumulates, with gaps. Operands include the most
  negative value and −1. Each result is compared with a wide-integer model,
  and the latency is checked on every operation. Each test counts loads,
  accumulates, accumulate stalls, overlapped operations and negative
  products, and fails if one of them never happens. `tb_multiplier_top`
  also runs all 1024 operand pairs through the 5 × 5 array.
* `tb_mac_unit_sizes` chains loads and accumulates at 48, 54 and 64 bits.
* Unit tests are exhaustive for `full_adder`, `compressor_4to2` (including
  the check that `cout` does not depend on `cin`), `booth_encoder`, the
  16-bit `incrementer` and the 5 × 5 and 8 × 8 array multipliers. They are
  random plus corner cases for `cla16`, `cla_adder` (34 and 32 bits, with
  carry-out), `final_adder` (including carries
  across all-ones segments), `pp_generator` (sum of rows against the
  product) and `pp_reduction_tree` (14, 7 and 2 rows).

Verilator's lint reports a few unused signals. They are the carries out of
the top bit of a modulo-2^Y row and the unused top padding of the final
adder. They are expected.

## How this differs from the source description

* **Booth radix.** The source mixes radix-4 and radix-8 statements. It
  names the digit set {0, ±1, ±2, ±3}, says "2X" is the complex multiple
  formed by "4X = 2X + 2X", and also gives the count floor((n+2)/3) and
  "n/3" partial products. This RTL follows the count, which means radix 8.
  The hard multiple is then 3X = X + 2X, and ±4 is needed as a digit.
* **Sign extension.** The source describes sign handling with per-row
  terms it calls PY and RY and an XOR gate. Their exact encoding is not
  given. The complemented-sign-bit and constant-row method used here gives
  the same sum.
* **Compressor and full adder circuits.** The source describes them at
  transistor level: an 18-transistor compressor and a 14-transistor
  transmission-gate full adder. Here they are logic. The compressor is two
  chained full adders, as the source also describes it.
* **Tree shape.** The architecture drawing shows columns of 4-input and
  3-input counters and a buffer. The text also gives cell and step counts
  for a tree slice ("16 to 3 rows with 10 full adders in 8 steps", "55
  buffers, 12 steps"), which this tree does not reproduce. The tree here is
  the regular row grouping described above. Electrical buffers are plain
  wires.
* **Final adder.** The drawing shows carry propagate networks, multiplexers
  and "final adder" boxes. They are read as a carry-select adder with
  incrementers. The incrementer equations are this implementation's
  reading of the source's two-bit counter equations. Their "all zeros"
  (decrement) chain is not used.
* **Gate counts of the array.** The source counts n²+3 NAND gates and two
  AND gates for the NAND array. This version needs n²−1 NAND gates and one
  AND gate, because it uses the Baugh-Wooley correction (a 1 at column N
  and an inverted top bit).
* **Not modelled.** Transistor sizing, the 80 nm layout, power and delay
  figures.
