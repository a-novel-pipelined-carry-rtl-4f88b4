# Pipelined carry adder (PCA) built from half adders

An N-bit adder can be built from nothing but half adders if the carries are
allowed to take several passes. Add `a` and `b` bit by bit with a row of half
adders; what comes out is a sum vector and a carry vector. Shift the carry
vector up one bit and add it to the sum vector with another row of half
adders, and repeat. Each pass settles at least one more low-order bit, so
after N passes no carry is left inside the word, and the carries that fell off
the top bit on the way are the carry-out. This staged arrangement is called a
*pipelined carry adder* here; "pipelined" refers to the stages of half
adders, not to registers. The whole design is combinational.

The RTL contains two forms of the adder:

* `pca_core`: the plain PCA triangle for any width, with an optional
  carry-in. At its default (8 bits, no carry-in) it is the complete plain
  8-bit PCA.
* `mpca`, the top level: the *modified* 8-bit PCA. The operands are cut into
  slices of 3, 3 and 2 bits, each slice is a small `pca_core`, and the slices
  are chained by their carries. This is the form the cost and delay numbers
  below refer to.

## The half-adder triangle

For N = 4 the stages look like this (`HA` is a half adder, `s_k`/`c_k` the
sum and carry outputs of stage k):

```
            bit 3        bit 2        bit 1        bit 0
stage 1   HA(a3,b3)    HA(a2,b2)    HA(a1,b1)    HA(a0,b0)     -> bit 0 final
stage 2   HA(s1,c1[2]) HA(s1,c1[1]) HA(s1,c1[0])               -> bit 1 final
stage 3   HA(s2,c2[2]) HA(s2,c2[1])                            -> bit 2 final
stage 4   HA(s3,c3[2])                                         -> bit 3 final

cout = c1[3] | c2[3] | c3[3] | c4[3]
```

In stage k the lowest carry still moving sits at bit k-2, so stage k only needs
half adders from bit k-1 upwards; lower bits pass through unchanged. That gives
N + (N-1) + ... + 1 = N(N+1)/2 half adders: 36 for 8 bits.

**Why a plain OR makes the carry-out.** Every half adder keeps
`x + y = s + 2c`, so at each stage the value of the word plus its pending
carries plus 2^N times the carries that left the top bit equals `a + b`. After
the last stage nothing is pending. Since `a + b < 2^(N+1)`, at most one of the
top-bit carries can be 1, and their OR equals their sum. The testbench checks
this one-hot property for every input.

**Delay.** The carry-out path runs through N half adders and the OR gate,
N + 1 gate delays (9 for 8 bits). In a ripple carry adder the carry passes
two gates per bit, roughly 2N gate delays.

**Carry-in.** When `HAS_CIN = 1` the carry-in becomes the second input of bit
0 in stage 2. Bit 0 is then no longer final after stage 1, so every stage
from 2 on has one more half adder and there is one extra stage. A w-bit slice
with carry-in needs w + w(w+1)/2 half adders and its OR gate has w + 1 inputs.
The bound argument above still holds, since `a + b + cin < 2^(w+1)`.

## The modified 8-bit adder (`mpca`)

The half-adder count of the plain triangle grows with the square of the width.
The modified adder keeps each triangle small:

| slice | bits | carry-in | half adders | OR gate | carry path |
|-------|------|----------|-------------|---------|------------|
| 0     | 2:0  | none     | 6           | 3-input | 3 HA + OR = 4 |
| 1     | 5:3  | slice 0  | 9           | 4-input | 3 HA + OR = 4 |
| 2     | 7:6  | slice 1  | 5           | 3-input | 2 HA + OR = 3 |

Total: 20 half adders and three OR gates, 43 gates, against 36 half adders
for the plain 8-bit triangle. The carry path is 4 + 4 + 3 = 11 gate delays,
two more than the plain triangle and about a quarter fewer than the 15 of an
8-bit ripple carry adder. Synthesised as generic gates, `mpca`
comes out as exactly 20 XOR, 20 AND, two 3-input OR and one 4-input OR cells;
`pca_core` at its default as 36 XOR, 36 AND and one 8-input OR.

The result is 9 bits wide: bit 8 is the carry-out of slice 2. There is no
carry-in to the 8-bit adder as a whole. Example: `10010101 + 11010101 =
101101010` (149 + 213 = 362).

### Choices made in this design

* **Slice order and widths.** The adder is described as three slices of two
  and three bits, with 20 half adders and two 3-input and one 4-input OR gates.
  The order 3, 3, 2 (least significant first) with the first slice taking no
  carry-in, and the carry-in entering at bit 0 of stage 2, is the reading that
  gives exactly those counts and the 11-gate-delay figure. Other orders work
  (the adder is correct for any partition) but cost 21 half adders.
* **No extra AND gate per slice.** The original description of the modified
  adder mentions an additional AND gate in each slice, while its gate total
  (43) includes none. This design has none: the carry-in needs no gate
  beyond the half adders.
* **Combinational.** No clock, reset or registers.
* **Gate level only.** The adder is meant for very small transistor-level
  cells: a 3-transistor half adder built from a 2-transistor pass-gate XOR and
  a 2-transistor multiplexer AND, which with static CMOS OR gates gives 86
  transistors for the 8-bit adder. Those cells are a process-level
  implementation; the RTL models their logic function (`half_adder`, the OR
  reductions) and nothing of their electrical behaviour.
* **Delays are structural.** The gate-delay numbers above follow from the
  structure; the RTL carries no delays and the testbenches check function
  only.

## Files and interfaces

| file | contents |
|------|----------|
| `rtl/pca_pkg.sv` | sizing functions: stages, lowest active bit per stage, half-adder count |
| `rtl/half_adder.sv` | `half_adder`: `s = a ^ b`, `c = a & b` |
| `rtl/pca_core.sv` | `pca_core #(N = 8, HAS_CIN = 0)`: one PCA triangle |
| `rtl/mpca.sv` | `mpca #(NPARTS = 3, PART_W = '{3,3,2}, N = 8)`: the modified adder, top level |
| `tb/tb_half_adder.sv`, `tb/tb_pca_core.sv`, `tb/tb_mpca.sv` | self-checking testbenches |

`pca_core` ports: `a`, `b` (N bits), `cin`, `sum` (N bits), `cout`, and
`stage_cout`, the top-bit carry of each stage (bit k-1 for stage k), which
are the inputs of the carry-out OR; it is there for observation.

`mpca` ports: `a`, `b` (N bits), `sum` (N + 1 bits).

To build a different width, set `PART_W` to the slice widths (least
significant first), `NPARTS` to their number and `N` to their sum; an
elaboration error flags a mismatch. `PART_W = '{8}`, `NPARTS = 1` gives the
plain triangle.

## Simulation

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl rtl/pca_pkg.sv tb/tb_mpca.sv --top-module tb_mpca
./obj_dir/Vtb_mpca
```

Replace `tb_mpca` by `tb_pca_core` or `tb_half_adder` for the other
testbenches. Each prints `TB_RESULT checks=<n> failures=<m>` and stops; a
watchdog ends a run that hangs, counting it as a failure. All run in well
under a second.

What they check, always against integer addition computed in the testbench:

* `tb_half_adder`: the four input pairs.
* `tb_pca_core`: all 65,536 operand pairs of the default 8-bit triangle, and
  all inputs of 3-bit and 2-bit triangles with carry-in; at most one top-bit
  carry per input; every stage delivering the carry-out at least once; the
  149 + 213 example.
* `tb_mpca` (default parameters, the full design): the 149 + 213 example, a
  set of reference operand pairs (184 + 50, 215 + 155, 255 + 255, ...), all
  65,536 operand pairs, the half-adder count of 20, and coverage of each
  mechanism: a carry from slice 0 to 1 and from slice 1 to 2, the final
  carry-out, a carry rippling through all three slices, and each stage of
  each slice supplying its slice's carry-out. A mechanism that never occurs
  counts as a failure.
