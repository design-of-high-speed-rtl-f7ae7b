# Approximate 8 x 8 multiplier with 8-2 adder compressors

An unsigned 8 x 8 multiplier that trades a small, one-sided error for a
shorter reduction tree. Two ideas are combined:

1. **Approximate partial products.** In the middle columns of the partial
   product matrix every symmetric pair of bits is split into a *propagate*
   bit (OR) and a *generate* bit (AND). That split is exact. The
   approximation is that all generate bits of a column are ORed into one
   bit, so the column needs fewer bits to be added.
2. **Adder compressors instead of a Wallace tree.** The remaining bits are
   at most eight per column, so a single line of 8-2 adder compressor cells
   reduces the whole matrix to one sum and one carry vector. A carry
   look-ahead adder, behind a pipeline register, recombines them.

The result is never larger than the exact product. Over all 65536 operand
pairs, 3517 products (5.4 %) come out low, and the mean relative error over
non-zero products is 0.064 %.

The RTL follows the published description of this multiplier (column range,
propagate/generate equations, OR of generates, 8-2 compressor built from
7-2 and 3-2 compressors, pipeline register before a CLA). Where the
description stops, choices were made; they are listed in
[Where this RTL makes its own choices](#where-this-rtl-makes-its-own-choices).

## The approximate partial-product matrix

With operands `a` and `b`, the partial product `a_{m,n} = a[m] & b[n]` has
weight `2^(m+n)`; column `k` holds every `a_{m,n}` with `m + n = k`.

In columns 3 to 11 (the ones holding more than three partial products) the
bits come in pairs `a_{m,n}`, `a_{n,m}` with `m < n`. Each pair is replaced
by

```
p_{m,n} = a_{m,n} | a_{n,m}      propagate
g_{m,n} = a_{m,n} & a_{n,m}      generate
```

Because `x + y = (x | y) + (x & y)`, the two new bits still add up to the
pair: nothing is lost yet. Then all generate bits of a column are ORed:

```
G_k = OR over pairs of g_{m,n}
```

This is the only approximation. A generate bit is `a[m] b[n] a[n] b[m]`,
which for uniform random operands is 1 with probability 1/16, and the
generate bits of one column use disjoint operand bits, so they are
independent. The OR is wrong only when two or more of them are 1, and then
the column loses `(count - 1) * 2^k`.

| column k | generate bits M | P(OR loses weight) |
|---------:|----------------:|-------------------:|
| 3, 4, 10, 11 | 2 | 0.00391 |
| 5, 6, 8, 9   | 3 | 0.01123 |
| 7            | 4 | 0.02153 |

The diagonal bit `a_{k/2,k/2}` of an even column has no partner and is kept.
Columns 0-2 and 12-14 keep their plain partial products. After this step
the tallest column holds 5 bits in the approximate range and 3 outside it,
so the eight inputs of an 8-2 compressor are always enough.

`pp_approx_gen` builds this matrix and stacks the bits of each column from
row 0 upwards into eight 16-bit operand rows. The order of bits in a column
does not matter to the sum.

## The 8-2 adder compressor

### 3-2 compressor (`comp_3_2`)

A full adder written with XORs and one multiplexer:
`sum = a ^ b ^ c`, `carry = (a ^ b) ? c : a`. Its longest path is two XORs.

### 7-2 compressor (`comp_7_2`)

Seven bits of one column become a sum bit and three bits of double weight:

```
x0 + ... + x6 = sum + 2*(cout1 + cout2 + carry)
```

It is three 3-2 compressors: two on `x[0..2]` and `x[3..5]`, one adding
their sums to `x[6]`.

### 8-2 compressor cell (`comp_8_2`)

One cell per column. It adds the eight operand bits of its column and five
*lateral* carries `cin[4:0]` coming from the cell of the column below, and
sends five lateral carries `cout[4:0]` to the column above:

```
popcount(x) + popcount(cin) = sum + 2*(popcount(cout) + carry)
```

(13 inputs = 1 + 2*6 outputs, so the identity is tight.)

```
 x0 x1 x2      x3 x4 x5
  \ | /         \ | /
  [3-2]         [3-2]
  sa  cout0     sb  cout1
   \              |
    sa, sb, x6, x7, cin0, cin1, cin2
                 |
              [7-2] ---> cout2, cout3, cout4
                 |
             s7, cin3, cin4
                 |
              [3-2] ---> sum, carry
```

The hard part of a compressor row is keeping the lateral carries from
rippling across the whole width. Here `cout0` and `cout1` depend on the
operand bits only; `cout2` depends on operand bits only; `cout3` and `cout4`
depend on `cin0..cin2`, which are the neighbour's operand-only carries. So
every lateral carry depends on at most the two columns below, and a row of
cells has the same delay whatever its width. The testbench of the cell
checks that `cout[1:0]` does not change when `cin` does.

### 16-bit adder compressor (`ac82_slice`, `ac16_8_2`)

`ac82_slice` is a row of `W` cells (default 4) with the lateral carries
chained from column to column. `ac16_8_2` chains four such slices into a
16-column compressor line, registers the resulting sum and carry vectors,
and adds them in the next cycle with `cla_adder`:

```
result = s + (c << 1)        (mod 2^16)
```

`ovf` reports a total that does not fit in 16 bits (a carry out of the top
column, a lateral carry out of it, or a CLA carry out). In the multiplier it
can never be set; the top asserts this.

### Carry look-ahead adder (`cla_adder`)

A two-level CLA. Bits are grouped by four; each group gives a group
generate and propagate; a second look-ahead level computes the carry into
every group directly, and inside each group the carry into every bit is a
flat sum of products of `g`, `p` and the group carry. `W` must be a
multiple of 4.

## Pipeline and interface (`approx_mult_top`)

| port | dir | width | meaning |
|------|-----|------:|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous, active low; clears the valid flags only |
| `in_valid` | in | 1 | `a`, `b` valid this cycle |
| `a`, `b` | in | 8 | unsigned operands |
| `out_valid` | out | 1 | `p` valid |
| `p` | out | 16 | approximate product |

```
edge 1   a, b, in_valid -> input register
         pp_approx_gen -> 8-2 compressor line      (combinational)
edge 2   sum/carry vectors -> pipeline register
         carry look-ahead adder                    (combinational)
edge 3   product -> output register
```

Latency is three clock edges; a new operand pair can enter every cycle.
Data registers are not reset. The state is 16 input bits, 32 sum/carry bits
between the compressor line and the adder, 16 output bits (64 in all), one
overflow bit and three valid flags; synthesis removes the few that are
always zero (the top column of the matrix is empty).

Parameters of `approx_mult_top`: `N` (operand width, default 8, even, at
most 8 so that every column fits the eight compressor inputs), `APPROX_LO`
and `APPROX_HI` (the approximate column range, default 3 and 11). Setting
`APPROX_LO > APPROX_HI` gives an exact multiplier with the same
compressor datapath.

## Where this RTL makes its own choices

The published description gives the arithmetic but not these details:

- **3-2 compressor equation.** Taken as the standard MUX-based full adder.
- **Internal wiring of the 7-2 and 8-2 compressors.** Only their
  input/output identities and "an 8-2 made of a 7-2 and 3-2 compressors"
  are given. The wiring above is the simplest that meets the identities and
  keeps lateral carries local. The published 7-2 compressor is said to
  have a ten-XOR critical path; this one has four.
- **Four 8-2 slices.** "A 16-bit adder compressor made of four 8-2
  compressors" is read as four slices of four columns.
- **CLA organisation.** Only "carry look-ahead adder" is given; 4-bit groups
  and two levels are a choice.
- **Input/output registers, valid flags, reset.** Only the register between
  the compressor line and the adder is described. The in/out registers were
  added so that the flip-flop count (64) matches the one reported for the
  published implementation.
- **Equation (1) operator.** The propagate is an OR; with an XOR the
  decomposition would not be exact.
- **Overflow flag** of the adder compressor.

Not modelled: the published implementation's FPGA timing and area figures,
and the power-saving circuit techniques (adaptive ground level) mentioned
alongside it, which are transistor-level and have no logic function here.

## Files

| file | content |
|------|---------|
| `rtl/amul_pkg.sv` | shared constants: 8 operand rows, 5 lateral carries, CLA group of 4 |
| `rtl/comp_3_2.sv` | 3-2 compressor |
| `rtl/comp_7_2.sv` | 7-2 compressor |
| `rtl/comp_8_2.sv` | 8-2 compressor cell |
| `rtl/ac82_slice.sv` | row of 8-2 cells |
| `rtl/cla_adder.sv` | two-level carry look-ahead adder |
| `rtl/ac16_8_2.sv` | pipelined 16-bit 8-2 adder compressor |
| `rtl/pp_approx_gen.sv` | approximate partial-product matrix |
| `rtl/approx_mult_top.sv` | the multiplier |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops; each
has a watchdog. For example, the end-to-end test:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    --top-module tb_approx_mult_top rtl/amul_pkg.sv tb/tb_approx_mult_top.sv
./obj_dir/Vtb_approx_mult_top
```

Replace the testbench name (in both places) to run another; `-y rtl` lets
Verilator find each module in the file of the same name. What they check:

- `tb_comp_3_2`, `tb_comp_7_2`, `tb_comp_8_2`: every input combination
  against the cell's counting identity; for the 8-2 cell also that the
  early lateral carries ignore `cin`.
- `tb_ac82_slice`: 20000 random operand sets against the slice identity.
- `tb_cla_adder`: carry-chain corners and 50000 random sums at 16 and 8 bits.
- `tb_ac16_8_2`: 20000 random operand sets, streamed with idle cycles,
  checking the sum, `ovf` (both values occur) and the one-cycle latency.
- `tb_pp_approx_gen`: all 65536 operand pairs; the rows must add up to the
  exact product minus the weight lost by each OR, and columns outside 3-11
  must carry the plain partial products. A second instance with an empty
  approximate range must give the exact product.
- `tb_approx_mult_top`: all 65536 pairs through the pipeline at the default
  parameters, back to back with random idle cycles, checking every product
  and the three-cycle latency. It counts losses in columns with 2, 3 and 4
  generate bits, exact products, back-to-back issues and idle cycles (each
  must occur), and prints the per-column loss probability and the mean
  relative error. It runs in well under a second.

The reference in each testbench is computed independently of the RTL
(integer arithmetic on the operands, not a copy of the matrix logic).
