# 4x4 array multiplier with common-Boolean-logic carry-select adders

An unsigned 4-bit by 4-bit combinational multiplier. Its full adders are
built the carry-select way, but the two candidate results are not
computed by two copies of an adder. Instead the cell derives both from a
single set of gates it shares between them, which this design calls
*common Boolean logic* (CBL).

A carry-select adder cell normally needs two full adders and two
multiplexers. The CBL cell needs one XOR, one inverter, one AND, one OR and
two multiplexers. Its carry still reaches the outputs through a single
multiplexer, as in any carry-select cell.

## The CBL cell

Write the full-adder truth table twice, once for carry-in 0 and once for
carry-in 1:

| cin | a | b | sum | cout |
|-----|---|---|-----|------|
| 0 | 0 | 0 | 0 | 0 |
| 0 | 0 | 1 | 1 | 0 |
| 0 | 1 | 0 | 1 | 0 |
| 0 | 1 | 1 | 0 | 1 |
| 1 | 0 | 0 | 1 | 0 |
| 1 | 0 | 1 | 0 | 1 |
| 1 | 1 | 0 | 0 | 1 |
| 1 | 1 | 1 | 1 | 1 |

With carry-in 0 the cell is a half adder: `sum0 = a ^ b` and `carry0 = a & b`.
With carry-in 1 the sum is the inverse of that, `sum1 = ~(a ^ b)`, and the
carry is `carry1 = a | b`. Neither pair depends on the carry. So both can be
ready before the carry arrives. The carry then acts only as the select of two
multiplexers:

```
sum  = cin ? ~(a ^ b) : (a ^ b)
cout = cin ?  (a | b) : (a & b)
```

The incoming carry is called the *previous carry*. It never enters an XOR or an
AND/OR tree. From `cin` to `sum` or `cout` the delay is one 2:1 multiplexer.
This is what shortens the carry paths that ripple along the array.

`rtl/cbl_full_adder.sv` is this cell. `rtl/mux2.sv` is the multiplexer it
uses twice. The multiplexer is written as the four-gate AND-OR form
`y = (d0 & ~sel) | (d1 & sel)`.

## The array

`rtl/pp_gen.sv` forms the sixteen bit products `AiBj = a[i] & b[j]`, each of
weight `2**(i+j)`. `rtl/cbl_multiplier.sv` adds them column by column. This
is the classic 4x4 array with 4 half adders and 8 three-input adders, and all
eight three-input adders are CBL cells. The cells are placed by column (the
product bit) as follows. "prev" is the input wired to the multiplexer selects.

| column | cells | output |
|---|---|---|
| 0 | `A0B0` | p0 |
| 1 | HA1(A0B1, A1B0) | p1, carry C1 |
| 2 | HA2(A1B1, A0B2); FA2(A2B0, HA2.sum, prev C1) | p2, C2 |
| 3 | HA3(A1B2, A0B3); FA3m(A2B1, HA3.sum, prev HA2.carry); FA3b(A3B0, FA3m.sum, prev C2) | p3, C3 |
| 4 | FA4t(A2B2, A1B3, prev HA3.carry); FA4m(A3B1, FA4t.sum, prev FA3m.carry); HA4(FA4m.sum, C3) | p4, C4 |
| 5 | FA5m(A3B2, A2B3, prev FA4t.carry); FA5b(FA5m.sum, FA4m.carry, prev C4) | p5, C5 |
| 6 | FA6(A3B3, FA5m.carry, prev C5) | p6, C6 = p7 |

C1 to C6 are the carries of the bottom row, the one that produces the product
bits. They are brought out on port `c` so that the final carry chain can be
observed.

Which input of a three-input adder is the previous carry is a free choice,
because the adder is symmetric. Here it is always the carry arriving from the
neighbouring, less significant column in the same row. Along the bottom row
(C1 → C2 → C3 → C4 → C5 → C6) a carry therefore passes through one
multiplexer per CBL cell, plus the one half adder in column 4.

### Gate budget

| gate | count | where |
|---|---|---|
| AND | 24 | 16 partial products + 1 per CBL cell |
| NOT | 8 | 1 per CBL cell (the `~(a ^ b)`) |
| XOR | 8 | 1 per CBL cell |
| OR | 8 | 1 per CBL cell |
| half adder | 4 | columns 1 to 4 |
| 2:1 multiplexer | 16 | 2 per CBL cell |
| full adder | 0 | |

The source prices gates in unit gates: AND, NOT and OR at 1, XOR at 5, a
half adder at 6 and a multiplexer at 4. That gives 168 units. A plain array
with 8 ordinary full adders at 13 units each gives 144. The same array with
each full adder replaced by two full adders and two multiplexers gives 312.
The CBL version keeps the one-multiplexer carry path of that 312-unit
version at a little over half its gate units.

A synthesis tool merges the two select inverters of each cell's
multiplexers. Its raw cell counts therefore differ slightly from this
hand count.

## Interface and timing

```
module cbl_multiplier (
  input  logic [3:0] a,   // A3..A0
  input  logic [3:0] b,   // B3..B0
  output logic [7:0] p,   // S7..S0 = a * b, unsigned
  output logic [5:0] c    // C6..C1, bottom-row carries; c[0] = C1
);
```

The multiplier is purely combinational. It has no clock, reset or handshake,
and `p` is valid one propagation delay after `a` and `b` settle. Register the
inputs and output outside it if a pipeline stage is wanted.

The widths are fixed at 4 x 4 → 8 in `rtl/cbl_pkg.sv`. The package also
defines the types `operand_t`, `product_t` and `pp_matrix_t`. The array is
wired cell by cell, so a wider multiplier means a new cell list, not a
changed constant.

## Files

| file | contents |
|---|---|
| `rtl/cbl_pkg.sv` | widths and types |
| `rtl/mux2.sv` | 2:1 multiplexer, AND-OR form |
| `rtl/half_adder.sv` | half adder |
| `rtl/cbl_full_adder.sv` | CBL carry-select full-adder cell |
| `rtl/pp_gen.sv` | 16 partial-product AND gates |
| `rtl/cbl_multiplier.sv` | the 4x4 multiplier (top) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example, the multiplier test:

```
verilator --binary --timing --assert \
  rtl/cbl_pkg.sv rtl/mux2.sv rtl/half_adder.sv rtl/pp_gen.sv \
  rtl/cbl_full_adder.sv rtl/cbl_multiplier.sv tb/tb_cbl_multiplier.sv \
  --top-module tb_cbl_multiplier -o sim
./obj_dir/sim
```

The package must come first on the command line. For the other testbenches,
swap in `tb/tb_<module>.sv` and `--top-module tb_<module>`.

What the tests check:

- `tb_mux2`, `tb_half_adder` and `tb_cbl_full_adder` run every input
  combination. `tb_cbl_full_adder` compares the cell with the truth table
  above and with `a + b + cin`. It also checks that both multiplexer
  settings were used.
- `tb_pp_gen` runs all 256 operand pairs. It checks every bit product and
  the weighted sum.
- `tb_cbl_multiplier` first runs the two worked examples 11 × 10 = 110
  (`01101110`) and 15 × 11 = 165 (`10100101`). It then runs all 256 operand
  pairs and checks the product against `a * b`. It checks the six bottom-row
  carries against a reference that repeats the column reduction with integer
  additions. It counts, for each of the eight CBL cells, how often the
  previous carry selected the carry-in-0 pair and how often the carry-in-1
  pair. A cell that never used one of the two counts as a failure. The test
  runs the top at its only size, so it is also the full-size test.

## How far it follows the source, and where it departs

Taken from the source:

- the CBL cell equations and its gate set (XOR, NOT, AND, OR, two
  multiplexers selected by the previous carry)
- the 4x4 array with 4 half adders and 8 adders
- the positions of the adders by column
- the names S0..S7 and C1..C6
- the gate budget
- the two worked examples

This design's own choices:

- **Multiplexer form.** The multiplexer is the standard AND-OR selector with
  one inverter on the select. This is the four-gate form the gate budget
  charges.
- **Which adder input is the previous carry.** This is not fixed per cell in
  the source. The choice (the carry from the neighbouring column) affects
  only timing, not the result.
- **Half-adder internals.** The half adders are the usual XOR/AND pair.
- **No clock.** No clocking, reset or signed-operand support is given in the
  source, so the multiplier is combinational and unsigned.

Not included:

- The baselines the CBL multiplier is compared with: the plain ripple-carry
  array and the carry-select array that uses two full adders per position.
- Transistor-level results: the layouts and the power figures (about 0.13 mW
  for the plain array, 0.30 mW for the two-adder carry-select array and
  0.16 mW for this one). These depend on a process and have no counterpart
  in RTL.
