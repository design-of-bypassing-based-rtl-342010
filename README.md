# Bypassing array multipliers built from GDI cells

An array multiplier spends most of its power in the adder array. Every adder can toggle
whenever an operand changes, even where the partial products it adds are all zero. In a
*bypassing* multiplier, a zero operand bit switches off the part of the array that would
only add zeros: its adders hold still and a multiplexer passes the running sum around them.
This RTL holds three unsigned N x N multipliers (N = 4 by default), all made from the same
small cell library:

| multiplier | what a zero bit switches off | module |
|---|---|---|
| Braun array (reference) | nothing | `braun_multiplier` |
| row bypassing | the adder row of a zero **multiplier** bit `b[j]` | `row_bypass_multiplier` |
| column bypassing | the adder column of a zero **multiplicand** bit `a[i]` | `column_bypass_multiplier` |

All three are purely combinational: no clock and no reset. `p = a * b` settles after the
array's propagation delay. Row bypassing saves the most switching when the multiplier has
many zeros. Column bypassing saves the most when the multiplicand has many zeros, and it
needs fewer extra gates than row bypassing.

The cells are written in the Gate-Diffusion-Input (GDI) style. That is a low-power circuit
style in which most gates are one or two transistor pairs. In this RTL each GDI cell is
modelled by its Boolean function, so the code simulates and synthesises like ordinary logic
and keeps the structure of the transistor-level design.

## The GDI cell and the cell library

A GDI cell is one PMOS and one NMOS transistor with a common gate `G`. The PMOS diffusion is
driven by input `P`, the NMOS diffusion by input `N`, and the joined drains form `D`. With `G`
low the PMOS conducts and `D = P`; with `G` high the NMOS conducts and `D = N`. Logically the
cell is a 2:1 selector, `D = G ? N : P` (`rtl/gdi_cell.sv`). Tying `P` and `N` to signals or
constants gives many functions from a single cell:

| N | P | G | D |
|---|---|---|---|
| 0 | B | A | A'B |
| B | 1 | A | A' + B |
| 1 | B | A | A + B |
| B | 0 | A | AB |
| C | B | A | A'B + AC |
| 0 | 1 | A | A' (inverter) |

The rest of the library is built only from `gdi_cell` instances:

| module | structure | function |
|---|---|---|
| `gdi_xor` | inverter on B; cell gated by A with P=B, N=B' | a ^ b |
| `gdi_xnor` | inverter on B; cell gated by A with P=B', N=B | ~(a ^ b) |
| `gdi_mux` | one cell gated by EN, A on N, B on P | en ? a : b |
| `gdi_half_adder` | `gdi_xor` for the sum, AND-configured cell for the carry | {cout,sum} = a+b |
| `gdi_full_adder` | `gdi_xnor`, an inverter, a sum cell gated by cin, a carry `gdi_mux` gated by a^b | {cout,sum} = a+b+cin |

The full adder forms both `x = a^b` and its complement. The sum cell passes `x` when `cin = 0`
and `~x` when `cin = 1`. The carry multiplexer passes `cin` when `a` and `b` differ and `a`
when they agree. That is `cout = ab + cin(a^b)`.

The partial products `a[i] & b[j]` are also AND-configured GDI cells.

## Braun array (`braun_multiplier`)

The reference design. Carry-save cell `(j, i)`, for row `j = 1..N-1` and column
`i = 0..N-2`, has weight `i+j`. It adds three bits:

* its partial product `a[i]b[j]`;
* the sum of cell `(j-1, i+1)`, diagonally above. The leftmost cell takes `a[N-1]b[j-1]`
  instead, and row 1 takes `a[i+1]b[0]`;
* the carry of cell `(j-1, i)`, straight above.

Row 1 has no carries to absorb, so its cells are half adders. Cell 0 of row `j` gives product
bit `p[j]`. A final ripple-carry row (half adder, then full adders) adds the last row's
carries to its sums and to `a[N-1]b[N-1]`, giving `p[2N-1:N]`. For N = 4:

```
            a3b0 a2b0 a1b0         (a0b0 = p0)
   row 1:    HA   HA   HA    + a2b1 a1b1 a0b1          -> p1
   row 2:    FA   FA   FA    + a2b2 a1b2 a0b2  (a3b1)  -> p2
   row 3:    FA   FA   FA    + a2b3 a1b3 a0b3  (a3b2)  -> p3
   final:    FA   FA   HA    (a3b3)                    -> p7 p6 p5 p4
```

## Row bypassing (`row_bypass_multiplier`, `adding_cell`)

### The adding cell

Every adder of this multiplier is an `adding_cell`. The cell sits in the row of multiplier bit
`x = b[j]`. Its partial product, previous sum and previous carry reach a full adder only
through input gates opened by `x`. Two multiplexers, also controlled by `x`, pick the outputs:

* `x = 1`: the full adder's sum and carry;
* `x = 0`: the previous sum and previous carry, passed on unchanged. The adder's inputs are
  held at 0, so it does not switch.

In a transistor circuit the input gates are three-state buffers that leave the adder's inputs
floating. Two-state logic has no floating level. Here the gates are therefore AND-configured
GDI cells: the inputs of a bypassed adder are held at 0 rather than left floating. Either way
the adder sees no transitions. This substitution is this design's own choice.

### Why passing "previous sum and carry" is exact

The difficult part of row bypassing is the carries. In a carry-save array the carry out of a
cell is one weight higher than its inputs. A bypassed cell that simply forwarded its incoming
carry would hand on a carry of the wrong weight. This design avoids the problem by giving each
adder row its own carry chain:

* The running sum entering row `j` is an N-bit vector aligned to weight `j`.
* Cell `i` of row `j` adds `a[i]b[j]`, bit `i` of the running sum, and the carry of cell
  `i-1` of the *same* row. Cell 0 gets a constant 0.
* The row's sums, shifted down one place, with the last cell's carry on top, form the running
  sum for row `j+1`. Sum bit 0 is product bit `p[j]`.
* The start value is `a & b[0]`, shifted down one place; `p[0] = a[0]b[0]`. After row N-1 the
  running sum is `p[2N-1:N]`.

When `b[j] = 0`, the sum multiplexers pass the running sum straight through. The carry
multiplexers pass each cell's incoming carry on along the row. That chain starts at the
constant 0, so every carry of a bypassed row is 0, which is exactly what adding an all-zero
partial-product row would have produced. So no correction logic is needed. The row for
`b[0]` has no adders: it only forms the starting partial products. A 4 x 4 multiplier
therefore has three bypassable rows of four cells each.

Example: in `11 x 10` (`1011 x 1010`), `b[0]` and `b[2]` are 0. Row `b[2]` is bypassed and
row `b[0]` has no adders to bypass.

Cost: N x (N-1) adding cells, each with three input gates and two multiplexers. This is
more hardware than the Braun array, which is the price of row bypassing.

## Column bypassing (`column_bypass_multiplier`)

The column-bypassing multiplier keeps the Braun array unchanged and adds control to it. All
carry-save cells with the same `i` handle partial products `a[i]b[j]`, so they form a column
that only adds zeros when `a[i] = 0`. In that case:

* every partial product of the column is 0;
* the column's carries, which run straight down the column, start at 0 in the half-adder row
  and stay 0;
* each cell's sum equals its incoming sum.

So each cell gets, in addition to its adder:

* input gates (AND-configured GDI cells with `a[i]`) that hold the adder's inputs at 0 while
  the column is off;
* a GDI multiplexer selected by `a[i]` that outputs the adder's sum when `a[i] = 1` and the
  incoming sum when `a[i] = 0`.

The carry each column hands to the final ripple row passes an AND gate with `a[i]`. This
guarantees a 0 carry from a switched-off column whatever its adders hold. With the input
gates used here the AND gate is logically redundant, but it is kept because it is part of the
scheme. Column `a[N-1]` contains no adders; its partial products feed the leftmost cells
directly, so it is never bypassed.

Example: `1010 x 1000` switches off columns 0 and 2. `1111 x 1000` switches off none.
A multiplicand of all ones always switches every column.

## Where this RTL departs from, or goes beyond, the reference scheme

* **Electrical behaviour is not modelled.** This covers threshold loss on passed levels,
  bulk connections, the twin-well process that some GDI functions need, and transistor sizes.
  The cells are ideal selectors. Transistor counts and delays therefore cannot be read from
  this RTL.
* **Three-state input gates are modelled as AND gates** (operand isolation), in the adding
  cell and in the column-bypass cells.
* **Row-bypass carries ripple along each row** instead of going down to the next row. With
  this arrangement bypassing is exact and needs no correction adders. The reference row
  scheme uses a carry-save arrangement plus extra adders along its right edge; those are not
  reproduced.
* **Full adder.** The adder forms XNOR first and then inverts it. It uses 10 transistors'
  worth of cells rather than the 12-transistor cell of the reference. Its function is the
  same.
* **Multiplexer polarity.** `gdi_mux` implements `en ? a : b`, which is its specified
  function. For that, input `a` goes on the NMOS side of the cell.
* **Size.** N is a parameter and defaults to 4, the size of the reference design. The
  testbenches also run N = 8 and N = 16.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>`.

* Cells: exhaustive over all inputs. The GDI cell is also checked in all six configurations
  of its function table. The adding cell's test also checks that a bypassed adder sees only
  zero inputs.
* Each multiplier, compared with `a*b`:
  * 4 x 4 and 8 x 8 instances are tested over every operand pair;
  * a 16 x 16 instance gets 4000 random pairs plus all-ones and alternating-bit corners;
  * the fixed examples are applied: `3 x 5 = 15` (Braun), `4 x 3 = 12` and `11 x 10 = 110`
    (row), `8 x 2 = 16`, `10 x 8 = 80` and `15 x 8 = 120` (column).
* The bypassing testbenches look inside the 4 x 4 array. Every row (column) whose operand
  bit is 0 must have all its adder inputs at 0. The testbenches count the bypass events and
  fail if bypassing, or a product with nothing bypassed, never occurs.
* `tb_gdi_multipliers_top` runs the three multipliers together at the default size through
  all 256 operand pairs and the three published example products. It counts row and column
  bypasses.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
          --top-module tb_gdi_multipliers_top tb/tb_gdi_multipliers_top.sv
./obj_dir/Vtb_gdi_multipliers_top
```

Replace the module name to run another testbench; each finishes in well under a second. To
lint a module: `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/<module>.sv`.

## Files

| file | contents |
|---|---|
| `rtl/gdi_cell.sv` | GDI basic cell (selector) |
| `rtl/gdi_xor.sv`, `rtl/gdi_xnor.sv`, `rtl/gdi_mux.sv` | two-cell XOR / XNOR, one-cell multiplexer |
| `rtl/gdi_half_adder.sv`, `rtl/gdi_full_adder.sv` | GDI adders |
| `rtl/braun_multiplier.sv` | Braun array |
| `rtl/adding_cell.sv`, `rtl/row_bypass_multiplier.sv` | row-bypassing cell and multiplier |
| `rtl/column_bypass_multiplier.sv` | column-bypassing multiplier |
| `rtl/gdi_multipliers_top.sv` | the three multipliers side by side, each with its own ports |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

To change the operand width, override `N` on any multiplier or on the top
(`#(.N(8))`). N must be at least 2. The product is always `2N` bits.
