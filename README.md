# Carry-save array multiplier without a final adder

An N x N unsigned array multiplier usually has three parts: an AND-gate array
that forms the partial products, a carry-save array of full adders that reduces
them, and a final carry-propagate adder (typically N ripple-carry cells) that
merges the last row's sums and carries. This design removes the final adder.
The carries that the last carry-save row would hand to it are fed instead into
adder inputs of the array that are otherwise tied to 0. The product is still
exact, and a 4x4 multiplier needs 12 full-adder cells instead of 16. In
general it needs N fewer: 8 fewer at 8x8, 16 fewer at 16x16.

The same array is also given in a column-bypassing form. There, an array column
whose multiplicand bit is 0 stops switching, which saves dynamic power.

Both multipliers are purely combinational, with no clock, registers or reset.
The operand size `N` is a parameter. It defaults to 4, and any N >= 2 works.

## The carry-save array

Write the operands as `x` (multiplicand) and `y` (multiplier). The partial
products are `pp[j][i] = x[i] & y[j]`, each of weight 2^(i+j) (`pp_gen`).

The adders form N-1 rows (r = 1..N-1) of N cells (array column i = 0..N-1).
Cell (r,i) sits at weight r+i and adds three bits:

| input | normal source | exceptions |
|---|---|---|
| `a`    | `pp[r][i]` | none |
| `s_in` | sum of cell (r-1, i+1), from the row above, one column to the left | row 1 takes `pp[0][i+1]`; **leftmost cell (i = N-1): see below** |
| `c_in` | carry of cell (r-1, i), from the row above, same column | row 1 takes 0 |

Up to this point the array is an ordinary carry-save multiplier. Carries are
not added within a row but passed down diagonally to the next row. The low
product bits come out at the right edge of the array:

- `p[0] = pp[0][0]`
- `p[r]` is the sum of cell (r,0)

## Removing the final adder

In the conventional array, the leftmost cell of each row has nothing on `s_in`,
because no row above reaches that weight, so the input is tied to 0. The last
row leaves a sum at each weight N-1..2N-2 and a carry at each weight N..2N-1.
An N-cell ripple adder would merge these into `p[N..2N-1]`.

Here that adder is gone. The rows' leftmost cells sit at weights N, N+1, ...,
2N-2, so there is exactly one free `s_in` per weight. Each one takes the carry
of the **last-row cell one weight lower**:

- the carry of last-row cell i (weight N-1+i) goes to `s_in` of the leftmost
  cell of row i+1 (weight N+i), for i = 0..N-2;
- `p[N-1+i]` is the sum of last-row cell i;
- `p[2N-1]` is the carry of the leftmost last-row cell.

Wiring for N = 4. The F values are the forwarded carries:

| weight | row 1 | row 2 | row 3 (last) | product bit |
|---|---|---|---|---|
| 1 | x0y1 + x1y0 | | | p1 |
| 2 | x1y1 + x2y0 | x0y2 + s + c | | p2 |
| 3 | x2y1 + x3y0 | x1y2 + s + c | x0y3 + s + c → carry F3 | p3 |
| 4 | x3y1 + **F3** | x2y2 + s + c | x1y3 + s + c → carry F4 | p4 |
| 5 | | x3y2 + **F4** + c | x2y3 + s + c → carry F5 | p5 |
| 6 | | | x3y3 + **F5** + c → carry | p6, p7 |

There are two reasons this is correct:

- **Every bit is counted once.** Every partial product, sum and carry of
  weight w enters exactly one cell of weight w or is a product bit. Each full
  adder conserves the weighted total.
- **There is no combinational loop.** Sums flow down within one weight.
  Carries, including the forwarded ones, flow only from weight w to weight w+1.

A forwarded carry re-enters at the top of the next weight and flows down
through the rows again. The critical path is therefore not that of a plain
carry-save array. The RTL makes no timing claim. Speed and power depend on the
full-adder circuit and the process.

Which free input receives which carry is this design's reading of the scheme.
The scheme's description names the forwarding only column by column: the carry
of the 4th column goes to the 5th instead of a zero, and so on, and the carry
of the 7th column is the MSB.

## Column bypassing

In `cb_mult_norca` every cell is a `bypass_adder`. Each array column is
controlled by its multiplicand bit, with `col_bypass[i] = ~x[i]`.

When `x[i] = 0`, every partial product in column i is 0. Row 1 feeds the column
a carry of 0, so every cell of the column has at most one input at 1, and all
carries down the column stay 0. The cell can therefore force its adder's inputs
to 0 (operand isolation), pass `s_in` to `sum`, and drive `cout = 0` without
changing the result.

This also holds for the leftmost column, where `s_in` carries a forwarded
carry: that carry is simply passed through. The bypass is a power measure only,
and the product is identical to that of `csa_mult_norca`.

The multiplexer-and-gated-carry cell follows the usual column-bypass
multiplier. Two details are this design's own choices:

- holding the adder still by AND-gating its inputs;
- controlling the bypass with the multiplicand.

## Modules

| file | module | role |
|---|---|---|
| `rtl/full_adder.sv` | `full_adder` | 1-bit full adder (logic function only) |
| `rtl/pp_gen.sv` | `pp_gen #(N)` | N x N AND array, `pp[j][i] = x[i] & y[j]` |
| `rtl/csa_mult_norca.sv` | `csa_mult_norca #(N)` | the array multiplier without a final adder: `x`, `y` → `p` (2N bits) |
| `rtl/bypass_adder.sv` | `bypass_adder` | full adder with column bypass and input isolation |
| `rtl/cb_mult_norca.sv` | `cb_mult_norca #(N)` | column-bypassing version: `x`, `y` → `p`, plus `col_bypass` (N bits) |
| `rtl/lpla_mult_top.sv` | `lpla_mult_top #(N)` | both multipliers side by side. `a_x`, `a_y` → `a_p`; `b_x`, `b_y` → `b_p`, `b_bypass` |

Array cells are generate blocks `g_row[r].g_col[i]`, with local nets `s_in`,
`c_in`, `s` and `c`. This keeps every cell's sum and carry a separate signal,
so simulators see no false combinational loop. It also lets a testbench probe
any cell.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- `tb_full_adder` and `tb_bypass_adder` are exhaustive. The bypass test also
  checks that the inner adder's inputs are held at 0.
- `tb_pp_gen` checks every bit at N = 4 and the weighted sum at N = 8.
- `tb_csa_mult_norca` compares against `x*y`:
  - all operand pairs at N = 2, 3, 4 and 8;
  - 20,000 random pairs at N = 16;
  - for N = 4, it requires each forwarded carry and the final-carry MSB to be
    1 at least once.
- `tb_cb_mult_norca` checks the product and `col_bypass` at N = 4, 8 and 16.
  For N = 4 it also checks on the internal nets that every bypassed column
  really carries 0, and that a forwarded carry passes through a bypassed
  leftmost column.
- `tb_lpla_mult_top` runs the top at its default size. All 256 operand pairs
  are applied to both multipliers, and the test counts each mechanism: carry
  forwarding, the MSB from the final carry, bypass of each column, and a carry
  passing through a bypassed column.

To simulate, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    tb/tb_lpla_mult_top.sv --top-module tb_lpla_mult_top
./obj_dir/Vtb_lpla_mult_top
```

To change the size, set the parameter: `csa_mult_norca #(.N(8))`.

## Limits and departures

- The intended full adder is a 14- or 16-transistor circuit. Only its Boolean
  function is modelled. The power, delay and energy-delay figures of such a
  circuit in 0.18 µm, 90 nm and 65 nm processes are circuit measurements, and
  this RTL cannot reproduce them.
- The positions at which forwarded carries enter the array are this design's
  reading of the scheme, as explained above. They are checked for exactness,
  not against a reference schematic.
- The column-bypassing multiplier's cell and its control are a standard
  construction, not a given schematic.
- The baselines are not included: the conventional carry-save multiplier with
  a ripple-carry final stage, and the conventional column-bypassing multiplier.
  Building the former takes adding an N-cell ripple adder after the last row
  and tying the leftmost `s_in` inputs to 0.
- Operands are unsigned. There is no signed (Baugh-Wooley) mode.
