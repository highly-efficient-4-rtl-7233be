# Approximate 4:2 compressors from carry-based approximate full adders

A 4:2 compressor is the workhorse of multiplier partial-product reduction: it
takes four bits of one column (X1..X4) plus a carry-in Cin from the column
to its right. It returns a Sum bit of the same weight and two bits of double
weight, Cout (sent to the next column) and Carry. The exact compressor is two
full adders in series and obeys

    X1 + X2 + X3 + X4 + Cin = Sum + 2 * (Cout + Carry)

Most of its cost is in the XOR gates that form the full-adder sums.
Error-tolerant workloads such as image, audio and video processing can accept
a slightly wrong column sum. This design therefore keeps the two-adder
structure and swaps each full adder for a *carry-based approximate adder*
(CBAA). A CBAA computes only a carry and takes its sum as the **inverted
carry**, so it needs no XOR gate.

Two compressors are provided, one for each CBAA variant:

| compressor | cell | cell carry | cell sum |
|---|---|---|---|
| design I (`approx_compressor1`) | CBAA II (`cbaa2`) | `a \| (b & c)` | `~carry` |
| design II (`approx_compressor2`) | CBAA IV (`cbaa4`) | `ab \| bc \| ac` (majority) | `~carry` |

All logic is combinational. There are no clocks, resets or parameters.

## How the two stages are wired

Both compressors use the same chain:

    stage 1:  cell(a = X1, b = X2, c = X3)   -> Cout  = carry,  s1  = sum (= ~Cout)
    stage 2:  cell(a = s1, b = X4, c = Cin)  -> Carry = carry,  Sum = sum (= ~Carry)

In CBAA II, input `a` goes straight to the OR gate and `b`, `c` go to the AND
gate, so the operands are not interchangeable. CBAA IV is symmetric. Cout
never depends on Cin in either design, so a row of compressors has no
carry ripple between columns.

Design I needs one AND gate, one OR gate and one inverter per cell. Design II
needs three AND gates, two OR gates and one inverter per cell.

## What the approximation costs

Every cell has `sum = ~carry`, so each compressor's encoded output is
`2*Cout + Carry + 1`. That value is always between 1 and 4, while the exact
count runs from 0 to 5. Over all 32 input patterns:

| | patterns exact | too high | too low | sum of \|error\| | error values |
|---|---|---|---|---|---|
| design I | 15 | 12 | 5 | 19 | −1 (5×), +1 (10×), +2 (2×) |
| design II | 20 | 6 | 6 | 12 | −1 (6×), +1 (6×) |

Design II is more accurate because its stage-1 carry is the exact majority.
Its only errors come from replacing the XOR sum with `~carry`, which is wrong
for the inputs 000 and 111. Design I also approximates the carry:
`X1 = 1` alone forces Cout = 1. These counts assume all inputs are
equally likely. In a real multiplier the input bits are mostly ANDed partial
products, each 1 with probability 1/4, and the error profile changes with
that distribution.

## Files

| file | contents |
|---|---|
| `rtl/compressor_pkg.sv` | `comp_in_t` = `{x1,x2,x3,x4,cin}`, `comp_out_t` = `{cout,carry,sum}` (packed structs) |
| `rtl/cbaa2.sv` | CBAA II cell |
| `rtl/cbaa4.sv` | CBAA IV cell |
| `rtl/approx_compressor1.sv` | design I, two `cbaa2` in series |
| `rtl/approx_compressor2.sv` | design II, two `cbaa4` in series |
| `rtl/approx_compressor_top.sv` | top: both designs on shared inputs `x`, outputs `y1` (design I) and `y2` (design II) |
| `tb/approx_compressor_ref.sv` | reference model: cell truth tables as 8-bit constants (`8'hF8` for CBAA II, `8'hE8` for CBAA IV), chained like the RTL, plus exact and encoded values |
| `tb/*_tb.sv` | one self-checking testbench per module |

The top exists so that both alternatives can be simulated and compared
together. In a multiplier you would instantiate `approx_compressor1` or
`approx_compressor2` directly, one per column position of a reduction
stage. Wire each column's `cout` to the `cin` of the next column.

## Simulation

Every testbench applies all input patterns exhaustively, one per clock cycle
of a testbench clock. It compares each output bit with the reference model
and ends with `TB_RESULT checks=N failures=M`. A watchdog stops the run and
counts a failure if the run hangs. Each testbench also checks more than the
truth table:

* the cell testbenches report how many of the 8 rows are exact (5 for CBAA
  II, 6 for CBAA IV);
* the compressor testbenches check that Cout does not depend on Cin. They
  also check the number of inexact patterns: 17 for design I, 12 for design II;
* `approx_compressor_top_tb` requires each case to occur at least once for
  each design: exact, too high and too low. It also requires at least one
  pattern where the two designs disagree, and it checks the inexact totals.

Example with plain Verilator, from the repository root:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
      rtl/compressor_pkg.sv tb/approx_compressor_ref.sv \
      tb/approx_compressor_top_tb.sv --top-module approx_compressor_top_tb
    ./obj_dir/Vapprox_compressor_top_tb

Replace the testbench file and top module name to run any other test. All
tests finish in well under a second.

## Where this RTL departs from or adds to the published design

* **Gate structure** of both cells and the stage wiring come from the
  published gate diagrams. The gate kinds (AND, OR, inverter) come from the
  prose.
* **Gate count for design II.** The prose counts two OR gates for the whole
  compressor. The diagram shows two per cell, four in total. The RTL
  follows the diagram. A single three-input OR per cell would compute the
  same function.
* **Port bundling** into packed structs, and the shared-input top, are
  additions of this RTL.
* **The exact compressor** is only a baseline for comparison and is not part
  of the RTL. The testbenches use its arithmetic as the error reference.
* **Implementation figures are not reproduced.** The published
  implementation on a Spartan-3E reports 2 LUTs and 6 I/Os for each
  approximate compressor, against 4 LUTs and 8 I/Os for the exact one. With
  all five inputs and three outputs as ports, this RTL has 8 I/Os. A generic
  4-input-LUT mapping gives 3 LUTs for each design, one per output. How
  the published design reached 6 I/Os is not explained. No timing or power
  figures are claimed here.
