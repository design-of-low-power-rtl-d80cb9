# 16-bit carry select adder with a shared Boolean logic term

A carry select adder speeds up addition by working out each result for
both possible carry-in values before the carry arrives. The real carry
then only picks one of the two. A conventional carry select adder pays for
this with duplicated hardware. It uses two ripple carry adders per group, or
one ripple carry adder plus a binary-to-excess-1 converter.

This design shrinks that duplication to the single bit. For a one-bit full
adder, both candidate results come from four gates that share their inputs:

| carry-in | sum            | carry-out   |
|----------|----------------|-------------|
| 0        | `a XOR b`      | `a AND b`   |
| 1        | `NOT (a XOR b)`| `a OR b`    |

The sum for carry-in 1 is just the inverse of the sum for carry-in 0. So one
XOR gate and one inverter give both sums, and one AND gate and one OR gate
give both carries. Two 2:1 multiplexers, selected by the incoming carry,
pick the result. Sixteen of these cells in a chain form the 16-bit adder.
The aim is the smallest possible gate count and power, not the shortest
delay.

## The one-bit cell (`cbl_csla_cell`)

```
 a ─┬─ XOR ── sum0 ──┬──────────── d0 ┐
 b ─┤                └─ INV ─ sum1 ─ d1 ┴ MUX ── sum
    ├─ AND ── cout0 ─────────────── d0 ┐
    └─ OR  ── cout1 ─────────────── d1 ┴ MUX ── cout
                         cin ───────── sel of both MUXes
```

- `sum0`, `sum1`, `cout0` and `cout1` depend only on `a` and `b`. They are
  ready as soon as the operands are.
- `cin` goes through one multiplexer to `sum`, and through one to `cout`.
- The output for each of the eight input combinations matches a full adder.
  The testbench checks this both against the written-out truth table and
  against `a + b + cin`.

The multiplexer is a separate module, `csla_mux2`. Each cell therefore
contains the gate set the design is counted in: XOR, INV, AND, OR and two MUXes.
At transistor level this set is 8 + 1 + 2 + 2 + 2×7 = 27 transistors per bit.
That is 432 for sixteen bits. A BEC-based carry select adder needs 470.

## The 16-bit adder (`novel_csla16`, the top)

```
cin ─► cell0 ─► cell1 ─► … ─► cell15 ─► cout
        │        │               │
      sum[0]   sum[1]          sum[15]
```

Cell *i* takes `a[i]` and `b[i]`. The carry-out of cell *i* is the
multiplexer select of cell *i+1*. Every cell computes its candidates in
parallel. After that, the carry passes one multiplexer per bit, so the
critical path is 16 multiplexers long.

This is a ripple chain. A block carry select adder skips the carry over
whole groups, and this design does not. It trades speed for area and power.
The reported figures at 180 nm show this. The area drops from 21.89 µm² to
8.25 µm², about 62 %. The power drops from 9.206 nW to 6.648 nW, about 27 %.
The delay is longer than that of the BEC-based adder.

| port   | dir | width   | meaning                                   |
|--------|-----|---------|-------------------------------------------|
| `a`    | in  | `WIDTH` | operand A                                 |
| `b`    | in  | `WIDTH` | operand B                                 |
| `cin`  | in  | 1       | carry into bit 0                          |
| `sum`  | out | `WIDTH` | `(a + b + cin) mod 2**WIDTH`              |
| `cout` | out | 1       | carry out of bit `WIDTH-1`                |

| parameter | default | meaning |
|-----------|---------|---------|
| `WIDTH`   | 16 (`csla_pkg::CSLA_WIDTH`) | operand width, one cell per bit |

Timing: the adder is purely combinational. It has no clock, no reset and no
registers. The outputs are valid one propagation delay after the inputs
change.

## Where this RTL makes its own choices

- **Carry-in and carry-out ports.** The adder brings out `cin` at bit 0 and
  `cout` at bit 15. The original design only defines the 16-bit adder as
  sixteen chained cells. Tie `cin` to 0 for a plain A + B.
- **Cell wiring.** The carry-out of each cell drives the next cell's select.
  This is the natural reading of "sixteen identical one-bit cells". No other
  way of joining the cells is given.
- **Carry candidates.** Some descriptions of the cell mention an AND gate
  and an inverter for the carry. Only AND (carry-in 0) and OR (carry-in 1)
  reproduce a full adder's carry, so AND/OR is used.
- **Gate level versus RTL.** The original is a transistor-level layout. Here
  the gates are written as RTL operators and the multiplexer behaviourally.
  A synthesis tool may restructure the logic, for example by merging a cell
  into a full adder. Keep the hierarchy, or use a dont-touch constraint, if
  the shared-term structure must be kept in silicon.
- **Not included.** The BEC-based carry select adder was only the reference
  for comparison, and it is not part of this design.

## Files

| file | contents |
|------|----------|
| `rtl/csla_pkg.sv`       | shared width constant `CSLA_WIDTH = 16` |
| `rtl/csla_mux2.sv`      | 1-bit 2:1 multiplexer |
| `rtl/cbl_csla_cell.sv`  | one-bit shared-logic carry select cell |
| `rtl/novel_csla16.sv`   | 16-bit adder, the top module |
| `tb/tb_cbl_csla_cell.sv`| exhaustive cell test (truth table and arithmetic) |
| `tb/tb_novel_csla16.sv` | end-to-end test of the 16-bit adder at default width |

## Verification

`tb_cbl_csla_cell` applies all eight input combinations to the cell.

`tb_novel_csla16` runs at the default width with no parameter override. It
compares `{cout, sum}` with integer addition for:

- corner operands;
- every `a` against `~a`, with both carry-ins (all cells propagate);
- a carry generated in bit 0 and propagated through all higher bits, for
  every such operand pair;
- a generated carry at each bit position;
- 200 000 random operand pairs.

The testbench counts how often each behaviour occurs, and it fails if any
count is zero. The counted behaviours are: cells that select their
carry-in-1 candidates, an adder carry-in of 1, a carry-out, and a carry
rippling through all sixteen cells. Both testbenches print
`TB_RESULT checks=N failures=M` and have a watchdog.

Run them with plain Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wall -Wno-fatal -Irtl -y rtl \
    rtl/csla_pkg.sv tb/tb_novel_csla16.sv --top-module tb_novel_csla16 -o sim
./obj_dir/sim

verilator --binary --timing -Wall -Wno-fatal -Irtl -y rtl \
    rtl/csla_pkg.sv tb/tb_cbl_csla_cell.sv --top-module tb_cbl_csla_cell -o sim_cell
./obj_dir/sim_cell
```

Both finish in well under a second. To try another width, change `WIDTH` on
`novel_csla16` or `CSLA_WIDTH` in the package. The end-to-end testbench sizes
itself from `CSLA_WIDTH`. Its exhaustive loops grow as 2^WIDTH.
