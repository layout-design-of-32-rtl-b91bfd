# 32-bit Brent-Kung adder with alternating AOI/OAI rows

A ripple-carry adder waits for each carry to pass every bit below it, so its
delay grows linearly with the width. A parallel prefix adder instead computes
the carry into every bit as a *group generate*, the OR/AND combination of all
lower bits, and builds all of them at once with a tree of small cells. The
delay then grows with log2 N. The Brent-Kung tree used here is the sparse member
of that family. Spans double on the way up (2, 4, 8, 16, 32 columns). The
finished prefixes then fan back down into the columns in between. No node
drives more than two cells of the next level, and wiring stays short. The
price is about twice the logic depth of a Kogge-Stone tree.

The RTL describes the gate structure of a full-custom CMOS implementation. Each
row of prefix cells is made of *inverting* gates: AND-OR-INVERT (AOI) in odd
rows and OR-AND-INVERT (OAI) in even rows. Signals therefore change polarity
from row to row, so no row needs an extra inverter after each AND-OR. Keeping
track of that polarity is the least obvious part of the design. It is
described in its own section below.

```
sum + 2^N * cout = a + b + cin          (N = 32 by default, purely combinational)
```

## Prefix formulation

Each operand bit `k` (0..N-1) sits in prefix **column** `k+1`. Column 0 holds the
carry-in:

| column | G (generate)       | P (propagate)      |
|--------|--------------------|--------------------|
| 0      | `cin`              | 0                  |
| k+1    | `a[k] & b[k]`      | `a[k] ^ b[k]`      |

A span of columns `i..j` generates a carry when its upper part generates one, or
when its upper part propagates a carry that its lower part generates:

```
G(i:j) = G(i:k) | P(i:k) & G(k-1:j)
P(i:j) = P(i:k) & P(k-1:j)
```

`G(i:0)` is the carry out of column `i`. The sum bit of operand bit `k` is
`P(k+1) ^ G(k:0)`. The carry-out is `G(N:0)`.

Two cells evaluate the operator:

* a **black cell** gives both `G(i:j)` and `P(i:j)`. It is used while a span
  has not yet reached column 0.
* a **grey cell** gives only `G(i:j)`. It is used when the span reaches column
  0, because `P(i:0)` is never needed.

## The tree for 32 bits

Rows of cells for N = 32. Columns run from 32 (left) down to 0 (right). `B` is a
black cell, `G` a grey cell, and `.` a wire passing through:

```
column     33322222222221111111111000000000 0
           21098765432109876543210987654321 0
row 1 AOI  .B.B.B.B.B.B.B.B.B.B.B.B.B.B.B.G .    up-sweep, spans of 2
row 2 OAI  .B...B...B...B...B...B...B...G.. .    spans of 4
row 3 AOI  .B.......B.......B.......G...... .    spans of 8
row 4 OAI  .B...............G.............. .    spans of 16
row 5 AOI  .G.............................. .    G(31:0)
row 6 OAI  G........G...................... .    carry-out G(32:0); G(23:0)
row 7 AOI  .....G.......G.......G.......... .    G(27:0), G(19:0), G(11:0)
row 8 OAI  ...G...G...G...G...G...G...G.... .    odd multiples of 2, minus 1
row 9 AOI  ..G.G.G.G.G.G.G.G.G.G.G.G.G.G.G.. .    remaining even columns
```

That makes 26 black cells and 32 grey cells. The rules are in `rtl/bk_pkg.sv`
and hold for any N that is a power of two (L = log2 N):

* **Up-sweep**, rows 1..L. In row `r`, column `i` has a cell when `(i+1)` is a
  multiple of `2^r`. Its lower input comes from column `i - 2^(r-1)`. The cell
  is grey when `i+1 = 2^r` and black otherwise.
* **Down-sweep**, rows L+1..2L-1. Row `r` works at level `l = 2L - r`. Column
  `i >= 2^l` with `(i+1) mod 2^l = 2^(l-1)` gets a grey cell. It combines the
  column's own span with the finished prefix from column `i - 2^(l-1)`.
* **Carry-out**. Column N gets one grey cell in row L+1. It reads G(N-1:0)
  straight from the last up-sweep row. The carry-out is therefore L+1 cells
  deep, while the slowest sum bit is 2L-1 cells deep.

For 16 columns, rows 1..7 of the same rules give the classic 16-column
Brent-Kung drawing: spans 15:14 … 1:0, 15:12 … 3:0, 15:8, 7:0, 15:0, then 11:0,
then 13:0, 9:0, 5:0, then the even columns.

## Polarity: AOI rows, OAI rows and the inverters

| row    | gates                   | reads        | produces      |
|--------|-------------------------|--------------|---------------|
| odd    | AOI21 (+ NAND2 for P)   | true signals | inverted      |
| even   | OAI21 (+ NOR2 for P)    | inverted     | true signals  |

By De Morgan, an OAI21 fed with `~G(i:k), ~P(i:k), ~G(k-1:j)` returns
`G(i:k) | P(i:k) & G(k-1:j)`. A NOR2 of `~P(i:k), ~P(k-1:j)` returns
`P(i:k) & P(k-1:j)`. So alternating rows need no inverters between them.

A node keeps the polarity of the row that made it. The PG logic counts as row
0, which is true polarity. A node made in row `s` and read by a cell in row `r`
is in the right polarity only when `r - s` is odd. Otherwise a `bk_buffer`
inverter sits on that input. This happens in two cases:

* a node skips an even number of rows, e.g. G(15:0) from row 4 read in row 6;
* a PG output goes straight into an OAI row, e.g. the carry-out cell's
  `G(32)` and `P(32)`.

Every group generate that leaves the tree from an odd row gets one more
inverter. The sum stage is then a plain XOR. For N = 32 this places 12
inverters inside the tree and 21 on its outputs. `bk_prefix_tree` works all of
this out at elaboration time from the functions in `bk_pkg`. You never place
them by hand.

The critical path to the carry-out shows the alternation:

```
P/G(3..0) -> G(3:0) row 2, true -> G(7:0) row 3, inverted -> G(15:0) row 4, true
          -> G(31:0) row 5, inverted -> G(32:0) row 6, true = cout
```

## Modules

| module              | role                                                   | parameters                         |
|---------------------|--------------------------------------------------------|------------------------------------|
| `bk_pkg`            | cell style/kind enums; tree geometry and polarity rules | –                                 |
| `brent_kung_adder`  | top: PG logic, prefix tree, sum logic                   | `N = 32` (power of two, >= 2)     |
| `bk_pg_logic`       | one bit: `g = a & b`, `p = a ^ b`                      | –                                  |
| `bk_prefix_tree`    | group-generate network, outputs `gg[i] = G(i:0)`, true polarity | `N = 32`                 |
| `bk_grey_cell`      | AOI21 or OAI21 grey cell                               | `STYLE = CELL_AOI / CELL_OAI`      |
| `bk_black_cell`     | AOI21+NAND2 or OAI21+NOR2 black cell                   | `STYLE`                            |
| `bk_buffer`         | inverter that restores polarity                        | –                                  |
| `bk_sum_logic`      | `s = p ^ c`, one XOR per bit                           | `N = 32`                           |

Top-level ports: `a[N-1:0]`, `b[N-1:0]`, `cin` in; `sum[N-1:0]`, `cout` out.
There is no clock, register or reset. Outputs settle combinationally.

## Simulating

Every testbench is self-checking. Each prints one line,
`TB_RESULT checks=<n> failures=<n>`, and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bk_pkg.sv \
          tb/tb_brent_kung_adder.sv --top-module tb_brent_kung_adder -o sim
./obj_dir/sim
```

Substitute any other testbench:

| testbench               | what it checks                                                                 |
|-------------------------|--------------------------------------------------------------------------------|
| `tb_brent_kung_adder`   | 32-bit adder at default parameters against `a + b + cin`. Covers the bring-up vector A = 0…01, B = 1…1 with cin = 1 then 0, generate/kill at every bit, and 20 000 random operands. It fails unless each of these occurs: carry-in rippling to the carry-out, carry-out 0 and 1, and a carry of 0 and of 1 into every bit. |
| `tb_bk_widths`          | N = 2, 4, 8 exhaustively (operands and carry-in); N = 16 with the 16-column bring-up vector and random operands; N = 64 random. |
| `tb_bk_prefix_tree`     | tree against the serial recurrence `G(i:0) = g[i] \| p[i] & G(i-1:0)`. Exhaustive at N = 2, 4, 8; directed and random at N = 32. At N = 32 it also checks the polarity of the internal carry-out-path nodes G(3:0), G(7:0), G(15:0), G(31:0) and G(32:0). |
| `tb_bk_grey_cell`, `tb_bk_black_cell` | both styles, all input combinations.                             |
| `tb_bk_pg_logic`, `tb_bk_buffer`, `tb_bk_sum_logic` | truth tables and random vectors.                   |

The RTL passes Verilator `--lint-only -Wall` without warnings and
elaborates in Yosys with the slang front end.

## Where this RTL departs from a transistor-level implementation, and how far to trust it

* **Function**: the adder has been checked exhaustively at N = 2, 4 and 8 and by
  directed and random vectors at N = 16, 32 and 64. The tree rules are the same
  code at every width, so this coverage carries over to the default width.
* **Buffers**: the positions of the inverters in the original 32-bit drawing
  were not available. The inverters here are placed by the polarity rule above,
  which is the minimum that keeps the logic correct. Non-inverting
  fan-out/drive buffers are not instanced, because in RTL they would be plain
  wires. A physical implementation would add them where loading demands.
* **Sum polarity**: the tree returns every carry in true polarity, and the sum
  stage is plain XOR. An implementation could instead use XNOR on inverted
  carries and save the output inverters.
* **Carry-out**: the top column uses a grey cell right after the up-sweep,
  `G(N:0) = G(N) | P(N) & G(N-1:0)`. This is the shortest path to the carry-out.
* **Width**: any power of two works. `brent_kung_adder #(.N(16))` has 16 operand
  bits, 17 prefix columns and a carry-out cell. It is not the 16-column tree
  (15 operand bits + carry-in) that is often drawn as "the 16-bit Brent-Kung
  adder". That tree is rows 1..7 of `bk_prefix_tree #(.N(16))` without the
  column-16 cell.
* **Timing and sizing**: transistor widths, layout and measured delays (about
  10 ns for the 32-bit carry-out path in a minimum-width layout) have no RTL
  counterpart. Only the logic depth (9 cell rows to the slowest sum bit, 6 to
  the carry-out, for N = 32) can be read from this code.
* **Not included**: the Kogge-Stone and Sklansky trees, and the ripple,
  carry-skip, carry-select and conditional-sum adders, are only points of
  comparison for this design.

## Changing the design

* Width: set `N` on `brent_kung_adder`. A width that is not a power of two
  stops elaboration with an error.
* Tree shape: edit `bk_cell_kind` and `bk_lo_col` in `bk_pkg`. The polarity
  bookkeeping (`bk_last_g_row`, `bk_last_p_row`, `bk_row_inverted`) and the
  inverter placement adapt automatically. So does the placement of the
  carry-out cell, provided every G that a later cell reads is still produced
  in some earlier row.
* Gate style: `bk_row_style` decides AOI or OAI per row. Making every row AOI,
  for example, still gives a correct adder. An inverter then appears on every
  cell input that needs one.
