// bk_pkg: shared types and the geometry of the Brent-Kung prefix network.
//
// The prefix network works on columns 0..N of an N-bit adder. Column 0 carries
// the carry-in (G0:0 = Cin, P0:0 = 0); columns 1..N carry the bitwise
// propagate/generate of operand bits 1..N. N must be a power of two.
//
// Rows of cells, numbered from 1 (row 0 is the bitwise PG logic):
//   * rows 1..L (L = log2 N), the up-sweep: in row r, column i holds a cell
//     when (i+1) is a multiple of 2^r. It merges span i:(i-2^(r-1)+1) with the
//     span ending at column i-2^(r-1). The cell whose span reaches column 0 is
//     a grey cell (only G is needed), all others are black cells.
//   * rows L+1..2L-1, the down-sweep: row r works at level l = 2L-r. Column
//     i >= 2^l with (i+1) mod 2^l = 2^(l-1) gets a grey cell that combines its
//     own span with the finished prefix G(i-2^(l-1)):0.
//   * the carry-out column N gets one grey cell in row L+1, taking G(N-1):0
//     from the last up-sweep row; this keeps the carry-out path at L+1 cells.
// Odd rows are built from AOI gates (true inputs, inverted outputs) and even
// rows from OAI gates (inverted inputs, true outputs), so a node produced in
// an odd row is held inverted. The alternation and the fan-out tree follow the
// 16-bit and 32-bit Brent-Kung structure; the formulas for which columns
// hold cells generalise that structure to any power of two.
package bk_pkg;

  // Gate style of a prefix cell. AOI: AND-OR-INVERT on true-polarity inputs,
  // giving inverted outputs. OAI: OR-AND-INVERT on inverted inputs, giving
  // true outputs.
  typedef enum logic {CELL_AOI = 1'b0, CELL_OAI = 1'b1} cell_style_e;

  // What sits at one (row, column) position of the prefix network.
  typedef enum logic [1:0] {CELL_NONE = 2'd0, CELL_GREY = 2'd1, CELL_BLACK = 2'd2} cell_kind_e;

  // log2 of the width (N is a power of two).
  function automatic int bk_log2(int n);
    return $clog2(n);
  endfunction

  // Number of cell rows: 2L-1 for the tree, at least L+1 for the carry-out cell.
  function automatic int bk_rows(int n);
    int l = bk_log2(n);
    return (2*l - 1 > l + 1) ? 2*l - 1 : l + 1;
  endfunction

  // Rows alternate: odd rows AOI, even rows OAI.
  function automatic cell_style_e bk_row_style(int r);
    return (r % 2 == 1) ? CELL_AOI : CELL_OAI;
  endfunction

  // A node made in row r is held inverted when row r is built from AOI gates.
  // Row 0 (the bitwise PG logic) is true polarity.
  function automatic bit bk_row_inverted(int r);
    return (r >= 1) && (bk_row_style(r) == CELL_AOI);
  endfunction

  // Cell at row r, column i of an N-bit adder.
  function automatic cell_kind_e bk_cell_kind(int n, int r, int i);
    int l = bk_log2(n);
    int lv;
    if (i == n)
      return (r == l + 1) ? CELL_GREY : CELL_NONE;
    if (r >= 1 && r <= l) begin
      if ((i + 1) % (1 << r) == 0)
        return ((i + 1) == (1 << r)) ? CELL_GREY : CELL_BLACK;
      return CELL_NONE;
    end
    if (r > l && r <= 2*l - 1) begin
      lv = 2*l - r;
      if (i >= (1 << lv) && (i + 1) % (1 << lv) == (1 << (lv - 1)))
        return CELL_GREY;
    end
    return CELL_NONE;
  endfunction

  // Column that feeds the lower-span input (k-1:j) of the cell at (r, i).
  function automatic int bk_lo_col(int n, int r, int i);
    int l = bk_log2(n);
    if (i == n) return n - 1;
    if (r <= l) return i - (1 << (r - 1));
    return i - (1 << (2*l - r - 1));
  endfunction

  // Last row <= r in which column i's G was produced (0: bitwise PG logic).
  function automatic int bk_last_g_row(int n, int r, int i);
    for (int rr = r; rr >= 1; rr--)
      if (bk_cell_kind(n, rr, i) != CELL_NONE) return rr;
    return 0;
  endfunction

  // Last row <= r in which column i's P was produced (only black cells make P).
  function automatic int bk_last_p_row(int n, int r, int i);
    for (int rr = r; rr >= 1; rr--)
      if (bk_cell_kind(n, rr, i) == CELL_BLACK) return rr;
    return 0;
  endfunction

endpackage
