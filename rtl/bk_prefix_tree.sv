// bk_prefix_tree: Brent-Kung group-generate network built from alternating
// AOI and OAI rows.
//
// Inputs are the bitwise generate/propagate of columns 0..N (column 0 holds
// the carry-in as G0:0 with P0:0 = 0; column N is the top operand bit). The
// output gg[i] is the group generate G_i:0 in true polarity, i.e. the carry
// out of column i: gg[N] is the adder's carry-out and gg[i-1] the carry into
// operand bit i. gg[0] is the carry-in itself, passed straight through.
//
// Structure (see bk_pkg for the exact column formulas):
//   * an up-sweep of log2 N rows builds the spans 2, 4, 8, ... columns wide;
//     a span that reaches column 0 is finished by a grey cell, any other span
//     by a black cell;
//   * a down-sweep of log2 N - 1 rows fans the finished prefixes back into
//     the columns in between with grey cells, so every node drives at most
//     two cells of the next level;
//   * the carry-out column N gets a single grey cell right after the
//     up-sweep, fed by G(N-1):0.
// Row r uses AOI gates when r is odd and OAI gates when r is even, so each
// node is held in the polarity of the row that made it. Where a cell reads a
// node of the wrong polarity (the node was made an even number of rows
// earlier, or comes straight from the PG logic into an OAI row), a bk_buffer
// inverter is placed on that input; the outputs that leave the tree inverted
// pass one more inverter. These inverters are the design's buffers.
// Entirely combinational: the critical path is log2 N + 1 cells to the carry-out
// and 2 log2 N - 1 cells (plus inverters) to the slowest sum carry.
module bk_prefix_tree
  import bk_pkg::*;
#(
  parameter int N = 32                  // adder width, a power of two >= 2
) (
  input  logic [N:0] g,                 // bitwise generate, column 0 = carry-in
  input  logic [N:0] p,                 // bitwise propagate, column 0 = 0
  output logic [N:0] gg                 // group generate G_i:0, true polarity
);
  localparam int R = bk_rows(N);

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_width
    $error("bk_prefix_tree: N must be a power of two >= 2");
  end

  // gn[r][i] / pn[r][i]: the newest G / P of column i after row r, held in the
  // polarity of the row that produced it. Columns without a cell in row r
  // simply carry the wire on.
  logic [N:0] gn [R+1];
  logic [N:0] pn [R+1];

  assign gn[0] = g;
  assign pn[0] = p;

  for (genvar r = 1; r <= R; r++) begin : g_row
    localparam cell_style_e STYLE = bk_row_style(r);
    localparam bit IN_INV = (STYLE == CELL_OAI);   // OAI rows want inverted inputs

    for (genvar i = 0; i <= N; i++) begin : g_col
      localparam cell_kind_e KIND = bk_cell_kind(N, r, i);

      if (KIND == CELL_NONE) begin : g_wire
        assign gn[r][i] = gn[r-1][i];
        assign pn[r][i] = pn[r-1][i];
      end else begin : g_cell
        localparam int  J      = bk_lo_col(N, r, i);
        localparam bit  FIX_GH = bk_row_inverted(bk_last_g_row(N, r-1, i)) != IN_INV;
        localparam bit  FIX_PH = bk_row_inverted(bk_last_p_row(N, r-1, i)) != IN_INV;
        localparam bit  FIX_GL = bk_row_inverted(bk_last_g_row(N, r-1, J)) != IN_INV;
        logic gh, ph, gl;

        if (FIX_GH) begin : g_inv_gh
          bk_buffer u_inv (.a(gn[r-1][i]), .y(gh));
        end else begin : g_pass_gh
          assign gh = gn[r-1][i];
        end
        if (FIX_PH) begin : g_inv_ph
          bk_buffer u_inv (.a(pn[r-1][i]), .y(ph));
        end else begin : g_pass_ph
          assign ph = pn[r-1][i];
        end
        if (FIX_GL) begin : g_inv_gl
          bk_buffer u_inv (.a(gn[r-1][J]), .y(gl));
        end else begin : g_pass_gl
          assign gl = gn[r-1][J];
        end

        if (KIND == CELL_GREY) begin : g_grey
          bk_grey_cell #(.STYLE(STYLE)) u_cell (
            .g_hi (gh), .p_hi (ph), .g_lo (gl), .g_out (gn[r][i])
          );
          // A grey cell's span reaches column 0; its P is never read again.
          assign pn[r][i] = pn[r-1][i];
        end else begin : g_black
          localparam bit FIX_PL = bk_row_inverted(bk_last_p_row(N, r-1, J)) != IN_INV;
          logic pl;
          if (FIX_PL) begin : g_inv_pl
            bk_buffer u_inv (.a(pn[r-1][J]), .y(pl));
          end else begin : g_pass_pl
            assign pl = pn[r-1][J];
          end
          bk_black_cell #(.STYLE(STYLE)) u_cell (
            .g_hi (gh), .p_hi (ph), .g_lo (gl), .p_lo (pl),
            .g_out (gn[r][i]), .p_out (pn[r][i])
          );
        end
      end
    end
  end

  // Bring every prefix out in true polarity.
  for (genvar i = 0; i <= N; i++) begin : g_out
    if (bk_row_inverted(bk_last_g_row(N, R, i))) begin : g_inv
      bk_buffer u_inv (.a(gn[R][i]), .y(gg[i]));
    end else begin : g_pass
      assign gg[i] = gn[R][i];
    end
  end
endmodule
