// bk_black_cell: black cell of the prefix network.
//
//   G_i:j = G_i:k + P_i:k . G_k-1:j      P_i:j = P_i:k . P_k-1:j
//
// Used where the merged span does not yet reach column 0, so the group
// propagate is still needed further down the tree. STYLE picks the row's
// inverting gates:
//   CELL_AOI  true inputs; AOI21 gives ~G_i:j, NAND2 gives ~P_i:j
//   CELL_OAI  inverted inputs; OAI21 gives G_i:j, NOR2 gives P_i:j
// Combinational, one gate delay.
module bk_black_cell
  import bk_pkg::*;
#(
  parameter cell_style_e STYLE = CELL_AOI
) (
  input  logic g_hi,   // G_i:k   (polarity set by STYLE)
  input  logic p_hi,   // P_i:k
  input  logic g_lo,   // G_k-1:j
  input  logic p_lo,   // P_k-1:j
  output logic g_out,  // G_i:j
  output logic p_out   // P_i:j
);
  if (STYLE == CELL_AOI) begin : g_aoi
    assign g_out = ~(g_hi | (p_hi & g_lo));
    assign p_out = ~(p_hi & p_lo);
  end else begin : g_oai
    assign g_out = ~(g_hi & (p_hi | g_lo));
    assign p_out = ~(p_hi | p_lo);
  end
endmodule
