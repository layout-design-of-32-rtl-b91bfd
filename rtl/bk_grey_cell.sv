// bk_grey_cell: grey cell of the prefix network, G_i:j = G_i:k + P_i:k . G_k-1:j.
//
// It is used where the merged span reaches column 0, so only the group
// generate is needed. STYLE picks the inverting gate of the row it sits in:
//   CELL_AOI  inputs in true polarity, output ~G_i:j (one AOI21 gate)
//   CELL_OAI  inputs inverted (~G_i:k, ~P_i:k, ~G_k-1:j), output G_i:j
//             (one OAI21 gate)
// Alternating the two in successive rows removes the inverter an AND-OR gate
// would otherwise need. Combinational, one gate delay.
module bk_grey_cell
  import bk_pkg::*;
#(
  parameter cell_style_e STYLE = CELL_AOI
) (
  input  logic g_hi,   // G_i:k   (polarity set by STYLE)
  input  logic p_hi,   // P_i:k
  input  logic g_lo,   // G_k-1:j
  output logic g_out   // G_i:j
);
  if (STYLE == CELL_AOI) begin : g_aoi
    assign g_out = ~(g_hi | (p_hi & g_lo));
  end else begin : g_oai
    assign g_out = ~(g_hi & (p_hi | g_lo));
  end
endmodule
