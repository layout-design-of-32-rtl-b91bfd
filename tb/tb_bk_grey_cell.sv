// tb_bk_grey_cell: exhaustive check of both grey-cell styles. The AOI cell
// gets true inputs and must return ~(G_hi | P_hi & G_lo); the OAI cell gets
// the same operands inverted and must return G_hi | P_hi & G_lo.
module tb_bk_grey_cell;
  import bk_pkg::*;
  logic gh, ph, gl;
  logic y_aoi, y_oai;
  int checks = 0, failures = 0;

  bk_grey_cell #(.STYLE(CELL_AOI)) u_aoi (.g_hi(gh),  .p_hi(ph),  .g_lo(gl),  .g_out(y_aoi));
  bk_grey_cell #(.STYLE(CELL_OAI)) u_oai (.g_hi(~gh), .p_hi(~ph), .g_lo(~gl), .g_out(y_oai));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_g;
      {gh, ph, gl} = v[2:0];
      #1;
      // Group generate: the upper span generates, or it propagates a lower carry.
      exp_g = (gh == 1'b1) || (ph == 1'b1 && gl == 1'b1);
      checks += 2;
      if (y_aoi !== !exp_g) begin
        failures++;
        $display("FAIL AOI in=%03b out=%0b expected %0b", v[2:0], y_aoi, !exp_g);
      end
      if (y_oai !== exp_g) begin
        failures++;
        $display("FAIL OAI in=%03b out=%0b expected %0b", v[2:0], y_oai, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
