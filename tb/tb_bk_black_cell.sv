// tb_bk_black_cell: exhaustive check of both black-cell styles. AOI: true
// inputs, inverted G_i:j and P_i:j out. OAI: inverted inputs, true outputs.
module tb_bk_black_cell;
  import bk_pkg::*;
  logic gh, ph, gl, pl;
  logic ga, pa, go, po;
  int checks = 0, failures = 0;

  bk_black_cell #(.STYLE(CELL_AOI)) u_aoi (
    .g_hi(gh), .p_hi(ph), .g_lo(gl), .p_lo(pl), .g_out(ga), .p_out(pa));
  bk_black_cell #(.STYLE(CELL_OAI)) u_oai (
    .g_hi(~gh), .p_hi(~ph), .g_lo(~gl), .p_lo(~pl), .g_out(go), .p_out(po));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic eg, ep;
      {gh, ph, gl, pl} = v[3:0];
      #1;
      eg = (gh == 1'b1) || (ph == 1'b1 && gl == 1'b1);
      ep = (ph == 1'b1) && (pl == 1'b1);
      checks += 4;
      if (ga !== !eg) begin failures++; $display("FAIL AOI G in=%04b", v[3:0]); end
      if (pa !== !ep) begin failures++; $display("FAIL AOI P in=%04b", v[3:0]); end
      if (go !== eg)  begin failures++; $display("FAIL OAI G in=%04b", v[3:0]); end
      if (po !== ep)  begin failures++; $display("FAIL OAI P in=%04b", v[3:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
