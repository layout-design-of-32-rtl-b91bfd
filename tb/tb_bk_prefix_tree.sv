// tb_bk_prefix_tree: the prefix network at its default width (32) and at
// widths 2, 4 and 8 is compared with the serial recurrence
//   G_0:0 = g[0],  G_i:0 = g[i] | p[i] & G_(i-1):0
// for random and directed generate/propagate patterns (the narrow widths
// exhaustively), including the all-propagate pattern that carries column 0
// through every cell on the way to column N. At N = 32 it also reads the
// nodes of the carry-out path inside the tree and checks that each is held in
// the polarity of its row (inverted after an AOI row, true after an OAI row).
module tb_bk_prefix_tree;
  int checks = 0, failures = 0;

  logic [32:0] g32, p32, gg32;
  logic [8:0]  g8,  p8,  gg8;
  logic [4:0]  g4,  p4,  gg4;
  logic [2:0]  g2,  p2,  gg2;

  bk_prefix_tree            u32 (.g(g32), .p(p32), .gg(gg32));
  bk_prefix_tree #(.N(8))   u8  (.g(g8),  .p(p8),  .gg(gg8));
  bk_prefix_tree #(.N(4))   u4  (.g(g4),  .p(p4),  .gg(gg4));
  bk_prefix_tree #(.N(2))   u2  (.g(g2),  .p(p2),  .gg(gg2));

  function automatic logic [32:0] ref_prefix(logic [32:0] g, logic [32:0] p, int n);
    logic [32:0] r = '0;
    r[0] = g[0];
    for (int i = 1; i <= n; i++) r[i] = g[i] | (p[i] & r[i-1]);
    return r;
  endfunction

  task automatic cmp(string tag, logic [32:0] got, logic [32:0] g, logic [32:0] p, int n);
    logic [32:0] exp_v = ref_prefix(g, p, n);
    for (int i = 0; i <= n; i++) begin
      checks++;
      if (got[i] !== exp_v[i]) begin
        failures++;
        if (failures < 20)
          $display("FAIL %s column %0d: got %0b expected %0b (g=%h p=%h)",
                   tag, i, got[i], exp_v[i], g, p);
      end
    end
  endtask

  // Internal nodes on the carry-out path, row by row: G3:0 (row 2, OAI, true),
  // G7:0 (row 3, AOI, inverted), G15:0 (row 4, true), G31:0 (row 5, inverted)
  // and G32:0 (row 6, true).
  int n_inv_seen = 0;
  task automatic check_path(logic [32:0] g, logic [32:0] p);
    logic [32:0] r = ref_prefix(g, p, 32);
    logic [4:0] got, want;
    got  = {u32.gn[6][32], u32.gn[5][31], u32.gn[4][15], u32.gn[3][7], u32.gn[2][3]};
    want = {r[32], ~r[31], r[15], ~r[7], r[3]};
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("FAIL path polarity: got %b expected %b", got, want);
    end
    if (!r[31]) n_inv_seen++;   // inverted node G31:0 held high
  endtask

  task automatic run32(logic [32:0] g, logic [32:0] p);
    g32 = g; p32 = p; p32[0] = 1'b0;
    #1;
    cmp("N=32", gg32, g32, p32, 32);
    check_path(g32, p32);
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Exhaustive narrow widths (column 0 propagate is always 0 in the adder).
    for (int v = 0; v < (1 << 9); v++) begin
      g2 = v[2:0]; p2 = {v[4:3], 1'b0};
      g4 = v[4:0]; p4 = {v[8:5], 1'b0};
      #1;
      cmp("N=2", 33'(gg2), 33'(g2), 33'(p2), 2);
      cmp("N=4", 33'(gg4), 33'(g4), 33'(p4), 4);
    end
    for (int v = 0; v < (1 << 17); v++) begin
      g8 = v[8:0]; p8 = {v[16:9], 1'b0};
      #1;
      cmp("N=8", 33'(gg8), 33'(g8), 33'(p8), 8);
    end
    // Directed 32-bit: carry-in through an all-propagate chain, a generate at
    // each column followed by full propagation, and a kill at each column.
    run32(33'h1, {32'hFFFF_FFFF, 1'b0});
    run32(33'h0, {32'hFFFF_FFFF, 1'b0});
    for (int i = 0; i <= 32; i++) begin
      run32(33'(1) << i, ~33'(0));
      run32(33'h1, ~(33'(1) << i));
    end
    // Random 32-bit, with sparse and dense propagate patterns.
    for (int t = 0; t < 3000; t++) begin
      logic [32:0] g, p;
      g = 33'({$urandom, $urandom}); p = 33'({$urandom, $urandom});
      if (t % 3 == 0) g = g & 33'({$urandom, $urandom}) & 33'({$urandom, $urandom});
      if (t % 3 == 1) p = p | 33'({$urandom, $urandom}) | 33'({$urandom, $urandom});
      run32(g, p);
    end
    checks++;
    if (n_inv_seen == 0) begin
      failures++;
      $display("FAIL inverted carry-path node never seen high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
