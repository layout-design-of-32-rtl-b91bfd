// tb_bk_widths: the adder at other widths. Widths 2, 4 and 8 are checked
// exhaustively over both operands and the carry-in; width 16 is driven with
// the 16-column bring-up vector (15 operand bits A = 1, B = 1...1, cin = 0,
// whose group generate G15:0 is the carry into bit 15 and must be 1 while
// bits 0..14 of the sum are 0) plus random operands; width 64 gets random
// operands. References come from the simulator's own addition.
module tb_bk_widths;
  int checks = 0, failures = 0;

  logic [1:0]  a2,  b2,  s2;   logic c2,  co2;
  logic [3:0]  a4,  b4,  s4;   logic c4,  co4;
  logic [7:0]  a8,  b8,  s8;   logic c8,  co8;
  logic [15:0] a16, b16, s16;  logic c16, co16;
  logic [63:0] a64, b64, s64;  logic c64, co64;

  brent_kung_adder #(.N(2))  u2  (.a(a2),  .b(b2),  .cin(c2),  .sum(s2),  .cout(co2));
  brent_kung_adder #(.N(4))  u4  (.a(a4),  .b(b4),  .cin(c4),  .sum(s4),  .cout(co4));
  brent_kung_adder #(.N(8))  u8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));
  brent_kung_adder #(.N(16)) u16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));
  brent_kung_adder #(.N(64)) u64 (.a(a64), .b(b64), .cin(c64), .sum(s64), .cout(co64));

  task automatic chk(string tag, logic [64:0] got, logic [64:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", tag, got, exp_v);
    end
  endtask

  initial begin : watchdog
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {c8, a8, b8} = v[16:0];
      {c4, a4, b4} = v[8:0];
      {c2, a2, b2} = v[4:0];
      #1;
      chk("N=8", 65'({co8, s8}), 65'(a8) + 65'(b8) + 65'(c8));
      if (v < (1 << 9)) chk("N=4", 65'({co4, s4}), 65'(a4) + 65'(b4) + 65'(c4));
      if (v < (1 << 5)) chk("N=2", 65'({co2, s2}), 65'(a2) + 65'(b2) + 65'(c2));
    end

    // 16-column bring-up vector.
    a16 = 16'h0001; b16 = 16'h7FFF; c16 = 1'b0;
    #1;
    chk("N=16 bring-up", 65'({co16, s16}), 65'(a16) + 65'(b16));
    checks++;
    if (s16[14:0] !== '0 || s16[15] !== 1'b1) begin
      failures++;
      $display("FAIL N=16 bring-up: sum=%h", s16);
    end

    for (int t = 0; t < 20000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom);
      a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom}; c64 = 1'($urandom);
      if (t % 4 == 1) b64 = ~a64;
      if (t % 4 == 2) b16 = ~a16;
      #1;
      chk("N=16", 65'({co16, s16}), 65'(a16) + 65'(b16) + 65'(c16));
      chk("N=64", {co64, s64}, 65'(a64) + 65'(b64) + 65'(c64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
