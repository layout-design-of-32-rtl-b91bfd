// tb_bk_pg_logic: exhaustive check of the bitwise PG cell against the
// half-adder truth table (G is the carry, P the sum of A + B).
module tb_bk_pg_logic;
  logic a, b, p, g;
  int checks = 0, failures = 0;

  bk_pg_logic dut (.a(a), .b(b), .p(p), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [1:0] s;
      {a, b} = v[1:0];
      #1;
      s = 2'(a) + 2'(b);
      checks++;
      if ({g, p} !== s) begin
        failures++;
        $display("FAIL a=%0b b=%0b: g=%0b p=%0b, expected %0b", a, b, g, p, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
