// tb_bk_sum_logic: random and walking-one vectors through the 32-bit sum
// stage; each bit must be the parity of its propagate and its carry.
module tb_bk_sum_logic;
  localparam int N = 32;
  logic [N-1:0] p, c, s;
  int checks = 0, failures = 0;

  bk_sum_logic dut (.p(p), .c(c), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (s[i] !== (p[i] != c[i])) begin
        failures++;
        $display("FAIL bit %0d p=%0b c=%0b s=%0b", i, p[i], c[i], s[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      p = N'(1) << i; c = '0; check();
      p = '0; c = N'(1) << i; check();
      p = N'(1) << i; c = N'(1) << i; check();
    end
    for (int t = 0; t < 200; t++) begin
      p = $urandom; c = $urandom; check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
