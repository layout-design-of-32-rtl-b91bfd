// tb_bk_buffer: the buffer must invert its input.
module tb_bk_buffer;
  logic a, y;
  int checks = 0, failures = 0;

  bk_buffer dut (.a(a), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      a = v[0];
      #1;
      checks++;
      if (y !== (a == 1'b0)) begin
        failures++;
        $display("FAIL a=%0b y=%0b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
