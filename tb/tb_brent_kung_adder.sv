// tb_brent_kung_adder: end-to-end test of the 32-bit adder at its default
// width. Every result is compared with {cout, sum} = a + b + cin worked out by
// the simulator's own 33-bit addition.
//
// Vectors:
//   * the bring-up vector A = 0...01, B = 1...1 with cin = 1 and then cin = 0
//     (expected sum 0...01 / 0...00, carry-out 1 both times);
//   * a carry-in rippling through an all-propagate word into the carry-out;
//   * a single generate at each bit position followed by full propagation,
//     and a kill at each bit position;
//   * random operands, some with long propagate runs.
// Counted events, each of which must occur at least once: the carry-in
// travelling all N bits to the carry-out, a carry-out of 1 and of 0, and a
// carry of 1 and of 0 into every bit position (every output of the prefix
// network seen in both states).
module tb_brent_kung_adder;
  localparam int N = 32;

  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  int n_full_chain = 0, n_cout1 = 0, n_cout0 = 0, n_doc_vec = 0;
  int n_carry1 [N];
  int n_carry0 [N];

  brent_kung_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N-1:0] va, logic [N-1:0] vb, logic vc);
    logic [N:0] exp_v;
    logic [N-1:0] carry_in;
    a = va; b = vb; cin = vc;
    #1;
    exp_v = {1'b0, va} + {1'b0, vb} + (N+1)'(vc);
    checks++;
    if ({cout, sum} !== exp_v) begin
      failures++;
      if (failures < 20)
        $display("FAIL a=%h b=%h cin=%0b: got cout=%0b sum=%h, expected cout=%0b sum=%h",
                 va, vb, vc, cout, sum, exp_v[N], exp_v[N-1:0]);
    end
    // Carry into each bit, recovered from the reference sum.
    carry_in = exp_v[N-1:0] ^ va ^ vb;
    for (int i = 0; i < N; i++) begin
      if (carry_in[i]) n_carry1[i]++; else n_carry0[i]++;
    end
    if (exp_v[N]) n_cout1++; else n_cout0++;
    if ((va ^ vb) == '1 && vc && exp_v[N]) n_full_chain++;
  endtask

  task automatic require(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL event never happened: %s", what);
    end
  endtask

  initial begin
    foreach (n_carry1[i]) begin n_carry1[i] = 0; n_carry0[i] = 0; end

    // Bring-up vector, carry-in high then low.
    apply(N'(1), '1, 1'b1);
    checks++;
    if (sum !== N'(1) || cout !== 1'b1) begin failures++; $display("FAIL bring-up vector, cin=1"); end
    else n_doc_vec++;
    apply(N'(1), '1, 1'b0);
    checks++;
    if (sum !== '0 || cout !== 1'b1) begin failures++; $display("FAIL bring-up vector, cin=0"); end
    else n_doc_vec++;

    // Carry-in through the whole word.
    apply('1, '0, 1'b1);
    apply(32'hA5A5_A5A5, 32'h5A5A_5A5A, 1'b1);
    apply(32'hA5A5_A5A5, 32'h5A5A_5A5A, 1'b0);

    // Generate at bit i, propagate above it; kill at bit i, propagate elsewhere.
    for (int i = 0; i < N; i++) begin
      logic [N-1:0] bit_i;
      bit_i = N'(1) << i;
      apply(bit_i | ~((bit_i << 1) - 1), bit_i, 1'b0);
      apply(~bit_i, '0, 1'b1);
      apply(~bit_i, ~bit_i ^ '1, 1'b0);
    end

    // Random operands.
    for (int t = 0; t < 20000; t++) begin
      logic [N-1:0] ra, rb;
      ra = $urandom;
      rb = $urandom;
      if (t % 4 == 1) rb = ~ra ^ (N'(1) << ($urandom % N));   // long propagate runs
      if (t % 4 == 2) rb = ~ra;                               // all propagate
      apply(ra, rb, 1'($urandom));
    end

    require("bring-up vector", n_doc_vec);
    require("carry-in through all bits to carry-out", n_full_chain);
    require("carry-out 1", n_cout1);
    require("carry-out 0", n_cout0);
    for (int i = 0; i < N; i++) begin
      require($sformatf("carry 1 into bit %0d", i), n_carry1[i]);
      require($sformatf("carry 0 into bit %0d", i), n_carry0[i]);
    end
    $display("events: full_chain=%0d cout1=%0d cout0=%0d bring_up=%0d",
             n_full_chain, n_cout1, n_cout0, n_doc_vec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
