// bk_sum_logic: sum stage of the adder, S_i = P_i XOR G_i-1:0.
//
// Each sum bit is the bit's own propagate XORed with the carry into it, which
// is the group generate of all lower columns (column 0 being the carry-in).
// One XOR gate per bit; combinational.
module bk_sum_logic #(
  parameter int N = 32                 // adder width
) (
  input  logic [N-1:0] p,              // bitwise propagate of bits 1..N
  input  logic [N-1:0] c,              // carry into bits 1..N, G_(i-1):0
  output logic [N-1:0] s               // sum bits 1..N
);
  for (genvar i = 0; i < N; i++) begin : g_xor
    assign s[i] = p[i] ^ c[i];
  end
endmodule
