// brent_kung_adder: N-bit Brent-Kung parallel prefix adder (N = 32 by default).
//
// sum + 2^N * cout = a + b + cin, computed in three combinational stages:
//   1. bitwise PG logic: one bk_pg_logic per operand bit gives G = A.B and
//      P = A xor B; the carry-in enters as prefix column 0 (G0:0 = cin,
//      P0:0 = 0), so operand bit k sits in column k+1;
//   2. the group PG network (bk_prefix_tree): a Brent-Kung tree of grey and
//      black cells, AOI gates in odd rows and OAI gates in even rows, with
//      inverters where polarity must be restored, giving every G_i:0;
//   3. sum logic (bk_sum_logic): S = P xor (carry into the bit).
// The carry-out is G_N:0, made by one extra grey cell on column N.
// There is no clock, register or reset: outputs settle a few gate delays
// after the inputs change (2 log2 N - 1 cell rows on the slowest sum bit,
// log2 N + 1 to the carry-out).
module brent_kung_adder #(
  parameter int N = 32                  // operand width, a power of two >= 2
) (
  input  logic [N-1:0] a,               // addend A
  input  logic [N-1:0] b,               // addend B
  input  logic         cin,             // carry in
  output logic [N-1:0] sum,             // sum
  output logic         cout             // carry out
);
  logic [N:0] g_bit;   // bitwise generate, prefix columns 0..N
  logic [N:0] p_bit;   // bitwise propagate, prefix columns 0..N
  logic [N:0] g_grp;   // group generate G_i:0, prefix columns 0..N

  assign g_bit[0] = cin;
  assign p_bit[0] = 1'b0;

  for (genvar k = 0; k < N; k++) begin : g_pg
    bk_pg_logic u_pg (.a(a[k]), .b(b[k]), .p(p_bit[k+1]), .g(g_bit[k+1]));
  end

  bk_prefix_tree #(.N(N)) u_tree (
    .g  (g_bit),
    .p  (p_bit),
    .gg (g_grp)
  );

  bk_sum_logic #(.N(N)) u_sum (
    .p (p_bit[N:1]),
    .c (g_grp[N-1:0]),
    .s (sum)
  );

  assign cout = g_grp[N];
endmodule
