// bk_pg_logic: bitwise propagate/generate cell of one adder bit.
//
// G = A AND B says the bit makes a carry on its own; P = A XOR B says it
// passes an incoming carry on (and is also half of the sum). One instance
// per operand bit; purely combinational, no clock or reset.
module bk_pg_logic (
  input  logic a,   // operand bit Ai
  input  logic b,   // operand bit Bi
  output logic p,   // propagate Pi
  output logic g    // generate Gi
);
  assign g = a & b;
  assign p = a ^ b;
endmodule
