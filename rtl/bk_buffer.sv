// bk_buffer: inverting buffer of the prefix network.
//
// Because AOI rows emit inverted signals and OAI rows expect inverted inputs,
// a node that is consumed an even number of rows after it was made, or that
// leaves the tree in inverted form, passes through one inverter. It also
// isolates the load on a fanned-out node. Combinational, one gate delay.
module bk_buffer (
  input  logic a,   // node in one polarity
  output logic y    // the same node in the other polarity
);
  assign y = ~a;
endmodule
