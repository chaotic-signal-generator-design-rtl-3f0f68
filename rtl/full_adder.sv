// full_adder: one-bit full adder, the cell that the ripple-carry adder is built
// from. s = x xor y xor ci; co is set when at least two of the inputs are set.
// Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = x ^ y ^ ci;
  assign co = (x & y) | (x & ci) | (y & ci);
endmodule
