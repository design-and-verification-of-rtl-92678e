// full_adder: one-bit full adder (FA).
//
// s = a XOR b XOR ci, co = majority(a, b, ci). It is the cell of the
// ripple-carry (RCA) blocks. The per-bit propagate p = a XOR b is brought out
// as well, since the skip logic needs the product of the propagates of a
// stage. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co,
  output logic p
);
  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = (a & b) | (p & ci);
endmodule
