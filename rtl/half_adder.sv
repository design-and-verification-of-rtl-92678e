// half_adder: one-bit half adder (HA).
//
// s = a XOR b, c = a AND b. It is the cell of the incrementation block and
// the first cell of every ripple-carry block after the first, whose carry
// input is constant zero. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
