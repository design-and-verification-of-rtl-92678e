// incrementation_block: adds the incoming carry to a stage's intermediate sum.
//
// The ripple-carry block of a stage (other than the first) adds its operand
// bits with a zero carry input and produces the intermediate result z. This
// block adds the true carry of the previous stage, ci, to z with a chain of
// half adders and gives the final sum bits of the stage: s = z + ci (mod 2^M).
// The last cell needs only its XOR: the carry out of the chain is not formed,
// because the stage's carry out comes from the skip logic instead.
// Purely combinational.
module incrementation_block #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] z,
  input  logic         ci,
  output logic [M-1:0] s
);
  logic [M-1:0] c;  // c[i] is the carry into bit i

  assign c[0] = ci;
  generate
    for (genvar i = 0; i < int'(M) - 1; i++) begin : g_ha
      half_adder u_ha (.a(z[i]), .b(c[i]), .s(s[i]), .c(c[i+1]));
    end
  endgenerate
  assign s[M-1] = z[M-1] ^ c[M-1];
endmodule
