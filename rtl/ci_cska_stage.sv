// ci_cska_stage: one stage (2 to Q) of the CI-CSKA adder.
//
// A stage holds three parts:
//   - an M-bit ripple-carry block whose carry input is zero (first cell a
//     half adder), giving the intermediate sum z, its carry out g and the
//     product p of its propagate signals;
//   - the skip gate, an AOI gate in even stages and an OAI gate in odd ones,
//     which forms the stage's carry out from g, p and the incoming carry
//     without waiting for the incrementation;
//   - the incrementation block, a half-adder chain that adds the incoming
//     carry to z to give the stage's sum bits.
// The ripple-carry block depends only on the operands, so it works in
// parallel with the skip chain; the incoming carry passes through one gate to
// reach the next stage and through the half-adder chain to reach the sum.
//
// c_in and c_out carry the polarities of the skip gate (see skip_logic): with
// GATE = SKIP_AOI c_in is true and c_out complemented, with SKIP_OAI the
// reverse. The incrementation block always gets the true carry; in an OAI
// stage an inverter off the skip path restores it. Purely combinational.
module ci_cska_stage
  import cska_pkg::*;
#(
  parameter int unsigned M    = 4,
  parameter skip_gate_e  GATE = SKIP_AOI
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         c_in,
  output logic [M-1:0] s,
  output logic         c_out,
  output logic         p      // product of the stage's propagate signals
);
  logic [M-1:0] z;
  logic         g;
  logic         c_true;

  rca_block #(.M(M), .HAS_CIN(1'b0)) u_rca (
    .a (a),
    .b (b),
    .ci(1'b0),
    .z (z),
    .co(g),
    .p (p)
  );

  skip_logic #(.GATE(GATE)) u_skip (
    .g    (g),
    .p    (p),
    .c_in (c_in),
    .c_out(c_out)
  );

  assign c_true = (GATE == SKIP_AOI) ? c_in : ~c_in;

  incrementation_block #(.M(M)) u_inc (
    .z (z),
    .ci(c_true),
    .s (s)
  );
endmodule
