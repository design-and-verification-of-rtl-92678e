// rca_block: M-bit ripple-carry block of one CI-CSKA stage.
//
// A chain of M one-bit adder cells adds a and b. In the first stage of the
// adder (HAS_CIN = 1) every cell is a full adder and ci is the adder's carry
// input. In every later stage the carry input is constant zero, so the first
// cell is a half adder, the rest full adders, and ci is ignored.
//
// Outputs:
//   z  - the M-bit sum of the block (the "intermediate results" of a later
//        stage, which its incrementation block finishes)
//   co - the carry out of the chain; in a later stage this is the stage's
//        generate signal (the chain starts from zero)
//   p  - the product (AND) of the M per-bit propagate signals a XOR b, used by
//        the skip logic
// Purely combinational.
module rca_block #(
  parameter int unsigned M       = 4,
  parameter bit          HAS_CIN = 1'b0
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         ci,
  output logic [M-1:0] z,
  output logic         co,
  output logic         p
);
  logic [M:0]   c;
  logic [M-1:0] pb;

  generate
    if (HAS_CIN) begin : g_fa0
      assign c[0] = ci;
      full_adder u_fa0 (.a(a[0]), .b(b[0]), .ci(c[0]), .s(z[0]), .co(c[1]), .p(pb[0]));
    end else begin : g_ha0
      assign c[0] = 1'b0;
      half_adder u_ha0 (.a(a[0]), .b(b[0]), .s(z[0]), .c(c[1]));
      assign pb[0] = z[0];  // a XOR b with no carry in
    end
    for (genvar i = 1; i < int'(M); i++) begin : g_fa
      full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(z[i]), .co(c[i+1]), .p(pb[i]));
    end
  endgenerate

  assign co = c[M];
  assign p  = &pb;
endmodule
