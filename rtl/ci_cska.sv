// ci_cska: N-bit concatenation-incrementation carry skip adder (CI-CSKA).
//
// {cout, sum} = a + b + cin, computed combinationally.
//
// The operand bits are cut into NUM_STAGES stages of STAGE_SIZE[j] bits,
// stage 1 at the least significant end. Equal sizes give the fixed-stage-size
// (FSS) form, unequal sizes the variable-stage-size (VSS) form; the stage
// sizes must add up to WIDTH. Stage 1 is a plain ripple-carry block of full
// adders that takes cin; its carry out enters the skip chain. Every later
// stage (ci_cska_stage) computes its own sum from a zero carry, then adds the
// incoming carry through a half-adder incrementation block, while an AOI or
// OAI skip gate forms its carry out. The skip gates alternate AOI, OAI, AOI,
// ... from stage 2, so the carry between stages is complemented after every
// even stage; if the last stage is even, cout is inverted back at the output.
//
// stage_p[j-1] is the product of the propagate signals of stage j (for stage
// 1 too). A carry runs the length of the skip chain only when these are set
// in the middle stages; the variable-latency wrapper uses them to detect that.
//
// Defaults: 32 bits in eight 4-bit stages. The width is the document's main
// case; the stage sizes are this design's choice, as none are given.
module ci_cska
  import cska_pkg::*;
#(
  parameter int unsigned WIDTH                  = 32,
  parameter int unsigned NUM_STAGES             = 8,
  parameter int unsigned STAGE_SIZE[NUM_STAGES] = '{default: 4}
) (
  input  logic [WIDTH-1:0]      a,
  input  logic [WIDTH-1:0]      b,
  input  logic                  cin,
  output logic [WIDTH-1:0]      sum,
  output logic                  cout,
  output logic [NUM_STAGES-1:0] stage_p
);
  // Bit position of the least significant bit of stage index k (0-based).
  function automatic int unsigned stage_lsb(int unsigned k);
    int unsigned acc = 0;
    for (int unsigned i = 0; i < k; i++) acc += STAGE_SIZE[i];
    return acc;
  endfunction

  localparam int unsigned TOTAL = stage_lsb(NUM_STAGES);

  generate
    if (TOTAL != WIDTH) begin : g_size_error
      $error("ci_cska: stage sizes add up to %0d, not WIDTH = %0d", TOTAL, WIDTH);
    end
  endgenerate

  // carry[k] is the carry leaving stage index k, in the polarity of that
  // stage's skip gate output (stage index 0 gives the true carry).
  logic [NUM_STAGES-1:0] carry;

  localparam int unsigned M0 = STAGE_SIZE[0];

  rca_block #(.M(M0), .HAS_CIN(1'b1)) u_stage1 (
    .a (a[M0-1:0]),
    .b (b[M0-1:0]),
    .ci(cin),
    .z (sum[M0-1:0]),
    .co(carry[0]),
    .p (stage_p[0])
  );

  generate
    for (genvar k = 1; k < int'(NUM_STAGES); k++) begin : g_stage
      localparam int unsigned LSB = stage_lsb(k);
      localparam int unsigned MK  = STAGE_SIZE[k];
      ci_cska_stage #(.M(MK), .GATE(skip_gate_of_stage(k + 1))) u_stage (
        .a    (a[LSB+MK-1:LSB]),
        .b    (b[LSB+MK-1:LSB]),
        .c_in (carry[k-1]),
        .s    (sum[LSB+MK-1:LSB]),
        .c_out(carry[k]),
        .p    (stage_p[k])
      );
    end

    // An even last stage ends on an AOI gate, whose output is complemented.
    if (NUM_STAGES >= 2 && skip_gate_of_stage(NUM_STAGES) == SKIP_AOI) begin : g_cout_inv
      assign cout = ~carry[NUM_STAGES-1];
    end else begin : g_cout
      assign cout = carry[NUM_STAGES-1];
    end
  endgenerate
endmodule
