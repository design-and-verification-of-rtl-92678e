// skip_logic: carry skip gate of one CI-CSKA stage.
//
// The carry out of a stage is C_out = G | (P & C_in), where G is the carry out
// of the stage's ripple-carry block (started from zero) and P the product of
// its propagate signals. Instead of a 2:1 multiplexer the stage uses a single
// inverting compound gate, so the polarity of the carry alternates along the
// skip chain:
//   GATE = SKIP_AOI: c_in is the true carry,        c_out = ~((P & c_in) | G)
//                    is the complemented carry.
//   GATE = SKIP_OAI: c_in is the complemented carry, c_out = ~((~P | c_in) & ~G)
//                    is the true carry. ~P and ~G are the inverted forms of the
//                    block's propagate product and carry out (a NAND and the
//                    inverting output of the last cell).
// The same Boolean function results either way; only the polarities of the
// carry at the input and output differ. Purely combinational.
module skip_logic
  import cska_pkg::*;
#(
  parameter skip_gate_e GATE = SKIP_AOI
) (
  input  logic g,      // carry out of the stage's RCA block, true polarity
  input  logic p,      // product of the stage's propagate signals, true polarity
  input  logic c_in,   // carry from the previous stage, polarity set by GATE
  output logic c_out   // carry to the next stage, opposite polarity to c_in
);
  generate
    if (GATE == SKIP_AOI) begin : g_aoi
      assign c_out = ~((p & c_in) | g);
    end else begin : g_oai
      logic p_n, g_n;
      assign p_n   = ~p;
      assign g_n   = ~g;
      assign c_out = ~((p_n | c_in) & g_n);
    end
  endgenerate
endmodule
