// vl_controller: sequencing of the variable-latency CI-CSKA.
//
// The adder is given a clock period that covers every path except its
// longest one: the carry produced by stage 1, carried by the skip gates of
// all middle stages (2 to Q-1) and finally rippling through the
// incrementation block of stage Q. That path is only sensitized when every
// middle stage propagates, i.e. when the propagate products stage_p of stages
// 2 to Q-1 are all set. This controller watches that condition and lets the
// result be taken after one clock cycle normally, after two when the long
// path is active. (With fewer than three stages there is no middle stage and
// every addition takes one cycle.)
//
// Handshake: an addition is accepted on a clock edge where in_valid and
// in_ready are both high (load_operands). load_result is high in the cycle
// whose closing edge stores the sum: the first cycle after acceptance, or the
// second if long_path was set. out_valid is high for the one cycle after
// that edge, with two_cycle telling which kind it was. in_ready is high when
// no addition is held or the held one finishes in this cycle, so short
// additions can be issued back to back, one per cycle.
//
// The one/two-cycle rule follows the document; the detection condition and
// the handshake are this design's choices. Reset is synchronous, active low.
module vl_controller #(
  parameter int unsigned NUM_STAGES = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [NUM_STAGES-1:0] stage_p,       // from the held operands
  output logic                  long_path,     // critical path sensitized
  output logic                  load_operands,
  output logic                  load_result,
  output logic                  out_valid,
  output logic                  two_cycle
);
  logic busy_q;    // operands are held
  logic second_q;  // the held addition is in its second cycle

  generate
    if (NUM_STAGES >= 3) begin : g_detect
      assign long_path = &stage_p[NUM_STAGES-2:1];
    end else begin : g_no_detect
      assign long_path = 1'b0;
    end
  endgenerate

  assign load_result   = busy_q & (second_q | ~long_path);
  assign in_ready      = ~busy_q | load_result;
  assign load_operands = in_valid & in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      second_q  <= 1'b0;
      out_valid <= 1'b0;
      two_cycle <= 1'b0;
    end else begin
      busy_q    <= load_operands | (busy_q & ~load_result);
      second_q  <= busy_q & ~load_result;
      out_valid <= load_result;
      two_cycle <= load_result & second_q;
    end
  end

  // The second cycle only ever follows a first one of the same addition.
  a_second_busy : assert property (@(posedge clk) disable iff (!rst_n) second_q |-> busy_q);
  // A held addition never waits more than two cycles.
  a_two_max : assert property (@(posedge clk) disable iff (!rst_n) second_q |-> load_result);
endmodule
