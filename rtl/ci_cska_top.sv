// ci_cska_top: variable-latency adder built on the CI-CSKA.
//
// {cout, sum} = a + b + cin, one addition at a time through a valid/ready
// handshake. The accepted operands are held in registers and fed to the
// combinational CI-CSKA adder (ci_cska). vl_controller looks at the stage
// propagate products of the held operands: when the carry could run the whole
// skip chain (every middle stage propagates) the result is stored after two
// clock cycles, otherwise after one. This lets the clock period, or the supply
// voltage for a given period, be set by the shorter paths.
//
// Timing: operands accepted at edge k (in_valid & in_ready); sum and cout are
// stored at edge k+1, or k+2 for a long-path addition, and out_valid is high
// for the following cycle with two_cycle set for a two-cycle addition. sum
// and cout hold their value until the next result. in_ready is high when a
// new addition can be accepted; one-cycle additions can follow each other on
// every cycle. Reset is synchronous, active low.
//
// Defaults: 32-bit adder in eight 4-bit stages (fixed stage size). Override
// STAGE_SIZE (and NUM_STAGES) for a variable-stage-size adder or WIDTH = 128
// for the wide variant.
module ci_cska_top #(
  parameter int unsigned WIDTH                  = 32,
  parameter int unsigned NUM_STAGES             = 8,
  parameter int unsigned STAGE_SIZE[NUM_STAGES] = '{default: 4}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic             out_valid,
  output logic             two_cycle,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0]      a_q, b_q;
  logic                  cin_q;
  logic [WIDTH-1:0]      sum_c;
  logic                  cout_c;
  logic [NUM_STAGES-1:0] stage_p;
  logic                  long_path;
  logic                  load_operands, load_result;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      cin_q <= 1'b0;
      sum   <= '0;
      cout  <= 1'b0;
    end else begin
      if (load_operands) begin
        a_q   <= a;
        b_q   <= b;
        cin_q <= cin;
      end
      if (load_result) begin
        sum  <= sum_c;
        cout <= cout_c;
      end
    end
  end

  ci_cska #(
    .WIDTH     (WIDTH),
    .NUM_STAGES(NUM_STAGES),
    .STAGE_SIZE(STAGE_SIZE)
  ) u_adder (
    .a      (a_q),
    .b      (b_q),
    .cin    (cin_q),
    .sum    (sum_c),
    .cout   (cout_c),
    .stage_p(stage_p)
  );

  vl_controller #(.NUM_STAGES(NUM_STAGES)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (in_valid),
    .in_ready     (in_ready),
    .stage_p      (stage_p),
    .long_path    (long_path),
    .load_operands(load_operands),
    .load_result  (load_result),
    .out_valid    (out_valid),
    .two_cycle    (two_cycle)
  );
endmodule
