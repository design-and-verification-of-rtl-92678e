// tb_ci_cska_top: end-to-end self-check of the variable-latency CI-CSKA at
// its default size (32 bits, eight 4-bit stages).
//
// Additions are offered with a randomly gapped in_valid. Operands are random
// words, words in which whole stages are forced to propagate (b = ~a on that
// stage) and a few fixed corner cases. Each accepted addition is queued with
// its expected {cout, sum} (integer a + b + cin), with its expected latency
// and with whether all middle stages (2 to Q-1) propagate. When out_valid
// shows, the oldest entry must match: the sum and carry, two_cycle, and the
// number of clock edges since acceptance (2 for a one-cycle addition: one edge
// to store the operands and one to store the result; 3 for a two-cycle one).
//
// Mechanisms counted (each must occur at least once): one-cycle additions,
// two-cycle additions, back-to-back acceptances, a stage skipping an incoming
// carry (all its bits propagate and a carry arrives), a stage's incrementation
// block adding an incoming carry, carry out of the adder, carry into the
// adder, and in_valid held off by in_ready low.
module tb_ci_cska_top;
  localparam int W  = 32;   // defaults of ci_cska_top
  localparam int Q  = 8;
  localparam int MS = 4;    // stage size
  localparam int N_OPS = 20000;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid, in_ready;
  logic [W-1:0] a, b, sum;
  logic         cin, cout, out_valid, two_cycle;

  typedef struct {
    logic [W:0] result;
    bit         long_op;
    int         cycle;
  } op_t;

  op_t q[$];
  int cycle = 0;
  int checks = 0, failures = 0;
  int n_short = 0, n_long = 0, n_b2b = 0, n_skip = 0, n_incr = 0;
  int n_cout = 0, n_cin = 0, n_stall = 0;

  ci_cska_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .a(a), .b(b), .cin(cin), .out_valid(out_valid), .two_cycle(two_cycle),
    .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N_OPS * 6 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  // Count the carry mechanisms an addition exercises, from its operands.
  task automatic count_mechanisms(logic [W-1:0] x, logic [W-1:0] y, logic c0);
    logic [W:0] part;
    logic       c = c0;
    for (int k = 0; k < Q; k++) begin
      if (k > 0 && c) begin
        n_incr++;
        if ((x[k*MS +: MS] ^ y[k*MS +: MS]) == '1) n_skip++;
      end
      part = (W+1)'(x[k*MS +: MS]) + (W+1)'(y[k*MS +: MS]) + (W+1)'(c);
      c = part[MS];
    end
  endtask

  function automatic bit middle_propagates(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] p = x ^ y;
    for (int k = 1; k < Q - 1; k++)
      if (p[k*MS +: MS] != '1) return 0;
    return Q >= 3;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endtask

  initial begin
    bit accept, prev_accept;
    op_t e;
    prev_accept = 0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    a = '0; b = '0; cin = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < N_OPS || q.size() != 0; ) begin
      @(negedge clk);
      // New offer, unless one is pending and not yet taken.
      if (!in_valid || accept) begin
        in_valid = (n < N_OPS) && ($urandom_range(4) != 0);
        a = rand_word();
        b = rand_word();
        cin = 1'($urandom_range(1));
        case (n % 8)
          0: ;
          1, 2, 3: for (int k = 0; k < Q; k++)
                     if ($urandom_range(3) != 0) b[k*MS +: MS] = ~a[k*MS +: MS];
          4, 5: for (int k = 1; k < Q - 1; k++) b[k*MS +: MS] = ~a[k*MS +: MS];
          6: begin a = rand_word(); b = ~a; cin = 1'b1; end
          default: begin a = '1; b = W'(n % 3); end
        endcase
      end
      #1;
      if (out_valid) begin
        check(q.size() != 0, "out_valid with nothing outstanding");
        if (q.size() != 0) begin
          e = q.pop_front();
          check({cout, sum} == e.result, $sformatf("sum got %0b_%h exp %h", cout, sum, e.result));
          check(two_cycle == e.long_op, "two_cycle");
          check(cycle - e.cycle == (e.long_op ? 3 : 2),
                $sformatf("latency %0d, long=%0b", cycle - e.cycle, e.long_op));
          if (e.long_op) n_long++; else n_short++;
          if (e.result[W]) n_cout++;
        end
      end
      accept = in_valid && in_ready;
      if (in_valid && !in_ready) n_stall++;
      if (accept) begin
        e.result  = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
        e.long_op = middle_propagates(a, b);
        e.cycle   = cycle;
        q.push_back(e);
        count_mechanisms(a, b, cin);
        if (cin) n_cin++;
        if (prev_accept) n_b2b++;
        n++;
      end
      prev_accept = accept;
      @(posedge clk);
      cycle++;
    end
    check(n_short > 0, "no one-cycle addition");
    check(n_long > 0, "no two-cycle addition");
    check(n_b2b > 0, "no back-to-back acceptance");
    check(n_skip > 0, "no skipped carry");
    check(n_incr > 0, "no incrementation of a stage");
    check(n_cout > 0, "no carry out");
    check(n_cin > 0, "no carry in");
    check(n_stall > 0, "no stall");
    $display("one-cycle=%0d two-cycle=%0d back-to-back=%0d skips=%0d increments=%0d cout=%0d cin=%0d stalls=%0d",
             n_short, n_long, n_b2b, n_skip, n_incr, n_cout, n_cin, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
