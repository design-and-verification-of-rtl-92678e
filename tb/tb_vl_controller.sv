// tb_vl_controller: cycle-by-cycle self-check of the variable-latency
// controller (8 stages). The testbench plays the operand register: when an
// addition is accepted it chooses the propagate products of the new operands,
// sometimes with all middle stages (2 to 7) set. It then expects the result
// to be stored one cycle after acceptance, or two when the middle stages all
// propagate, out_valid and two_cycle one edge later, and in_ready to follow
// from whether the held addition finishes in the current cycle. It counts
// one-cycle and two-cycle additions and back-to-back acceptances and fails if
// any of them never happened.
module tb_vl_controller;
  localparam int unsigned NS = 8;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          in_valid;
  logic          in_ready;
  logic [NS-1:0] stage_p;
  logic          long_path, load_operands, load_result, out_valid, two_cycle;

  int checks = 0, failures = 0;
  int n_short = 0, n_long = 0, n_back_to_back = 0;

  // Reference state: is an addition held, how many cycles it has been held
  // for (1 in the first cycle after acceptance) and whether it is long.
  bit held = 0;
  int age = 0;
  bit is_long = 0;
  bit exp_valid = 0, exp_two = 0;
  bit prev_accept = 0;

  vl_controller #(.NUM_STAGES(NS)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .stage_p(stage_p), .long_path(long_path), .load_operands(load_operands),
    .load_result(load_result), .out_valid(out_valid), .two_cycle(two_cycle));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    bit done, ready, accept;
    rst_n = 1'b0;
    in_valid = 1'b0;
    stage_p = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      #1;
      // Expected behaviour in this cycle.
      done  = held && (age == 2 || !is_long);
      ready = !held || done;
      accept = in_valid && ready;
      check(out_valid == exp_valid, "out_valid");
      if (exp_valid) check(two_cycle == exp_two, "two_cycle");
      check(in_ready == ready, "in_ready");
      check(load_result == done, "load_result");
      check(load_operands == accept, "load_operands");
      check(long_path == (&stage_p[NS-2:1]), "long_path");
      if (done) begin
        if (age == 2) n_long++; else n_short++;
      end
      if (accept && prev_accept) n_back_to_back++;
      // Advance the reference to the next cycle.
      exp_valid = done;
      exp_two = done && age == 2;
      prev_accept = accept;
      @(posedge clk);
      #1;
      if (accept) begin
        held = 1;
        age = 1;
        is_long = ($urandom_range(2) == 0);
        stage_p = NS'($urandom);
        if (is_long) stage_p[NS-2:1] = '1;
        else stage_p[1 + $urandom_range(NS - 3)] = 1'b0;
      end else if (done) begin
        held = 0;
        age = 0;
      end else if (held) begin
        age++;
      end
    end
    check(n_short > 0, "no one-cycle addition");
    check(n_long > 0, "no two-cycle addition");
    check(n_back_to_back > 0, "no back-to-back acceptance");
    $display("one-cycle=%0d two-cycle=%0d back-to-back=%0d", n_short, n_long, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
