// tb_full_adder: exhaustive self-check of full_adder against a + b + ci and
// of its propagate output against a XOR b.
module tb_full_adder;
  logic a, b, ci, s, co, p;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co), .p(p));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, ci} = 3'(i);
      #1;
      checks++;
      if ({co, s} !== 2'(int'(a) + int'(b) + int'(ci)) || p !== (a != b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b got co=%0b s=%0b p=%0b", a, b, ci, co, s, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
