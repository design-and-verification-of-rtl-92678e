// tb_skip_logic: exhaustive self-check of both skip gates. The expected carry
// is G | (P & C); the AOI gate must take C true and return it complemented,
// the OAI gate must take C complemented and return it true.
module tb_skip_logic;
  import cska_pkg::*;
  logic g, p, c, aoi_out, oai_out;
  int checks = 0, failures = 0;

  skip_logic #(.GATE(SKIP_AOI)) dut_aoi (.g(g), .p(p), .c_in(c),  .c_out(aoi_out));
  skip_logic #(.GATE(SKIP_OAI)) dut_oai (.g(g), .p(p), .c_in(~c), .c_out(oai_out));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int i = 0; i < 8; i++) begin
      {g, p, c} = 3'(i);
      // All eight combinations are applied, including g = p = 1, which
      // cannot occur in the adder (a fully propagating stage generates no
      // carry from zero).
      #1;
      expected = g | (p & c);
      checks += 2;
      if (aoi_out !== ~expected) begin
        failures++;
        $display("FAIL AOI g=%0b p=%0b c=%0b got %0b", g, p, c, aoi_out);
      end
      if (oai_out !== expected) begin
        failures++;
        $display("FAIL OAI g=%0b p=%0b c=%0b got %0b", g, p, c, oai_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
