// tb_ci_cska_stage: exhaustive self-check of an AOI stage (4 bits) and an
// OAI stage (3 bits). For each operand pair and incoming carry the sum bits
// must equal a + b + carry, the carry out must be the true carry out of that
// sum in the gate's output polarity, and p must be the propagate product.
module tb_ci_cska_stage;
  import cska_pkg::*;
  logic [3:0] a4, b4, s4;
  logic [2:0] a3, b3, s3;
  logic       c, co4, co3, p4, p3;
  int checks = 0, failures = 0;

  ci_cska_stage #(.M(4), .GATE(SKIP_AOI)) dut_aoi (
    .a(a4), .b(b4), .c_in(c), .s(s4), .c_out(co4), .p(p4));
  ci_cska_stage #(.M(3), .GATE(SKIP_OAI)) dut_oai (
    .a(a3), .b(b3), .c_in(~c), .s(s3), .c_out(co3), .p(p3));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] r4;
    logic [3:0] r3;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int k = 0; k < 2; k++) begin
          a4 = 4'(i); b4 = 4'(j); a3 = 3'(i); b3 = 3'(j); c = 1'(k);
          #1;
          r4 = 5'(i + j + k);
          r3 = 4'((i % 8) + (j % 8) + k);
          checks += 2;
          if (s4 !== r4[3:0] || co4 !== ~r4[4] || p4 !== ((i ^ j) == 15)) begin
            failures++;
            $display("FAIL AOI a=%0d b=%0d c=%0d got s=%0d co_n=%0b p=%0b", i, j, k, s4, co4, p4);
          end
          if (s3 !== r3[2:0] || co3 !== r3[3] || p3 !== (((i ^ j) % 8) == 7)) begin
            failures++;
            $display("FAIL OAI a=%0d b=%0d c=%0d got s=%0d co=%0b p=%0b", i % 8, j % 8, k, s3, co3, p3);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
