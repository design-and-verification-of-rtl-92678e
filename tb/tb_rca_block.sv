// tb_rca_block: exhaustive self-check of rca_block in both forms: a 4-bit
// first-stage block that takes a carry input, and a 5-bit later-stage block
// whose carry input is ignored (treated as zero). Sum, carry out and the
// propagate product are compared with integer arithmetic.
module tb_rca_block;
  logic [3:0] a4, b4, z4;
  logic       ci4, co4, p4;
  logic [4:0] a5, b5, z5;
  logic       ci5, co5, p5;
  int checks = 0, failures = 0;

  rca_block #(.M(4), .HAS_CIN(1'b1)) dut_first (
    .a(a4), .b(b4), .ci(ci4), .z(z4), .co(co4), .p(p4));
  rca_block #(.M(5), .HAS_CIN(1'b0)) dut_later (
    .a(a5), .b(b5), .ci(ci5), .z(z5), .co(co5), .p(p5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(i); b4 = 4'(j); ci4 = 1'(c);
          #1;
          checks++;
          if ({co4, z4} !== 5'(i + j + c) || p4 !== ((i ^ j) == 15)) begin
            failures++;
            $display("FAIL first a=%0d b=%0d ci=%0d got co=%0b z=%0d p=%0b", i, j, c, co4, z4, p4);
          end
        end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j); ci5 = 1'($urandom_range(1));
        #1;
        checks++;
        if ({co5, z5} !== 6'(i + j) || p5 !== ((i ^ j) == 31)) begin
          failures++;
          $display("FAIL later a=%0d b=%0d got co=%0b z=%0d p=%0b", i, j, co5, z5, p5);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
