// tb_incrementation_block: exhaustive self-check of incrementation_block for
// 4 and 7 bits: s must equal z + ci modulo 2^M.
module tb_incrementation_block;
  logic [3:0] z4, s4;
  logic [6:0] z7, s7;
  logic       ci;
  int checks = 0, failures = 0;

  incrementation_block #(.M(4)) dut4 (.z(z4), .ci(ci), .s(s4));
  incrementation_block #(.M(7)) dut7 (.z(z7), .ci(ci), .s(s7));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++)
      for (int c = 0; c < 2; c++) begin
        z4 = 4'(i); z7 = 7'(i); ci = 1'(c);
        #1;
        checks += 2;
        if (s4 !== 4'(i + c)) begin
          failures++;
          $display("FAIL M=4 z=%0d ci=%0d got %0d", z4, c, s4);
        end
        if (s7 !== 7'(i + c)) begin
          failures++;
          $display("FAIL M=7 z=%0d ci=%0d got %0d", z7, c, s7);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
