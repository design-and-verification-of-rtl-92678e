// tb_ci_cska: self-check of the combinational CI-CSKA adder in four
// configurations driven with the same operands:
//   - the default 32-bit adder, eight 4-bit stages (even stage count, so the
//     final carry comes from an AOI gate and is inverted back);
//   - a 32-bit variable-stage-size adder, stages 2,3,4,5,6,5,4,3;
//   - a 32-bit adder of seven stages 5,5,5,5,4,4,4 (odd stage count);
//   - a 128-bit adder of thirty-two 4-bit stages.
// Every sum and carry out is compared with a + b + cin formed by integer
// addition, and each stage's propagate product with the XOR of its operand
// bits. Operands mix random words with words built so that whole stages
// propagate, which makes carries travel along the skip chain; the number of
// additions where the carry crossed all middle stages of the default adder
// is counted and must not be zero.
module tb_ci_cska;
  localparam int unsigned N_RANDOM = 20000;

  logic [127:0] a, b;
  logic         cin;

  logic [31:0]  s_fss, s_vss, s_odd;
  logic [127:0] s_128;
  logic         co_fss, co_vss, co_odd, co_128;
  logic [7:0]   p_fss, p_vss;
  logic [6:0]   p_odd;
  logic [31:0]  p_128;

  localparam int unsigned VSS_SIZES[8] = '{2, 3, 4, 5, 6, 5, 4, 3};
  localparam int unsigned ODD_SIZES[7] = '{5, 5, 5, 5, 4, 4, 4};
  localparam int unsigned W128_SIZES[32] = '{default: 4};

  int checks = 0, failures = 0;
  int long_chain = 0;

  ci_cska dut_fss (
    .a(a[31:0]), .b(b[31:0]), .cin(cin), .sum(s_fss), .cout(co_fss), .stage_p(p_fss));

  ci_cska #(.WIDTH(32), .NUM_STAGES(8), .STAGE_SIZE(VSS_SIZES)) dut_vss (
    .a(a[31:0]), .b(b[31:0]), .cin(cin), .sum(s_vss), .cout(co_vss), .stage_p(p_vss));

  ci_cska #(.WIDTH(32), .NUM_STAGES(7), .STAGE_SIZE(ODD_SIZES)) dut_odd (
    .a(a[31:0]), .b(b[31:0]), .cin(cin), .sum(s_odd), .cout(co_odd), .stage_p(p_odd));

  ci_cska #(.WIDTH(128), .NUM_STAGES(32), .STAGE_SIZE(W128_SIZES)) dut_128 (
    .a(a), .b(b), .cin(cin), .sum(s_128), .cout(co_128), .stage_p(p_128));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // Propagate product of bits [lsb +: n] of a ^ b.
  function automatic logic prop(logic [127:0] x, int lsb, int n);
    logic r = 1'b1;
    for (int i = lsb; i < lsb + n; i++) r &= x[i];
    return r;
  endfunction

  task automatic check_p32(string name, logic [7:0] got, int n_st, int sizes[8]);
    int lsb = 0;
    for (int k = 0; k < n_st; k++) begin
      checks++;
      if (got[k] !== prop(a ^ b, lsb, sizes[k])) begin
        failures++;
        $display("FAIL %s stage_p[%0d] a=%h b=%h", name, k, a[31:0], b[31:0]);
      end
      lsb += sizes[k];
    end
  endtask

  task automatic apply_and_check();
    logic [32:0]  r32;
    logic [128:0] r128;
    #1;
    r32  = {1'b0, a[31:0]} + {1'b0, b[31:0]} + 33'(cin);
    r128 = {1'b0, a} + {1'b0, b} + 129'(cin);
    checks += 4;
    if ({co_fss, s_fss} !== r32) begin
      failures++;
      $display("FAIL fss a=%h b=%h cin=%0b got %0b_%h exp %h", a[31:0], b[31:0], cin, co_fss, s_fss, r32);
    end
    if ({co_vss, s_vss} !== r32) begin
      failures++;
      $display("FAIL vss a=%h b=%h cin=%0b got %0b_%h exp %h", a[31:0], b[31:0], cin, co_vss, s_vss, r32);
    end
    if ({co_odd, s_odd} !== r32) begin
      failures++;
      $display("FAIL odd a=%h b=%h cin=%0b got %0b_%h exp %h", a[31:0], b[31:0], cin, co_odd, s_odd, r32);
    end
    if ({co_128, s_128} !== r128) begin
      failures++;
      $display("FAIL 128 a=%h b=%h cin=%0b got %0b_%h exp %h", a, b, cin, co_128, s_128, r128);
    end
    check_p32("fss", p_fss, 8, '{4, 4, 4, 4, 4, 4, 4, 4});
    check_p32("vss", p_vss, 8, '{2, 3, 4, 5, 6, 5, 4, 3});
    check_p32("odd", {1'b0, p_odd}, 7, '{5, 5, 5, 5, 4, 4, 4, 0});
    for (int k = 0; k < 32; k++) begin
      checks++;
      if (p_128[k] !== prop(a ^ b, 4 * k, 4)) begin
        failures++;
        $display("FAIL 128 stage_p[%0d]", k);
      end
    end
    // Carry generated in stage 1 and carried through stages 2..7.
    if (prop(a ^ b, 4, 24) && ((a[3:0] + b[3:0] + 5'(cin)) >= 16)) long_chain++;
  endtask

  initial begin
    // Directed corners.
    a = '0; b = '0; cin = 0; apply_and_check();
    a = '1; b = '0; cin = 1; apply_and_check();           // full-length carry
    a = '1; b = 128'd1; cin = 0; apply_and_check();
    a = '1; b = '1; cin = 1; apply_and_check();
    a = {4{32'hAAAA_AAAA}}; b = {4{32'h5555_5555}}; cin = 1; apply_and_check();
    a = {4{32'h0FFF_FFF8}}; b = {4{32'h0000_0008}}; cin = 0; apply_and_check();
    // Random words, and words in which 4-bit groups are forced to propagate.
    for (int n = 0; n < N_RANDOM; n++) begin
      a = rand128();
      b = rand128();
      cin = 1'($urandom_range(1));
      if (n % 2 == 1) begin
        for (int k = 0; k < 32; k++)
          if ($urandom_range(3) != 0) b[4*k +: 4] = ~a[4*k +: 4];
      end
      apply_and_check();
    end
    checks++;
    if (long_chain == 0) begin
      failures++;
      $display("FAIL no addition carried across all middle stages");
    end
    $display("carries across all middle stages: %0d", long_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
