// tb_gd_mult8x8: end-to-end, full-size test of the 8x8 GD multiplier.
//
// Applies all 65536 operand pairs and compares the 16-bit product with the
// integer product a*b. Two directed pairs come first: 168*169 = 0x6EE8 and
// 60*60 = 0x0E10, operands that give the two products shown on the
// published simulation waveform.
//
// It also counts how often each summation mechanism of the column adders is
// exercised and counts a failure for any that never happens:
//   - each 5LA in columns 6..11 producing both carries at once (a column sum
//     of 4 or 5), the case the two-carry 5LA exists for;
//   - the column-4 full adder carrying into the first 5LA;
//   - the carry chain reaching columns 12..14 from the 5LA row;
//   - the top bit of group 4 (q4[7]) reaching P15, and P15 set by the
//     column-14 carry instead.
// The column-15 half adder's own carry must never be 1.
module tb_gd_mult8x8;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int dbl_carry [6:11];
  int n_col4_carry = 0, n_col12_carry = 0, n_col13_carry = 0, n_col14_carry = 0;
  int n_q4_top = 0;

  gd_mult8x8 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int x, input int y);
    a = 8'(x);
    b = 8'(y);
    #1;
    checks++;
    if (int'(p) != x * y) begin
      failures++;
      if (failures < 20) $display("FAIL %0d * %0d: got %0d expected %0d", x, y, p, x * y);
    end
    for (int k = 6; k <= 11; k++)
      if (dut.c1[k] && dut.c2[k]) dbl_carry[k]++;
    if (dut.c_col4)  n_col4_carry++;
    if (dut.c_col12) n_col12_carry++;
    if (dut.c_col13) n_col13_carry++;
    if (dut.c_col14) n_col14_carry++;
    if (dut.q4[7])   n_q4_top++;
    checks++;
    if (dut.c_col15_unused) begin
      failures++;
      $display("FAIL %0d * %0d: carry out of column 15", x, y);
    end
  endtask

  task automatic expect_seen(input string what, input int n);
    $display("%-34s %0d", what, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int k = 6; k <= 11; k++) dbl_carry[k] = 0;

    // products shown on the published waveform
    apply(168, 169);
    checks++;
    if (p != 16'b0110111011101000) begin failures++; $display("FAIL 168*169"); end
    apply(60, 60);
    checks++;
    if (p != 16'b0000111000010000) begin failures++; $display("FAIL 60*60"); end

    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        apply(x, y);

    for (int k = 6; k <= 11; k++)
      expect_seen($sformatf("5LA column %0d both carries", k), dbl_carry[k]);
    expect_seen("column-4 full adder carry", n_col4_carry);
    expect_seen("carry into column 13", n_col12_carry);
    expect_seen("carry into column 14", n_col13_carry);
    expect_seen("carry into column 15", n_col14_carry);
    expect_seen("group-4 top bit into P15", n_q4_top);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
