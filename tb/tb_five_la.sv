// tb_five_la: exhaustive self-checking test of the 5:2 logic adder.
// For all 32 input combinations it checks the column identity
// a+b+c+d+e = s + 2*(c1+c2), and that c1 is the carry of a, b, c alone
// (the first full adder), so that c1 does not depend on d and e.
module tb_five_la;
  logic a, b, c, d, e, s, c1, c2;
  int checks = 0, failures = 0;

  five_la dut (.a(a), .b(b), .c(c), .d(d), .e(e), .s(s), .c1(c1), .c2(c2));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int total, first;
      {a, b, c, d, e} = 5'(v);
      #1;
      total = int'(a) + int'(b) + int'(c) + int'(d) + int'(e);
      first = int'(a) + int'(b) + int'(c);
      checks++;
      if (int'(s) + 2 * (int'(c1) + int'(c2)) != total) begin
        failures++;
        $display("FAIL inputs=%05b: s=%0d c1=%0d c2=%0d", v[4:0], s, c1, c2);
      end
      checks++;
      if (int'(c1) != (first >= 2 ? 1 : 0)) begin
        failures++;
        $display("FAIL inputs=%05b: c1=%0d is not the carry of a,b,c", v[4:0], c1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
