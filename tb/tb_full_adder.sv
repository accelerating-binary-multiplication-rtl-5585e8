// tb_full_adder: exhaustive self-checking test of the single-bit full adder.
// All 8 input combinations are applied; sum and cout are compared with the
// two bits of the integer sum a+b+c. A watchdog ends the run if it hangs.
module tb_full_adder;
  logic a, b, c, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, c} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if ({cout, sum} != 2'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d: got cout=%0d sum=%0d", a, b, c, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
