// tb_half_adder: exhaustive self-checking test of the single-bit half adder.
// All 4 input combinations are applied; sum and carry are compared with the
// two bits of the integer sum a+b. A watchdog ends the run if it hangs.
module tb_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int total;
      {a, b} = 2'(v);
      #1;
      total = int'(a) + int'(b);
      checks++;
      if ({carry, sum} != 2'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d: got carry=%0d sum=%0d", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
