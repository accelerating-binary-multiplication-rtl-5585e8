// tb_wallace4x4: exhaustive self-checking test of the 4x4 multiplier wallace4x4.
// All 256 operand pairs are applied and the 8-bit product is compared with
// the integer product a*b. A watchdog ends the run if it hangs.
module tb_wallace4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  wallace4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      checks++;
      if (int'(p) != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL %0d * %0d: got %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
