// tb_pp_gen4: exhaustive self-checking test of the 4x4 partial-product
// generator. For all 256 operand pairs every one of the 16 outputs is
// compared with the AND of the selected operand bits, and the weighted sum
// of all partial products is compared with a*b.
module tb_pp_gen4;
  logic [3:0]      a, b;
  logic [3:0][3:0] pp;
  int checks = 0, failures = 0;

  pp_gen4 dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int weighted;
      {a, b} = 8'(v);
      #1;
      weighted = 0;
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (pp[j][i] != (((v >> (4 + i)) & 1) & ((v >> j) & 1))) begin
            failures++;
            $display("FAIL a=%0d b=%0d pp[%0d][%0d]=%0d", a, b, j, i, pp[j][i]);
          end
          weighted += int'(pp[j][i]) << (i + j);
        end
      checks++;
      if (weighted != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d weighted sum %0d", a, b, weighted);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
