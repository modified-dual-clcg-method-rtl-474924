// tb_full_adder: exhaustive check of the one-bit full adder against the
// arithmetic sum a + b + c = {co, s}.
module tb_full_adder;
  logic a, b, c, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a, .b, .c, .s, .co);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (2'({co, s}) != 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> co=%0b s=%0b", a, b, c, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
