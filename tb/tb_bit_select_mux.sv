// tb_bit_select_mux: exhaustive check of the output multiplexer:
// z = b_bit when sel = 0, c_bit when sel = 1.
module tb_bit_select_mux;
  logic b_bit, c_bit, sel, z;
  int checks = 0, failures = 0;

  bit_select_mux dut (.b_bit, .c_bit, .sel, .z);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic expected;
      {sel, c_bit, b_bit} = 3'(v);
      expected = (v >= 4) ? ((v >> 1) & 1) == 1 : (v & 1) == 1;
      #1;
      checks++;
      if (z !== expected) begin
        failures++;
        $display("FAIL sel=%0b c=%0b b=%0b -> z=%0b", sel, c_bit, b_bit, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
