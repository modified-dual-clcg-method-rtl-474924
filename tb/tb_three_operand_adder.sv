// tb_three_operand_adder: checks the carry-save three-operand adder at its
// default width (32 bits) with corner values and random operands, and a
// 5-bit instance with the worked example 10011 + 11001 + 01011 = 110111.
// The reference is the plain arithmetic sum of the operands.
module tb_three_operand_adder;
  localparam int unsigned N = 32;
  logic [N-1:0] a, b, c;
  logic [N+1:0] sum;
  logic [4:0]   a5, b5, c5;
  logic [6:0]   sum5;
  int checks = 0, failures = 0;

  three_operand_adder dut (.a, .b, .c, .sum);
  three_operand_adder #(.N(5)) dut5 (.a(a5), .b(b5), .c(c5), .sum(sum5));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [N-1:0] ta, tb_, tc);
    logic [N+1:0] expected;
    a = ta; b = tb_; c = tc;
    #1;
    expected = (N+2)'(ta) + (N+2)'(tb_) + (N+2)'(tc);
    checks++;
    if (sum !== expected) begin
      failures++;
      $display("FAIL %h + %h + %h = %h, expected %h", ta, tb_, tc, sum, expected);
    end
  endtask

  initial begin
    // Worked example at 5 bits.
    a5 = 5'b10011; b5 = 5'b11001; c5 = 5'b01011;
    #1;
    checks++;
    if (sum5 !== 7'b0110111) begin
      failures++;
      $display("FAIL 5-bit example: %b", sum5);
    end
    // Exhaustive at 5 bits.
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int k = 0; k < 32; k += 3) begin
          a5 = 5'(i); b5 = 5'(j); c5 = 5'(k);
          #1;
          checks++;
          if (int'(sum5) != i + j + k) begin
            failures++;
            $display("FAIL 5-bit %0d + %0d + %0d = %0d", i, j, k, sum5);
          end
        end
    // Corners at 32 bits.
    check32('0, '0, '0);
    check32('1, '0, '0);
    check32('1, '1, '0);
    check32('1, '1, '1);
    check32(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);
    check32(32'h5555_5555, 32'hAAAA_AAAA, 32'h0000_0001);
    // Random at 32 bits.
    for (int n = 0; n < 5000; n++) check32($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
