// tb_magnitude_comparator: checks the 32-bit greater-than comparator with
// equal, adjacent, extreme and random operand pairs against the plain
// unsigned comparison.
module tb_magnitude_comparator;
  localparam int unsigned N = 32;
  logic [N-1:0] a, b;
  logic gt;
  int checks = 0, failures = 0;
  int n_gt = 0;

  magnitude_comparator dut (.a, .b, .gt);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [N-1:0] ta, tb_);
    logic expected;
    a = ta; b = tb_;
    #1;
    expected = (longint'(ta) > longint'(tb_));
    checks++;
    if (expected) n_gt++;
    if (gt !== expected) begin
      failures++;
      $display("FAIL %h > %h gave %0b", ta, tb_, gt);
    end
  endtask

  initial begin
    chk('0, '0);
    chk('1, '1);
    chk(32'd1, 32'd0);
    chk(32'd0, 32'd1);
    chk(32'h8000_0000, 32'h7FFF_FFFF);
    chk(32'h7FFF_FFFF, 32'h8000_0000);
    chk('1, '0);
    chk('0, '1);
    for (int n = 0; n < 5000; n++) begin
      logic [N-1:0] r;
      r = $urandom;
      chk(r, $urandom);
      chk(r, r);
      chk(r, r + 1);
      chk(r + 1, r);
      chk(r, r ^ (32'h1 << ($urandom % 32)));
    end
    checks++;
    if (n_gt == 0 || n_gt == checks - 1) begin
      failures++;
      $display("FAIL only one outcome seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
