// tb_modified_dual_clcg_4bit: the generator in a 4-bit configuration.
//
// The generator is instantiated with N = 4, shifts r = 3, 2, 3, 2 (a = 9, 5,
// 9, 5, all = 1 mod 4) and odd prime increments b = 11, 3, 7, 13. With these
// values every 4-bit LCG has the full period 16 (Hull-Dobell), so the four
// states, and with them the output, repeat with period exactly 16. The test
// compares zi with a reference model on every clock for every one of the
// 16 * 16 combinations of x0 and y0 (p0, q0 random), and checks that the
// output sequence repeats after 16 bits and that the y state does not repeat
// earlier.
module tb_modified_dual_clcg_4bit;
  localparam int unsigned N = 4;
  localparam int unsigned R[4] = '{3, 2, 3, 2};
  localparam int unsigned BV[4] = '{11, 3, 7, 13};
  localparam int PERIOD = 16;

  logic clk = 1'b0;
  logic start;
  logic [N-1:0] x0, y0, p0, q0;
  logic zi;
  int checks = 0, failures = 0;
  int n_sel_b = 0, n_sel_c = 0;

  modified_dual_clcg #(
    .N(N), .R1(R[0]), .R2(R[1]), .R3(R[2]), .R4(R[3]),
    .B1(4'(BV[0])), .B2(4'(BV[1])), .B3(4'(BV[2])), .B4(4'(BV[3]))
  ) dut (.clk, .start, .x0, .y0, .p0, .q0, .zi);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned nxt(input int unsigned s, input int k);
    return (s * ((1 << R[k]) + 1) + BV[k]) % (1 << N);
  endfunction

  initial begin
    int unsigned s[4];
    logic [2*PERIOD-1:0] zs;
    logic expected;
    start = 1'b0;
    {x0, y0, p0, q0} = '0;
    @(posedge clk);
    for (int xi = 0; xi < 16; xi++)
      for (int yi = 0; yi < 16; yi++) begin
        @(negedge clk);
        x0 = 4'(xi); y0 = 4'(yi); p0 = 4'($urandom); q0 = 4'($urandom);
        s = '{32'(x0), 32'(y0), 32'(p0), 32'(q0)};
        start = 1'b1;
        for (int i = 0; i < 2 * PERIOD; i++) begin
          for (int k = 0; k < 4; k++) s[k] = nxt(s[k], k);
          @(posedge clk);
          #1;
          if (s[1][0]) begin expected = (s[2] > s[3]); n_sel_c++; end
          else         begin expected = (s[0] > s[1]); n_sel_b++; end
          zs[i] = zi;
          checks++;
          if (zi !== expected) begin
            failures++;
            if (failures < 10) $display("FAIL seeds %0d %0d bit %0d: zi=%0b exp %0b", xi, yi, i, zi, expected);
          end
          if (i > 0 && i < PERIOD && s[1] == 32'(nxt(y0, 1))) begin
            failures++;
            $display("FAIL y state repeats after %0d steps", i);
          end
          @(negedge clk);
          start = 1'b0;
        end
        checks++;
        if (zs[PERIOD-1:0] !== zs[2*PERIOD-1:PERIOD]) begin
          failures++;
          $display("FAIL output period is not %0d for seeds %0d %0d", PERIOD, xi, yi);
        end
      end
    checks++;
    if (n_sel_b == 0 || n_sel_c == 0) begin
      failures++;
      $display("FAIL a selection never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
