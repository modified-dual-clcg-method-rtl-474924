// tb_modified_dual_clcg: end-to-end test of the modified dual-CLCG generator
// at its default parameters (32-bit words, r = 6/5/4/2, b = 0x2B/0x13/0x17/0x0B).
//
// A reference model in this file iterates the four recurrences with
// multiplications (a = 2^r + 1), forms B = x > y, C = p > q and
// z = y[0] ? C : B, and the output bit zi is compared with it on every clock.
// The run starts with the seeds 1, 2, 3, 4, then restarts several times with
// random seeds, once with START held high for several clocks. Checked:
//   - latency: z_0 appears one clock after the START edge, and one new bit
//     follows on every clock (uniform rate, no skipped cycles);
//   - every mechanism occurs: seed load, held START, selection of B
//     (y[0] = 0), selection of C (y[0] = 1), and for each selection a cycle in
//     which B and C differ so that the choice decides the output;
//   - the output is balanced: between 45 % and 55 % ones over all bits.
module tb_modified_dual_clcg;
  localparam int unsigned N = 32;
  localparam longint unsigned A1 = 64'h41, A2 = 64'h21, A3 = 64'h11, A4 = 64'h05;
  localparam longint unsigned C1 = 64'h2B, C2 = 64'h13, C3 = 64'h17, C4 = 64'h0B;
  localparam int RUN_BITS = 4000;    // bits compared after each start

  logic clk = 1'b0;
  logic start;
  logic [N-1:0] x0, y0, p0, q0;
  logic zi;

  logic [N-1:0] mx, my, mp, mq;      // reference LCG states
  int checks = 0, failures = 0;
  int n_load = 0, n_held = 0, n_sel_b = 0, n_sel_c = 0, n_decide_b = 0, n_decide_c = 0;
  int n_bits = 0, n_ones = 0;

  modified_dual_clcg dut (.clk, .start, .x0, .y0, .p0, .q0, .zi);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] step_ref(input logic [N-1:0] s, input longint unsigned a,
                                            input longint unsigned b);
    return N'(longint'(s) * a + b);
  endfunction

  // Advance the reference by one iteration (or load the seeds) and return z.
  task automatic advance(input logic load);
    if (load) begin
      mx = step_ref(x0, A1, C1); my = step_ref(y0, A2, C2);
      mp = step_ref(p0, A3, C3); mq = step_ref(q0, A4, C4);
    end else begin
      mx = step_ref(mx, A1, C1); my = step_ref(my, A2, C2);
      mp = step_ref(mp, A3, C3); mq = step_ref(mq, A4, C4);
    end
  endtask

  // One clock with the given START value; compares zi after the edge.
  task automatic clock(input logic st, input string what);
    logic bb, cc, z;
    @(negedge clk);
    start = st;
    advance(st);
    @(posedge clk);
    #1;
    bb = (mx > my);
    cc = (mp > mq);
    z  = my[0] ? cc : bb;
    if (my[0]) begin n_sel_c++; if (bb != cc) n_decide_c++; end
    else       begin n_sel_b++; if (bb != cc) n_decide_b++; end
    n_bits++;
    if (z) n_ones++;
    checks++;
    if (zi !== z) begin
      failures++;
      if (failures < 20) $display("FAIL %s at bit %0d: zi=%0b expected %0b", what, n_bits, zi, z);
    end
  endtask

  task automatic run(input logic [N-1:0] sx, sy, sp, sq, input int hold, input int nbits);
    @(negedge clk);
    x0 = sx; y0 = sy; p0 = sp; q0 = sq;
    n_load++;
    clock(1'b1, "first bit after start");   // z_0, one clock after the START edge
    for (int h = 1; h < hold; h++) begin
      n_held++;
      clock(1'b1, "start held");
    end
    for (int i = 1; i < nbits; i++) clock(1'b0, "free running");
  endtask

  task automatic require(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end else
      $display("  %-34s %0d", what, count);
  endtask

  initial begin
    start = 1'b0;
    x0 = '0; y0 = '0; p0 = '0; q0 = '0;
    mx = '0; my = '0; mp = '0; mq = '0;
    repeat (2) @(posedge clk);
    run(32'd1, 32'd2, 32'd3, 32'd4, 1, RUN_BITS);
    run($urandom, $urandom, $urandom, $urandom, 4, RUN_BITS);
    for (int k = 0; k < 4; k++) run($urandom, $urandom, $urandom, $urandom, 1, RUN_BITS);
    $display("mechanisms:");
    require(n_load, "seed loads (START)");
    require(n_held, "cycles with START held high");
    require(n_sel_b, "B selected (y[0]=0)");
    require(n_sel_c, "C selected (y[0]=1)");
    require(n_decide_b, "B selected and B != C");
    require(n_decide_c, "C selected and B != C");
    $display("ones: %0d of %0d bits", n_ones, n_bits);
    checks++;
    if (n_ones * 100 < n_bits * 45 || n_ones * 100 > n_bits * 55) begin
      failures++;
      $display("FAIL output not balanced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
