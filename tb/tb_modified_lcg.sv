// tb_modified_lcg: checks one modified LCG (default: N = 32, R = 6, B = 0x2B)
// and a second instance with R = 5, B = 0x13 against the reference recurrence
// s' = (s * (2^R + 1) + B) mod 2^N computed with a multiplication.
// Checked: the seed load one clock after START (latency one cycle), START held
// high (repeated loads of the same seed), free running iteration, that the
// seed input is ignored while START is low, and a restart with a new seed.
module tb_modified_lcg;
  localparam int unsigned N  = 32;
  localparam int unsigned RA = 6;
  localparam logic [N-1:0] BA = 32'h2B;
  localparam int unsigned RB = 5;
  localparam logic [N-1:0] BB = 32'h13;

  logic clk = 1'b0;
  logic start;
  logic [N-1:0] seed, state_a, state_b;
  logic [N-1:0] ref_a, ref_b;
  int checks = 0, failures = 0;
  int n_loads = 0, n_iter = 0;

  modified_lcg dut_a (.clk, .start, .seed, .state(state_a));
  modified_lcg #(.N(N), .R(RB), .B(BB)) dut_b (.clk, .start, .seed, .state(state_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] lcg_ref(input logic [N-1:0] s, input int unsigned r,
                                           input logic [N-1:0] b);
    longint unsigned a;
    a = (64'd1 << r) + 64'd1;
    return N'(longint'(s) * a + longint'(b));
  endfunction

  task automatic compare(input string what);
    checks++;
    if (state_a !== ref_a || state_b !== ref_b) begin
      failures++;
      $display("FAIL %s: a=%h (exp %h) b=%h (exp %h)", what, state_a, ref_a, state_b, ref_b);
    end
  endtask

  // One clock: apply start/seed before the rising edge, advance the model, check after it.
  task automatic step(input logic st, input logic [N-1:0] sd, input string what);
    @(negedge clk);
    start = st;
    seed  = sd;
    if (st) begin
      ref_a = lcg_ref(sd, RA, BA);
      ref_b = lcg_ref(sd, RB, BB);
      n_loads++;
    end else begin
      ref_a = lcg_ref(ref_a, RA, BA);
      ref_b = lcg_ref(ref_b, RB, BB);
      n_iter++;
    end
    @(posedge clk);
    #1;
    compare(what);
  endtask

  initial begin
    start = 1'b0;
    seed  = '0;
    ref_a = '0;
    ref_b = '0;
    // Seed load: visible exactly one clock later.
    step(1'b1, 32'd1, "load seed 1");
    // START held high: keeps reloading f(seed).
    step(1'b1, 32'd1, "start held");
    step(1'b1, 32'd1, "start held");
    // Free running; the seed input changes but must be ignored.
    for (int i = 0; i < 300; i++) step(1'b0, $urandom, "iterate");
    // Restart with random seeds, several times.
    for (int k = 0; k < 10; k++) begin
      step(1'b1, $urandom, "restart");
      for (int i = 0; i < 100; i++) step(1'b0, $urandom, "iterate after restart");
    end
    // Corner seeds.
    step(1'b1, '1, "load all ones");
    for (int i = 0; i < 20; i++) step(1'b0, '0, "iterate");
    step(1'b1, '0, "load zero");
    for (int i = 0; i < 20; i++) step(1'b0, '0, "iterate");
    checks++;
    if (n_loads < 2 || n_iter < 2) begin
      failures++;
      $display("FAIL loads=%0d iterations=%0d", n_loads, n_iter);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
