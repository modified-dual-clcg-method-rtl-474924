// modified_lcg: one linear congruential generator of the modified dual-CLCG.
//
// Recurrence: s_{i+1} = ((s_i << R) + s_i + B) mod 2^N, i.e. s_{i+1} =
// (a * s_i + B) mod 2^N with the multiplier a = 2^R + 1 realised as a fixed
// left shift (wiring only) instead of a multiplier. A 2:1 input multiplexer
// driven by START chooses the operand s_i: the external seed while START is
// high, the register's own output otherwise. The three operands (shifted
// s_i, s_i and B) are summed by the carry-save three-operand adder, and the
// low N bits are stored in the N-bit state register on every rising clock
// edge.
//
// Interface:
//   clk    rising-edge clock
//   start  1: take seed as s_i (load); 0: iterate on the register
//   seed   initial value s_0 (x_0, y_0, p_0 or q_0)
//   state  register output s_{i+1}, valid one clock after start was high
// Timing: one new state per clock. While start stays high the register keeps
// loading f(seed). The register has no reset: as in the document, START is
// the only way to initialise it.
//
// Structure (mux, shifter, three-operand adder, register, feedback) follows
// the document; R and B are parameters whose defaults are those of the first
// generator of the reference configuration.
module modified_lcg #(
  parameter int unsigned N = mdclcg_pkg::N_DEFAULT,
  parameter int unsigned R = mdclcg_pkg::R1_DEFAULT,
  parameter logic [N-1:0] B = N'(mdclcg_pkg::B1_DEFAULT)
) (
  input  logic         clk,
  input  logic         start,
  input  logic [N-1:0] seed,
  output logic [N-1:0] state
);
  initial begin
    assert (R >= 1 && R < N) else $error("modified_lcg: need 1 <= R < N (1 < 2^R < 2^N)");
  end

  logic [N-1:0] s_cur;      // s_i: seed or fed-back state
  logic [N-1:0] s_shift;    // 2^R * s_i mod 2^N
  logic [N+1:0] s_sum;      // exact three-operand sum
  logic [N-1:0] s_next;     // s_{i+1}

  always_comb s_cur   = start ? seed : state;
  always_comb s_shift = s_cur << R;

  three_operand_adder #(.N(N)) u_add (
    .a  (s_shift),
    .b  (s_cur),
    .c  (B),
    .sum(s_sum)
  );

  // Modulo 2^N: the two carry bits above the word are dropped.
  always_comb s_next = s_sum[N-1:0];

  always_ff @(posedge clk) state <= s_next;
endmodule
