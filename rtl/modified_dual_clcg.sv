// modified_dual_clcg: modified dual coupled-LCG pseudorandom bit generator.
//
// Four LCGs iterate in lock step:
//   x' = (2^R1 x + x + B1) mod 2^N      y' = (2^R2 y + y + B2) mod 2^N
//   p' = (2^R3 p + p + B3) mod 2^N      q' = (2^R4 q + q + B4) mod 2^N
// Two comparators form B = (x' > y') and C = (p' > q'), and a 2:1 multiplexer
// steered by y'[0] emits z = y'[0] ? C : B. Unlike the original dual-CLCG,
// which only produces a bit when its inequalities hold, this emits one bit on
// every clock.
//
// Interface:
//   clk                 rising-edge clock
//   start               high for (at least) one clock to load the seeds
//   x0, y0, p0, q0      N-bit seeds
//   zi                  pseudorandom output bit
// Timing: with start high at a rising edge the four registers take the first
// iterates x1, y1, p1, q1 of the seeds, so zi carries z_0 from that edge on
// (one clock of initial latency) and a new bit after every further edge while
// start is low. zi is a combinational function of the four registers. There is
// no reset; before the first start zi is meaningless.
//
// The block diagram (START seed multiplexers, shift-add LCGs, two
// comparators, output multiplexer on y'[0]), the port list and the default
// width of 32 bits follow the document. The shift amounts and increments are
// parameters; their defaults are explained in mdclcg_pkg.
module modified_dual_clcg #(
  parameter int unsigned  N  = mdclcg_pkg::N_DEFAULT,
  parameter int unsigned  R1 = mdclcg_pkg::R1_DEFAULT,
  parameter int unsigned  R2 = mdclcg_pkg::R2_DEFAULT,
  parameter int unsigned  R3 = mdclcg_pkg::R3_DEFAULT,
  parameter int unsigned  R4 = mdclcg_pkg::R4_DEFAULT,
  parameter logic [N-1:0] B1 = N'(mdclcg_pkg::B1_DEFAULT),
  parameter logic [N-1:0] B2 = N'(mdclcg_pkg::B2_DEFAULT),
  parameter logic [N-1:0] B3 = N'(mdclcg_pkg::B3_DEFAULT),
  parameter logic [N-1:0] B4 = N'(mdclcg_pkg::B4_DEFAULT)
) (
  input  logic         clk,
  input  logic         start,
  input  logic [N-1:0] x0,
  input  logic [N-1:0] y0,
  input  logic [N-1:0] p0,
  input  logic [N-1:0] q0,
  output logic         zi
);
  logic [N-1:0] x, y, p, q;   // x_{i+1}, y_{i+1}, p_{i+1}, q_{i+1}
  logic         b_i, c_i;     // inequality bits of equations (5) and (6)

  modified_lcg #(.N(N), .R(R1), .B(B1)) u_lcg_x (.clk, .start, .seed(x0), .state(x));
  modified_lcg #(.N(N), .R(R2), .B(B2)) u_lcg_y (.clk, .start, .seed(y0), .state(y));
  modified_lcg #(.N(N), .R(R3), .B(B3)) u_lcg_p (.clk, .start, .seed(p0), .state(p));
  modified_lcg #(.N(N), .R(R4), .B(B4)) u_lcg_q (.clk, .start, .seed(q0), .state(q));

  magnitude_comparator #(.N(N)) u_cmp_xy (.a(x), .b(y), .gt(b_i));
  magnitude_comparator #(.N(N)) u_cmp_pq (.a(p), .b(q), .gt(c_i));

  bit_select_mux u_mux (.b_bit(b_i), .c_bit(c_i), .sel(y[0]), .z(zi));
endmodule
