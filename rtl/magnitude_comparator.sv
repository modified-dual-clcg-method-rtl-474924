// magnitude_comparator: N-bit unsigned "greater than" comparator.
//
// gt = 1 when a > b and 0 otherwise. It produces the inequality bits
// B_i = (x_{i+1} > y_{i+1}) and C_i = (p_{i+1} > q_{i+1}) of the generator.
// Purely combinational.
//
// The document gives the function (an n-bit binary comparator) but not its
// insides; this is the plain behavioural comparison. The document leaves the
// case a == b open; here it yields 0, since a > b does not hold.
module magnitude_comparator #(
  parameter int unsigned N = mdclcg_pkg::N_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         gt
);
  always_comb gt = (a > b);
endmodule
