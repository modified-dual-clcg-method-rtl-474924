// bit_select_mux: the 2:1 output multiplexer of the modified dual-CLCG.
//
// z = b_bit when sel = 0 and z = c_bit when sel = 1. In the generator, b_bit
// is B_i (x_{i+1} > y_{i+1}), c_bit is C_i (p_{i+1} > q_{i+1}) and sel is
// y_{i+1}[0], the least significant bit of the second LCG's state. This
// selection replaces the AND of B_i and C_i of the original dual-CLCG and is
// what lets the modified method emit one bit every clock. Combinational.
module bit_select_mux (
  input  logic b_bit,
  input  logic c_bit,
  input  logic sel,
  output logic z
);
  always_comb z = sel ? c_bit : b_bit;
endmodule
