// mdclcg_pkg: constants shared by the modified dual-CLCG pseudorandom bit generator.
//
// The generator runs four LCGs of the form s' = (s << r) + s + b (mod 2^n).
// The word width n = 32 and the per-generator multipliers a = 2^r + 1 = 0x41,
// 0x21, 0x11 and 0x05 (so r = 6, 5, 4, 2) are the values printed on the
// reference schematic of the design. The increments b2 = 0x13 and b3 = 0x17 are
// printed there as well. The increments b1 = 0x2B (43) and b4 = 0x0B (11) are
// this design's choice, made under the method's rule that every increment is a
// prime below 2^n.
package mdclcg_pkg;

  // Word width n of every LCG, comparator and adder.
  localparam int unsigned N_DEFAULT = 32;

  // Left-shift amounts r1..r4: multiplier a_k = 2^r_k + 1.
  localparam int unsigned R1_DEFAULT = 6;   // a1 = 0x41
  localparam int unsigned R2_DEFAULT = 5;   // a2 = 0x21
  localparam int unsigned R3_DEFAULT = 4;   // a3 = 0x11
  localparam int unsigned R4_DEFAULT = 2;   // a4 = 0x05

  // Additive constants b1..b4 (primes).
  localparam logic [63:0] B1_DEFAULT = 64'h2B;
  localparam logic [63:0] B2_DEFAULT = 64'h13;
  localparam logic [63:0] B3_DEFAULT = 64'h17;
  localparam logic [63:0] B4_DEFAULT = 64'h0B;

endpackage
