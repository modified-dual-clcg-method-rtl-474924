// full_adder: one-bit full adder, the cell of the carry-save row and of the
// ripple-carry stage of the three-operand adder.
//
// s = a ^ b ^ c, co = majority(a, b, c). Purely combinational, no clock.
// The document names the cell and its function; the gate form is this
// design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ c;
    co = (a & b) | (a & c) | (b & c);
  end
endmodule
