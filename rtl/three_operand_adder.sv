// three_operand_adder: carry-save three-operand adder (CSA + ripple-carry).
//
// Stage 1 is a row of N full adders that reduces the three operands a, b, c
// bit by bit to a partial-sum word ps and a carry word cy, with no carry
// propagation (constant delay of one full adder). Stage 2 is an N-bit
// ripple-carry adder that adds {0, ps[N-1:1]} to cy; together with ps[0] as
// the least significant bit this yields the exact sum a + b + c, which needs
// N + 2 bits. The ripple stage is the critical path and grows linearly with N.
//
// Interface: a, b, c are N-bit unsigned operands; sum is the (N+2)-bit result.
// Timing: purely combinational.
//
// The two-stage structure (full-adder row, then ripple-carry adder, carry
// word shifted left by one place) follows the document. The document speaks of
// an n-bit sum with a one-bit carry-out; this design also keeps the top carry
// bit so that the result is exact for every input, and users that need the
// sum modulo 2^N simply take sum[N-1:0].
module three_operand_adder #(
  parameter int unsigned N = mdclcg_pkg::N_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N+1:0] sum
);
  logic [N-1:0] ps;        // partial sums of the carry-save row
  logic [N-1:0] cy;        // carries of the carry-save row (weight 2^(i+1))
  logic [N-1:0] rca_a;     // ps shifted right by one, zero at the top
  logic [N-1:0] rca_s;     // ripple-carry sum bits
  logic [N:0]   rc;        // ripple carry chain, rc[0] = 0

  // Stage 1: carry-save row.
  for (genvar i = 0; i < N; i++) begin : g_csa
    full_adder u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .s(ps[i]), .co(cy[i]));
  end

  // Stage 2: ripple-carry adder of {0, ps[N-1:1]} and cy.
  assign rca_a = {1'b0, ps[N-1:1]};
  assign rc[0] = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_rca
    full_adder u_fa (.a(rca_a[i]), .b(cy[i]), .c(rc[i]), .s(rca_s[i]), .co(rc[i+1]));
  end

  assign sum = {rc[N], rca_s, ps[0]};
endmodule
