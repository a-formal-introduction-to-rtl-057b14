// full_adder: one-bit full adder built from two half adders and an OR gate.
//
// The first half adder adds a and b (sum1, carry1), the second adds sum1 and
// the carry input c (sum, carry2); the carry output is carry1 | carry2.
// This is the document's structure, with its internal wire names.
// Purely combinational; no clock.
module full_adder
  import hdl_prim_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic sum1, carry1, carry2;

  half_adder u_ha1 (.a(a),    .b(b), .sum(sum1), .carry(carry1));
  half_adder u_ha2 (.a(sum1), .b(c), .sum(sum),  .carry(carry2));

  b_gate #(.FN(B_OR)) u_or (.in({carry2, carry1}), .out(carry));
endmodule
