// half_adder: one-bit half adder.
//
// SUM is the exclusive-or of the two inputs and CARRY their and, one gate
// each, exactly the two-gate circuit of the document's first example.
// Purely combinational; no clock.
module half_adder
  import hdl_prim_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  b_gate #(.FN(B_XOR)) u_xor (.in({b, a}), .out(sum));
  b_gate #(.FN(B_AND)) u_and (.in({b, a}), .out(carry));
endmodule
