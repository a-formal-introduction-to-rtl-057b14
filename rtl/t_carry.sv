// t_carry: carry look-ahead cell, cout = g | (c & p).
//
// Given the propagate p and generate g of a group of bits and the carry c
// into the group, gives the carry out of the group. The same cell also
// combines two groups' generates (see tv_alu_help). Two gates: an AND then
// an OR, as the document defines it. Purely combinational.
module t_carry
  import hdl_prim_pkg::*;
(
  input  logic c,
  input  logic p,
  input  logic g,
  output logic cout
);
  logic t0;
  b_gate #(.FN(B_AND)) u_and (.in({p, c}),  .out(t0));
  b_gate #(.FN(B_OR))  u_or  (.in({t0, g}), .out(cout));
endmodule
