// t_cell: one-bit ALU function cell, the leaf of the propagate-generate ALU.
//
// The control vector mpg holds two 4-entry truth tables over {a, b}: the
// bit propagate p = mpg.prop[{a,b}] and the bit generate g = mpg.gen[{a,b}].
// The result bit is out = p ^ c, where c is the carry into this bit from the
// look-ahead tree. With gen = 0 and a carry of 0 into the ALU every internal
// carry is 0, so out = p and the cell computes any logic function of a, b.
// The document names this cell and its ports; this encoding of the eight
// control bits is the design's own. Purely combinational.
module t_cell
  import alu_pkg::*;
(
  input  logic c,
  input  logic a,
  input  logic b,
  input  mpg_t mpg,
  output logic p,
  output logic g,
  output logic out
);
  logic [1:0] idx;
  assign idx = {a, b};
  assign p   = mpg.prop[idx];
  assign g   = mpg.gen[idx];
  assign out = p ^ c;
endmodule
