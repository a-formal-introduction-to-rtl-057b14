// b_gate: one primitive gate, selected by the parameter FN.
//
// The primitives are buffer, inverter, 2- to 4-input NAND, OR, AND and NOR,
// and 2-input XOR and equivalence (XNOR). The input port is as wide as the
// gate's input count (hdl_prim_pkg::prim_arity); in[0] is the first input.
// Building circuits from these instances keeps each circuit's gate count
// and gate depth the same as in its gate-level description.
// Purely combinational.
module b_gate
  import hdl_prim_pkg::*;
#(
  parameter prim_e FN = B_AND
) (
  input  logic [prim_arity(FN)-1:0] in,
  output logic                      out
);
  always_comb begin
    unique case (FN)
      B_BUF:                    out = in[0];
      B_NOT:                    out = ~in[0];
      B_NAND, B_NAND3, B_NAND4: out = ~(&in);
      B_OR, B_OR3, B_OR4:       out = |in;
      B_AND, B_AND3, B_AND4:    out = &in;
      B_NOR, B_NOR3, B_NOR4:    out = ~(|in);
      B_XOR:                    out = ^in;
      default:                  out = ~(^in);   // B_EQV
    endcase
  end
endmodule
