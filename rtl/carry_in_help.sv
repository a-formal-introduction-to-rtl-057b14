// carry_in_help: carry into bit 0 of the propagate-generate ALU (Cx).
//
// Increment, negate and subtract add a constant 1 (two's complement of a is
// ~a + 1); add with carry passes the carry input c; subtract with borrow
// computes b - a - c as b + ~a + ~c and so passes ~c. Every other op-code
// uses 0, which with a zero generate keeps all internal carries at 0.
// The derivation from the operation table is this design's own.
// Purely combinational.
module carry_in_help
  import alu_pkg::*;
(
  input  alu_op_e op,
  input  logic    c,
  output logic    cx
);
  always_comb begin
    unique case (op)
      OP_INC, OP_NEG, OP_SUB: cx = 1'b1;
      OP_ADC:                 cx = c;
      OP_SBB:                 cx = ~c;
      default:                cx = 1'b0;
    endcase
  end
endmodule
