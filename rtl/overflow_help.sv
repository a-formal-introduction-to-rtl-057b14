// overflow_help: the ALU's two's-complement overflow output.
//
// Uses only the top bits of a, b and the ALU result r:
//   add, add with carry (b + a):      a == b and r != a
//   subtract, with borrow (b - a):    a != b and r != b
//   increment (a + 1):                a >= 0 and r < 0
//   decrement (a - 1):                a < 0 and r >= 0
//   negate (0 - a):                   a < 0 and r < 0 (only for the most
//                                     negative number)
// and 0 for every other op-code. The rules are this design's own reading of
// signed overflow. Purely combinational.
module overflow_help
  import alu_pkg::*;
(
  input  alu_op_e op,
  input  logic    a_msb,
  input  logic    b_msb,
  input  logic    alu_msb,
  output logic    overflow
);
  always_comb begin
    unique case (op)
      OP_ADC, OP_ADD: overflow = (a_msb == b_msb) && (alu_msb != a_msb);
      OP_SBB, OP_SUB: overflow = (a_msb != b_msb) && (alu_msb != b_msb);
      OP_INC:         overflow = ~a_msb & alu_msb;
      OP_DEC:         overflow = a_msb & ~alu_msb;
      OP_NEG:         overflow = a_msb & alu_msb;
      default:        overflow = 1'b0;
    endcase
  end
endmodule
