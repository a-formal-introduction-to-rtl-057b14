// mpg: op-code decoder for the propagate-generate ALU.
//
// Maps each of the sixteen op-codes to the control vector ctl that every
// one-bit cell of the ALU receives (see alu_pkg::mpg_t). Arithmetic is done
// as b + f(a) + carry-in: add uses p = a^b, g = a&b; increment p = a, g = 0;
// negate p = ~a, g = 0; decrement (a + all ones) p = ~a, g = a; subtract
// (b + ~a) p = ~a^b, g = ~a&b. Move and the three shifts pass a (p = a);
// the logic operations put their function in p with g = 0. The encoding is
// this design's own. Purely combinational.
//
// ctl.gen[0] (the generate entry for a = b = 0) is 0 for every op-code, since
// no operation generates a carry from two zero bits; it is kept so every cell
// receives the full 8-bit vector. Synthesis may map this decoder to a small
// 16-entry ROM.
module mpg
  import alu_pkg::*;
(
  input  alu_op_e op,
  output mpg_t    ctl
);

  // Truth tables of the functions of (a, b) the ALU needs.
  localparam logic [3:0] TT_ZERO  = 4'b0000;
  localparam logic [3:0] TT_A     = 4'b1100;  // a
  localparam logic [3:0] TT_NA    = 4'b0011;  // ~a
  localparam logic [3:0] TT_XOR   = 4'b0110;  // a ^ b
  localparam logic [3:0] TT_XNOR  = 4'b1001;  // ~a ^ b
  localparam logic [3:0] TT_OR    = 4'b1110;  // a | b
  localparam logic [3:0] TT_AND   = 4'b1000;  // a & b
  localparam logic [3:0] TT_NAB   = 4'b0010;  // ~a & b

  always_comb begin
    unique case (op)
      OP_INC:                 ctl = '{prop: TT_A,    gen: TT_ZERO};
      OP_ADC, OP_ADD:         ctl = '{prop: TT_XOR,  gen: TT_AND};
      OP_NEG:                 ctl = '{prop: TT_NA,   gen: TT_ZERO};
      OP_DEC:                 ctl = '{prop: TT_NA,   gen: TT_A};
      OP_SBB, OP_SUB:         ctl = '{prop: TT_XNOR, gen: TT_NAB};
      OP_XOR:                 ctl = '{prop: TT_XOR,  gen: TT_ZERO};
      OP_OR:                  ctl = '{prop: TT_OR,   gen: TT_ZERO};
      OP_AND:                 ctl = '{prop: TT_AND,  gen: TT_ZERO};
      OP_NOT:                 ctl = '{prop: TT_NA,   gen: TT_ZERO};
      // move, move, and the shifts (which shift the moved a afterwards)
      default:                ctl = '{prop: TT_A,    gen: TT_ZERO};
    endcase
  end
endmodule
