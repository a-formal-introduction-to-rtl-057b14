// alu_pkg: op-codes and control encoding shared by the n-bit ALU and its parts.
//
// The sixteen op-codes are those of the ALU operation table (move, increment,
// add with carry, add, negate, decrement, subtract with borrow, subtract,
// three right shifts, xor, or, and, not, move). The 4-bit code is written
// with its leftmost printed character as bit 3.
//
// mpg_t is this design's own encoding of the 8-bit control vector MPG that
// steers every one-bit ALU cell: two 4-entry truth tables, indexed by
// {a, b}. 'prop' gives the bit propagate P (which is also the result bit
// when the carry into the bit is 0) and 'gen' gives the bit generate G.
// Entry k of a table is the function's value for {a, b} == k.
package alu_pkg;

  typedef enum logic [3:0] {
    OP_MOVE  = 4'b0000,  // a
    OP_INC   = 4'b0001,  // a + 1
    OP_ADC   = 4'b0010,  // b + a + c
    OP_ADD   = 4'b0011,  // b + a
    OP_NEG   = 4'b0100,  // 0 - a
    OP_DEC   = 4'b0101,  // a - 1
    OP_SBB   = 4'b0110,  // b - a - c
    OP_SUB   = 4'b0111,  // b - a
    OP_ROR   = 4'b1000,  // rotate right through carry
    OP_ASR   = 4'b1001,  // arithmetic shift right
    OP_LSR   = 4'b1010,  // logical shift right
    OP_XOR   = 4'b1011,  // b xor a
    OP_OR    = 4'b1100,  // b or a
    OP_AND   = 4'b1101,  // b and a
    OP_NOT   = 4'b1110,  // not a
    OP_MOVE2 = 4'b1111   // a
  } alu_op_e;

  typedef struct packed {
    logic [3:0] prop;  // P truth table over {a, b}
    logic [3:0] gen;   // G truth table over {a, b}
  } mpg_t;

  // Op-codes whose carry output is a carry (add type) or a borrow (subtract type).
  function automatic logic is_add_type(alu_op_e op);
    return op inside {OP_INC, OP_ADC, OP_ADD};
  endfunction

  function automatic logic is_sub_type(alu_op_e op);
    return op inside {OP_NEG, OP_DEC, OP_SBB, OP_SUB};
  endfunction

  function automatic logic is_shift(alu_op_e op);
    return op inside {OP_ROR, OP_ASR, OP_LSR};
  endfunction

endpackage
