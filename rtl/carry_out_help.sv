// carry_out_help: the ALU's carry output.
//
// The carry out of the propagate-generate ALU is g | p & cx (one t_carry
// cell on its group propagate and generate). For increment, add and add
// with carry that is the carry output. For negate, decrement, subtract and
// subtract with borrow, which add the complement, the carry output is the
// borrow, the inverse of that carry. For the three right shifts it is the
// bit shifted out, a[0]. For move and the logic operations it is 0.
// Which sense the carry has for subtraction is this design's choice.
// Purely combinational.
module carry_out_help
  import alu_pkg::*;
(
  input  alu_op_e op,
  input  logic    cx,
  input  logic    p,
  input  logic    g,
  input  logic    a_lsb,
  output logic    carry
);
  logic cout;

  t_carry u_cout (.c(cx), .p(p), .g(g), .cout(cout));

  always_comb begin
    if (is_add_type(op))      carry = cout;
    else if (is_sub_type(op)) carry = ~cout;
    else if (is_shift(op))    carry = a_lsb;
    else                      carry = 1'b0;
  end
endmodule
