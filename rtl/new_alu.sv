// new_alu: N-bit ALU with sixteen operations, a carry and an overflow output.
//
// Three parts, as in the document's block diagram:
//  - a propagate-generate ALU (tv_alu_help) with its decoders: mpg turns the
//    op-code into the per-bit control vector and carry_in_help gives the
//    carry into bit 0 (cx). It does all arithmetic and logic operations with
//    a carry look-ahead tree, so its delay grows with log2(N);
//  - a shift/buffer stage (tv_shift_or_buf) that shifts the result right by
//    one for the three shift op-codes and otherwise passes it;
//  - carry and overflow logic (carry_out_help, overflow_help) fed by cx, the
//    ALU's group p and g, a[0] and the top bits of a, b and the ALU result.
// Operations (op[3:0]): 0000 a, 0001 a+1, 0010 b+a+c, 0011 b+a, 0100 -a,
// 0101 a-1, 0110 b-a-c, 0111 b-a, 1000 rotate right through c, 1001
// arithmetic shift right, 1010 logical shift right, 1011 b^a, 1100 b|a,
// 1101 b&a, 1110 ~a, 1111 a. For subtract-type operations carry is a borrow.
// a[0] is least significant. Purely combinational; no clock.
module new_alu
  import alu_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic         c,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [3:0]   op,
  output logic [N-1:0] out,
  output logic         carry,
  output logic         overflow
);
  alu_op_e     opc;
  mpg_t        ctl;
  logic        cx, p, g;
  logic [N-1:0] alu;

  assign opc = alu_op_e'(op);

  mpg           u_mpg (.op(opc), .ctl(ctl));
  carry_in_help u_cin (.op(opc), .c(c), .cx(cx));

  tv_alu_help #(.N(N)) u_pg_alu (
    .c(cx), .a(a), .b(b), .mpg(ctl), .p(p), .g(g), .out(alu)
  );

  tv_shift_or_buf #(.N(N)) u_shift (
    .op(opc), .c(c), .a_msb(a[N-1]), .alu(alu), .out(out)
  );

  carry_out_help u_cout (
    .op(opc), .cx(cx), .p(p), .g(g), .a_lsb(a[0]), .carry(carry)
  );

  overflow_help u_ovf (
    .op(opc), .a_msb(a[N-1]), .b_msb(b[N-1]), .alu_msb(alu[N-1]), .overflow(overflow)
  );
endmodule
