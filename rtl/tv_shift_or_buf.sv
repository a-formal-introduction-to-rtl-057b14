// tv_shift_or_buf: shift/buffer stage at the output of the ALU.
//
// For the three shift op-codes the propagate-generate ALU is set to pass a,
// and this stage shifts that value right by one place, filling the top bit
// with the carry input c (rotate right through carry), with a's own top bit
// a_msb (arithmetic shift) or with 0 (logical shift). For every other
// op-code it passes the ALU result unchanged. The bit shifted out (a[0]) is
// the carry output, formed in carry_out_help.
// Interface: op, c, a_msb, alu[N-1:0] in; out[N-1:0] out. Combinational.
module tv_shift_or_buf
  import alu_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  alu_op_e      op,
  input  logic         c,
  input  logic         a_msb,
  input  logic [N-1:0] alu,
  output logic [N-1:0] out
);
  logic top;

  always_comb begin
    unique case (op)
      OP_ROR:  top = c;
      OP_ASR:  top = a_msb;
      default: top = 1'b0;
    endcase
  end

  if (N == 1) begin : g_one
    assign out = is_shift(op) ? top : alu;
  end else begin : g_many
    assign out = is_shift(op) ? {top, alu[N-1:1]} : alu;
  end
endmodule
