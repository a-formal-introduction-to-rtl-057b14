// tb_carry_out_help: checks the carry output for every op-code and every
// combination of cx, group p, group g and a[0]. The expected carry out of
// the propagate-generate ALU is worked out by adding: with group generate
// set it is 1, with group propagate set it equals the carry in.
module tb_carry_out_help;
  import alu_pkg::*;
  alu_op_e op;
  logic    cx, p, g, a_lsb, carry, exp_carry, add_carry;
  int checks = 0, failures = 0;

  carry_out_help dut (.op(op), .cx(cx), .p(p), .g(g), .a_lsb(a_lsb), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      op = alu_op_e'(i[3:0]);
      {cx, p, g, a_lsb} = i[7:4];
      add_carry = g ? 1'b1 : (p ? cx : 1'b0);
      case (i[3:0])
        4'd1, 4'd2, 4'd3:       exp_carry = add_carry;
        4'd4, 4'd5, 4'd6, 4'd7: exp_carry = !add_carry;   // borrow
        4'd8, 4'd9, 4'd10:      exp_carry = a_lsb;        // bit shifted out
        default:                exp_carry = 1'b0;
      endcase
      #1;
      checks++;
      if (carry !== exp_carry) begin
        failures++;
        $display("FAIL op=%b cx=%0d p=%0d g=%0d a0=%0d carry=%0d", op, cx, p, g, a_lsb, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
