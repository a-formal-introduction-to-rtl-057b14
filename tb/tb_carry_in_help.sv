// tb_carry_in_help: checks the carry into bit 0 for every op-code and both
// values of the carry input.
module tb_carry_in_help;
  import alu_pkg::*;
  alu_op_e op;
  logic    c, cx, exp_cx;
  int checks = 0, failures = 0;

  carry_in_help dut (.op(op), .c(c), .cx(cx));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      op = alu_op_e'(i[3:0]);
      c  = i[4];
      case (i[3:0])
        4'd1, 4'd4, 4'd7: exp_cx = 1'b1;   // a + 1, ~a + 1, b + ~a + 1
        4'd2:             exp_cx = c;      // b + a + c
        4'd6:             exp_cx = !c;     // b + ~a + ~c = b - a - c
        default:          exp_cx = 1'b0;
      endcase
      #1;
      checks++;
      if (cx !== exp_cx) begin
        failures++;
        $display("FAIL op=%b c=%0d cx=%0d", op, c, cx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
