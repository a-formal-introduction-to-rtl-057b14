// tb_mpg: for every op-code, applies the decoded control vector to all four
// (a, b) bit pairs and checks that the propagate and generate functions are
// those the operation needs: the result bit for a logic operation, and the
// per-bit sum and carry terms of b + f(a) for the arithmetic ones.
module tb_mpg;
  import alu_pkg::*;
  alu_op_e op;
  mpg_t    ctl;
  int checks = 0, failures = 0;

  mpg dut (.op(op), .ctl(ctl));

  // Expected {p, g} for operation o on bits x (from a) and y (from b).
  function automatic logic [1:0] expect_pg(logic [3:0] o, logic x, logic y);
    case (o)
      4'b0001: return {x, 1'b0};            // a + 1: add a and 0
      4'b0010, 4'b0011: return {x ^ y, x & y};
      4'b0100: return {~x, 1'b0};           // ~a + 1
      4'b0101: return {~x, x};              // a + all ones
      4'b0110, 4'b0111: return {~x ^ y, ~x & y};   // b + ~a
      4'b1011: return {x ^ y, 1'b0};
      4'b1100: return {x | y, 1'b0};
      4'b1101: return {x & y, 1'b0};
      4'b1110: return {~x, 1'b0};
      default: return {x, 1'b0};            // move and shifts pass a
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 16; o++) begin
      op = alu_op_e'(o);
      #1;
      for (int i = 0; i < 4; i++) begin
        logic x, y;
        {x, y} = 2'(i);
        checks++;
        if ({ctl.prop[i], ctl.gen[i]} !== expect_pg(4'(o), x, y)) begin
          failures++;
          $display("FAIL op=%b a=%0d b=%0d p=%0d g=%0d", 4'(o), x, y, ctl.prop[i], ctl.gen[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
