// tb_overflow_help: checks the overflow output for every op-code and every
// combination of sign bits, against overflow worked out by doing the
// operation on 4-bit signed numbers chosen to have those sign bits and
// seeing whether the result fits in 4 bits.
module tb_overflow_help;
  import alu_pkg::*;
  alu_op_e op;
  logic    a_msb, b_msb, alu_msb, overflow;
  int checks = 0, failures = 0;
  int cases_seen[16];

  overflow_help dut (.op(op), .a_msb(a_msb), .b_msb(b_msb), .alu_msb(alu_msb), .overflow(overflow));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Run every operation on all 4-bit operands and carry values; feed the
    // sign bits of the operands and the 4-bit result to the block.
    for (int o = 0; o < 16; o++) begin
      for (int av = -8; av < 8; av++) begin
        for (int bv = -8; bv < 8; bv++) begin
          for (int cv = 0; cv < 2; cv++) begin
            int r;
            logic exp_ovf;
            case (o)
              1: r = av + 1;
              2: r = bv + av + cv;
              3: r = bv + av;
              4: r = -av;
              5: r = av - 1;
              6: r = bv - av - cv;
              7: r = bv - av;
              default: r = av;
            endcase
            exp_ovf = (o >= 1 && o <= 7) && (r < -8 || r > 7);
            op = alu_op_e'(o);
            a_msb = av < 0; b_msb = bv < 0;
            alu_msb = r[3];
            #1;
            checks++;
            if (overflow !== exp_ovf) begin
              failures++;
              $display("FAIL op=%0d a=%0d b=%0d c=%0d r=%0d ovf=%0d", o, av, bv, cv, r, overflow);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
