// tb_tv_shift_or_buf: checks the shift/buffer stage at 8 bits and at 1 bit
// for every op-code with random data: shift op-codes shift right by one and
// fill the top bit, the others pass the input through.
module tb_tv_shift_or_buf;
  import alu_pkg::*;
  alu_op_e    op;
  logic       c, a_msb;
  logic [7:0] alu, out, exp_out;
  logic [0:0] alu1, out1, exp1;
  int checks = 0, failures = 0;

  tv_shift_or_buf #(.N(8)) dut  (.op(op), .c(c), .a_msb(a_msb), .alu(alu),  .out(out));
  tv_shift_or_buf #(.N(1)) dut1 (.op(op), .c(c), .a_msb(a_msb), .alu(alu1), .out(out1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1600; i++) begin
      op = alu_op_e'(i % 16);
      c = 1'($urandom); alu = 8'($urandom); a_msb = alu[7]; alu1 = 1'($urandom);
      if (i % 3 == 0) a_msb = 1'($urandom);
      case (i % 16)
        8:  begin exp_out = {c, alu[7:1]};     exp1 = c;     end
        9:  begin exp_out = {a_msb, alu[7:1]}; exp1 = a_msb; end
        10: begin exp_out = {1'b0, alu[7:1]};  exp1 = 1'b0;  end
        default: begin exp_out = alu; exp1 = alu1; end
      endcase
      #1;
      checks += 2;
      if (out !== exp_out) begin failures++; $display("FAIL op=%b c=%0d alu=%b out=%b", op, c, alu, out); end
      if (out1 !== exp1) begin failures++; $display("FAIL N=1 op=%b out=%b", op, out1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
