// tb_new_alu: checks the ALU at its default 32 bits and at 1 and 7 bits
// against the reference model, for all sixteen op-codes on corner and random
// operands, and checks that carry, overflow and a full-width carry chain
// each occurred.
module tb_new_alu;
  int checks = 0, failures = 0;
  logic start = 0;
  logic d32, d1, d7;
  int ch[3], fl[3], cy[3], ov[3], fc[3];

  alu_checker #(.N(32), .ROUNDS(400)) u32 (.start(start), .done(d32), .checks(ch[0]), .failures(fl[0]), .carries(cy[0]), .overflows(ov[0]), .full_chains(fc[0]));
  alu_checker #(.N(1),  .ROUNDS(40))  u1  (.start(start), .done(d1),  .checks(ch[1]), .failures(fl[1]), .carries(cy[1]), .overflows(ov[1]), .full_chains(fc[1]));
  alu_checker #(.N(7),  .ROUNDS(400)) u7  (.start(start), .done(d7),  .checks(ch[2]), .failures(fl[2]), .carries(cy[2]), .overflows(ov[2]), .full_chains(fc[2]));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 start = 1;
    wait (d32 && d1 && d7);
    for (int i = 0; i < 3; i++) begin
      checks += ch[i] + 3;
      failures += fl[i];
      if (cy[i] == 0) begin failures++; $display("FAIL instance %0d never produced a carry", i); end
      if (ov[i] == 0) begin failures++; $display("FAIL instance %0d never overflowed", i); end
      if (fc[i] == 0) begin failures++; $display("FAIL instance %0d never carried through all bits", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
