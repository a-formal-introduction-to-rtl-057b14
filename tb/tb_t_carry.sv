// tb_t_carry: exhaustive check of the look-ahead cell, cout = g | c & p.
module tb_t_carry;
  logic c, p, g, cout, exp_cout;
  int checks = 0, failures = 0;

  t_carry dut (.c(c), .p(p), .g(g), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {c, p, g} = 3'(i);
      // carry leaves the group if it is generated there, or enters and propagates
      exp_cout = (g == 1'b1) ? 1'b1 : ((c == 1'b1) && (p == 1'b1));
      #1;
      checks++;
      if (cout !== exp_cout) begin
        failures++;
        $display("FAIL c=%0d p=%0d g=%0d cout=%0d", c, p, g, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
