// tb_v_adder: exhaustive check of the 4-bit ripple-carry adder, then random
// checks of a 13-bit one, against integer addition c + a + b.
module tb_v_adder;
  localparam int unsigned W = 13;
  logic         c;
  logic [3:0]   a, b, sum;
  logic         cout;
  logic         c2;
  logic [W-1:0] a2, b2, sum2;
  logic         cout2;
  int checks = 0, failures = 0;

  v_adder dut (.c(c), .a(a), .b(b), .sum(sum), .cout(cout));
  v_adder #(.N(W)) dut_w (.c(c2), .a(a2), .b(b2), .sum(sum2), .cout(cout2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {c, a, b} = 9'(i);
      #1;
      checks++;
      if ({cout, sum} != 5'(a) + 5'(b) + 5'(c)) begin
        failures++;
        $display("FAIL c=%0d a=%0d b=%0d -> %0d", c, a, b, {cout, sum});
      end
    end
    for (int i = 0; i < 2000; i++) begin
      c2 = 1'($urandom); a2 = W'($urandom); b2 = W'($urandom);
      if (i == 0) begin c2 = 1'b1; a2 = '1; b2 = '0; end   // carry through every stage
      #1;
      checks++;
      if ({cout2, sum2} != (W+1)'(a2) + (W+1)'(b2) + (W+1)'(c2)) begin
        failures++;
        $display("FAIL W c=%0d a=%0d b=%0d", c2, a2, b2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
