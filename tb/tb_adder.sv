// tb_adder: checks the cost-selected adder at widths on both sides of the
// crossover (4, 25, 26 and 32 bits) against integer addition. Both
// structures compute the same sum, so which one was elaborated is not
// visible at the ports; the widths cover both branches of the choice.
module tb_adder;
  int checks = 0, failures = 0;

  logic c4, c25, c26, c32;
  logic [3:0]  a4, b4, s4;   logic co4;
  logic [24:0] a25, b25, s25; logic co25;
  logic [25:0] a26, b26, s26; logic co26;
  logic [31:0] a32, b32, s32; logic co32;

  adder             d4  (.c(c4),  .a(a4),  .b(b4),  .sum(s4),  .cout(co4));
  adder #(.N(25))   d25 (.c(c25), .a(a25), .b(b25), .sum(s25), .cout(co25));
  adder #(.N(26))   d26 (.c(c26), .a(a26), .b(b26), .sum(s26), .cout(co26));
  adder #(.N(32))   d32 (.c(c32), .a(a32), .b(b32), .sum(s32), .cout(co32));


  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {c4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} != 5'(a4) + 5'(b4) + 5'(c4)) begin failures++; $display("FAIL N=4 %0d", i); end
    end
    for (int i = 0; i < 2000; i++) begin
      c25 = 1'($urandom); a25 = 25'($urandom); b25 = 25'($urandom);
      c26 = 1'($urandom); a26 = 26'($urandom); b26 = 26'($urandom);
      c32 = 1'($urandom); a32 = $urandom;      b32 = $urandom;
      if (i == 0) begin c25 = 1; a25 = '1; b25 = 0; c26 = 1; a26 = '1; b26 = 0; c32 = 1; a32 = '1; b32 = 0; end
      #1;
      checks += 3;
      if ({co25, s25} != 26'(a25) + 26'(b25) + 26'(c25)) begin failures++; $display("FAIL N=25"); end
      if ({co26, s26} != 27'(a26) + 27'(b26) + 27'(c26)) begin failures++; $display("FAIL N=26"); end
      if ({co32, s32} != 33'(a32) + 33'(b32) + 33'(c32)) begin failures++; $display("FAIL N=32"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
