// tb_tv_adder: checks the propagate-generate adder against integer addition:
// exhaustively at 1, 3 and 5 bits (odd sizes give unbalanced splits), and
// with random and carry-chain operands at its default 32 bits and at 128.
module tb_tv_adder;
  int checks = 0, failures = 0;

  logic c1, c3, c5, c32, c128;
  logic [0:0]   a1, b1, s1;   logic co1;
  logic [2:0]   a3, b3, s3;   logic co3;
  logic [4:0]   a5, b5, s5;   logic co5;
  logic [31:0]  a32, b32, s32; logic co32;
  logic [127:0] a128, b128, s128; logic co128;

  tv_adder #(.N(1))   d1   (.c(c1),   .a(a1),   .b(b1),   .sum(s1),   .cout(co1));
  tv_adder #(.N(3))   d3   (.c(c3),   .a(a3),   .b(b3),   .sum(s3),   .cout(co3));
  tv_adder #(.N(5))   d5   (.c(c5),   .a(a5),   .b(b5),   .sum(s5),   .cout(co5));
  tv_adder            d32  (.c(c32),  .a(a32),  .b(b32),  .sum(s32),  .cout(co32));
  tv_adder #(.N(128)) d128 (.c(c128), .a(a128), .b(b128), .sum(s128), .cout(co128));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      {c1, a1, b1} = 3'(i);
      {c3, a3, b3} = 7'(i);
      {c5, a5, b5} = 11'(i);
      #1;
      if (i < 8) begin
        checks++;
        if ({co1, s1} != 2'(a1) + 2'(b1) + 2'(c1)) begin failures++; $display("FAIL N=1 %0d", i); end
      end
      if (i < 128) begin
        checks++;
        if ({co3, s3} != 4'(a3) + 4'(b3) + 4'(c3)) begin failures++; $display("FAIL N=3 %0d", i); end
      end
      checks++;
      if ({co5, s5} != 6'(a5) + 6'(b5) + 6'(c5)) begin failures++; $display("FAIL N=5 %0d", i); end
    end
    for (int i = 0; i < 3000; i++) begin
      c32 = 1'($urandom); a32 = $urandom; b32 = $urandom;
      c128 = 1'($urandom);
      a128 = {$urandom, $urandom, $urandom, $urandom};
      b128 = {$urandom, $urandom, $urandom, $urandom};
      if (i == 0) begin c32 = 1; a32 = '1; b32 = '0; c128 = 1; a128 = '1; b128 = '0; end
      if (i == 1) begin c32 = 0; a32 = '1; b32 = 1;  c128 = 0; a128 = '1; b128 = 1;  end
      #1;
      checks += 2;
      if ({co32, s32} != 33'(a32) + 33'(b32) + 33'(c32)) begin
        failures++; $display("FAIL N=32 c=%0d a=%h b=%h got %h", c32, a32, b32, {co32, s32});
      end
      if ({co128, s128} != 129'(a128) + 129'(b128) + 129'(c128)) begin
        failures++; $display("FAIL N=128 c=%0d a=%h b=%h", c128, a128, b128);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
