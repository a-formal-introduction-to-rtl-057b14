// tb_tv_alu_help: checks the propagate-generate ALU at 1, 5 and 32 bits.
// For arithmetic control vectors the result must be b + f(a) + c (with f the
// operand function the control selects), and the group g, p must give the
// carry out (g | p & c) and p must be 1 exactly when every bit propagates.
// For logic control vectors with c = 0 the result must be the bitwise
// function.
module tb_tv_alu_help;
  import alu_pkg::*;
  int checks = 0, failures = 0;

  mpg_t ctl;
  logic c;
  logic [0:0]  a1, b1, o1;   logic p1, g1;
  logic [4:0]  a5, b5, o5;   logic p5, g5;
  logic [31:0] a32, b32, o32; logic p32, g32;

  tv_alu_help #(.N(1)) d1  (.c(c), .a(a1),  .b(b1),  .mpg(ctl), .p(p1),  .g(g1),  .out(o1));
  tv_alu_help #(.N(5)) d5  (.c(c), .a(a5),  .b(b5),  .mpg(ctl), .p(p5),  .g(g5),  .out(o5));
  tv_alu_help          d32 (.c(c), .a(a32), .b(b32), .mpg(ctl), .p(p32), .g(g32), .out(o32));

  // k: 0 add b+a, 1 subtract b+~a, 2 a+0 (increment form), 3 a+all ones,
  //    4 xor, 5 or, 6 and, 7 not
  function automatic mpg_t ctl_of(int k);
    case (k)
      0: return '{prop: 4'b0110, gen: 4'b1000};
      1: return '{prop: 4'b1001, gen: 4'b0010};
      2: return '{prop: 4'b1100, gen: 4'b0000};
      3: return '{prop: 4'b0011, gen: 4'b1100};
      4: return '{prop: 4'b0110, gen: 4'b0000};
      5: return '{prop: 4'b1110, gen: 4'b0000};
      6: return '{prop: 4'b1000, gen: 4'b0000};
      default: return '{prop: 4'b0011, gen: 4'b0000};
    endcase
  endfunction

  // Expected {carry out, result} and the expected "all bits propagate".
  function automatic logic [32:0] ref_res(int k, int n, logic [31:0] x, logic [31:0] y, logic ci);
    logic [32:0] mask, r, xs, ys;
    mask = (33'd1 << n) - 1;
    xs = {1'b0, x} & mask; ys = {1'b0, y} & mask;
    case (k)
      0: r = ys + xs + 33'(ci);
      1: r = ys + (~xs & mask) + 33'(ci);
      2: r = xs + 33'(ci);
      3: r = xs + mask + 33'(ci);
      4: r = xs ^ ys;
      5: r = xs | ys;
      6: r = xs & ys;
      default: r = ~xs & mask;
    endcase
    return r & ((mask << 1) | 1);
  endfunction

  function automatic logic ref_allprop(int k, int n, logic [31:0] x, logic [31:0] y);
    logic [31:0] mask, pv;
    mask = (n == 32) ? '1 : ((32'd1 << n) - 1);
    case (k)
      0: pv = x ^ y;
      1: pv = ~x ^ y;
      2: pv = x;
      3: pv = ~x;
      default: return 1'bx;
    endcase
    return (pv & mask) == mask;
  endfunction

  task automatic check(int k, int n, logic [31:0] r, logic p, logic g, logic [31:0] x, logic [31:0] y);
    logic [32:0] e;
    logic cout;
    e = ref_res(k, n, x, y, c);
    cout = g | (p & c);
    checks++;
    if (k < 4) begin
      if (((33'(cout) << n) | 33'(r)) !== e || p !== ref_allprop(k, n, x, y)) begin
        failures++;
        $display("FAIL k=%0d n=%0d c=%0d a=%h b=%h got %h cout=%0d p=%0d", k, n, c, x, y, r, cout, p);
      end
    end else begin
      if (r !== e[31:0] || g !== 1'b0) begin
        failures++;
        $display("FAIL logic k=%0d n=%0d a=%h b=%h got %h", k, n, x, y, r);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      ctl = ctl_of(k);
      for (int i = 0; i < 2048; i++) begin
        c = (k < 4) ? i[10] : 1'b0;
        {a5, b5} = i[9:0];
        a1 = i[0]; b1 = i[1];
        a32 = $urandom; b32 = $urandom;
        if (i == 0) begin a32 = '1; b32 = '0; end
        if (i == 1) begin a32 = '0; b32 = '1; end
        #1;
        if (i < 8) check(k, 1, 32'(o1), p1, g1, 32'(a1), 32'(b1));
        check(k, 5, 32'(o5), p5, g5, 32'(a5), 32'(b5));
        check(k, 32, o32, p32, g32, a32, b32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
