// tb_t_cell: checks the one-bit ALU cell for every control vector used by
// the ALU and every a, b, c: p and g must equal the chosen functions of a
// and b, and out must be the sum bit p ^ c.
module tb_t_cell;
  import alu_pkg::*;
  logic c, a, b, p, g, out;
  mpg_t ctl;
  int checks = 0, failures = 0;

  t_cell dut (.c(c), .a(a), .b(b), .mpg(ctl), .p(p), .g(g), .out(out));

  // The (propagate, generate) function pairs, written as expressions.
  function automatic logic [1:0] expect_pg(int k, logic x, logic y);
    case (k)
      0: return {x ^ y, x & y};        // add
      1: return {x, 1'b0};             // increment, move
      2: return {~x, 1'b0};            // negate, not
      3: return {~x, x};               // decrement
      4: return {~x ^ y, ~x & y};      // subtract
      5: return {x | y, 1'b0};         // or
      default: return {x & y, 1'b0};   // and
    endcase
  endfunction

  function automatic mpg_t ctl_of(int k);
    case (k)
      0: return '{prop: 4'b0110, gen: 4'b1000};
      1: return '{prop: 4'b1100, gen: 4'b0000};
      2: return '{prop: 4'b0011, gen: 4'b0000};
      3: return '{prop: 4'b0011, gen: 4'b1100};
      4: return '{prop: 4'b1001, gen: 4'b0010};
      5: return '{prop: 4'b1110, gen: 4'b0000};
      default: return '{prop: 4'b1000, gen: 4'b0000};
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
    for (int k = 0; k < 7; k++) begin
      for (int i = 0; i < 8; i++) begin
        ctl = ctl_of(k);
        {a, b, c} = 3'(i);
        #1;
        checks++;
        if ({p, g} !== expect_pg(k, a, b) || out !== (expect_pg(k, a, b) >> 1) ^ c) begin
          failures++;
          $display("FAIL k=%0d a=%0d b=%0d c=%0d p=%0d g=%0d out=%0d", k, a, b, c, p, g, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
