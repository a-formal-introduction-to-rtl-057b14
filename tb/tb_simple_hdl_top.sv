// tb_simple_hdl_top: end-to-end test of the top at its default sizes
// (32-bit ALU, 4-bit and 32-bit adders). It runs a short program of ALU
// operations in which each result feeds the next (a 32-bit running sum
// built with add and add-with-carry, then subtract, shifts and logic),
// checks every step against the reference model, and checks both adders on
// random and carry-chain operands. It counts how often each mechanism
// happened: each op-code, a carry out, a borrow, an overflow, a rotate
// through carry, a carry through every bit of each adder. A mechanism that
// never happened counts as a failure.
module tb_simple_hdl_top;
  import alu_model_pkg::*;
  localparam int unsigned AN = 32, SN = 4, WN = 32;
  typedef alu_model #(AN) model_t;

  logic          alu_c, alu_carry, alu_overflow;
  logic [AN-1:0] alu_a, alu_b, alu_out;
  logic [3:0]    alu_op;
  logic          add_c, add_cout, wadd_c, wadd_cout;
  logic [SN-1:0] add_a, add_b, add_sum;
  logic [WN-1:0] wadd_a, wadd_b, wadd_sum;

  int checks = 0, failures = 0;
  int op_seen[16];
  int n_carry = 0, n_borrow = 0, n_overflow = 0, n_rotate_in = 0, n_chain_small = 0, n_chain_wide = 0;

  simple_hdl_top dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic alu_step(logic [3:0] op, logic c, logic [AN-1:0] a, logic [AN-1:0] b);
    logic [AN+1:0] e;
    alu_op = op; alu_c = c; alu_a = a; alu_b = b;
    #1;
    e = model_t::eval(c, a, b, op);
    checks++;
    op_seen[op]++;
    if ({alu_carry, alu_overflow, alu_out} !== e) begin
      failures++;
      $display("FAIL alu op=%b c=%0d a=%h b=%h got %0d %0d %h", op, c, a, b, alu_carry, alu_overflow, alu_out);
    end
    if (alu_carry && op inside {4'b0001, 4'b0010, 4'b0011}) n_carry++;
    if (alu_carry && op inside {[4'b0100:4'b0111]}) n_borrow++;
    if (alu_overflow) n_overflow++;
    if (op == 4'b1000 && c && alu_out[AN-1]) n_rotate_in++;
  endtask

  initial begin
    logic [AN-1:0] acc, hi;
    logic          cy;
    #1;
    // 64-bit accumulation in two 32-bit halves: add low words, add with carry
    // high words, as a program would use the carry output.
    acc = '0; hi = '0;
    for (int i = 0; i < 300; i++) begin
      logic [AN-1:0] x;
      x = $urandom | 32'h8000_0000;
      alu_step(4'b0011, 1'b0, x, acc);
      acc = alu_out; cy = alu_carry;
      alu_step(4'b0010, cy, 32'd0, hi);
      hi = alu_out;
    end
    // Walk the result through every other operation.
    for (int i = 0; i < 400; i++) begin
      logic [3:0] op;
      op = 4'(i % 16);
      alu_step(op, 1'($urandom), acc, hi ^ $urandom);
      acc = alu_out ^ 32'($urandom);
    end
    // Overflow and carry corners.
    alu_step(4'b0011, 0, 32'h7fff_ffff, 32'd1);
    alu_step(4'b0111, 0, 32'd1, 32'h8000_0000);
    alu_step(4'b0001, 0, 32'hffff_ffff, 32'd0);
    alu_step(4'b0101, 0, 32'd0, 32'd0);
    alu_step(4'b0100, 0, 32'h8000_0000, 32'd0);
    alu_step(4'b1000, 1, 32'h0000_0001, 32'd0);

    // The adders.
    for (int i = 0; i < 2000; i++) begin
      add_c = 1'($urandom); add_a = SN'($urandom); add_b = SN'($urandom);
      wadd_c = 1'($urandom); wadd_a = $urandom; wadd_b = $urandom;
      if (i % 100 == 0) begin add_a = '1; add_b = '0; add_c = 1; wadd_a = '1; wadd_b = '0; wadd_c = 1; end
      #1;
      checks += 2;
      if ({add_cout, add_sum} !== (SN+1)'(add_a) + (SN+1)'(add_b) + (SN+1)'(add_c)) begin
        failures++; $display("FAIL small adder c=%0d a=%h b=%h", add_c, add_a, add_b);
      end
      if ({wadd_cout, wadd_sum} !== (WN+1)'(wadd_a) + (WN+1)'(wadd_b) + (WN+1)'(wadd_c)) begin
        failures++; $display("FAIL wide adder c=%0d a=%h b=%h", wadd_c, wadd_a, wadd_b);
      end
      if (add_cout && add_sum == '0 && add_a == '1) n_chain_small++;
      if (wadd_cout && wadd_sum == '0 && wadd_a == '1) n_chain_wide++;
    end

    for (int o = 0; o < 16; o++) begin
      checks++;
      if (op_seen[o] == 0) begin failures++; $display("FAIL op-code %b never ran", 4'(o)); end
    end
    checks += 6;
    if (n_carry == 0)       begin failures++; $display("FAIL no carry out"); end
    if (n_borrow == 0)      begin failures++; $display("FAIL no borrow"); end
    if (n_overflow == 0)    begin failures++; $display("FAIL no overflow"); end
    if (n_rotate_in == 0)   begin failures++; $display("FAIL no rotate through carry"); end
    if (n_chain_small == 0) begin failures++; $display("FAIL no full carry chain in the small adder"); end
    if (n_chain_wide == 0)  begin failures++; $display("FAIL no full carry chain in the wide adder"); end
    $display("carries=%0d borrows=%0d overflows=%0d rotates=%0d chains=%0d/%0d",
             n_carry, n_borrow, n_overflow, n_rotate_in, n_chain_small, n_chain_wide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
