// alu_checker: drives one N-bit ALU instance with every op-code on corner
// and random operands and compares it with alu_model. Used by the ALU
// testbenches to cover several widths with one piece of code. 'start'
// begins a run of ROUNDS random rounds; 'done' rises when it has finished,
// with the numbers of checks and failures and counts of how often carry,
// overflow and a carry through every bit were seen.
module alu_checker #(
  parameter int unsigned N      = 32,
  parameter int unsigned ROUNDS = 200
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   carries,
  output int   overflows,
  output int   full_chains
);
  typedef alu_model_pkg::alu_model #(N) model_t;

  logic         c, carry, overflow;
  logic [N-1:0] a, b, out;
  logic [3:0]   op;
  logic [N+1:0] e;

  new_alu #(.N(N)) dut (.c(c), .a(a), .b(b), .op(op), .out(out), .carry(carry), .overflow(overflow));

  task automatic one();
    #1;
    e = model_t::eval(c, a, b, op);
    checks++;
    if ({carry, overflow, out} !== e) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d op=%b c=%0d a=%h b=%h got c=%0d v=%0d out=%h want c=%0d v=%0d out=%h",
                 N, op, c, a, b, carry, overflow, out, e[N+1], e[N], e[N-1:0]);
    end
    if (carry && op inside {[4'b0001:4'b0111]}) carries++;
    if (overflow) overflows++;
    // a carry that enters bit 0 and leaves the top bit
    if (op == 4'b0001 && a == '1) full_chains++;
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; carries = 0; overflows = 0; full_chains = 0;
    wait (start);
    for (int o = 0; o < 16; o++) begin
      op = 4'(o);
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++)
          for (int k = 0; k < 2; k++) begin
            a = model_t::corner(i); b = model_t::corner(j); c = 1'(k);
            one();
          end
      for (int r = 0; r < ROUNDS; r++) begin
        a = model_t::random_word(); b = model_t::random_word(); c = 1'($urandom);
        one();
      end
    end
    done = 1;
  end
endmodule
