// adder: N-bit adder whose structure is chosen by cost when it is generated.
//
// The cost of an adder is its gate count divided by three (rounded down)
// plus its worst-case delay in gate levels. A ripple-carry adder costs
// 5N/3 + 2N+1 and grows linearly; a propagate-generate adder costs more for
// small N but its delay grows with log2(N). The ripple-carry adder is used
// only when its cost is strictly lower. With the published costs that holds
// up to 25 bits; at 26 bits both cost 96 and the propagate-generate adder is
// chosen, so PG_MIN_N = 26 is the crossover. The threshold comes from those
// published cost figures rather than from measuring this RTL.
// Interface: c (carry in), a, b in; sum, cout out. Purely combinational.
module adder #(
  parameter int unsigned N        = 4,
  parameter int unsigned PG_MIN_N = 26
) (
  input  logic         c,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);
  if (N < PG_MIN_N) begin : g_ripple
    v_adder #(.N(N)) u_add (.c(c), .a(a), .b(b), .sum(sum), .cout(cout));
  end else begin : g_pg
    tv_adder #(.N(N)) u_add (.c(c), .a(a), .b(b), .sum(sum), .cout(cout));
  end
endmodule
