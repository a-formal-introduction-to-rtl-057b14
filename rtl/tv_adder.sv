// tv_adder: N-bit propagate-generate (carry look-ahead) adder.
//
// The look-ahead tree (tv_adder_tree) is a balanced binary tree over the N
// bit positions, so the carry path grows with log2(N) instead of N. The carry
// out of the whole adder is one more t_carry at the root: cout = g | p & c.
// The document names this adder and says its look-ahead follows a tree, but
// does not print its cells; the tree here mirrors its propagate-generate ALU.
// a[0], b[0], sum[0] are least significant. Purely combinational.
module tv_adder #(
  parameter int unsigned N = 32
) (
  input  logic         c,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic p, g;

  tv_adder_tree #(.N(N)) u_tree (.c(c), .a(a), .b(b), .p(p), .g(g), .sum(sum));
  t_carry u_cout (.c(c), .p(p), .g(g), .cout(cout));
endmodule
