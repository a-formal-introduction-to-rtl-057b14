// v_adder: N-bit ripple-carry adder.
//
// A chain of N full adders; the carry input c enters the least significant
// stage and each stage's carry feeds the next more significant one, so the
// worst-case path runs through all N stages (2N+1 gate delays, 5N gates).
// a[0], b[0] and sum[0] are the least significant bits. (The document numbers
// its bits the other way round: its bit N is the least significant.)
// Purely combinational; no clock. Default N = 4, the document's example.
module v_adder #(
  parameter int unsigned N = 4
) (
  input  logic         c,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] carry;

  assign carry[0] = c;

  for (genvar i = 0; i < N; i++) begin : g_stage
    full_adder u_fa (.a(a[i]), .b(b[i]), .c(carry[i]), .sum(sum[i]), .carry(carry[i+1]));
  end

  assign cout = carry[N];
endmodule
