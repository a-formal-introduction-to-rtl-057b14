// tv_adder_tree: the look-ahead tree of the propagate-generate adder.
//
// The same balanced tree as the propagate-generate ALU (tv_alu_help): a
// one-bit node is a half adder giving p = a ^ b and g = a & b, with
// sum = p ^ c; a wider node covers a low part of N/2 bits and a high part,
// carries into the high part with t_carry(c, pl, gl), and forms
// p = pl & pr and g = t_carry(gl, pr, gr). Nodes are heap-numbered (see
// tree_pkg); numbers with no node in the tree hold constants.
// Interface: c (carry into bit 0), a, b in; p, g (group propagate and
// generate), sum out. Purely combinational.
module tv_adder_tree
  import hdl_prim_pkg::*;
  import tree_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic         c,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         p,
  output logic         g,
  output logic [N-1:0] sum
);
  localparam int unsigned K = tree_nodes(N);

  for (genvar k = 1; k < K; k++) begin : g_node
    localparam int unsigned SZ = node_size(N, k);
    localparam int unsigned LO = node_lo(N, k);
    logic np, ng, nc;   // this node's propagate, generate and carry in

    if (SZ == 1) begin : g_leaf
      half_adder u_ha (.a(a[LO]), .b(b[LO]), .sum(np), .carry(ng));
      b_gate #(.FN(B_XOR)) u_sum (.in({nc, np}), .out(sum[LO]));
    end else if (SZ >= 2) begin : g_join
      assign g_node[2*k].nc = nc;
      t_carry u_cl (.c(nc), .p(g_node[2*k].np), .g(g_node[2*k].ng), .cout(g_node[2*k+1].nc));
      b_gate #(.FN(B_AND)) u_p (.in({g_node[2*k+1].np, g_node[2*k].np}), .out(np));
      t_carry u_g (.c(g_node[2*k].ng), .p(g_node[2*k+1].np), .g(g_node[2*k+1].ng), .cout(ng));
    end else begin : g_absent
      assign np = 1'b0;
      assign ng = 1'b0;
      assign nc = 1'b0;
    end
  end

  assign g_node[1].nc = c;
  assign p = g_node[1].np;
  assign g = g_node[1].ng;
endmodule
