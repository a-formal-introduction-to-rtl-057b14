// tv_alu_help: N-bit propagate-generate ALU (PG-ALU), built as a balanced
// binary tree with carry look-ahead at every internal node.
//
// A one-bit node is a single t_cell. A wider node covers a low part of N/2
// bits (rounded down) and a high part of the rest, each a smaller node, and
// joins them as the original generator does:
//   carry into the high part   cl = t_carry(c, pl, gl) = gl | c & pl
//   group propagate            p  = pl & pr
//   group generate             g  = t_carry(gl, pr, gr) = gr | gl & pr
// The generator builds this tree by recursion; here the same tree is laid
// out by a loop over heap-numbered nodes (see tree_pkg), node k having the
// children 2k and 2k+1, with the signals of each node in its generate
// block. Numbers with no node in the tree hold constants.
// The delay from inputs to outputs grows with log2(N). The carry out of the
// whole ALU is g | p & c and is formed outside (carry_out_help).
// Fanout: every internal node whose height h (levels of joins below and
// including it) has (h - 1) % 3 == 0 passes mpg to its two parts through
// eight b_gate buffers; the other nodes pass it on as is. Each control
// line, and each buffer output, then feeds at most 8 of the buffers or
// t_cells below it, as in the original generator. The buffers do not
// change the logic, and synthesis may remove them.
// Interface: c (carry into bit 0), a, b, mpg (control, see alu_pkg) in;
// p, g, out out. Purely combinational.
module tv_alu_help
  import alu_pkg::*;
  import hdl_prim_pkg::*;
  import tree_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic         c,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  mpg_t         mpg,
  output logic         p,
  output logic         g,
  output logic [N-1:0] out
);
  localparam int unsigned K = tree_nodes(N);

  for (genvar k = 1; k < K; k++) begin : g_node
    localparam int unsigned SZ = node_size(N, k);
    localparam int unsigned LO = node_lo(N, k);
    localparam int unsigned H  = tree_depth(SZ);
    logic np, ng, nc;   // this node's propagate, generate and carry in
    mpg_t nm;           // the control vector as it reaches this node

    if (SZ == 1) begin : g_leaf
      t_cell u_cell (.c(nc), .a(a[LO]), .b(b[LO]), .mpg(nm), .p(np), .g(ng), .out(out[LO]));
    end else if (SZ >= 2) begin : g_join
      mpg_t cm;         // control vector handed to both parts
      if ((H - 1) % 3 == 0) begin : g_buf
        for (genvar i = 0; i < $bits(mpg_t); i++) begin : g_bit
          b_gate #(.FN(B_BUF)) u_buf (.in(nm[i]), .out(cm[i]));
        end
      end else begin : g_nobuf
        assign cm = nm;
      end
      assign g_node[2*k].nm   = cm;
      assign g_node[2*k+1].nm = cm;
      assign g_node[2*k].nc = nc;
      t_carry u_cl (.c(nc), .p(g_node[2*k].np), .g(g_node[2*k].ng), .cout(g_node[2*k+1].nc));
      b_gate #(.FN(B_AND)) u_p (.in({g_node[2*k+1].np, g_node[2*k].np}), .out(np));
      t_carry u_g (.c(g_node[2*k].ng), .p(g_node[2*k+1].np), .g(g_node[2*k+1].ng), .cout(ng));
    end else begin : g_absent
      assign np = 1'b0;
      assign ng = 1'b0;
      assign nc = 1'b0;
      assign nm = '0;
    end
  end

  assign g_node[1].nc = c;
  assign g_node[1].nm = mpg;
  assign p = g_node[1].np;
  assign g = g_node[1].ng;
endmodule
