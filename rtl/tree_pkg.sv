// tree_pkg: index arithmetic for the balanced binary look-ahead trees.
//
// A tree over n bit positions is split at its root into a low part of n/2
// positions (rounded down) and a high part of n - n/2, and so on down to
// single positions. Nodes are numbered as in a heap: the root is 1 and the
// children of node k are 2k (low part) and 2k+1 (high part). Such a tree
// has depth tree_depth(n) and fits in node numbers below tree_nodes(n).
// node_size(n, k) is how many bit positions node k covers, or 0 if the tree
// has no node k; node_lo(n, k) is the lowest of those positions.
package tree_pkg;

  function automatic int unsigned tree_depth(int unsigned n);
    return (n > 1) ? $clog2(n) : 0;
  endfunction

  function automatic int unsigned tree_nodes(int unsigned n);
    return 2 ** (tree_depth(n) + 1);
  endfunction

  // Walks from the root to node k, following the bits of k below its
  // leading 1 (most significant first): 0 = low part, 1 = high part.
  function automatic int unsigned node_size(int unsigned n, int unsigned k);
    int unsigned sz;
    sz = n;
    for (int i = 30; i >= 0; i--) begin
      if ((k >> (i + 1)) != 0) begin
        if (sz < 2) return 0;
        sz = k[i] ? sz - sz / 2 : sz / 2;
      end
    end
    return sz;
  endfunction

  function automatic int unsigned node_lo(int unsigned n, int unsigned k);
    int unsigned sz, lo;
    sz = n;
    lo = 0;
    for (int i = 30; i >= 0; i--) begin
      if ((k >> (i + 1)) != 0) begin
        if (k[i]) begin
          lo += sz / 2;
          sz  = sz - sz / 2;
        end else begin
          sz  = sz / 2;
        end
      end
    end
    return lo;
  endfunction

endpackage
