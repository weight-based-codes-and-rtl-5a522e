// two_rail_checker -- reduces N two-rail pairs to one.
//
// Each pair (t, f) is valid when t != f.  A two-rail cell merges two pairs a
// and b into
//   t = a.t & b.t | a.f & b.f
//   f = a.t & b.f | a.f & b.t
// which is valid exactly when both inputs are.  The cells form a balanced
// binary tree stored heap-fashion: node k has children 2k+1 and 2k+2, the N
// leaves are nodes N-1 .. 2N-2 and the root is node 0.  This is the
// comparison stage of a Berger-style checker: it compares the computed sum
// with the check bits and keeps the totally self-checking property, because
// every cell sees all four valid input combinations under a handful of code
// words.  The cell equations are the standard ones; the document only
// relies on an existing Berger checker for this stage.
//
// Interface: in[N] pairs, out pair.  Combinational.
module two_rail_checker import wbc_pkg::*; #(
  parameter int unsigned N = 7
) (
  input  tr_pair_t [N-1:0] in,
  output tr_pair_t         out
);

  tr_pair_t node [2*N-1];

  for (genvar l = 0; l < N; l++) begin : g_leaf
    assign node[N-1+l] = in[l];
  end

  for (genvar k = 0; k < N - 1; k++) begin : g_cell
    tr_pair_t a, b;
    assign a = node[2*k+1];
    assign b = node[2*k+2];
    assign node[k] = '{t: (a.t & b.t) | (a.f & b.f),
                       f: (a.t & b.f) | (a.f & b.t)};
  end

  assign out = node[0];

endmodule
