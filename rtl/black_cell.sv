// black_cell: prefix operator of a parallel prefix adder. It merges the
// (generate, propagate) pair of the upper group i:k with that of the lower,
// adjacent group k-1:j into the pair of group i:j:
//   G(i:j) = G(i:k) | P(i:k) & G(k-1:j),   P(i:j) = P(i:k) & P(k-1:j).
// Combinational.
module black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g,
  output logic p
);
  assign g = g_hi | (p_hi & g_lo);
  assign p = p_hi & p_lo;
endmodule
