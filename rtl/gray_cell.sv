// gray_cell: the reduced prefix operator used where the lower group already
// reaches the carry-in, so only the group generate (the carry) is needed:
//   G(i:j) = G(i:k) | P(i:k) & G(k-1:j).
// Combinational.
module gray_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g
);
  assign g = g_hi | (p_hi & g_lo);
endmodule
