// prefix_adder: W-bit parallel prefix adder of the Sklansky (divide and
// conquer) form. The three steps, the black/gray/buffer cells and the 8-bit
// topology follow the source paper; the generalisation to any width and the
// carry-in are this design's additions.
//
// Three steps:
//   pre-computation : p_i = a_i ^ b_i, g_i = a_i & b_i
//   carry generation: ceil(log2(W+1)) levels of prefix cells. At level l,
//                     every position whose bit l is set merges with the last
//                     position of the block below it; the others are buffers.
//                     A gray cell is used where the lower group already
//                     reaches the carry-in, a black cell elsewhere.
//   final step      : s_i = p_i ^ c_(i-1)
// The carry-in enters as an extra position 0 with generate = cin and
// propagate = 0, so every carry is a prefix that ends at the carry-in.
// Purely combinational: delay grows with log2(W), fan-out doubles per level.
module prefix_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned M  = W + 1;        // positions including the carry-in
  localparam int unsigned LV = $clog2(M);    // prefix levels

  // Pre-computation, Eq. p = a xor b, g = a and b.
  logic [M-1:0] g0, p0;
  assign g0 = {a & b, cin};
  assign p0 = {a ^ b, 1'b0};

  for (genvar l = 0; l <= LV; l++) begin : lvl
    logic [M-1:0] g, p;
    if (l == 0) begin : base
      assign g = g0;
      assign p = p0;
    end else begin : cells
      for (genvar i = 0; i < M; i++) begin : node
        localparam int unsigned S = l - 1;                  // span exponent
        localparam int unsigned J = ((i >> S) << S) - 1;    // partner position
        if (((i >> S) & 1) == 0) begin : buf_cell
          assign g[i] = lvl[l-1].g[i];
          assign p[i] = lvl[l-1].p[i];
        end else if ((J >> S) == 0) begin : gray
          gray_cell u_gray (
            .g_hi(lvl[l-1].g[i]), .p_hi(lvl[l-1].p[i]),
            .g_lo(lvl[l-1].g[J]), .g(g[i])
          );
          assign p[i] = 1'b0;  // group reaches the carry-in, whose p is 0
        end else begin : black
          black_cell u_black (
            .g_hi(lvl[l-1].g[i]), .p_hi(lvl[l-1].p[i]),
            .g_lo(lvl[l-1].g[J]), .p_lo(lvl[l-1].p[J]),
            .g(g[i]), .p(p[i])
          );
        end
      end
    end
  end

  // Final computation: carry into bit i is the prefix ending at position i.
  logic [M-1:0] c;
  assign c    = lvl[LV].g;
  assign sum  = p0[M-1:1] ^ c[M-2:0];
  assign cout = c[M-1];
endmodule
