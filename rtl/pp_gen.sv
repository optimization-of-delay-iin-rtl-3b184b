// pp_gen: partial product generation for an N x N multiplication.
//
// pp[i][j] is the bit of weight 2^(i+j): x[j] & y[i] (one AND gate per bit).
// With tc = 1 the operands are two's complement and the Baugh-Wooley form is
// produced instead: the 2(N-1) bits where exactly one of the indices is N-1
// are inverted. The Baugh-Wooley correction, +2^N - 2^(2N-1), is not part of
// this matrix: the reduction tree adds tc in column N and the alpha-bit adder
// subtracts tc in column 2N-1, so one array serves both number formats.
// AND gates and the use of Baugh-Wooley follow the source paper; the split
// of the correction and the per-pair mode input are this design's choices.
// Purely combinational.
module pp_gen #(
  parameter int unsigned N = mac_pkg::MAC_N
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         tc,           // 1: signed (two's complement) operands
  output logic [N-1:0] pp [N]        // pp[i][j]: weight 2^(i+j)
);
  for (genvar i = 0; i < N; i++) begin : row
    for (genvar j = 0; j < N; j++) begin : bitpos
      if ((i == N-1) != (j == N-1)) begin : mixed
        assign pp[i][j] = (x[j] & y[i]) ^ tc;
      end else begin : plain
        assign pp[i][j] = x[j] & y[i];
      end
    end
  end
endmodule
