// pp_reduction: first pipeline stage's reduction network. It adds the N x N
// partial products of the new operand pair to the accumulator state, which
// is fed back in carry-save form, without propagating carries across the
// word except in the lowest L = 2N-1-K columns.
//
// Matrix (column c has weight 2^c): the partial products, REG1 (columns
// 0..2N-2), REG2 (columns L..2N-2), REG3 (column L) and, in signed mode, the
// Baugh-Wooley constant tc in column N. A Wallace tree (full adders on every
// group of three bits of a column, a half adder on a leftover pair, stage
// after stage) brings columns 0..2N-2 down to two rows. Carries that leave
// column 2N-2 are not compressed further: they come out on car[] as NOV
// separate bits of weight 2^(2N-1), for the alpha-bit adder to count. The
// tree shape, the stage count and NOV are worked out at elaboration by the
// functions of mac_pkg (N = 16, K = 17: 6 stages, NOV = 6).
//
// The lowest L columns of the two rows are added by an L-bit parallel prefix
// adder: its sum becomes the low part of the next REG1 and its carry-out the
// next REG3. The upper K columns stay as two rows: the first row becomes the
// upper part of the next REG1, the second row the next REG2.
// Invariant: reg1_d + reg2_d*2^L + reg3_d*2^L + sum(car)*2^(2N-1)
//          = reg1 + reg2*2^L + reg3*2^L + (product matrix value) + tc*2^N.
// The matrix with fed-back REG1..REG3, the (2N-1-K)-bit LSB addition and the
// Wallace tree follow the source paper. Passing on every overflow carry (the
// paper's earlier Dadda version has exactly two) and using a prefix adder for
// the LSB part are this design's choices.
// Purely combinational; the registers sit in the top module.
module pp_reduction
  import mac_pkg::*;
#(
  parameter int unsigned N   = MAC_N,
  parameter int unsigned K   = MAC_K,
  parameter int unsigned NOV = wt_ovf(N, K)
) (
  input  logic [N-1:0]   pp [N],       // pp[i][j]: weight 2^(i+j)
  input  logic           tc,           // Baugh-Wooley constant (signed mode)
  input  logic [2*N-2:0] reg1,
  input  logic [K-1:0]   reg2,
  input  logic           reg3,
  output logic [2*N-2:0] reg1_d,
  output logic [K-1:0]   reg2_d,
  output logic           reg3_d,
  output logic [NOV-1:0] car           // overflow carries, weight 2^(2N-1)
);
  localparam int NC = 2*N;
  localparam int L  = 2*N - 1 - K;
  localparam int NS = wt_stages(N, K);
  localparam int MH = wt_maxh(N, K);

  for (genvar s = 0; s <= NS; s++) begin : stg
    logic [MH-1:0] b  [NC];   // bits of each column after s stages
    logic [MH-1:0] cy [NC];   // carries made from each column by stage s
    // Column heights before this stage's compression (one call per stage).
    localparam wt_cols_t HPREV = (s > 0) ? wt_heights(N, K, s-1) : '0;

    for (genvar ci = 0; ci < NC; ci++) begin : col
      if (s == 0) begin : init
        assign cy[ci] = '0;
        if (ci == NC - 1) begin : empty
          assign b[ci] = '0;
        end else begin : fill
          localparam int IMIN = (ci > N - 1) ? ci - (N - 1) : 0;
          localparam int IMAX = (ci < N - 1) ? ci : N - 1;
          localparam int P1   = IMAX - IMIN + 1;            // REG1 position
          localparam int P2   = P1 + 1;                     // REG2 position
          localparam int P3   = P2 + ((ci >= L) ? 1 : 0);   // REG3 position
          localparam int P4   = P3 + ((ci == L) ? 1 : 0);   // tc position
          localparam int H    = P4 + ((ci == N) ? 1 : 0);
          for (genvar i = IMIN; i <= IMAX; i++) begin : ppbit
            assign b[ci][i-IMIN] = pp[i][ci-i];
          end
          assign b[ci][P1] = reg1[ci];
          if (ci >= L) begin : r2
            assign b[ci][P2] = reg2[ci-L];
          end
          if (ci == L) begin : r3
            assign b[ci][P3] = reg3;
          end
          if (ci == N) begin : bw
            assign b[ci][P4] = tc;
          end
          for (genvar q = H; q < MH; q++) begin : zero
            assign b[ci][q] = 1'b0;
          end
        end
      end else begin : red
        localparam int HP  = int'(HPREV[ci*8 +: 8]);
        localparam int CIN = (ci > 0) ? wt_carries(int'(HPREV[(ci-1)*8 +: 8])) : 0;
        if (ci == NC - 1) begin : top
          // Overflow column: keep what is there, append the new carries.
          for (genvar q = 0; q < HP; q++) begin : keep
            assign b[ci][q] = stg[s-1].b[ci][q];
          end
          for (genvar q = 0; q < CIN; q++) begin : cin
            assign b[ci][HP+q] = cy[ci-1][q];
          end
          for (genvar q = HP + CIN; q < MH; q++) begin : zero
            assign b[ci][q] = 1'b0;
          end
          assign cy[ci] = '0;
        end else begin : cmp
          localparam int NF  = HP / 3;
          localparam int NH  = ((HP % 3) == 2) ? 1 : 0;
          localparam int NP  = ((HP % 3) == 1) ? 1 : 0;
          localparam int OWN = NF + NH + NP;
          for (genvar g = 0; g < NF; g++) begin : fas
            fa u_fa (
              .a (stg[s-1].b[ci][3*g]),
              .b (stg[s-1].b[ci][3*g+1]),
              .ci(stg[s-1].b[ci][3*g+2]),
              .s (b[ci][g]),
              .co(cy[ci][g])
            );
          end
          if (NH == 1) begin : has
            ha u_ha (
              .a (stg[s-1].b[ci][3*NF]),
              .b (stg[s-1].b[ci][3*NF+1]),
              .s (b[ci][NF]),
              .co(cy[ci][NF])
            );
          end
          if (NP == 1) begin : pass
            assign b[ci][NF] = stg[s-1].b[ci][3*NF];
          end
          for (genvar q = NF + NH; q < MH; q++) begin : cyzero
            assign cy[ci][q] = 1'b0;
          end
          for (genvar q = 0; q < CIN; q++) begin : cin
            assign b[ci][OWN+q] = cy[ci-1][q];
          end
          for (genvar q = OWN + CIN; q < MH; q++) begin : zero
            assign b[ci][q] = 1'b0;
          end
        end
      end
    end
  end

  // Two rows left in columns 0..2N-2.
  logic [2*N-2:0] row0, row1;
  for (genvar ci = 0; ci < NC - 1; ci++) begin : rows
    assign row0[ci] = stg[NS].b[ci][0];
    assign row1[ci] = stg[NS].b[ci][1];
  end
  assign car = stg[NS].b[NC-1][NOV-1:0];

  // Carry-propagate addition of the lowest L columns only.
  prefix_adder #(.W(L)) u_lsb_add (
    .a   (row0[L-1:0]),
    .b   (row1[L-1:0]),
    .cin (1'b0),
    .sum (reg1_d[L-1:0]),
    .cout(reg3_d)
  );
  assign reg1_d[2*N-2:L] = row0[2*N-2:L];
  assign reg2_d          = row1[2*N-2:L];
endmodule
