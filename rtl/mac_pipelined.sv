// mac_pipelined: two-stage pipelined multiply-accumulate unit, N-bit operands,
// (2N+ALPHA-1)-bit result, unsigned or two's complement selected per operand
// pair by tc.
//
// Idea: the running sum is never fully added up while it accumulates. Stage 1
// feeds the accumulator back in carry-save form (REG1, REG2, REG3) into the
// partial product matrix of the next product, so one Wallace tree does both
// the multiplication and the accumulation. Only the lowest L = 2N-1-K
// columns are carry-propagated every cycle (L-bit prefix adder); the upper K
// columns stay as two rows, and the carries out of the top column are only
// counted, by the ALPHA-bit adder into REG4. Stage 2 resolves the redundant
// upper part with one (K+ALPHA)-bit parallel prefix adder into REG_Result.
// Its operands pass through AND gates driven by en, so the final adder only
// toggles when a result is wanted.
//
// Pipeline, one operand pair per cycle, no stalls:
//   edge 1: REG_X, REG_Y, tc_q <= x, y, tc
//   edge 2: REG1..REG4 <= state + REG_X * REG_Y   (partial product reduction)
//   edge 3: REG_Result <= en ? state : 0          (final addition)
// so a pair applied before edge t shows up in result after edge t+2, and
// result always holds the sum of every pair applied up to two edges earlier.
// The sum wraps modulo 2^(2N+ALPHA-1); in signed mode it is two's complement.
// rst_n (asynchronous, active low) clears every register, and so the sum.
// The register structure, the enable gating and the sizes (N = 16, ALPHA = 8,
// 39-bit result) follow the source paper; K = 17, the reset, the tc input and
// the zero shown while en is low are this design's choices.
module mac_pipelined
  import mac_pkg::*;
#(
  parameter int unsigned N     = MAC_N,
  parameter int unsigned K     = MAC_K,
  parameter int unsigned ALPHA = MAC_ALPHA
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,       // show the accumulated sum
  input  logic                 tc,       // operands are two's complement
  input  logic [N-1:0]         x,
  input  logic [N-1:0]         y,
  output logic [2*N+ALPHA-2:0] result
);
  localparam int unsigned L   = 2*N - 1 - K;
  localparam int unsigned NOV = wt_ovf(N, K);
  localparam int unsigned RW  = 2*N + ALPHA - 1;

  // Input registers.
  logic [N-1:0] reg_x, reg_y;
  logic         tc_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_x <= '0;
      reg_y <= '0;
      tc_q  <= 1'b0;
    end else begin
      reg_x <= x;
      reg_y <= y;
      tc_q  <= tc;
    end
  end

  // Stage 1: partial products, Wallace reduction with accumulator feedback.
  logic [N-1:0]   pp [N];
  logic [2*N-2:0] reg1, reg1_d;
  logic [K-1:0]   reg2, reg2_d;
  logic           reg3, reg3_d;
  logic [NOV-1:0] car;
  logic [ALPHA-1:0] reg4;

  pp_gen #(.N(N)) u_ppg (
    .x(reg_x), .y(reg_y), .tc(tc_q), .pp(pp)
  );

  pp_reduction #(.N(N), .K(K), .NOV(NOV)) u_ppr (
    .pp(pp), .tc(tc_q),
    .reg1(reg1), .reg2(reg2), .reg3(reg3),
    .reg1_d(reg1_d), .reg2_d(reg2_d), .reg3_d(reg3_d),
    .car(car)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg1 <= '0;
      reg2 <= '0;
      reg3 <= 1'b0;
    end else begin
      reg1 <= reg1_d;
      reg2 <= reg2_d;
      reg3 <= reg3_d;
    end
  end

  alpha_adder #(.ALPHA(ALPHA), .NOV(NOV)) u_alpha (
    .clk(clk), .rst_n(rst_n), .car(car), .tc(tc_q), .reg4(reg4)
  );

  // Stage 2: operand gating and final (K+ALPHA)-bit addition.
  logic [K+ALPHA-1:0] fin_a, fin_b, fin_sum;
  logic               fin_cin, fin_cout;
  logic [L-1:0]       low_g;
  assign fin_a   = {reg4, reg1[2*N-2:L]} & {(K+ALPHA){en}};
  assign fin_b   = {{ALPHA{1'b0}}, reg2 & {K{en}}};
  assign fin_cin = reg3 & en;
  assign low_g   = reg1[L-1:0] & {L{en}};

  prefix_adder #(.W(K+ALPHA)) u_final_add (
    .a(fin_a), .b(fin_b), .cin(fin_cin), .sum(fin_sum), .cout(fin_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) result <= '0;
    else        result <= RW'({fin_sum, low_g});
  end

  // fin_cout is the carry past bit 2N+ALPHA-2: the sum wraps there.
  logic unused_cout;
  assign unused_cout = fin_cout;
endmodule
