// alpha_adder: the small overflow accumulator of the MAC (register REG4).
//
// Every cycle the reduction tree hands over NOV overflow carries, each of
// weight 2^(2N-1). This block counts them (a popcount of NOV bits) and adds
// the count to the ALPHA-bit register REG4 with a ripple chain: a half adder
// in bit 0, full adders above and a plain XOR in the top bit, whose carry
// would leave the accumulator. In signed mode (tc = 1) it also subtracts one,
// the 2^(2N-1) part of the Baugh-Wooley correction, by adding an all-ones
// word. REG4 therefore holds bits 2N-1 .. 2N+ALPHA-2 of the accumulated sum,
// less whatever is still held in carry-save form in REG1..REG3.
// The ripple chain and the "subtract one" in signed mode follow the source
// paper; counting any number of carries exactly, instead of combining two of
// them with an OR and an AND gate, is this design's choice.
// Timing: REG4 updates on the rising edge of clk; asynchronous active-low
// reset clears it. Latency one cycle from car/tc to reg4.
module alpha_adder #(
  parameter int unsigned ALPHA = mac_pkg::MAC_ALPHA,
  parameter int unsigned NOV   = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NOV-1:0]   car,     // overflow carries, equal weight
  input  logic             tc,      // signed mode: subtract one
  output logic [ALPHA-1:0] reg4
);
  localparam int unsigned CW = $clog2(NOV + 1);

  // Carry counter: number of ones on car.
  logic [CW-1:0] cnt;
  always_comb begin
    cnt = '0;
    for (int i = 0; i < NOV; i++) cnt = cnt + CW'(car[i]);
  end

  // Word added to REG4: cnt, minus one in signed mode.
  logic [ALPHA-1:0] addend;
  assign addend = ALPHA'(cnt) + {ALPHA{tc}};

  // Ripple chain: HA, FA ... FA, XOR.
  logic [ALPHA-1:0] sc;    // sum bits
  logic [ALPHA-1:0] cc;    // carry out of each bit
  ha u_ha0 (.a(reg4[0]), .b(addend[0]), .s(sc[0]), .co(cc[0]));
  for (genvar i = 1; i < ALPHA - 1; i++) begin : chain
    fa u_fa (.a(reg4[i]), .b(addend[i]), .ci(cc[i-1]), .s(sc[i]), .co(cc[i]));
  end
  if (ALPHA > 1) begin : msb
    assign sc[ALPHA-1] = reg4[ALPHA-1] ^ addend[ALPHA-1] ^ cc[ALPHA-2];
    assign cc[ALPHA-1] = 1'b0;   // carry out of the accumulator is dropped
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reg4 <= '0;
    else        reg4 <= sc;
  end
endmodule
