// tb_alpha_adder: self-checking test of the overflow counter REG4
// (ALPHA = 8, six carries as in the 16-bit MAC). Random carry patterns and
// modes are applied every cycle; a reference register adds the number of
// ones, minus one in signed mode, modulo 2^ALPHA. Checks wrap-around in both
// directions, the one-cycle latency and the asynchronous reset.
module tb_alpha_adder;
  localparam int ALPHA = 8;
  localparam int NOV   = 6;
  int checks = 0;
  int failures = 0;
  int wraps = 0;

  logic             clk = 1'b0;
  logic             rst_n;
  logic [NOV-1:0]   car;
  logic             tc;
  logic [ALPHA-1:0] reg4;
  logic [ALPHA-1:0] model;

  alpha_adder #(.ALPHA(ALPHA), .NOV(NOV)) u_dut (
    .clk(clk), .rst_n(rst_n), .car(car), .tc(tc), .reg4(reg4)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; car = '0; tc = 1'b0; model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (reg4 != '0) failures++;
    for (int n = 0; n < 4000; n++) begin
      car = NOV'($urandom);
      tc  = (n % 1000 < 500) ? 1'($urandom) : 1'b1;   // stretch of net decrements
      if (n % 1000 < 250) tc = 1'b0;
      @(posedge clk);
      begin
        logic [ALPHA:0] nxt;
        nxt = {1'b0, model} + (ALPHA+1)'($countones(car)) - (ALPHA+1)'(tc);
        if (nxt[ALPHA]) wraps++;
        model = nxt[ALPHA-1:0];
      end
      #1;
      checks++;
      if (reg4 != model) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d reg4=%0d model=%0d", n, reg4, model);
      end
    end
    // Asynchronous reset in the middle of a cycle.
    #2 rst_n = 1'b0;
    #1;
    checks++;
    if (reg4 != '0) failures++;
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("REG4 never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
