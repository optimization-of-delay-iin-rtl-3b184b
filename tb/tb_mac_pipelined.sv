// tb_mac_pipelined: end-to-end test of the pipelined MAC at its default
// sizes (N = 16, K = 17, ALPHA = 8: 39-bit result). A cycle-level reference
// model keeps the running sum modulo 2^39 as a plain integer and delays it
// through the same two register stages; result is compared after every edge.
// Phases: latency of a single pair after reset; the two operand pairs of the
// reference waveform (62760 x 1280, then 690 x 655: sum 80784750); random
// unsigned and signed pairs with en toggling; long runs of all-ones
// operands that make REG4 and the whole sum wrap; a reset in mid-run.
// Each mechanism (en gating, overflow carries, LSB adder carry-out, REG4
// wrap, signed and unsigned products, reset) is counted and must occur.
module tb_mac_pipelined;
  localparam int N     = 16;
  localparam int ALPHA = 8;
  localparam int RW    = 2*N + ALPHA - 1;

  int checks = 0;
  int failures = 0;
  int n_gated = 0, n_ovf = 0, n_lsb_carry = 0, n_wrap = 0;
  int n_signed = 0, n_unsigned = 0, n_reset = 0;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          en;
  logic          tc;
  logic [N-1:0]  x, y;
  logic [RW-1:0] result;

  mac_pipelined u_dut (
    .clk(clk), .rst_n(rst_n), .en(en), .tc(tc), .x(x), .y(y), .result(result)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model.
  localparam longint MASK = (longint'(1) << RW) - 1;
  logic [N-1:0]  mx, my;
  logic          mtc;
  longint        macc;     // sum held in REG1..REG4
  longint        mres;     // REG_Result

  function automatic longint product(logic [N-1:0] a, logic [N-1:0] b, logic s);
    if (s) return longint'($signed(a)) * longint'($signed(b));
    else   return longint'(a) * longint'(b);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mx <= '0; my <= '0; mtc <= 1'b0; macc <= 0; mres <= 0;
    end else begin
      longint nxt;
      nxt = macc + product(mx, my, mtc);
      if ((nxt & ~MASK) != 0) n_wrap++;
      mres <= en ? macc : 0;
      macc <= nxt & MASK;
      mx <= x; my <= y; mtc <= tc;
      if (mx != '0 && my != '0) begin
        if (mtc) n_signed++;
        else     n_unsigned++;
      end
    end
  end

  // Internal events that the test must provoke.
  always @(posedge clk) begin
    if (rst_n) begin
      if (u_dut.car != '0) n_ovf++;
      if (u_dut.reg3_d) n_lsb_carry++;
      if (!en && macc != 0) n_gated++;
    end
  end

  task automatic check_now(string tag);
    checks++;
    if (longint'(result) != mres) begin
      failures++;
      if (failures < 10) $display("%s: result=%0d expected=%0d", tag, result, mres);
    end
  endtask

  task automatic step(string tag);
    @(posedge clk);
    #1;
    check_now(tag);
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    #2;
    rst_n = 1'b1;
    n_reset++;
  endtask

  initial begin
    int lat;
    rst_n = 1'b0; en = 1'b1; tc = 1'b0; x = '0; y = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Latency: one pair, then zeros; count edges until it shows.
    x = 16'd3; y = 16'd5;
    lat = 0;
    for (int i = 0; i < 6; i++) begin
      @(posedge clk);
      #1;
      x = '0; y = '0;
      check_now("latency");
      if (lat == 0 && result != '0) lat = i + 1;
    end
    checks++;
    if (lat != 3 || result != RW'(15)) begin
      failures++;
      $display("latency %0d edges, result %0d (want 3 edges, 15)", lat, result);
    end

    // Reference waveform pairs.
    do_reset();
    x = 16'd62760; y = 16'd1280; step("wave1");
    x = 16'd690;   y = 16'd655;  step("wave2");
    x = '0; y = '0;
    step("wave3"); step("wave4");
    checks++;
    if (result != RW'(80784750)) begin
      failures++;
      $display("waveform pair sum %0d, want 80784750", result);
    end

    // Random pairs, both modes, en toggling.
    for (int n = 0; n < 6000; n++) begin
      x  = N'($urandom);
      y  = N'($urandom);
      tc = 1'($urandom);
      en = ($urandom % 4) != 0;
      step("random");
    end

    // All-ones operands: REG4 and the full sum wrap.
    en = 1'b1; tc = 1'b0; x = '1; y = '1;
    for (int n = 0; n < 400; n++) step("wrap-up");
    tc = 1'b1; x = 16'h8000; y = 16'h7fff;      // large negative products
    for (int n = 0; n < 400; n++) step("wrap-down");

    // Reset in mid-run, then keep going.
    x = 16'd1234; y = 16'd4321; tc = 1'b0;
    step("pre-reset");
    do_reset();
    #1 check_now("reset");
    for (int n = 0; n < 200; n++) begin
      x = N'($urandom); y = N'($urandom); tc = 1'($urandom);
      step("post-reset");
    end
    en = 1'b1; x = '0; y = '0;
    repeat (3) step("drain");

    $display("events: gated=%0d ovf=%0d lsb_carry=%0d wrap=%0d signed=%0d unsigned=%0d reset=%0d",
             n_gated, n_ovf, n_lsb_carry, n_wrap, n_signed, n_unsigned, n_reset);
    checks++; if (n_gated == 0)     begin failures++; $display("en gating never exercised"); end
    checks++; if (n_ovf == 0)       begin failures++; $display("no overflow carries"); end
    checks++; if (n_lsb_carry == 0) begin failures++; $display("LSB adder never carried"); end
    checks++; if (n_wrap == 0)      begin failures++; $display("sum never wrapped"); end
    checks++; if (n_signed == 0)    begin failures++; $display("no signed products"); end
    checks++; if (n_unsigned == 0)  begin failures++; $display("no unsigned products"); end
    checks++; if (n_reset == 0)     begin failures++; $display("no reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
