// tb_prefix_adder: self-checking test of the Sklansky prefix adder.
// The 8-bit instance (default width) is checked exhaustively over all
// operand pairs and both carry-in values; a 14-bit and a 25-bit instance
// (the widths the MAC uses) are checked on random operands. The reference
// is the plain integer sum.
module tb_prefix_adder;
  int checks = 0;
  int failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        c8, co8;
  logic [13:0] a14, b14, s14;
  logic        c14, co14;
  logic [24:0] a25, b25, s25;
  logic        c25, co25;

  prefix_adder u_w8 (.a(a8), .b(b8), .cin(c8), .sum(s8), .cout(co8));
  prefix_adder #(.W(14)) u_w14 (.a(a14), .b(b14), .cin(c14), .sum(s14), .cout(co14));
  prefix_adder #(.W(25)) u_w25 (.a(a25), .b(b25), .cin(c25), .sum(s25), .cout(co25));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(i); b8 = 8'(j); c8 = 1'(c);
          #1;
          checks++;
          if ({co8, s8} != 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("W8 mismatch %0d+%0d+%0d -> %0d", i, j, c, {co8, s8});
          end
        end
    for (int n = 0; n < 5000; n++) begin
      a14 = 14'($urandom); b14 = 14'($urandom); c14 = 1'($urandom);
      a25 = 25'($urandom); b25 = 25'($urandom); c25 = 1'($urandom);
      if (n == 0) begin a14 = '1; b14 = '0; c14 = 1'b1; a25 = '1; b25 = '0; c25 = 1'b1; end
      #1;
      checks += 2;
      if ({co14, s14} != 15'(a14) + 15'(b14) + 15'(c14)) begin
        failures++;
        if (failures < 10) $display("W14 mismatch %h+%h+%b", a14, b14, c14);
      end
      if ({co25, s25} != 26'(a25) + 26'(b25) + 26'(c25)) begin
        failures++;
        if (failures < 10) $display("W25 mismatch %h+%h+%b", a25, b25, c25);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
