// tb_pp_gen: self-checking test of partial product generation (N = 16).
// For random and corner operands, in both modes, the weighted sum of the
// matrix plus the Baugh-Wooley correction (+2^N - 2^(2N-1) in signed mode)
// must equal the integer product, compared modulo 2^(2N+8).
module tb_pp_gen;
  localparam int N = 16;
  int checks = 0;
  int failures = 0;

  logic [N-1:0] x, y;
  logic         tc;
  logic [N-1:0] pp [N];

  pp_gen u_dut (.x(x), .y(y), .tc(tc), .pp(pp));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expected(logic [N-1:0] a, logic [N-1:0] b, logic s);
    if (s) return longint'($signed(a)) * longint'($signed(b));
    else   return longint'(a) * longint'(b);
  endfunction

  initial begin
    longint sum;
    longint mask;
    mask = (longint'(1) << (2*N + 8)) - 1;
    for (int n = 0; n < 4000; n++) begin
      x  = N'($urandom);
      y  = N'($urandom);
      tc = 1'($urandom);
      case (n)
        0: begin x = '1; y = '1; tc = 1'b0; end
        1: begin x = '1; y = '1; tc = 1'b1; end
        2: begin x = 16'h8000; y = 16'h8000; tc = 1'b1; end
        3: begin x = 16'h8000; y = 16'h7fff; tc = 1'b1; end
        default: ;
      endcase
      #1;
      sum = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (pp[i][j]) sum += longint'(1) << (i + j);
      if (tc) sum += (longint'(1) << N) - (longint'(1) << (2*N - 1));
      checks++;
      if ((sum & mask) != (expected(x, y, tc) & mask)) begin
        failures++;
        if (failures < 10) $display("mismatch x=%h y=%h tc=%b", x, y, tc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
