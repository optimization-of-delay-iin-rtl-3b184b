// tb_pp_reduction: self-checking test of the Wallace reduction network with
// accumulator feedback (N = 16, K = 17). Random partial product matrices and
// random accumulator rows go in; the value of what comes out,
//   reg1_d + (reg2_d + reg3_d) * 2^L + (number of ones on car) * 2^(2N-1),
// must equal the value of what went in,
//   reg1 + (reg2 + reg3) * 2^L + sum of pp[i][j] * 2^(i+j) + tc * 2^N.
// A second instance at N = 8, K = 9 gets the same check.
// It also checks that the state it hands back is bounded (no bit above
// column 2N-2 is lost) and that the overflow carries are used.
module tb_pp_reduction;
  import mac_pkg::*;
  localparam int N   = 16;
  localparam int K   = 17;
  localparam int L   = 2*N - 1 - K;
  localparam int NOV = wt_ovf(N, K);
  int checks = 0;
  int failures = 0;
  int ovf_seen = 0;

  logic [N-1:0]   pp [N];
  logic           tc;
  logic [2*N-2:0] reg1, reg1_d;
  logic [K-1:0]   reg2, reg2_d;
  logic           reg3, reg3_d;
  logic [NOV-1:0] car;

  pp_reduction u_dut (
    .pp(pp), .tc(tc), .reg1(reg1), .reg2(reg2), .reg3(reg3),
    .reg1_d(reg1_d), .reg2_d(reg2_d), .reg3_d(reg3_d), .car(car)
  );

  // Second instance at N = 8, K = 9, the size of the 8-bit Wallace example.
  localparam int N8   = 8;
  localparam int K8   = 9;
  localparam int L8   = 2*N8 - 1 - K8;
  localparam int NOV8 = wt_ovf(N8, K8);
  logic [N8-1:0]    pp8 [N8];
  logic             tc8;
  logic [2*N8-2:0]  r1_8, r1d_8;
  logic [K8-1:0]    r2_8, r2d_8;
  logic             r3_8, r3d_8;
  logic [NOV8-1:0]  car8;

  pp_reduction #(.N(N8), .K(K8)) u_dut8 (
    .pp(pp8), .tc(tc8), .reg1(r1_8), .reg2(r2_8), .reg3(r3_8),
    .reg1_d(r1d_8), .reg2_d(r2d_8), .reg3_d(r3d_8), .car(car8)
  );

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint vin, vout;
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < N; i++) pp[i] = N'($urandom);
      reg1 = (2*N-1)'({$urandom, $urandom});
      reg2 = K'($urandom);
      reg3 = 1'($urandom);
      tc   = 1'($urandom);
      if (n == 0) begin
        for (int i = 0; i < N; i++) pp[i] = '1;
        reg1 = '1; reg2 = '1; reg3 = 1'b1; tc = 1'b1;
      end
      if (n == 1) begin
        for (int i = 0; i < N; i++) pp[i] = '0;
        reg1 = '0; reg2 = '0; reg3 = 1'b0; tc = 1'b0;
      end
      #1;
      vin = longint'(reg1) + ((longint'(reg2) + longint'(reg3)) << L) + (longint'(tc) << N);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (pp[i][j]) vin += longint'(1) << (i + j);
      vout = longint'(reg1_d) + ((longint'(reg2_d) + longint'(reg3_d)) << L)
           + (longint'($countones(car)) << (2*N - 1));
      if (car != '0) ovf_seen++;
      for (int i = 0; i < N8; i++) pp8[i] = N8'($urandom);
      r1_8 = (2*N8-1)'($urandom); r2_8 = K8'($urandom);
      r3_8 = 1'($urandom); tc8 = 1'($urandom);
      #1;
      begin
        longint v8in, v8out;
        v8in = longint'(r1_8) + ((longint'(r2_8) + longint'(r3_8)) << L8) + (longint'(tc8) << N8);
        for (int i = 0; i < N8; i++)
          for (int j = 0; j < N8; j++)
            if (pp8[i][j]) v8in += longint'(1) << (i + j);
        v8out = longint'(r1d_8) + ((longint'(r2d_8) + longint'(r3d_8)) << L8)
              + (longint'($countones(car8)) << (2*N8 - 1));
        checks++;
        if (v8in != v8out) begin
          failures++;
          if (failures < 10) $display("N=8 mismatch n=%0d in=%0d out=%0d", n, v8in, v8out);
        end
      end
      checks++;
      if (vin != vout) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d in=%0d out=%0d", n, vin, vout);
      end
    end
    checks++;
    if (ovf_seen == 0) begin
      failures++;
      $display("overflow carries never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
