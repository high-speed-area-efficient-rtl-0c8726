// Self-checking testbench of dim1_mult.
// N = 8 (the default): every A in 0..2^n and every B in 0..2^n-1, 65792
// products. A 16-bit instance gets 40000 random operand pairs plus the
// A = 0, B = 0, A = 2^n and B = 2^n-1 corners. The expected result is
// d[A*B] = (A*B - 1) mod 2^n+1 computed with integer arithmetic, with
// d[A] = (A - 1) mod 2^n+1 applied to the input.
module tb_dim1_mult;
  localparam int N1 = 8;
  localparam int N2 = 16;
  localparam longint M1 = (64'd1 << N1) + 1;
  localparam longint M2 = (64'd1 << N2) + 1;

  int checks = 0, failures = 0;
  logic [N1:0]   da1;
  logic [N1-1:0] b1;
  logic [N1:0]   dp1;
  logic [N2:0]   da2;
  logic [N2-1:0] b2;
  logic [N2:0]   dp2;

  dim1_mult dut8 (.da(da1), .b(b1), .dp(dp1));
  dim1_mult #(.N(N2)) dut16 (.da(da2), .b(b2), .dp(dp2));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint av, bv, exp_v;
    da2 = '0; b2 = '0;
    for (av = 0; av < M1; av++) begin
      for (bv = 0; bv < (1 << N1); bv++) begin
        da1 = (N1+1)'((av + M1 - 1) % M1);
        b1  = N1'(bv);
        #1;
        exp_v = (av * bv + M1 - 1) % M1;
        checks++;
        if (longint'(dp1) != exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL n=8 A=%0d B=%0d dp=%0d exp=%0d", av, bv, dp1, exp_v);
        end
      end
    end
    for (int k = 0; k < 40000; k++) begin
      case (k)
        0: begin av = 0;        bv = $urandom_range(65535); end
        1: begin av = $urandom_range(65536); bv = 0; end
        2: begin av = 65536;    bv = 65535; end
        3: begin av = 1;        bv = 65535; end
        default: begin av = $urandom_range(65536); bv = $urandom_range(65535); end
      endcase
      da2 = (N2+1)'((av + M2 - 1) % M2);
      b2  = N2'(bv);
      #1;
      exp_v = (av * bv + M2 - 1) % M2;
      checks++;
      if (longint'(dp2) != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL n=16 A=%0d B=%0d dp=%0d exp=%0d", av, bv, dp2, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
