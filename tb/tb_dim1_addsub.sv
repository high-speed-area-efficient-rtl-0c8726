// Self-checking testbench of dim1_addsub, N = 8: every pair A, B in 0..2^n
// in both modes (132,098 cases), compared with (A +/- B - 1) mod 2^n+1
// worked out as integers from the normal-form values.
module tb_dim1_addsub;
  localparam int N = 8;
  localparam int M = (1 << N) + 1;

  int checks = 0, failures = 0;
  logic [N:0] da, db, dr;
  logic       sub;

  dim1_addsub #(.N(N)) dut (.da(da), .db(db), .sub(sub), .dr(dr));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int s = 0; s < 2; s++) begin
      for (int a = 0; a < M; a++) begin
        for (int b = 0; b < M; b++) begin
          sub = s[0];
          da = (N+1)'((a + M - 1) % M);
          db = (N+1)'((b + M - 1) % M);
          #1;
          e = (s != 0) ? (a - b + 2 * M - 1) % M : (a + b + M - 1) % M;
          checks++;
          if (int'(dr) != e) begin
            failures++;
            if (failures < 10) $display("FAIL sub=%0d A=%0d B=%0d dr=%0d exp=%0d", s, a, b, dr, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
