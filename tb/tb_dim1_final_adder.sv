// Self-checking testbench of dim1_final_adder, N = 8, all 65536 operand
// pairs. The (n+1)-bit result must equal (x + y + 1) mod 2^n+1, so the zero
// code 2^n appears exactly when x + y = 2^n - 1.
module tb_dim1_final_adder;
  localparam int N = 8;
  localparam longint M = (64'd1 << N) + 1;

  int checks = 0, failures = 0, zeros = 0;
  logic [N-1:0] x, y;
  logic [N:0]   r;

  dim1_final_adder #(.N(N)) dut (.x(x), .y(y), .r(r));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_v;
    for (int xv = 0; xv < (1 << N); xv++) begin
      for (int yv = 0; yv < (1 << N); yv++) begin
        x = N'(xv); y = N'(yv);
        #1;
        exp_v = (longint'(xv) + yv + 1) % M;
        checks++;
        if (r[N]) zeros++;
        if (longint'(r) != exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d r=%0d exp=%0d", xv, yv, r, exp_v);
        end
      end
    end
    checks++;
    if (zeros != (1 << N)) begin
      failures++;
      $display("FAIL zero code seen %0d times", zeros);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
