// Self-checking testbench of mod2np1_prefix_adder, N = 8: every pair of
// residues 0..2^n, compared with (x + y) mod 2^n+1. Counts both sides of
// the correction (sum below / at or above the modulus) and the x = y = 0
// case.
module tb_mod2np1_prefix_adder;
  localparam int N = 8;
  localparam int M = (1 << N) + 1;

  int checks = 0, failures = 0, n_corr = 0, n_plain = 0;
  logic [N:0] x, y, sum;

  mod2np1_prefix_adder #(.N(N)) dut (.x(x), .y(y), .sum(sum));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < M; a++) begin
      for (int b = 0; b < M; b++) begin
        x = (N+1)'(a); y = (N+1)'(b);
        #1;
        if (a + b >= M) n_corr++; else n_plain++;
        checks++;
        if (int'(sum) != (a + b) % M) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d sum=%0d", a, b, sum);
        end
      end
    end
    checks++;
    if (n_corr == 0 || n_plain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
