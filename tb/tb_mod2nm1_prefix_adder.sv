// Self-checking testbench of mod2nm1_prefix_adder, N = 8: every pair of
// n-bit operands. The result must be congruent to x + y modulo 2^n-1 (all
// ones is accepted as the second code of zero) and lie in 0..2^n-1.
module tb_mod2nm1_prefix_adder;
  localparam int N = 8;
  localparam int M = (1 << N) - 1;

  int checks = 0, failures = 0;
  logic [N-1:0] x, y, sum;

  mod2nm1_prefix_adder #(.N(N)) dut (.x(x), .y(y), .sum(sum));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << N); a++) begin
      for (int b = 0; b < (1 << N); b++) begin
        x = N'(a); y = N'(b);
        #1;
        checks++;
        if (int'(sum) % M != (a + b) % M) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d sum=%0d", a, b, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
