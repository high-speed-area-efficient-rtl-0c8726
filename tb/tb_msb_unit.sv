// Self-checking testbench of msb_unit, N = 8, every pair of 9-bit vectors.
// Expected: bit N of ps + 2*pc in N+1 bits.
module tb_msb_unit;
  localparam int N = 8;

  int checks = 0, failures = 0;
  logic [N:0] ps, pc;
  logic       msb;

  msb_unit #(.N(N)) dut (.ps(ps), .pc(pc), .msb(msb));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    for (int a = 0; a < (2 << N); a++) begin
      for (int c = 0; c < (2 << N); c++) begin
        ps = (N+1)'(a); pc = (N+1)'(c);
        #1;
        t = (a + 2 * c) >> N;
        checks++;
        if (msb != t[0]) begin
          failures++;
          if (failures < 10) $display("FAIL ps=%0d pc=%0d msb=%b", a, c, msb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
