// Workload testbench: the 12-bit and 16-bit sizes of the residue blocks.
// For n = 12 and n = 16 it instantiates the 2^n+1 and 2^n-1 adders, the
// forward converter and the multiplier, drives 20000 random operand sets
// each, and checks every result against integer arithmetic.
module tb_residue_sizes;
  int checks = 0, failures = 0;
  bit done [2];

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(longint got, longint exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp_v);
    end
  endtask

  for (genvar s = 0; s < 2; s++) begin : g_size
    localparam int N = (s == 0) ? 12 : 16;
    localparam longint MP = (64'd1 << N) + 1;
    localparam longint MM = (64'd1 << N) - 1;

    logic [N:0]     ap_x, ap_y, ap_sum;
    logic [N-1:0]   am_x, am_y, am_sum;
    logic [3*N-1:0] cv_x;
    logic [N-1:0]   cv_m1, cv_p0;
    logic [N:0]     cv_p1;
    logic [N:0]     da, dp;
    logic [N-1:0]   b;

    mod2np1_prefix_adder #(.N(N)) u_ap (.x(ap_x), .y(ap_y), .sum(ap_sum));
    mod2nm1_prefix_adder #(.N(N)) u_am (.x(am_x), .y(am_y), .sum(am_sum));
    b2r_converter        #(.N(N)) u_cv (.x(cv_x), .r_m1(cv_m1), .r_p0(cv_p0), .r_p1(cv_p1));
    dim1_mult            #(.N(N)) u_mu (.da(da), .b(b), .dp(dp));

    initial begin
      longint xa, ya, xv, av, bv;
      for (int k = 0; k < 20000; k++) begin
        xa = longint'($urandom_range(int'(MP) - 1));
        ya = longint'($urandom_range(int'(MP) - 1));
        if (k == 0) begin xa = 0; ya = 0; end
        if (k == 1) begin xa = MP - 1; ya = MP - 1; end
        ap_x = (N+1)'(xa); ap_y = (N+1)'(ya);
        am_x = N'($urandom); am_y = N'($urandom);
        xv = ((longint'($urandom) << 16) ^ longint'($urandom)) & ((64'd1 << (3 * N)) - 1);
        cv_x = (3*N)'(xv);
        av = longint'($urandom_range(int'(MP) - 1));
        bv = longint'($urandom_range(int'(MM)));
        da = (N+1)'((av + MP - 1) % MP);
        b  = N'(bv);
        #1;
        chk(longint'(ap_sum), (xa + ya) % MP, $sformatf("n=%0d 2^n+1 adder", N));
        chk(longint'(am_sum) % MM, (longint'(am_x) + longint'(am_y)) % MM, $sformatf("n=%0d 2^n-1 adder", N));
        chk(longint'(cv_m1) % MM, xv % MM, $sformatf("n=%0d converter 2^n-1", N));
        chk(longint'(cv_p0), xv % (MM + 1), $sformatf("n=%0d converter 2^n", N));
        chk(longint'(cv_p1), xv % MP, $sformatf("n=%0d converter 2^n+1", N));
        chk(longint'(dp), (av * bv + MP - 1) % MP, $sformatf("n=%0d multiplier", N));
      end
      done[s] = 1'b1;
    end
  end

  initial begin
    done[0] = 1'b0;
    done[1] = 1'b0;
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
