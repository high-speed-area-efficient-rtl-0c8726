// Self-checking testbench of dim1_ct_gen, N = 8, all 257 codes of d[A].
// The required correction is worked out arithmetically: Booth digits m_i
// of d[A] (with a(-1) = NOR(a(n-1), a(n))), m'_i = m_i or +1/-1 for the
// zero digits 000/111, and CT = -1 - sum(m'_i * 4^i) modulo 2^n+1.
module tb_dim1_ct_gen;
  localparam int N = 8;
  localparam longint M = (64'd1 << N) + 1;

  int checks = 0, failures = 0;
  logic [N:0]   da;
  logic [N-1:0] ct;

  dim1_ct_gen #(.N(N)) dut (.da(da), .ct(ct));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, m, exp_v;
    int hi, mid, lo;
    for (int v = 0; v <= (1 << N); v++) begin
      da = (N+1)'(v);
      #1;
      acc = 0;
      for (int i = 0; i < N / 2; i++) begin
        hi  = int'(da[2*i+1]);
        mid = int'(da[2*i]);
        lo  = (i == 0) ? int'(!(da[N-1] || da[N])) : int'(da[2*i-1]);
        m = -2 * hi + mid + lo;
        if (m == 0) m = (hi != 0) ? -1 : 1;
        acc += m * (longint'(1) << (2 * i));
      end
      exp_v = (-1 - acc) % M;
      if (exp_v < 0) exp_v += M;
      checks++;
      if (longint'(ct) != exp_v) begin
        failures++;
        $display("FAIL da=%0d ct=%0d exp=%0d", da, ct, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
