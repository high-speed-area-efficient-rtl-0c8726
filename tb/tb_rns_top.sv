// End-to-end testbench of rns_top at its default width (N = 8, no
// parameter override). All five datapaths get random operands mixed with
// directed corners, and every result is compared with integer arithmetic.
// It also counts how often each mechanism of the design was exercised and
// fails if one never was:
//   multiplier: each Booth digit kind of d[A] (+1, +2, -1, -2, +0, -0),
//               A = 0 (input zero flag), zero product (output zero flag)
//   2^n+1 adder: correction taken, not taken, and the x = y = 0 case
//   2^n-1 adder: end-around carry, and the all-ones zero code
//   2^n+1 converter: final addition needing 0, 1 and 2 subtractions
//   2^n-1 converter: the all-ones zero code
//   add/subtractor: both modes, a zero operand (bypass), a zero result
module tb_rns_top;
  localparam int N = 8;
  localparam longint MP = (64'd1 << N) + 1;
  localparam longint MM = (64'd1 << N) - 1;

  int checks = 0, failures = 0;

  logic [3*N-1:0] cv_x;
  logic [N-1:0]   cv_r_m1, cv_r_p0;
  logic [N:0]     cv_r_p1;
  logic [N:0]     ap_x, ap_y, ap_sum;
  logic [N-1:0]   am_x, am_y, am_sum;
  logic [N:0]     mu_da, mu_dp;
  logic [N-1:0]   mu_b;
  logic [N:0]     ds_da, ds_db, ds_dr;
  logic           ds_sub;

  rns_top dut (.*);

  // mechanism counters
  int n_dig [6];     // +1 +2 -1 -2 +0 -0
  int n_azero = 0, n_pzero = 0;
  int n_ap_corr = 0, n_ap_plain = 0, n_ap_00 = 0;
  int n_am_eac = 0, n_am_z2 = 0;
  int n_cv_k [3];
  int n_cv_z2 = 0;
  int n_ds_add = 0, n_ds_sub = 0, n_ds_zop = 0, n_ds_zres = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("add/sub adds:%0d subtracts:%0d zero operand:%0d zero result:%0d",
             n_ds_add, n_ds_sub, n_ds_zop, n_ds_zres);
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

  task automatic count_digits(logic [N:0] d);
    logic [N:0] ax;
    int m;
    ax = {d[N-1:0], ~(d[N-1] | d[N])};
    for (int i = 0; i < N / 2; i++) begin
      m = -2 * int'(ax[2*i+2]) + int'(ax[2*i+1]) + int'(ax[2*i]);
      case (m)
        1:  n_dig[0]++;
        2:  n_dig[1]++;
        -1: n_dig[2]++;
        -2: n_dig[3]++;
        default: if (ax[2*i+2]) n_dig[5]++; else n_dig[4]++;
      endcase
    end
  endtask

  initial begin
    longint a, b, xv, b1, b2, b3, t;
    for (int i = 0; i < 6; i++) n_dig[i] = 0;
    for (int i = 0; i < 3; i++) n_cv_k[i] = 0;
    for (int k = 0; k < 100000; k++) begin
      // multiplier
      a = $urandom_range(int'(MP) - 1);
      b = $urandom_range(int'(MM));
      if (k % 97 == 0) a = 0;
      if (k % 89 == 0) b = 0;
      mu_da = (N+1)'((a + MP - 1) % MP);
      mu_b  = N'(b);
      // 2^n+1 adder
      ap_x = (N+1)'($urandom_range(int'(MP) - 1));
      ap_y = (N+1)'($urandom_range(int'(MP) - 1));
      if (k % 101 == 0) begin ap_x = '0; ap_y = '0; end
      // 2^n-1 adder
      am_x = N'($urandom);
      am_y = N'($urandom);
      if (k % 103 == 0) am_y = ~am_x;
      // converter
      xv = longint'($urandom) & ((64'd1 << (3 * N)) - 1);
      if (k % 107 == 0) xv = MM * longint'($urandom_range(65000) + 1);
      cv_x = (3*N)'(xv);
      // diminished-1 adder/subtractor (a and b reused as normal-form values)
      ds_sub = k[0] ^ k[3];
      ds_da  = mu_da;
      ds_db  = (k % 13 == 0) ? mu_da : (N+1)'(($urandom_range(int'(MP) - 1)));
      if (k % 83 == 0) ds_db = (N+1)'(1 << N);
      #1;
      begin
        longint av2, bv2, e2;
        av2 = (longint'(ds_da) + 1) % MP;
        bv2 = (longint'(ds_db) + 1) % MP;
        e2  = ds_sub ? (av2 - bv2 + 2 * MP - 1) % MP : (av2 + bv2 + MP - 1) % MP;
        chk(longint'(ds_dr), e2, "dim1 add/sub");
        if (ds_sub) n_ds_sub++; else n_ds_add++;
        if (ds_da[N] || ds_db[N]) n_ds_zop++;
        if (ds_dr[N]) n_ds_zres++;
      end
      chk(longint'(mu_dp), (a * b + MP - 1) % MP, "multiplier");
      chk(longint'(ap_sum), (longint'(ap_x) + longint'(ap_y)) % MP, "2^n+1 adder");
      chk(longint'(am_sum) % MM, (longint'(am_x) + longint'(am_y)) % MM, "2^n-1 adder");
      chk(longint'(cv_r_m1) % MM, xv % MM, "converter 2^n-1");
      chk(longint'(cv_r_p0), xv % (MM + 1), "converter 2^n");
      chk(longint'(cv_r_p1), xv % MP, "converter 2^n+1");
      // mechanisms
      count_digits(mu_da);
      if (mu_da[N]) n_azero++;
      if (mu_dp[N]) n_pzero++;
      if (ap_x == 0 && ap_y == 0) n_ap_00++;
      else if (longint'(ap_x) + longint'(ap_y) >= MP) n_ap_corr++;
      else n_ap_plain++;
      if (int'(am_x) + int'(am_y) >= (1 << N)) n_am_eac++;
      if (am_sum == '1) n_am_z2++;
      b1 = xv & MM; b2 = (xv >> N) & MM; b3 = (xv >> (2 * N)) & MM;
      t = (MP - b2) + b3 + b1;
      n_cv_k[t / MP]++;
      if (cv_r_m1 == '1) n_cv_z2++;
    end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (n_dig[i] == 0) begin failures++; $display("FAIL digit kind %0d never seen", i); end
    end
    foreach (n_cv_k[i]) begin
      checks++;
      if (n_cv_k[i] == 0) begin failures++; $display("FAIL converter case %0d never seen", i); end
    end
    checks++;
    if (n_azero == 0 || n_pzero == 0 || n_ap_corr == 0 || n_ap_plain == 0 || n_ap_00 == 0 ||
        n_am_eac == 0 || n_am_z2 == 0 || n_cv_z2 == 0 ||
        n_ds_add == 0 || n_ds_sub == 0 || n_ds_zop == 0 || n_ds_zres == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("digits +1:%0d +2:%0d -1:%0d -2:%0d +0:%0d -0:%0d", n_dig[0], n_dig[1], n_dig[2],
             n_dig[3], n_dig[4], n_dig[5]);
    $display("A=0:%0d zero products:%0d | adder2^n+1 corr:%0d plain:%0d 0+0:%0d | adder2^n-1 eac:%0d zero-code:%0d",
             n_azero, n_pzero, n_ap_corr, n_ap_plain, n_ap_00, n_am_eac, n_am_z2);
    $display("converter 2^n+1 subtractions 0:%0d 1:%0d 2:%0d | 2^n-1 zero-code:%0d",
             n_cv_k[0], n_cv_k[1], n_cv_k[2], n_cv_z2);
    $display("add/sub adds:%0d subtracts:%0d zero operand:%0d zero result:%0d",
             n_ds_add, n_ds_sub, n_ds_zop, n_ds_zres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
