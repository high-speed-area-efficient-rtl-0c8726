// Self-checking testbench of b2r_converter at N = 8 and N = 16: random
// 3n-bit numbers, all three residues checked against integer remainders
// (for 2^n-1 the all-ones code is accepted as zero).
module tb_b2r_converter;
  int checks = 0, failures = 0;

  logic [23:0] x8;
  logic [7:0]  m1_8, p0_8;
  logic [8:0]  p1_8;
  logic [47:0] x16;
  logic [15:0] m1_16, p0_16;
  logic [16:0] p1_16;

  b2r_converter dut8 (.x(x8), .r_m1(m1_8), .r_p0(p0_8), .r_p1(p1_8));
  b2r_converter #(.N(16)) dut16 (.x(x16), .r_m1(m1_16), .r_p0(p0_16), .r_p1(p1_16));

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

  initial begin
    longint a, b;
    for (int k = 0; k < 50000; k++) begin
      a = longint'($urandom) & 64'hFFFFFF;
      b = ((longint'($urandom) << 16) ^ longint'($urandom)) & 64'hFFFF_FFFF_FFFF;
      if (k == 0) begin a = 0; b = 0; end
      if (k == 1) begin a = 64'hFFFFFF; b = 64'hFFFF_FFFF_FFFF; end
      x8 = 24'(a); x16 = 48'(b);
      #1;
      chk(longint'(m1_8) % 255, a % 255, "n8 mod 2^n-1");
      chk(longint'(p0_8), a % 256, "n8 mod 2^n");
      chk(longint'(p1_8), a % 257, "n8 mod 2^n+1");
      chk(longint'(m1_16) % 65535, b % 65535, "n16 mod 2^n-1");
      chk(longint'(p0_16), b % 65536, "n16 mod 2^n");
      chk(longint'(p1_16), b % 65537, "n16 mod 2^n+1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
