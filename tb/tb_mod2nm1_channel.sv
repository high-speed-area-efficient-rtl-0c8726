// Self-checking testbench of mod2nm1_channel, N = 8: 200000 random 24-bit
// inputs plus zero, all ones and multiples of 2^n-1. The residue must be
// congruent to x modulo 2^n-1 (all ones accepted as zero).
module tb_mod2nm1_channel;
  localparam int N = 8;
  localparam longint M = (64'd1 << N) - 1;

  int checks = 0, failures = 0;
  logic [3*N-1:0] x;
  logic [N-1:0]   r;

  mod2nm1_channel #(.N(N)) dut (.x(x), .r(r));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xv;
    for (int k = 0; k < 200000; k++) begin
      case (k)
        0: xv = 0;
        1: xv = (64'd1 << (3 * N)) - 1;
        2: xv = M;
        3: xv = M * 1000;
        default: xv = longint'($urandom) & ((64'd1 << (3 * N)) - 1);
      endcase
      x = (3*N)'(xv);
      #1;
      checks++;
      if (longint'(r) % M != xv % M) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d r=%0d", xv, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
