// Self-checking testbench of mod2np1_channel, N = 8: 200000 random 24-bit
// inputs plus corners (zero, all ones, B2 = 0, B2 all ones, multiples of
// 2^n+1). The residue must equal x mod 2^n+1 exactly.
module tb_mod2np1_channel;
  localparam int N = 8;
  localparam longint M = (64'd1 << N) + 1;

  int checks = 0, failures = 0;
  logic [3*N-1:0] x;
  logic [N:0]     r;

  mod2np1_channel #(.N(N)) dut (.x(x), .r(r));

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
        2: xv = 24'hFF00FF;
        3: xv = 24'h00FF00;
        4: xv = M * 12345;
        5: xv = M * 12345 - 1;
        default: xv = longint'($urandom) & ((64'd1 << (3 * N)) - 1);
      endcase
      x = (3*N)'(xv);
      #1;
      checks++;
      if (longint'(r) != xv % M) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d r=%0d exp=%0d", xv, r, xv % M);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
