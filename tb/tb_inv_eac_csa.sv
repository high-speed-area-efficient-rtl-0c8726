// Self-checking testbench of inv_eac_csa, N = 8: random operand triples plus
// all-zero and all-one corners. Checks s + c + 1 = x + y + z + 2 modulo
// 2^n+1, the identity that lets the cells form a diminished-1 adder tree.
module tb_inv_eac_csa;
  localparam int N = 8;
  localparam longint M = (64'd1 << N) + 1;

  int checks = 0, failures = 0;
  logic [N-1:0] x, y, z, s, c;

  inv_eac_csa #(.N(N)) dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint lhs, rhs;
    for (int k = 0; k < 30000; k++) begin
      if (k < 8) begin
        x = k[0] ? '1 : '0; y = k[1] ? '1 : '0; z = k[2] ? '1 : '0;
      end else begin
        x = N'($urandom); y = N'($urandom); z = N'($urandom);
      end
      #1;
      lhs = (longint'(s) + longint'(c) + 1) % M;
      rhs = (longint'(x) + longint'(y) + longint'(z) + 2) % M;
      checks++;
      if (lhs != rhs) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
