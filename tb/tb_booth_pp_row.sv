// Self-checking testbench of booth_pp_row, N = 8, every row index I = 0..3,
// every Booth digit and every multiplicand B. The expected partial product
// is worked out with integer arithmetic modulo 2^n+1:
//   m*4^I*B + m'*4^I - 1, with m' = m, or +1 / -1 for the zero digits
//   000 / 111,
// and the row must produce exactly that residue as an n-bit vector.
module tb_booth_pp_row;
  import rns_pkg::*;

  localparam int N = 8;
  localparam int D = N / 2;
  localparam longint M = (64'd1 << N) + 1;

  int checks = 0, failures = 0;
  logic [N-1:0] b;
  logic [2:0]   grp;
  booth_sel_t   sel;
  logic [N-1:0] pp [D];

  booth_encoder u_be (.grp(grp), .sel(sel));
  for (genvar i = 0; i < D; i++) begin : g_r
    booth_pp_row #(.N(N), .I(i)) dut (.b(b), .sel(sel), .pp(pp[i]));
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint modm(longint v);
    longint r = v % M;
    return (r < 0) ? r + M : r;
  endfunction

  initial begin
    longint m, mm, w, exp_v;
    for (int g = 0; g < 8; g++) begin
      for (int bv = 0; bv < (1 << N); bv++) begin
        grp = 3'(g);
        b   = N'(bv);
        #1;
        m  = -2 * longint'(grp[2]) + longint'(grp[1]) + longint'(grp[0]);
        mm = (m != 0) ? m : (grp[2] ? -1 : 1);
        for (int i = 0; i < D; i++) begin
          w = longint'(1) << (2 * i);
          exp_v = modm(m * w * bv + mm * w - 1);
          checks++;
          if (longint'(pp[i]) != exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL I=%0d grp=%b B=%0d pp=%0d exp=%0d", i, grp, bv, pp[i], exp_v);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
