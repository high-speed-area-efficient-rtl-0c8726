// Self-checking testbench of booth_encoder: all eight bit groups, each
// compared with the digit m = -2*a(2i+1) + a(2i) + a(2i-1) worked out as an
// integer.
module tb_booth_encoder;
  import rns_pkg::*;

  int checks = 0, failures = 0;
  logic [2:0] grp;
  booth_sel_t sel;

  booth_encoder dut (.grp(grp), .sel(sel));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, mag;
    for (int g = 0; g < 8; g++) begin
      grp = 3'(g);
      #1;
      m   = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      mag = (m < 0) ? -m : m;
      checks++;
      if (sel.one !== (mag == 1) || sel.two !== (mag == 2) || sel.neg !== grp[2]) begin
        failures++;
        $display("FAIL grp=%b m=%0d sel=%b", grp, m, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
