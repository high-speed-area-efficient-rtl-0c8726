// Diminished-1 modulo 2^n+1 multiplier with radix-4 Booth recoding.
//
// Computes d[A*B] = |d[A]*B + B - 1| mod 2^n+1 from A in diminished-1 form
// (d[A] = A - 1, with d[0] = 2^n flagged by bit N) and B in normal binary.
// The diminished-1 operand d[A] is Booth recoded; its top bits a(n-1) and
// the zero flag a(n) fold into the first digit through a(-1) = NOR(a(n-1),
// a(n)), which makes d[A] = sum(m_i*4^i) - 1 (mod 2^n+1) and cancels the
// "+ B" term. The structure is:
//   N/2 Booth encoders (BE) on d[A]
//   N/2 selector rows (BS/BS-) that turn each digit into an n-bit partial
//       product by circular shift of B or ~B with complemented wrap bits
//   one correction term CT, computed from d[A] alone
//   a linear chain of N/2-1 inverted end-around-carry CSAs, as in the
//       8-bit arrangement the structure is taken from (PP0..PP2 first, then
//       PP3, then CT)
//   the two-stage inverted n-bit adder, which adds the last +1.
// Everything stays n bits wide; only the output carries the zero flag.
// The input range of B is 0..2^n-1: the value 2^n is not accepted.
// The chain order, the CT logic and the zero handling are this design's
// own working out; the block set and the 8-bit arrangement follow the
// published structure.
//
// Interface: da[N:0] (bit N = A is zero), b[N-1:0], dp[N:0] (bit N =
// product is zero, then dp[N-1:0] = 0). Purely combinational, no clock.
module dim1_mult
  import rns_pkg::*;
#(
  parameter int unsigned N = 8   // even, at least 4
) (
  input  logic [N:0]   da,
  input  logic [N-1:0] b,
  output logic [N:0]   dp
);

  localparam int unsigned D = N / 2;  // number of Booth digits

  if (N < 4 || (N % 2) != 0) begin : g_bad_n
    $error("dim1_mult: N must be even and at least 4");
  end

  // Booth recoding of d[A]; ax[j+1] = a(j), ax[0] = a(-1)
  logic [N:0] ax;
  assign ax = {da[N-1:0], ~(da[N-1] | da[N])};

  booth_sel_t       sel [D];
  logic [N-1:0]     ops [D+1];   // PP_0 .. PP_{D-1}, CT

  for (genvar i = 0; i < D; i++) begin : g_row
    booth_encoder u_be (
      .grp (ax[2*i+2 : 2*i]),
      .sel (sel[i])
    );
    booth_pp_row #(.N(N), .I(i)) u_bs (
      .b   (b),
      .sel (sel[i]),
      .pp  (ops[i])
    );
  end

  dim1_ct_gen #(.N(N)) u_ct (
    .da (da),
    .ct (ops[D])
  );

  // linear chain of inverted EAC CSAs
  logic [N-1:0] sv [D];
  logic [N-1:0] cv [D];
  assign sv[0] = ops[0];
  assign cv[0] = ops[1];
  for (genvar k = 1; k < D; k++) begin : g_csa
    inv_eac_csa #(.N(N)) u_csa (
      .x (sv[k-1]),
      .y (cv[k-1]),
      .z (ops[k+1]),
      .s (sv[k]),
      .c (cv[k])
    );
  end

  dim1_final_adder #(.N(N)) u_add (
    .x (sv[D-1]),
    .y (cv[D-1]),
    .r (dp)
  );

endmodule
