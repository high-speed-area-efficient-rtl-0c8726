// Modulo 2^n-1 adder with the end-around carry computed in advance.
//
// Instead of adding X+Y and then adding the carry out back in, a
// Kogge-Stone prefix network computes the carry out of X+Y first, and a
// single adder then forms X + Y + cout in N bits. The result is a residue in
// 0..2^n-1 where 2^n-1 (all ones) is the second code of zero; it occurs only
// when X+Y = 2^n-1 exactly. The published design gives only the idea of computing
// the carry out with a prefix network; the network choice is this design's.
//
// Purely combinational.
module mod2nm1_prefix_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] sum
);

  localparam int unsigned L = (N <= 1) ? 1 : $clog2(N);

  logic [N-1:0] gl [L+1];
  logic [N-1:0] pl [L+1];

  assign gl[0] = x & y;
  assign pl[0] = x | y;

  for (genvar l = 0; l < L; l++) begin : g_lvl
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i >= (1 << l)) begin : g_op
        assign gl[l+1][i] = gl[l][i] | (pl[l][i] & gl[l][i-(1<<l)]);
        assign pl[l+1][i] = pl[l][i] & pl[l][i-(1<<l)];
      end else begin : g_pass
        assign gl[l+1][i] = gl[l][i];
        assign pl[l+1][i] = pl[l][i];
      end
    end
  end

  logic cout;
  assign cout = gl[L][N-1];
  assign sum  = x + y + N'(cout);

endmodule
