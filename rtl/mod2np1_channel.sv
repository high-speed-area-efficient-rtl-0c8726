// Binary-to-residue converter channel for the modulus 2^n+1.
//
// With the 3n-bit input split into n-bit slices B3, B2, B1 and 2^n = -1
// (mod 2^n+1), X = B3 - B2 + B1 (mod 2^n+1). Two binary adders work in
// parallel:
//   sa = ~('0' & B2) + "10...010"   in n+1 bits  = 2^n + 1 - B2 = -B2
//   sb = B3 + B1                    in n bits with carry out (n+1 bits)
// and a modulo 2^n+1 addition of sa and sb gives the residue. The two
// adders and the constant follow the published structure. sa lies in
// 2..2^n+1 and sb in 0..2^(n+1)-2, so their sum can exceed the modulus
// twice; the final addition here forms sa+sb, sa+sb-M and sa+sb-2M and
// keeps the smallest non-negative one. That three-way selection is this
// design's own choice for the final "ADD mod 2^n+1".
//
// Output r in 0..2^n. Purely combinational.
module mod2np1_channel #(
  parameter int unsigned N = 8
) (
  input  logic [3*N-1:0] x,   // {B3, B2, B1}
  output logic [N:0]     r
);

  localparam logic [N:0]   KCONST = (N+1)'((1 << N) + 2);   // "10...010"
  localparam logic [N+2:0] M1 = (N+3)'((1 << N) + 1);
  localparam logic [N+2:0] M2 = (N+3)'((1 << (N + 1)) + 2);

  logic [N-1:0] b1, b2, b3;
  logic [N:0]   sa, sb;
  logic [N+2:0] t, t1, t2;

  always_comb begin
    {b3, b2, b1} = x;
    sa = ~{1'b0, b2} + KCONST;
    sb = {1'b0, b3} + {1'b0, b1};
    t  = (N+3)'(sa) + (N+3)'(sb);
    t1 = t - M1;
    t2 = t - M2;
    if (!t2[N+2])      r = t2[N:0];
    else if (!t1[N+2]) r = t1[N:0];
    else               r = t[N:0];
  end

endmodule
