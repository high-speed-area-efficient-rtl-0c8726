// Binary-to-residue converter channel for the modulus 2^n-1.
//
// The 3n-bit input is split into slices B3, B2, B1 of n bits. Because
// 2^n = 1 (mod 2^n-1), X = B3 + B2 + B1 (mod 2^n-1). A carry-save adder with
// end-around carry (the carry out of bit n-1 re-enters at bit 0) reduces the
// three slices to two vectors, and a ripple adder with end-around carry adds
// them. The end-around carry of the final adder is applied as a second
// increment stage rather than a literal feedback wire, so there is no
// combinational loop. The result is 0..2^n-1, where 2^n-1 is the second code
// of zero (it appears only for inputs that are nonzero multiples of 2^n-1).
//
// Purely combinational.
module mod2nm1_channel #(
  parameter int unsigned N = 8
) (
  input  logic [3*N-1:0] x,   // {B3, B2, B1}
  output logic [N-1:0]   r
);

  logic [N-1:0] b1, b2, b3, s, g, c;
  logic [N:0]   t;

  always_comb begin
    {b3, b2, b1} = x;
    // CSA-EAC
    s = b1 ^ b2 ^ b3;
    g = (b1 & b2) | (b1 & b3) | (b2 & b3);
    c = {g[N-2:0], g[N-1]};
    // CRA-EAC
    t = {1'b0, s} + {1'b0, c};
    r = t[N-1:0] + N'(t[N]);
  end

endmodule
