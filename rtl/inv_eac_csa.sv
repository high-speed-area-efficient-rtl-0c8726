// Inverted end-around-carry carry-save adder, modulo 2^n+1, diminished-1.
//
// Full-adder row over three N-bit vectors. The carry vector is shifted left
// by one and the carry out of bit N-1, which has weight 2^n = -1 (mod
// 2^n+1), re-enters at bit 0 inverted. Then, modulo 2^n+1,
//     x + y + z + 2 = s + c + 1,
// so a tree of these cells keeps the diminished-1 meaning of its operands:
// each cell turns three diminished-1 operands into two.
//
// Purely combinational.
module inv_eac_csa #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);

  logic [N-1:0] g;

  always_comb begin
    s = x ^ y ^ z;
    g = (x & y) | (x & z) | (y & z);
    c = {g[N-2:0], ~g[N-1]};
  end

endmodule
