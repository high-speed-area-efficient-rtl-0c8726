// Radix-4 Booth encoder (one "BE" cell of the multiplier array).
//
// Looks at three overlapping bits {a(2i+1), a(2i), a(2i-1)} of the Booth
// recoded operand and produces the digit m = -2*a(2i+1) + a(2i) + a(2i-1) as
// sign and one-hot magnitude. neg is simply a(2i+1), so the two zero digits
// 000 ("plus zero") and 111 ("minus zero") differ in neg; the selector row
// and the correction term rely on that difference.
//
// Purely combinational, no clock.
module booth_encoder
  import rns_pkg::*;
(
  input  logic [2:0]  grp,  // {a(2i+1), a(2i), a(2i-1)}
  output booth_sel_t  sel
);

  always_comb begin
    sel.neg = grp[2];
    sel.one = grp[1] ^ grp[0];
    sel.two = (grp[2] ^ grp[1]) & ~(grp[1] ^ grp[0]);
  end

endmodule
