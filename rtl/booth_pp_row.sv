// Booth selector row: one diminished-1 partial product of the modulo 2^n+1
// multiplier (a row of BS / BS- cells).
//
// For Booth digit m at weight 4^I the row forms the n-bit vector
//   |m|=1 : iCLS(X, 2I)      |m|=2 : iCLS(X, 2I+1)      X = B, or ~B if m<0
// where iCLS(v,k) rotates v left by k and complements the k bits that wrap
// into the low end. Modulo 2^n+1 this vector equals m*4^I*B + m*4^I - 1.
// For a zero digit the selector passes 0 through the same cells, which gives
// the low 2I bits = ~neg and the rest = neg, i.e. 4^I-1 for "plus zero"
// and -4^I-1 for "minus zero"; the correction term accounts for both.
// Cells below bit 2I (and bit 2I for |m|=2) are the complementing BS- cells.
//
// Parameters: N operand width (even), I digit index 0..N/2-1.
// Purely combinational.
module booth_pp_row
  import rns_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned I = 0
) (
  input  logic [N-1:0] b,    // multiplicand B
  input  booth_sel_t   sel,  // Booth digit I
  output logic [N-1:0] pp    // partial product PP_I
);

  localparam int unsigned K = 2 * I;  // shift for |m| = 1

  for (genvar j = 0; j < N; j++) begin : g_bit
    // source bit positions of the x1 and x2 paths, taken circularly
    localparam int unsigned P1 = (j + N - K) % N;
    localparam int unsigned P2 = (j + 2 * N - K - 1) % N;
    // wrap flags: bit came around the top and is complemented
    localparam bit W1 = (j < K);
    localparam bit W2 = (j < K + 1);
    logic x1, x2;
    assign x1 = b[P1] ^ W1;
    assign x2 = b[P2] ^ W2;
    // a zero digit takes the x1 path with a zero source bit
    assign pp[j] = ((sel.one & x1) | (sel.two & x2) | (~sel.one & ~sel.two & W1)) ^ sel.neg;
  end

endmodule
