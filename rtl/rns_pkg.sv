// Shared types of the residue-arithmetic blocks.
//
// booth_sel_t is the set of select lines a radix-4 Booth encoder hands to a
// row of Booth selectors: the digit m in {-2,-1,0,+1,+2} is carried as a
// sign (neg) and a one-hot magnitude (one = |m| is 1, two = |m| is 2; both
// low for a zero digit). The encoding is the usual one for radix-4 Booth
// recoding; the field names are this design's own.
package rns_pkg;

  typedef struct packed {
    logic neg;  // digit is negative (or a "minus zero" digit, bits 111)
    logic one;  // |m| == 1
    logic two;  // |m| == 2
  } booth_sel_t;

endpackage
