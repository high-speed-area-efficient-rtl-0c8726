// Modulo 2^n+1 adder of two residues in normal (n+1)-bit form, with the
// correction decided by a parallel-prefix computation of the MSB of X+Y-1.
//
// A row of carry-save cells adds X, Y and the constant -1 (all ones):
// ps = ~(x ^ y), pc = x | y. The MSB unit finds bit n of X+Y-1 from ps and
// pc. If it is set, X+Y >= 2^n+1 and the result is X+Y-1-2^n: the ripple
// adder adds ps + 2*pc with carry-in 0 and bit n of its sum is cleared.
// Otherwise the result is X+Y, i.e. the same sum with carry-in 1. So the
// inverted MSB is the carry-in, as in the published structure. Two details
// are this design's own: bit n of the sum is cleared when the MSB is set,
// and X = Y = 0 (where X+Y-1 is negative and its MSB is meaningless) is
// caught by the OR of pc, so the correction is skipped.
//
// Inputs must be in 0..2^n. Purely combinational.
module mod2np1_prefix_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N:0] x,
  input  logic [N:0] y,
  output logic [N:0] sum
);

  logic [N:0] ps, pc;
  logic       msb, sub, cin;
  logic [N:0] cra;

  always_comb begin
    ps = ~(x ^ y);
    pc = x | y;
  end

  msb_unit #(.N(N)) u_msb (
    .ps  (ps),
    .pc  (pc),
    .msb (msb)
  );

  always_comb begin
    sub = msb & (|pc);
    cin = ~sub;
    cra = ps + {pc[N-1:0], 1'b0} + (N+1)'(cin);
    sum = {cra[N] & ~sub, cra[N-1:0]};
  end

endmodule
