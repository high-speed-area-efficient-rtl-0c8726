// Two-stage inverted end-around-carry adder: diminished-1 addition
// r = |x + y + 1| mod 2^n+1.
//
// Stage 1 adds x + y in N bits with carry out. Stage 2 adds the inverted
// carry back in: if x + y >= 2^n the result is the low N bits, otherwise the
// low N bits plus one. The carry out of stage 2, which occurs only when
// x + y = 2^n - 1, is the result 2^n, the diminished-1 code of zero; it is
// returned as bit N (the zero flag) with bits N-1:0 all zero. Splitting the
// end-around carry into two stages keeps the circuit free of a
// combinational loop.
//
// Purely combinational.
module dim1_final_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N:0]   r   // bit N = zero flag
);

  logic [N:0] s1;
  logic       inc;  // inverted end-around carry

  always_comb begin
    s1  = {1'b0, x} + {1'b0, y};
    inc = ~s1[N];
    r   = {1'b0, s1[N-1:0]} + (N+1)'(inc);
  end

endmodule
