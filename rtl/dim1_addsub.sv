// Diminished-1 modulo 2^n+1 adder/subtractor.
//
// Adds or subtracts two residues held in diminished-1 form (bit N of each
// operand is the zero flag):
//     d[A+B] = |d[A] + d[B] + 1|          (sub = 0)
//     d[A-B] = |d[A] + ~d[B] + 1|         (sub = 1), since d[-B] = ~d[B]
// The sum goes through the same two-stage inverted adder as the
// multiplier's last stage. The rules only hold for nonzero operands, so
// zero operands bypass the adder: A = 0 gives d[B] or d[-B], B = 0 gives
// d[A]. The bypass, and d[-B] = d[0] for B = 0, are this design's handling;
// the add and subtract rules themselves are the standard diminished-1 ones.
//
// Purely combinational.
module dim1_addsub #(
  parameter int unsigned N = 8
) (
  input  logic [N:0] da,   // d[A], bit N = zero flag
  input  logic [N:0] db,   // d[B], bit N = zero flag
  input  logic       sub,  // 0: A+B, 1: A-B
  output logic [N:0] dr    // d[A+B] or d[A-B]
);

  logic [N-1:0] yb;
  logic [N:0]   sum;
  logic [N:0]   nb;   // d[-B] as an (N+1)-bit code

  assign yb = sub ? ~db[N-1:0] : db[N-1:0];

  dim1_final_adder #(.N(N)) u_add (
    .x (da[N-1:0]),
    .y (yb),
    .r (sum)
  );

  always_comb begin
    nb = db[N] ? db : {1'b0, ~db[N-1:0]};
    if (db[N])      dr = da;
    else if (da[N]) dr = sub ? nb : db;
    else            dr = sum;
  end

endmodule
