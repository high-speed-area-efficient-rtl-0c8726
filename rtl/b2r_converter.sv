// Forward (binary-to-residue) converter for the moduli set
// {2^n-1, 2^n, 2^n+1}.
//
// A 3n-bit binary number is converted to its three residues in parallel.
// The 2^n residue is the low n bits, with no logic; the other two come from
// the channel blocks mod2nm1_channel and mod2np1_channel.
//
// Purely combinational.
module b2r_converter #(
  parameter int unsigned N = 8
) (
  input  logic [3*N-1:0] x,
  output logic [N-1:0]   r_m1,   // x mod 2^N-1 (2^N-1 also means 0)
  output logic [N-1:0]   r_p0,   // x mod 2^N
  output logic [N:0]     r_p1    // x mod 2^N+1
);

  mod2nm1_channel #(.N(N)) u_m1 (.x(x), .r(r_m1));
  mod2np1_channel #(.N(N)) u_p1 (.x(x), .r(r_p1));
  assign r_p0 = x[N-1:0];

endmodule
