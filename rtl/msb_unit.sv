// MSB computation unit of the prefix-based modulo 2^n+1 adder.
//
// Returns bit N of ps + 2*pc (both N+1 bits wide, the top carry pc[N] is
// dropped) without forming the sum: each bit position i pairs ps[i] with
// pc[i-1] into generate g_i = AND and propagate p_i = OR, a Kogge-Stone
// parallel-prefix network folds positions 0..N-1 into the carry into bit N,
// and msb = ps[N] ^ pc[N-1] ^ carry. The choice of Kogge-Stone is this
// design's own; the published design asks only for a prefix carry computation.
//
// Purely combinational.
module msb_unit #(
  parameter int unsigned N = 8
) (
  input  logic [N:0] ps,
  input  logic [N:0] pc,
  output logic       msb
);

  localparam int unsigned L = (N <= 1) ? 1 : $clog2(N);

  logic [N-1:0] gl [L+1];
  logic [N-1:0] pl [L+1];

  // level 0: bit pairs (ps[i], pc[i-1])
  for (genvar i = 0; i < N; i++) begin : g_gp
    if (i == 0) begin : g_b0
      assign gl[0][i] = 1'b0;
      assign pl[0][i] = ps[0];
    end else begin : g_bi
      assign gl[0][i] = ps[i] & pc[i-1];
      assign pl[0][i] = ps[i] | pc[i-1];
    end
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i >= (1 << l)) begin : g_op
        assign gl[l+1][i] = gl[l][i] | (pl[l][i] & gl[l][i-(1<<l)]);
        assign pl[l+1][i] = pl[l][i] & pl[l][i-(1<<l)];
      end else begin : g_pass
        assign gl[l+1][i] = gl[l][i];
        assign pl[l+1][i] = pl[l][i];
      end
    end
  end

  assign msb = ps[N] ^ pc[N-1] ^ gl[L][N-1];

endmodule
