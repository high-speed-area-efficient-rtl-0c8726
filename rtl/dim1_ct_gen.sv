// Correction term CT of the diminished-1 modulo 2^n+1 multiplier.
//
// The multiplier adds the N/2 Booth partial products, CT, and N/2 from its
// inverted end-around-carry adder tree. For the sum to equal d[A*B] = 
// |d[A]*B + B - 1|, CT must equal (mod 2^n+1)
//     CT = ~d[A] - P + Q        (+1 when A = 0)
// where P (Q) is the sum of 4^i over the "plus zero" (000) ("minus zero"
// 111) Booth digits. Per digit that stays inside the two bits 2i+1:2i:
//     ct[2i+1] = ~a(2i+1)
//     ct[2i]   = majority(a(2i+1), ~a(2i), a(2i-1))   (| a(n) for i = 0)
// so CT is N/2 small gates on the Booth encoder inputs, independent of B.
// a(-1) is NOR(a(n-1), a(n)), the same bit the first Booth encoder sees.
// This closed form was derived for this design; the published arrangement shows
// CT produced by one small cell per digit from the encoder wires.
//
// Purely combinational.
module dim1_ct_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N:0]   da,  // d[A], bit N = zero flag
  output logic [N-1:0] ct
);

  logic [N:0] ax;  // ax[j+1] = a(j), ax[0] = a(-1)
  assign ax = {da[N-1:0], ~(da[N-1] | da[N])};

  for (genvar i = 0; i < N / 2; i++) begin : g_dig
    logic h, m, l;
    assign h = ax[2*i+2];
    assign m = ax[2*i+1];
    assign l = ax[2*i];
    assign ct[2*i+1] = ~h;
    if (i == 0) begin : g_lsb
      assign ct[2*i] = (h & ~m) | (h & l) | (~m & l) | da[N];
    end else begin : g_mid
      assign ct[2*i] = (h & ~m) | (h & l) | (~m & l);
    end
  end

endmodule
