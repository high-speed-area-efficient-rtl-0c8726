// Residue-number-system building blocks for the moduli set
// {2^n-1, 2^n, 2^n+1}, side by side.
//
// Four independent combinational datapaths share one width parameter N:
//   - the forward converter (3n-bit binary in, three residues out),
//   - the two modulo adders (2^n+1 with prefix MSB correction, 2^n-1 with
//     prefix end-around carry),
//   - the diminished-1 modulo 2^n+1 multiplier, d[A] (with zero flag) times
//     B in normal form, product in diminished-1 form,
//   - the diminished-1 adder/subtractor (mode input ds_sub).
// They are not wired to each other: the multiplier works in diminished-1
// form and the adders and converter in normal form, and no conversion
// between the two is part of the design. Each datapath has its own ports.
//
// Purely combinational, no clock or reset.
module rns_top #(
  parameter int unsigned N = 8
) (
  // forward converter
  input  logic [3*N-1:0] cv_x,
  output logic [N-1:0]   cv_r_m1,
  output logic [N-1:0]   cv_r_p0,
  output logic [N:0]     cv_r_p1,
  // modulo 2^n+1 adder
  input  logic [N:0]     ap_x,
  input  logic [N:0]     ap_y,
  output logic [N:0]     ap_sum,
  // modulo 2^n-1 adder
  input  logic [N-1:0]   am_x,
  input  logic [N-1:0]   am_y,
  output logic [N-1:0]   am_sum,
  // diminished-1 multiplier
  input  logic [N:0]     mu_da,
  input  logic [N-1:0]   mu_b,
  output logic [N:0]     mu_dp,
  // diminished-1 adder/subtractor
  input  logic [N:0]     ds_da,
  input  logic [N:0]     ds_db,
  input  logic           ds_sub,
  output logic [N:0]     ds_dr
);

  b2r_converter #(.N(N)) u_cv (
    .x    (cv_x),
    .r_m1 (cv_r_m1),
    .r_p0 (cv_r_p0),
    .r_p1 (cv_r_p1)
  );

  mod2np1_prefix_adder #(.N(N)) u_ap (.x(ap_x), .y(ap_y), .sum(ap_sum));

  mod2nm1_prefix_adder #(.N(N)) u_am (.x(am_x), .y(am_y), .sum(am_sum));

  dim1_mult #(.N(N)) u_mu (.da(mu_da), .b(mu_b), .dp(mu_dp));

  dim1_addsub #(.N(N)) u_ds (.da(ds_da), .db(ds_db), .sub(ds_sub), .dr(ds_dr));

endmodule
