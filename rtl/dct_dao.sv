// dct_dao: DA odd processing element of the 8-point DCT.
//
// Produces the DA partial-sum words of the four odd outputs
//   [Z1 Z3 Z5 Z7]^T = M_odd * [b0 b1 b2 b3]^T,  b_m = x_m - x_(7-m),
// where M_odd holds +-C1, +-C3, +-C5, +-C7 as in the document's odd-part
// equation (da_pkg::DCT_ODD_COEF). For output Z_(2k+1) and coefficient bit
// j the word z[k][j] is the sum of the b_m whose coefficient has that bit
// set. The document builds these sums with a few shared adders; here the
// needed sums come out of the subset-sum network of da_pe, which synthesis
// prunes to the sums actually used. Combinational.
module dct_dao #(
  parameter int unsigned IN_W = 10,
  parameter int unsigned Q    = da_pkg::DCT_Q,
  parameter int unsigned P    = 12
) (
  input  logic signed [IN_W-1:0] b [4],
  output logic signed [P-1:0]    z [4][Q]
);

  da_pe #(.N_IN(4), .N_OUT(4), .IN_W(IN_W), .Q(Q), .P(P),
          .COEF(da_pkg::DCT_ODD_COEF)) u_pe (
    .u(b), .y(z)
  );

endmodule
