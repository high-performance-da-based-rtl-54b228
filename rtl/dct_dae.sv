// dct_dae: DA even processing element of the 8-point DCT.
//
// Serves one pair of even DCT outputs that share a 2x2 coefficient matrix
//   [Zp]   [ CA   CB ] [u0]
//   [Zq] = [ CB  -CA ] [u1]
// With CA = CB = C4 and (u0, u1) = (A0, A1) it gives (Z0, Z4); with
// CA = C2, CB = C6 and (u0, u1) = (B0, B1) it gives (Z2, Z6). Every partial-
// sum word is one of 0, u0, u1 or u0 + u1, so the element needs a single
// adder, as the document states for its even part. Output words are the DA
// bit-level formulation: zp[j] and zq[j] belong to coefficient bit j
// (j = 0 is the sign bit with weight -1, j = Q-1 has weight 2^-(Q-1)).
// The matrix form follows the document's even-part equation; the partial
// sums are selected by the shared da_pe element. Combinational.
module dct_dae #(
  parameter int unsigned IN_W = 11,
  parameter int unsigned Q    = da_pkg::DCT_Q,
  parameter int unsigned P    = 12,
  parameter int          CA   = da_pkg::C4,
  parameter int          CB   = da_pkg::C4
) (
  input  logic signed [IN_W-1:0] u0,
  input  logic signed [IN_W-1:0] u1,
  output logic signed [P-1:0]    zp [Q],
  output logic signed [P-1:0]    zq [Q]
);

  localparam int M [2][2] = '{'{CA, CB}, '{CB, -CA}};

  logic signed [IN_W-1:0] u [2];
  logic signed [P-1:0]    y [2][Q];

  assign u[0] = u0;
  assign u[1] = u1;

  da_pe #(.N_IN(2), .N_OUT(2), .IN_W(IN_W), .Q(Q), .P(P), .COEF(M)) u_pe (
    .u(u), .y(y)
  );

  assign zp = y[0];
  assign zq = y[1];

endmodule
