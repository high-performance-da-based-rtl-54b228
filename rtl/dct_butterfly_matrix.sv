// dct_butterfly_matrix: the DA-Butterfly-Matrix of the 8-point DCT.
//
// Input: one 8-sample vector x[0..7]. Output: for each DCT output Z_n the
// Q partial-sum words y[n][0..Q-1] of its DA bit-level formulation, ready
// for one optimized adder tree per output.
// It holds the 12 adders/subtractors of the document:
//   a_m = x_m + x_(7-m),  b_m = x_m - x_(7-m)        (8, m = 0..3)
//   A0 = a0 + a3, A1 = a1 + a2, B0 = a0 - a3, B1 = a1 - a2   (4)
// followed by two DA even elements, (A0, A1) -> (Z0, Z4) with C4 and
// (B0, B1) -> (Z2, Z6) with C2/C6, and one DA odd element,
// (b0..b3) -> (Z1, Z3, Z5, Z7). Combinational; dct1d registers its output.
// Widths: a/b are IN_W+1 bits, A/B are IN_W+2 bits, words are P bits
// (P = IN_W+3 = 12 for 9-bit inputs, the P of the document's example tree).
module dct_butterfly_matrix #(
  parameter int unsigned IN_W = 9,
  parameter int unsigned Q    = da_pkg::DCT_Q,
  parameter int unsigned P    = IN_W + 3
) (
  input  logic signed [IN_W-1:0] x [8],
  output logic signed [P-1:0]    y [8][Q]
);

  logic signed [IN_W:0]   a [4];
  logic signed [IN_W:0]   b [4];
  logic signed [IN_W+1:0] ae0, ae1, be0, be1;   // A0, A1, B0, B1

  always_comb begin
    for (int m = 0; m < 4; m++) begin
      a[m] = (IN_W+1)'(x[m]) + (IN_W+1)'(x[7-m]);
      b[m] = (IN_W+1)'(x[m]) - (IN_W+1)'(x[7-m]);
    end
    ae0 = (IN_W+2)'(a[0]) + (IN_W+2)'(a[3]);
    ae1 = (IN_W+2)'(a[1]) + (IN_W+2)'(a[2]);
    be0 = (IN_W+2)'(a[0]) - (IN_W+2)'(a[3]);
    be1 = (IN_W+2)'(a[1]) - (IN_W+2)'(a[2]);
  end

  logic signed [P-1:0] odd [4][Q];

  dct_dae #(.IN_W(IN_W+2), .Q(Q), .P(P), .CA(da_pkg::C4), .CB(da_pkg::C4)) u_dae04 (
    .u0(ae0), .u1(ae1), .zp(y[0]), .zq(y[4])
  );

  dct_dae #(.IN_W(IN_W+2), .Q(Q), .P(P), .CA(da_pkg::C2), .CB(da_pkg::C6)) u_dae26 (
    .u0(be0), .u1(be1), .zp(y[2]), .zq(y[6])
  );

  dct_dao #(.IN_W(IN_W+1), .Q(Q), .P(P)) u_dao (
    .b(b), .z(odd)
  );

  assign y[1] = odd[0];
  assign y[3] = odd[1];
  assign y[5] = odd[2];
  assign y[7] = odd[3];

endmodule
