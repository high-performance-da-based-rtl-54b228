// dht8: 8-point discrete Hartley transform core using distributed arithmetic.
//
// Computes Y(k) = sum_n x(n) * cas(2 pi n k / 8), cas = cos + sin, without
// scaling, for one 8-sample vector per clock. The kernel entries are only
// 0, +-1 and +-sqrt(2).
//   ALU stage: four add/subtract units form e_n = x(n) + x(n+4) and
//     f_n = x(n) - x(n+4), n = 0..3 (the document's ALU1..ALU4; even
//     outputs use the sums, odd outputs the differences, and an odd output
//     whose coefficient is 0 does not use that difference).
//   DA stage: even outputs Y0, Y2, Y4, Y6 are +-1 combinations of e_n; odd
//     outputs are Y1 = f0 + sqrt2 f1 + f2, Y3 = f0 - f2 + sqrt2 f3,
//     Y5 = f0 - sqrt2 f1 + f2, Y7 = f0 - f2 - sqrt2 f3. Coefficients are
//     9-bit DA constants with weights -2^1, 2^0, 2^-1..2^-7, so sqrt(2) is
//     1.0110101b, the bit pattern of the document's DHT DA table.
//   Eight optimized adder trees add the partial-sum words.
// The document's intermediate sums R1..R10 are formed here implicitly by
// the subset-sum network of da_pe.
//
// Timing: z/out_valid 2 clocks after x/in_valid, one vector per clock,
// the same pipeline as dct1d. Synchronous active-low reset clears the valid
// flags only.
module dht8 #(
  parameter int unsigned IN_W  = 9,
  parameter int unsigned Q     = da_pkg::DHT_Q,
  parameter int unsigned FRAC  = da_pkg::DHT_FRAC,
  parameter int unsigned P     = IN_W + 3,
  parameter int unsigned KEEP  = da_pkg::OAT_KEEP,
  parameter int unsigned OUT_W = P + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x [8],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] z [8]
);

  logic signed [IN_W:0] e [4];
  logic signed [IN_W:0] f [4];

  always_comb begin
    for (int n = 0; n < 4; n++) begin
      e[n] = (IN_W+1)'(x[n]) + (IN_W+1)'(x[n+4]);
      f[n] = (IN_W+1)'(x[n]) - (IN_W+1)'(x[n+4]);
    end
  end

  logic signed [P-1:0]     ye [4][Q];
  logic signed [P-1:0]     yo [4][Q];
  logic signed [P-1:0]     y_q [8][Q];
  logic signed [OUT_W-1:0] z_c [8];
  logic                    v_q;

  da_pe #(.N_IN(4), .N_OUT(4), .IN_W(IN_W+1), .Q(Q), .P(P),
          .COEF(da_pkg::DHT_EVEN_COEF)) u_pe_even (.u(e), .y(ye));

  da_pe #(.N_IN(4), .N_OUT(4), .IN_W(IN_W+1), .Q(Q), .P(P),
          .COEF(da_pkg::DHT_ODD_COEF)) u_pe_odd (.u(f), .y(yo));

  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      y_q[2*k]   <= ye[k];
      y_q[2*k+1] <= yo[k];
    end
    z <= z_c;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
    end
  end

  for (genvar k = 0; k < 8; k++) begin : g_oat
    oat #(.P(P), .Q(Q), .FRAC(FRAC), .KEEP(KEEP), .OUT_W(OUT_W)) u_oat (
      .y(y_q[k]), .z(z_c[k])
    );
  end

endmodule
