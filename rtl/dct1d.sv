// dct1d: 8-point one-dimensional DCT core using distributed arithmetic.
//
// Computes, for each input vector x[0..7],
//   Z_n = k_n * sum_m x_m * cos((2m+1) n pi / 16),  k_0 = 1/sqrt(2), else 1,
// i.e. the DCT without the overall factor 1/2, as in the document. No
// multiplier is used: the DA-Butterfly-Matrix forms the partial-sum words of
// every output and eight optimized adder trees, one per output, add them in
// parallel. Coefficients have 9-bit DA precision (see da_pkg); outputs are
// rounded to integers by the error-compensated trees.
//
// Timing: fully parallel, one vector accepted every clock.
//   cycle 0: x and in_valid sampled; butterfly matrix result registered
//   cycle 1: the eight trees finish in this cycle and z is registered
// so z/out_valid appear 2 clocks after the vector was presented. The
// register after the butterfly matrix and the one-cycle tree follow the
// document; registering at exactly these two points is this design's
// choice. Synchronous active-low reset clears the valid flags only.
module dct1d #(
  parameter int unsigned IN_W  = 9,
  parameter int unsigned Q     = da_pkg::DCT_Q,
  parameter int unsigned FRAC  = da_pkg::DCT_FRAC,
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

  logic signed [P-1:0]     y_c [8][Q];
  logic signed [P-1:0]     y_q [8][Q];
  logic signed [OUT_W-1:0] z_c [8];
  logic                    v_q;

  dct_butterfly_matrix #(.IN_W(IN_W), .Q(Q), .P(P)) u_bm (.x(x), .y(y_c));

  always_ff @(posedge clk) begin
    y_q <= y_c;
    z   <= z_c;
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

  for (genvar n = 0; n < 8; n++) begin : g_oat
    oat #(.P(P), .Q(Q), .FRAC(FRAC), .KEEP(KEEP), .OUT_W(OUT_W)) u_oat (
      .y(y_q[n]), .z(z_c[n])
    );
  end

endmodule
