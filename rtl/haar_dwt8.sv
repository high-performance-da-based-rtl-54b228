// haar_dwt8: 8-point Haar wavelet transform core using distributed arithmetic.
//
// Computes Z = H8 * x for one 8-sample vector per clock, where H8 is the
// orthonormal 8x8 Haar kernel (three decomposition levels in one matrix):
//   Z0 = (x0+..+x7)/sqrt(8)         Z1 = (x0+..+x3 - x4-..-x7)/sqrt(8)
//   Z2 = (x0+x1-x2-x3)/2            Z3 = (x4+x5-x6-x7)/2
//   Z(4+k) = (x(2k) - x(2k+1))/sqrt(2),  k = 0..3
// An adder stage forms the pair sums p_k = x(2k)+x(2k+1), pair differences
// d_k, the half sums p0+p1, p2+p3 and the terms above. Each output is then
// one term times one constant, applied by DA: the DA element gives the
// partial-sum word of each coefficient bit and an optimized adder tree adds
// them. Coefficients are 9-bit (1/sqrt(8) = 0.01011010b as in the
// document's DA coefficient table, 1/2, 1/sqrt(2) = 0.10110101b).
// 9-bit inputs and 13-bit outputs follow the widths of the document's
// simulation waveforms; outputs are integers rounded by the trees.
//
// Timing: one vector per clock, z/out_valid 2 clocks after x/in_valid
// (adder stage + DA registered, then one cycle of adder trees), the same
// pipeline as dct1d. Synchronous active-low reset clears the valid flags.
module haar_dwt8 #(
  parameter int unsigned IN_W  = 9,
  parameter int unsigned Q     = da_pkg::DWT_Q,
  parameter int unsigned FRAC  = da_pkg::DWT_FRAC,
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

  localparam int COEF [8] = '{da_pkg::H_RS8,  da_pkg::H_RS8,
                              da_pkg::H_HALF, da_pkg::H_HALF,
                              da_pkg::H_RS2,  da_pkg::H_RS2,
                              da_pkg::H_RS2,  da_pkg::H_RS2};

  logic signed [P-1:0] pk [4];
  logic signed [P-1:0] dk [4];
  logic signed [P-1:0] s0, s1;
  logic signed [P-1:0] t [8];      // term multiplied by the constant of Z_n

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      pk[k] = P'(x[2*k]) + P'(x[2*k+1]);
      dk[k] = P'(x[2*k]) - P'(x[2*k+1]);
    end
    s0   = pk[0] + pk[1];
    s1   = pk[2] + pk[3];
    t[0] = s0 + s1;
    t[1] = s0 - s1;
    t[2] = pk[0] - pk[1];
    t[3] = pk[2] - pk[3];
    for (int k = 0; k < 4; k++) t[4+k] = dk[k];
  end

  logic signed [P-1:0]     y_c [8][Q];
  logic signed [P-1:0]     y_q [8][Q];
  logic signed [OUT_W-1:0] z_c [8];
  logic                    v_q;

  for (genvar n = 0; n < 8; n++) begin : g_lane
    localparam int CM [1][1] = '{'{COEF[n]}};
    logic signed [P-1:0] tin [1];
    logic signed [P-1:0] yw  [1][Q];

    assign tin[0] = t[n];

    da_pe #(.N_IN(1), .N_OUT(1), .IN_W(P), .Q(Q), .P(P), .COEF(CM)) u_pe (
      .u(tin), .y(yw)
    );
    assign y_c[n] = yw[0];

    oat #(.P(P), .Q(Q), .FRAC(FRAC), .KEEP(KEEP), .OUT_W(OUT_W)) u_oat (
      .y(y_q[n]), .z(z_c[n])
    );
  end

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

endmodule
