// da_transform_top: the three multiplier-free DA transform cores side by side.
//
//   * dct2d     : 8x8 2-D DCT (two DA 1-D DCT cores and a transpose buffer)
//   * haar_dwt8 : 8-point Haar wavelet transform
//   * dht8      : 8-point discrete Hartley transform
// Each core has its own input vector, valid flags and result vector; they
// share only the clock and reset. All take 9-bit signed samples and accept
// one 8-sample vector per clock. The cores are independent designs built
// from the same two parts, the DA processing element (da_pe) and the
// optimized adder tree (oat).
// Timing: DWT and DHT results 2 clocks after their input; DCT columns start
// 5 clocks after the last row of a block (see dct2d).
module da_transform_top #(
  parameter int unsigned IN_W = 9
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // 2-D DCT: rows in, columns out
  input  logic                   dct_in_valid,
  input  logic signed [IN_W-1:0] dct_x [8],
  output logic                   dct_out_valid,
  output logic                   dct_out_last,
  output logic signed [IN_W+7:0] dct_z [8],
  // Haar DWT
  input  logic                   dwt_in_valid,
  input  logic signed [IN_W-1:0] dwt_x [8],
  output logic                   dwt_out_valid,
  output logic signed [IN_W+3:0] dwt_z [8],
  // DHT
  input  logic                   dht_in_valid,
  input  logic signed [IN_W-1:0] dht_x [8],
  output logic                   dht_out_valid,
  output logic signed [IN_W+3:0] dht_z [8]
);

  dct2d #(.IN_W(IN_W)) u_dct (
    .clk(clk), .rst_n(rst_n), .in_valid(dct_in_valid), .x(dct_x),
    .out_valid(dct_out_valid), .out_last(dct_out_last), .z(dct_z)
  );

  haar_dwt8 #(.IN_W(IN_W)) u_dwt (
    .clk(clk), .rst_n(rst_n), .in_valid(dwt_in_valid), .x(dwt_x),
    .out_valid(dwt_out_valid), .z(dwt_z)
  );

  dht8 #(.IN_W(IN_W)) u_dht (
    .clk(clk), .rst_n(rst_n), .in_valid(dht_in_valid), .x(dht_x),
    .out_valid(dht_out_valid), .z(dht_z)
  );

endmodule
