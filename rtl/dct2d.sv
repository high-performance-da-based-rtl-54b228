// dct2d: 8x8 two-dimensional DCT by the row-column method.
//
// A first 1-D DCT core (dct1d) transforms the 8 rows of a block, one row
// vector per clock; a ping-pong transpose buffer turns the 8 results into
// column vectors; a second dct1d transforms the columns. The output is the
// 2-D DCT of the block, column by column: z[u] of the c-th output vector is
// coefficient (u, c), u = vertical frequency, c = horizontal frequency,
// each scaled as in dct1d (no 1/2 factors, so 4x the orthonormal value).
// The row core has IN_W-bit inputs; the column core takes the row core's
// full-width outputs, so no intermediate rounding beyond the row trees.
//
// Timing: a block is 8 consecutive row vectors with in_valid high (blocks
// may follow each other without gaps). The first column vector of a block
// comes out 2 + 1 + 2 = 5 clocks after its last row was presented
// (row core 2, transpose 1, column core 2) and the 8 columns follow on
// consecutive clocks; out_last marks the 8th.
// The document titles its design an 8x8 2-D DCT built from the DA 1-D core
// but describes only the 1-D core; the row-column arrangement with a
// transpose buffer is this design's choice.
module dct2d #(
  parameter int unsigned IN_W   = 9,
  parameter int unsigned MID_W  = IN_W + 4,    // row-core output width
  parameter int unsigned OUT_W  = MID_W + 4    // column-core output width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x [8],
  output logic                    out_valid,
  output logic                    out_last,
  output logic signed [OUT_W-1:0] z [8]
);

  logic                    row_v;
  logic signed [MID_W-1:0] row_z [8];
  logic                    col_v, col_last;
  logic signed [MID_W-1:0] col_x [8];
  logic                    last_d1, last_d2;

  dct1d #(.IN_W(IN_W), .P(IN_W+3), .OUT_W(MID_W)) u_row (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .out_valid(row_v), .z(row_z)
  );

  transpose_buffer #(.W(MID_W)) u_tbuf (
    .clk(clk), .rst_n(rst_n), .in_valid(row_v), .row(row_z),
    .out_valid(col_v), .out_last(col_last), .col(col_x)
  );

  dct1d #(.IN_W(MID_W), .P(MID_W+3), .OUT_W(OUT_W)) u_col (
    .clk(clk), .rst_n(rst_n), .in_valid(col_v), .x(col_x),
    .out_valid(out_valid), .z(z)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_d1 <= 1'b0;
      last_d2 <= 1'b0;
    end else begin
      last_d1 <= col_last;
      last_d2 <= last_d1;
    end
  end
  assign out_last = last_d2;

endmodule
