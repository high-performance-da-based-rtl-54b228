// transpose_buffer: 8x8 ping-pong transpose memory for the row-column 2-D DCT.
//
// Accepts row vectors (8 words) one per clock while in_valid is high and
// returns the same 8x8 block as column vectors. Two banks alternate: the
// 8 rows of a block are written into one bank while the columns of the
// previous block are read from the other, so blocks can stream back to back
// at one vector per clock. After the 8th row of a block is written, its
// first column appears on the next clock and the 8 columns follow on
// consecutive clocks (out_valid high for 8 cycles); out_last marks the
// 8th column.
// The document names an 8x8 2-D DCT but does not describe its transpose
// memory; this bank arrangement is this design's choice.
// Synchronous active-low reset clears the counters and flags; the data
// banks need no reset (a bank is only read after it has been filled).
module transpose_buffer #(
  parameter int unsigned W = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] row [8],
  output logic                out_valid,
  output logic                out_last,
  output logic signed [W-1:0] col [8]
);

  logic signed [W-1:0] mem [2][8][8];   // [bank][row][column]

  logic [2:0] wr_cnt, rd_cnt;
  logic       wr_bank, rd_bank;
  logic       rd_active;

  // Write side: fill rows of the current bank.
  always_ff @(posedge clk) begin
    if (in_valid) mem[wr_bank][wr_cnt] <= row;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_cnt    <= '0;
      wr_bank   <= 1'b0;
      rd_cnt    <= '0;
      rd_bank   <= 1'b0;
      rd_active <= 1'b0;
    end else begin
      if (in_valid) begin
        wr_cnt <= wr_cnt + 3'd1;
        if (wr_cnt == 3'd7) wr_bank <= ~wr_bank;
      end
      if (in_valid && wr_cnt == 3'd7) begin
        // A full block: start (or restart) reading it next clock.
        rd_active <= 1'b1;
        rd_bank   <= wr_bank;
        rd_cnt    <= '0;
      end else if (rd_active) begin
        rd_cnt <= rd_cnt + 3'd1;
        if (rd_cnt == 3'd7) rd_active <= 1'b0;
      end
    end
  end

  // Read side: column rd_cnt of the full bank.
  always_comb begin
    for (int r = 0; r < 8; r++) col[r] = mem[rd_bank][r][rd_cnt];
  end
  assign out_valid = rd_active;
  assign out_last  = rd_active && (rd_cnt == 3'd7);

  // Blocks arrive at most one row per clock, so a block completes no sooner
  // than 8 clocks after the previous one and reading never falls behind.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_valid && wr_cnt == 3'd7 && rd_active) |-> (rd_cnt == 3'd7))
    else $error("transpose_buffer: new block completed while a column read was pending");

endmodule
