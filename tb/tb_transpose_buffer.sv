// tb_transpose_buffer: self-checking testbench of the ping-pong transpose
// buffer.
//
// Writes random 8x8 blocks of 13-bit words, row by row, both back to back
// (a new block starts while the previous one is being read) and with idle
// clocks between rows. Checks that each block comes back as its 8 columns,
// in order, on 8 consecutive clocks starting the clock after its last row,
// with out_last on the 8th column only, and that no extra vectors appear.
module tb_transpose_buffer;

  localparam int W = 13, NBLK = 200;

  logic                clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0] row [8];
  logic                out_valid, out_last;
  logic signed [W-1:0] col [8];

  transpose_buffer #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .row(row),
                                 .out_valid(out_valid), .out_last(out_last), .col(col));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_cols = 0, n_back_to_back = 0;
  int exp_w [$];           // expected column words, 8 per column
  int exp_t [$];           // cycle at which each column is due
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid && in_valid) n_back_to_back++;
    if (rst_n && out_valid) begin
      n_cols++;
      checks++;
      if (exp_t.size() == 0) begin
        failures++;
        $display("FAIL unexpected column at cycle %0d", cycle);
      end else begin
        int t;
        t = exp_t.pop_front();
        if (t != cycle) begin
          failures++;
          if (failures < 10) $display("FAIL column due at %0d came at %0d", t, cycle);
        end
        for (int r = 0; r < 8; r++) begin
          int e;
          e = exp_w.pop_front();
          checks++;
          if (int'(col[r]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL column word %0d: %0d vs %0d", r, col[r], e);
          end
        end
        checks++;
        if (out_last != (n_cols % 8 == 0)) begin
          failures++;
          $display("FAIL out_last at column %0d", n_cols);
        end
      end
    end
  end

  task automatic send_block(bit gaps);
    int blk [8][8];
    int t_last;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) blk[r][c] = int'($signed(W'($urandom)));
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) row[c] = W'(blk[r][c]);
      in_valid = 1'b1;
      if (r == 7) t_last = cycle;
      @(posedge clk);
      #1;
      if (r == 7) begin
        for (int c = 0; c < 8; c++) begin
          exp_t.push_back(t_last + 1 + c);
          for (int q = 0; q < 8; q++) exp_w.push_back(blk[q][c]);
        end
      end
      if (gaps && $urandom_range(0, 2) == 0) begin
        in_valid = 1'b0;
        @(posedge clk);
        #1;
      end
    end
    in_valid = 1'b0;
  endtask

  initial begin
    for (int c = 0; c < 8; c++) row[c] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) send_block(b % 3 == 2);
    repeat (12) @(posedge clk);
    checks++;
    if (n_cols != 8 * NBLK || exp_t.size() != 0) begin
      failures++;
      $display("FAIL %0d columns out for %0d blocks", n_cols, NBLK);
    end
    checks++;
    if (n_back_to_back == 0) begin
      failures++;
      $display("FAIL no row was written while a column was read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * NBLK + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
