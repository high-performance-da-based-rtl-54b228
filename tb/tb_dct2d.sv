// tb_dct2d: self-checking testbench of the 8x8 2-D DCT.
//
// Sends random 8x8 blocks of 9-bit signed samples, one row per clock, some
// blocks back to back and some with idle clocks between rows. Each block's
// 8 output columns are checked bit-exactly against a row-column reference
// built from the bit-level 1-D model, and against the exact 2-D DCT
// (4x the orthonormal one); the first column must come out 5 clocks after
// the block's last row and the columns on consecutive clocks, out_last on
// the 8th.
module tb_dct2d;
  import tb_da_pkg::*;

  localparam int IN_W = 9, OUT_W = 17, NBLK = 60, LAT = 5;

  logic                    clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0]  x [8];
  logic                    out_valid, out_last;
  logic signed [OUT_W-1:0] z [8];

  dct2d dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
             .out_valid(out_valid), .out_last(out_last), .z(z));

  always #5 clk = ~clk;

  int     checks = 0, failures = 0, cycle = 0, n_cols = 0;
  longint exp_w [$];
  real    exp_r [$];
  int     exp_t [$];
  real    max_err = 0.0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) score();
  end

  task automatic score();
    int t;
    n_cols++;
    checks++;
    if (exp_t.size() == 0) begin
      failures++;
      $display("FAIL unexpected column at cycle %0d", cycle);
      return;
    end
    t = exp_t.pop_front();
    if (t != cycle) begin
      failures++;
      if (failures < 10) $display("FAIL column due at %0d came at %0d", t, cycle);
    end
    for (int u = 0; u < 8; u++) begin
      longint e = exp_w.pop_front();
      real    r = exp_r.pop_front();
      checks += 2;
      if (longint'(z[u]) != e) begin
        failures++;
        if (failures < 10) $display("FAIL z[%0d] = %0d, reference %0d", u, z[u], e);
      end
      if (rabs(real'(z[u]) - r) > 16.0) begin
        failures++;
        if (failures < 10) $display("FAIL z[%0d] = %0d, exact %f", u, z[u], r);
      end
      if (rabs(real'(z[u]) - r) > max_err) max_err = rabs(real'(z[u]) - r);
    end
    checks++;
    if (out_last != (n_cols % 8 == 0)) begin
      failures++;
      $display("FAIL out_last at column %0d", n_cols);
    end
  endtask

  task automatic send_block(blk_t blk, bit gaps);
    blk_t  e;
    rblk_t r;
    e = dct2_ref(blk, IN_W + 3, IN_W + 7, 2);
    r = dct2_true(blk);
    for (int i = 0; i < 8; i++) begin
      for (int m = 0; m < 8; m++) x[m] = IN_W'(blk[i][m]);
      in_valid = 1'b1;
      if (i == 7)
        for (int c = 0; c < 8; c++) begin
          exp_t.push_back(cycle + LAT + c);
          for (int u = 0; u < 8; u++) begin
            exp_w.push_back(e[c][u]);
            exp_r.push_back(r[c][u]);
          end
        end
      @(posedge clk);
      #1;
      if (gaps && $urandom_range(0, 2) == 0) begin
        in_valid = 1'b0;
        @(posedge clk);
        #1;
      end
    end
    in_valid = 1'b0;
  endtask

  initial begin
    blk_t blk;
    for (int m = 0; m < 8; m++) x[m] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // extremes: flat maximum, flat minimum, checkerboard
    for (int i = 0; i < 8; i++) for (int m = 0; m < 8; m++) blk[i][m] = 255;
    send_block(blk, 1'b0);
    for (int i = 0; i < 8; i++) for (int m = 0; m < 8; m++) blk[i][m] = -256;
    send_block(blk, 1'b0);
    for (int i = 0; i < 8; i++) for (int m = 0; m < 8; m++) blk[i][m] = ((i + m) % 2 == 0) ? 255 : -256;
    send_block(blk, 1'b0);
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 8; i++)
        for (int m = 0; m < 8; m++) blk[i][m] = longint'($signed(IN_W'($urandom)));
      send_block(blk, b % 4 == 3);
    end
    repeat (LAT + 10) @(posedge clk);
    checks++;
    if (n_cols != 8 * (NBLK + 3) || exp_t.size() != 0) begin
      failures++;
      $display("FAIL %0d columns out for %0d blocks", n_cols, NBLK + 3);
    end
    $display("max |error| against exact 2-D DCT: %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 * (NBLK + 3) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
