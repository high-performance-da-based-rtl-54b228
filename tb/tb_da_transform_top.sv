// tb_da_transform_top: end-to-end testbench of the three transform cores.
//
// Runs the top level at its default parameters (9-bit samples), driving
// all three cores at the same time:
//   * 2-D DCT: random 8x8 blocks row by row, partly back to back so that a
//     block is written into one transpose bank while the previous block is
//     read from the other, partly with idle clocks between rows;
//   * Haar DWT and DHT: random 8-sample vectors, one per clock with random
//     idle clocks.
// Every result is compared bit-exactly with the bit-level reference models
// and its arrival clock with the core's latency (DCT: 5 clocks after the
// last row; DWT, DHT: 2 clocks). The mechanisms of the design are counted
// and each must occur at least once: back-to-back DCT blocks (transpose
// ping-pong overlap), idle input clocks on each core, and tree results
// raised above plain truncation by the compensated carry (DWT outputs
// compared with the floor of the exact product).
module tb_da_transform_top;
  import tb_da_pkg::*;

  localparam int IN_W = 9, NBLK = 40, NVEC = 2000;

  logic                   clk = 1'b0, rst_n = 1'b0;
  logic                   dct_in_valid = 1'b0, dwt_in_valid = 1'b0, dht_in_valid = 1'b0;
  logic signed [IN_W-1:0] dct_x [8], dwt_x [8], dht_x [8];
  logic                   dct_out_valid, dct_out_last, dwt_out_valid, dht_out_valid;
  logic signed [IN_W+7:0] dct_z [8];
  logic signed [IN_W+3:0] dwt_z [8], dht_z [8];

  da_transform_top dut (
    .clk(clk), .rst_n(rst_n),
    .dct_in_valid(dct_in_valid), .dct_x(dct_x),
    .dct_out_valid(dct_out_valid), .dct_out_last(dct_out_last), .dct_z(dct_z),
    .dwt_in_valid(dwt_in_valid), .dwt_x(dwt_x),
    .dwt_out_valid(dwt_out_valid), .dwt_z(dwt_z),
    .dht_in_valid(dht_in_valid), .dht_x(dht_x),
    .dht_out_valid(dht_out_valid), .dht_z(dht_z)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  // mechanism counters
  int n_pingpong = 0, n_dct_idle = 0, n_dwt_idle = 0, n_dht_idle = 0, n_comp_carry = 0;
  int n_dct_cols = 0, n_dwt_out = 0, n_dht_out = 0;

  // expected results, element by element, and due cycles
  longint dct_e [$], dwt_e [$], dht_e [$];
  real    dwt_q [$];
  int     dct_t [$], dwt_t [$], dht_t [$];

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dct_in_valid && dct_out_valid) n_pingpong++;
      if (dct_out_valid) score_dct();
      if (dwt_out_valid) score_vec(1'b0);
      if (dht_out_valid) score_vec(1'b1);
    end
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL %s (cycle %0d)", msg, cycle);
  endtask

  task automatic score_dct();
    int t;
    n_dct_cols++;
    checks++;
    if (dct_t.size() == 0) begin fail("unexpected DCT column"); return; end
    t = dct_t.pop_front();
    if (t != cycle) fail($sformatf("DCT column due at %0d", t));
    for (int u = 0; u < 8; u++) begin
      longint e = dct_e.pop_front();
      checks++;
      if (longint'(dct_z[u]) != e) fail($sformatf("DCT z[%0d]=%0d ref %0d", u, dct_z[u], e));
    end
    checks++;
    if (dct_out_last != (n_dct_cols % 8 == 0)) fail("DCT out_last");
  endtask

  task automatic score_vec(bit is_dht);
    int t;
    checks++;
    if (is_dht) begin
      n_dht_out++;
      if (dht_t.size() == 0) begin fail("unexpected DHT output"); return; end
      t = dht_t.pop_front();
      if (t != cycle) fail($sformatf("DHT output due at %0d", t));
      for (int k = 0; k < 8; k++) begin
        longint e = dht_e.pop_front();
        checks++;
        if (longint'(dht_z[k]) != e) fail($sformatf("DHT Y%0d=%0d ref %0d", k, dht_z[k], e));
      end
    end else begin
      n_dwt_out++;
      if (dwt_t.size() == 0) begin fail("unexpected DWT output"); return; end
      t = dwt_t.pop_front();
      if (t != cycle) fail($sformatf("DWT output due at %0d", t));
      for (int k = 0; k < 8; k++) begin
        longint e = dwt_e.pop_front();
        real    q = dwt_q.pop_front();
        checks++;
        if (longint'(dwt_z[k]) != e) fail($sformatf("DWT Z%0d=%0d ref %0d", k, dwt_z[k], e));
        if (real'(dwt_z[k]) > $floor(q)) n_comp_carry++;
      end
    end
  endtask

  // exact DWT outputs with the quantized 9-bit constants
  function automatic rvec8_t dwt_qexact(vec8_t x);
    rvec8_t r;
    longint pk [4];
    for (int k = 0; k < 4; k++) pk[k] = x[2*k] + x[2*k+1];
    r[0] = 90.0  * real'(pk[0] + pk[1] + pk[2] + pk[3]) / 256.0;
    r[1] = 90.0  * real'(pk[0] + pk[1] - pk[2] - pk[3]) / 256.0;
    r[2] = 128.0 * real'(pk[0] - pk[1]) / 256.0;
    r[3] = 128.0 * real'(pk[2] - pk[3]) / 256.0;
    for (int k = 0; k < 4; k++) r[4+k] = 181.0 * real'(x[2*k] - x[2*k+1]) / 256.0;
    return r;
  endfunction

  task automatic run_dct();
    blk_t blk, e;
    for (int b = 0; b < NBLK; b++) begin
      bit gaps = (b % 4 == 3);
      for (int i = 0; i < 8; i++)
        for (int m = 0; m < 8; m++) blk[i][m] = longint'($signed(IN_W'($urandom)));
      e = dct2_ref(blk, IN_W + 3, IN_W + 7, 2);
      for (int i = 0; i < 8; i++) begin
        for (int m = 0; m < 8; m++) dct_x[m] = IN_W'(blk[i][m]);
        dct_in_valid = 1'b1;
        if (i == 7)
          for (int c = 0; c < 8; c++) begin
            dct_t.push_back(cycle + 5 + c);
            for (int u = 0; u < 8; u++) dct_e.push_back(e[c][u]);
          end
        @(posedge clk);
        #1;
        if (gaps && $urandom_range(0, 2) == 0) begin
          dct_in_valid = 1'b0;
          n_dct_idle++;
          @(posedge clk);
          #1;
        end
      end
    end
    dct_in_valid = 1'b0;
  endtask

  task automatic run_vec(bit is_dht);
    vec8_t v, e;
    rvec8_t q;
    for (int t = 0; t < NVEC; t++) begin
      for (int m = 0; m < 8; m++) v[m] = longint'($signed(IN_W'($urandom)));
      if (is_dht) begin
        e = dht8_ref(v, IN_W + 3, 2);
        for (int m = 0; m < 8; m++) begin dht_x[m] = IN_W'(v[m]); dht_e.push_back(e[m]); end
        dht_t.push_back(cycle + 2);
        dht_in_valid = 1'b1;
      end else begin
        e = dwt8_ref(v, IN_W + 3, 2);
        q = dwt_qexact(v);
        for (int m = 0; m < 8; m++) begin
          dwt_x[m] = IN_W'(v[m]); dwt_e.push_back(e[m]); dwt_q.push_back(q[m]);
        end
        dwt_t.push_back(cycle + 2);
        dwt_in_valid = 1'b1;
      end
      @(posedge clk);
      #1;
      if ($urandom_range(0, 9) == 0) begin
        if (is_dht) begin dht_in_valid = 1'b0; n_dht_idle++; end
        else        begin dwt_in_valid = 1'b0; n_dwt_idle++; end
        @(posedge clk);
        #1;
      end
    end
    if (is_dht) dht_in_valid = 1'b0;
    else        dwt_in_valid = 1'b0;
  endtask

  initial begin
    for (int m = 0; m < 8; m++) begin dct_x[m] = '0; dwt_x[m] = '0; dht_x[m] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      run_dct();
      run_vec(1'b0);
      run_vec(1'b1);
    join
    repeat (16) @(posedge clk);
    checks += 3;
    if (n_dct_cols != 8 * NBLK || dct_t.size() != 0) fail($sformatf("%0d DCT columns for %0d blocks", n_dct_cols, NBLK));
    if (n_dwt_out != NVEC || dwt_t.size() != 0) fail($sformatf("%0d DWT outputs for %0d vectors", n_dwt_out, NVEC));
    if (n_dht_out != NVEC || dht_t.size() != 0) fail($sformatf("%0d DHT outputs for %0d vectors", n_dht_out, NVEC));
    $display("mechanisms: transpose ping-pong overlap %0d, DCT idle %0d, DWT idle %0d, DHT idle %0d, compensated carries %0d",
             n_pingpong, n_dct_idle, n_dwt_idle, n_dht_idle, n_comp_carry);
    checks += 5;
    if (n_pingpong   == 0) fail("no transpose ping-pong overlap");
    if (n_dct_idle   == 0) fail("no DCT idle clock");
    if (n_dwt_idle   == 0) fail("no DWT idle clock");
    if (n_dht_idle   == 0) fail("no DHT idle clock");
    if (n_comp_carry == 0) fail("no compensated carry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * NVEC + 20 * NBLK + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
