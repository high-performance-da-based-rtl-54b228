// tb_image_workload: a 256x256 8-bit image through all three cores.
//
// The image is generated here (smooth two-dimensional pattern plus noise,
// pixel values 0..255). It is streamed, at one vector per clock:
//   * into the 2-D DCT as 1024 blocks of 8x8 in raster order, back to back;
//   * into the Haar DWT and the DHT as 8192 segments of 8 pixels (each
//     image row cut into 32 segments).
// Every output is compared bit-exactly with the bit-level reference model.
// Each transformed block or segment is then inverted with the exact real
// inverse transform and rounded, and the reconstruction error against the
// original pixels is measured (sum of absolute errors, mean squared error,
// largest error); the largest error must stay within the bound the 9-bit
// coefficients and the rounding trees allow.
// The whole image must pass in 8192 clocks plus pipeline latency per core.
module tb_image_workload;
  import tb_da_pkg::*;

  localparam int IN_W = 9, N = 256, NSEG = N * N / 8;

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

  int img [N][N];
  int checks = 0, failures = 0, cycle = 0;
  int dct_cols = 0, dwt_n = 0, dht_n = 0;
  int last_out_cycle = 0;
  longint dct_blk [8][8];        // [column][u] of the block being received

  // reconstruction error statistics: [0] DCT, [1] DWT, [2] DHT
  real sae [3], sse [3];
  int  maxe [3];

  always @(posedge clk) cycle <= cycle + 1;

  // pixel (r, c) of block b / segment s
  function automatic int blk_pix(int b, int i, int m);
    return img[(b / (N / 8)) * 8 + i][(b % (N / 8)) * 8 + m];
  endfunction
  function automatic int seg_pix(int s, int m);
    return img[s / (N / 8)][(s % (N / 8)) * 8 + m];
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL %s", msg);
  endtask

  task automatic add_err(int k, real rec, int orig);
    int e = int'(rec) - orig;     // real to int rounds to nearest
    if (e < 0) e = -e;
    sae[k] += real'(e);
    sse[k] += real'(e) * real'(e);
    if (e > maxe[k]) maxe[k] = e;
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (dct_out_valid) dct_col();
      if (dwt_out_valid) seg_out(1'b0);
      if (dht_out_valid) seg_out(1'b1);
      if (dct_out_valid || dwt_out_valid || dht_out_valid) last_out_cycle = cycle;
    end
  end

  task automatic dct_col();
    int c = dct_cols % 8;
    for (int u = 0; u < 8; u++) dct_blk[c][u] = longint'(dct_z[u]);
    dct_cols++;
    if (c == 7) begin
      int   b = dct_cols / 8 - 1;
      blk_t x, e;
      for (int i = 0; i < 8; i++) for (int m = 0; m < 8; m++) x[i][m] = blk_pix(b, i, m);
      e = dct2_ref(x, IN_W + 3, IN_W + 7, 2);
      for (int cc = 0; cc < 8; cc++)
        for (int u = 0; u < 8; u++) begin
          checks++;
          if (dct_blk[cc][u] != e[cc][u]) fail($sformatf("DCT block %0d (%0d,%0d)", b, u, cc));
        end
      // inverse: the core output is 4x the orthonormal DCT, so each
      // dimension uses the orthonormal inverse weights divided by 2
      for (int i = 0; i < 8; i++)
        for (int m = 0; m < 8; m++) begin
          real s = 0.0;
          for (int u = 0; u < 8; u++)
            for (int v = 0; v < 8; v++)
              s += real'(dct_blk[v][u]) / 4.0 *
                   ((u == 0) ? 0.5 / $sqrt(2.0) : 0.5 * $cos(real'((2*i+1)*u) * PI / 16.0)) *
                   ((v == 0) ? 0.5 / $sqrt(2.0) : 0.5 * $cos(real'((2*m+1)*v) * PI / 16.0));
          add_err(0, s, blk_pix(b, i, m));
        end
    end
  endtask

  // inverse Haar: x = H8^T z
  function automatic rvec8_t haar_inv(vec8_t z);
    rvec8_t x;
    real s8 = 1.0 / $sqrt(8.0), s2 = 1.0 / $sqrt(2.0);
    for (int m = 0; m < 8; m++) begin
      x[m] = s8 * real'(z[0]) + ((m < 4) ? s8 : -s8) * real'(z[1]);
      if (m < 4) x[m] += ((m < 2) ? 0.5 : -0.5) * real'(z[2]);
      else       x[m] += ((m < 6) ? 0.5 : -0.5) * real'(z[3]);
      x[m] += ((m % 2 == 0) ? s2 : -s2) * real'(z[4 + m / 2]);
    end
    return x;
  endfunction

  task automatic seg_out(bit is_dht);
    vec8_t v, z, e;
    rvec8_t rec;
    int s = is_dht ? dht_n : dwt_n;
    for (int m = 0; m < 8; m++) begin
      v[m] = seg_pix(s, m);
      z[m] = is_dht ? longint'(dht_z[m]) : longint'(dwt_z[m]);
    end
    e = is_dht ? dht8_ref(v, IN_W + 3, 2) : dwt8_ref(v, IN_W + 3, 2);
    for (int m = 0; m < 8; m++) begin
      checks++;
      if (z[m] != e[m]) fail($sformatf("%s segment %0d output %0d", is_dht ? "DHT" : "DWT", s, m));
    end
    if (is_dht) begin
      // the DHT is its own inverse up to a factor 1/8
      rvec8_t h;
      vec8_t zz;
      for (int m = 0; m < 8; m++) zz[m] = z[m];
      h = dht8_true(zz);
      for (int m = 0; m < 8; m++) add_err(2, h[m] / 8.0, int'(v[m]));
      dht_n++;
    end else begin
      rec = haar_inv(z);
      for (int m = 0; m < 8; m++) add_err(1, rec[m], int'(v[m]));
      dwt_n++;
    end
  endtask

  task automatic run_dct();
    for (int b = 0; b < N * N / 64; b++)
      for (int i = 0; i < 8; i++) begin
        for (int m = 0; m < 8; m++) dct_x[m] = IN_W'(blk_pix(b, i, m));
        dct_in_valid = 1'b1;
        @(posedge clk);
        #1;
      end
    dct_in_valid = 1'b0;
  endtask

  task automatic run_seg();
    for (int s = 0; s < NSEG; s++) begin
      for (int m = 0; m < 8; m++) begin
        dwt_x[m] = IN_W'(seg_pix(s, m));
        dht_x[m] = IN_W'(seg_pix(s, m));
      end
      dwt_in_valid = 1'b1;
      dht_in_valid = 1'b1;
      @(posedge clk);
      #1;
    end
    dwt_in_valid = 1'b0;
    dht_in_valid = 1'b0;
  endtask

  initial begin
    int start;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        real p;
        p = 128.0 + 90.0 * $sin(real'(r) / 23.0) * $cos(real'(c) / 17.0)
                 + 20.0 * $sin(real'(r + 2 * c) / 5.0) + real'($urandom_range(0, 15)) - 8.0;
        if (p < 0.0)   p = 0.0;
        if (p > 255.0) p = 255.0;
        img[r][c] = int'(p);
      end
    for (int k = 0; k < 3; k++) begin sae[k] = 0.0; sse[k] = 0.0; maxe[k] = 0; end
    for (int m = 0; m < 8; m++) begin dct_x[m] = '0; dwt_x[m] = '0; dht_x[m] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    start = cycle;
    fork
      run_dct();
      run_seg();
    join
    repeat (20) @(posedge clk);
    checks += 4;
    if (dct_cols != N * N / 8) fail($sformatf("%0d DCT columns", dct_cols));
    if (dwt_n != NSEG) fail($sformatf("%0d DWT segments", dwt_n));
    if (dht_n != NSEG) fail($sformatf("%0d DHT segments", dht_n));
    if (last_out_cycle - start > NSEG + 12) fail($sformatf("image took %0d clocks", last_out_cycle - start));
    $display("image %0dx%0d done in %0d clocks", N, N, last_out_cycle - start);
    for (int k = 0; k < 3; k++)
      $display("%s reconstruction: sum |err| %0.0f, MSE %f, max |err| %0d",
               (k == 0) ? "DCT" : (k == 1) ? "DWT" : "DHT", sae[k], sse[k] / real'(N * N), maxe[k]);
    checks += 3;
    if (maxe[0] > 4) fail("DCT reconstruction error too large");
    if (maxe[1] > 4) fail("DWT reconstruction error too large");
    if (maxe[2] > 2) fail("DHT reconstruction error too large");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSEG + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
