// tb_dct1d: self-checking testbench of the 1-D 8-point DA DCT core.
//
// Streams 8-sample vectors of 9-bit signed data into the core: extreme
// vectors first, then random ones, mostly back to back with occasional idle
// clocks. Each result is checked
//   * bit-exactly against a reference that follows the same butterfly and DA
//     formulation with a bit-by-bit adder tree model,
//   * against the exact real-valued DCT (error within the 9-bit coefficient
//     and tree rounding bound),
//   * for its latency: out_valid exactly 2 clocks after in_valid,
// and the core must accept one vector per clock (the number of results
// must equal the number of vectors and every cycle with input has output
// two cycles later). A mid-run reset must clear the valid pipeline.
module tb_dct1d;
  import tb_da_pkg::*;

  localparam int IN_W = 9, OUT_W = 13, P = 12, KEEP = 2, LAT = 2;
  localparam int NVEC = 3000;

  logic                    clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0]  x [8];
  logic                    out_valid;
  logic signed [OUT_W-1:0] z [8];

  dct1d dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
             .out_valid(out_valid), .z(z));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  // queues hold vectors element by element
  longint exp_q [$];
  int     exp_t [$];
  longint inp_q [$];
  int     n_out = 0, n_in = 0;
  real    max_err = 0.0;

  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && out_valid) score();
  end

  task automatic score();
      vec8_t e, xi;
      rvec8_t tr;
      int t;
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        for (int m = 0; m < 8; m++) begin
          e[m]  = exp_q.pop_front();
          xi[m] = inp_q.pop_front();
        end
        t = exp_t.pop_front();
        if (cycle - t != LAT) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", cycle - t, LAT);
        end
        tr = dct8_true(xi);
        for (int n = 0; n < 8; n++) begin
          real bound = 1.5;
          for (int m = 0; m < 8; m++) bound += rabs(real'(xi[m])) / 512.0;
          checks += 2;
          if (longint'(z[n]) != e[n]) begin
            failures++;
            if (failures < 10) $display("FAIL Z%0d = %0d, reference %0d", n, z[n], e[n]);
          end
          if (rabs(real'(z[n]) - tr[n]) > bound) begin
            failures++;
            if (failures < 10) $display("FAIL Z%0d = %0d, exact %f", n, z[n], tr[n]);
          end
          if (rabs(real'(z[n]) - tr[n]) > max_err) max_err = rabs(real'(z[n]) - tr[n]);
        end
      end
  endtask

  task automatic drive(vec8_t v);
    vec8_t e;
    for (int m = 0; m < 8; m++) x[m] = IN_W'(v[m]);
    in_valid = 1'b1;
    e = dct8_ref(v, P, KEEP);
    for (int m = 0; m < 8; m++) begin
      exp_q.push_back(e[m]);
      inp_q.push_back(v[m]);
    end
    exp_t.push_back(cycle);
    n_in++;
    @(posedge clk);
    #1;
  endtask

  initial begin
    vec8_t v;
    for (int m = 0; m < 8; m++) x[m] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // extremes
    for (int m = 0; m < 8; m++) v[m] = 255;   drive(v);
    for (int m = 0; m < 8; m++) v[m] = -256;  drive(v);
    for (int m = 0; m < 8; m++) v[m] = (m % 2 == 0) ? 255 : -256; drive(v);
    for (int m = 0; m < 8; m++) v[m] = (m < 4) ? 255 : -256; drive(v);
    for (int t = 0; t < NVEC; t++) begin
      for (int m = 0; m < 8; m++) v[m] = longint'($signed(IN_W'($urandom)));
      drive(v);
      if ($urandom_range(0, 15) == 0) begin
        in_valid = 1'b0;
        @(posedge clk);
        #1;
      end
    end
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    // reset with data in flight: no result may come out afterwards
    #1;
    for (int m = 0; m < 8; m++) x[m] = IN_W'(m);
    in_valid = 1'b1;
    @(posedge clk);
    #1 in_valid = 1'b0; rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (n_out != n_in) begin
      failures++;
      $display("FAIL %0d vectors in, %0d results out", n_in, n_out);
    end
    $display("max |error| against exact DCT: %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * NVEC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
