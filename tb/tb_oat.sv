// tb_oat: self-checking testbench of the optimized adder tree.
//
// Two trees are exercised: the (P, Q) = (12, 6) example configuration with
// all five truncation columns below the integer result, and the 9-word DHT
// configuration whose sign word has weight -2 (7 fraction columns). Random
// and extreme words are applied; every result is compared bit-exactly with
// a bit-by-bit model and its distance from the exact weighted sum is
// bounded. The mean error of the tree is also compared with that of plain
// truncation (all fraction columns dropped, no compensation), which it must
// beat: that is the point of the compensated tree.
module tb_oat;
  import tb_da_pkg::*;

  localparam int P = 12;

  logic signed [P-1:0] ya [6];
  logic signed [P:0]   za;
  logic signed [P-1:0] yb [9];
  logic signed [P:0]   zb;

  oat #(.P(P), .Q(6))                         dut_a (.y(ya), .z(za));
  oat #(.P(P), .Q(9), .FRAC(7), .KEEP(2))    dut_b (.y(yb), .z(zb));

  int checks = 0, failures = 0;
  real err_oat_a = 0.0, err_trunc_a = 0.0;

  task automatic check_a();
    words_t w;
    longint r;
    real ex;
    for (int j = 0; j < 16; j++) w[j] = (j < 6) ? longint'(ya[j]) : 0;
    r  = oat_ref(P, 6, 5, 2, w);
    ex = oat_exact(6, 5, w);
    checks++;
    if (longint'(za) != r || rabs(real'(za) - ex) > 1.0) begin
      failures++;
      if (failures < 10) $display("FAIL oat(12,6): z=%0d ref=%0d exact=%f", za, r, ex);
    end
    err_oat_a   += rabs(real'(za) - ex);
    err_trunc_a += rabs($floor(ex) - ex) ;
  endtask

  task automatic check_b();
    words_t w;
    longint r;
    real ex;
    for (int j = 0; j < 16; j++) w[j] = (j < 9) ? longint'(yb[j]) : 0;
    r  = oat_ref(P, 9, 7, 2, w);
    ex = oat_exact(9, 7, w);
    checks++;
    if (longint'(zb) != r || rabs(real'(zb) - ex) > 1.5) begin
      failures++;
      if (failures < 10) $display("FAIL oat(12,9): z=%0d ref=%0d exact=%f", zb, r, ex);
    end
  endtask

  localparam int N = 4000;

  initial begin
    // extremes
    for (int j = 0; j < 6; j++) ya[j] = '0;
    for (int j = 0; j < 9; j++) yb[j] = '0;
    #1 check_a(); check_b();
    for (int j = 0; j < 6; j++) ya[j] = {1'b1, {(P-1){1'b0}}};
    for (int j = 0; j < 9; j++) yb[j] = {3'b111, {(P-3){1'b0}}};
    #1 check_a(); check_b();
    for (int j = 0; j < 6; j++) ya[j] = {1'b0, {(P-1){1'b1}}};
    for (int j = 0; j < 9; j++) yb[j] = {3'b000, {(P-3){1'b1}}};
    #1 check_a(); check_b();
    err_oat_a = 0.0; err_trunc_a = 0.0;
    for (int t = 0; t < N; t++) begin
      for (int j = 0; j < 6; j++) ya[j] = P'($urandom);
      for (int j = 0; j < 9; j++) yb[j] = P'($signed(P'($urandom)) >>> 2);
      #1 check_a(); check_b();
    end
    // compensation must reduce the mean truncation error
    checks++;
    $display("mean |error|: compensated tree %f, plain truncation %f",
             err_oat_a / N, err_trunc_a / N);
    if (!(err_oat_a < 0.75 * err_trunc_a)) begin
      failures++;
      $display("FAIL compensated tree not better than truncation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
