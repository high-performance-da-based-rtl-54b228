// tb_dct_dae: self-checking testbench of the DCT DA even element.
//
// Two instances as used in the 1-D DCT: (Z0, Z4) with C4/C4 and (Z2, Z6)
// with C2/C6. For random and extreme inputs every partial-sum word is
// compared with the word built from the coefficient bits, and the weighted
// sum of the words must equal the exact product with the 9-bit constants,
// e.g. Z2 = (C2*u0 + C6*u1)/256.
module tb_dct_dae;
  import tb_da_pkg::*;

  localparam int IN_W = 11, Q = 9, P = 12, FRAC = 8;

  logic signed [IN_W-1:0] u0, u1;
  logic signed [P-1:0]    z0 [Q], z4 [Q], z2 [Q], z6 [Q];

  dct_dae #(.IN_W(IN_W), .Q(Q), .P(P), .CA(181), .CB(181)) dut04 (
    .u0(u0), .u1(u1), .zp(z0), .zq(z4));
  dct_dae #(.IN_W(IN_W), .Q(Q), .P(P), .CA(237), .CB(98)) dut26 (
    .u0(u0), .u1(u1), .zp(z2), .zq(z6));

  int checks = 0, failures = 0;

  task automatic check_one(string nm, logic signed [P-1:0] z [Q], int ca, int cb);
    words_t w;
    longint uu [4];
    int c [4];
    c  = '{ca, cb, 0, 0};
    uu = '{longint'(u0), longint'(u1), 0, 0};
    for (int j = 0; j < 16; j++) w[j] = (j < Q) ? longint'(z[j]) : 0;
    for (int j = 0; j < Q; j++) begin
      checks++;
      if (w[j] != da_word(Q, j, 2, c, uu)) begin
        failures++;
        if (failures < 10) $display("FAIL %s word %0d", nm, j);
      end
    end
    checks++;
    if (oat_exact(Q, FRAC, w) != real'(longint'(ca) * uu[0] + longint'(cb) * uu[1]) / 256.0) begin
      failures++;
      if (failures < 10) $display("FAIL %s sum", nm);
    end
  endtask

  task automatic check();
    check_one("Z0", z0, dct_c(4),  dct_c(4));
    check_one("Z4", z4, dct_c(4), -dct_c(4));
    check_one("Z2", z2, dct_c(2),  dct_c(6));
    check_one("Z6", z6, dct_c(6), -dct_c(2));
  endtask

  initial begin
    u0 = {1'b1, {(IN_W-1){1'b0}}}; u1 = {1'b1, {(IN_W-1){1'b0}}};
    #1 check();
    u0 = {1'b0, {(IN_W-1){1'b1}}}; u1 = {1'b1, {(IN_W-1){1'b0}}};
    #1 check();
    for (int t = 0; t < 2000; t++) begin
      u0 = IN_W'($urandom); u1 = IN_W'($urandom);
      #1 check();
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
