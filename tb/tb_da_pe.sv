// tb_da_pe: self-checking testbench of the DA processing element.
//
// Instance under test: the 4-input, 4-output DHT odd-part configuration
// (9-bit coefficients 0, +-1, +-sqrt(2)). For random and extreme inputs
// every partial-sum word is compared with a word built from the
// coefficient bits by the reference model, and the words' weighted sum is
// checked to equal the exact inner product with the quantized constants.
module tb_da_pe;
  import tb_da_pkg::*;

  localparam int IN_W = 10, Q = 9, P = 12, FRAC = 7;

  logic signed [IN_W-1:0] u [4];
  logic signed [P-1:0]    y [4][Q];

  da_pe #(.N_IN(4), .N_OUT(4), .IN_W(IN_W), .Q(Q), .P(P),
          .COEF(da_pkg::DHT_ODD_COEF)) dut (.u(u), .y(y));

  int checks = 0, failures = 0;

  // odd-output kernel columns: Y1, Y3, Y5, Y7 against f0..f3
  function automatic int kc(int k, int n);
    return dht_c(n, 2*k + 1);
  endfunction

  task automatic check();
    longint uu [4];
    int c [4];
    for (int i = 0; i < 4; i++) uu[i] = longint'(u[i]);
    for (int k = 0; k < 4; k++) begin
      words_t w;
      longint ip = 0;
      for (int n = 0; n < 4; n++) begin
        c[n] = kc(k, n);
        ip  += longint'(c[n]) * uu[n];
      end
      for (int j = 0; j < 16; j++) w[j] = 0;
      for (int j = 0; j < Q; j++) begin
        w[j] = longint'(y[k][j]);
        checks++;
        if (w[j] != da_word(Q, j, 4, c, uu)) begin
          failures++;
          if (failures < 10) $display("FAIL word k=%0d j=%0d: %0d vs %0d", k, j, w[j], da_word(Q, j, 4, c, uu));
        end
      end
      checks++;
      if (oat_exact(Q, FRAC, w) != real'(ip) / 128.0) begin
        failures++;
        if (failures < 10) $display("FAIL sum k=%0d: %f vs %f", k, oat_exact(Q, FRAC, w), real'(ip) / 128.0);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) u[i] = {1'b1, {(IN_W-1){1'b0}}};
    #1 check();
    for (int i = 0; i < 4; i++) u[i] = {1'b0, {(IN_W-1){1'b1}}};
    #1 check();
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 4; i++) u[i] = IN_W'($urandom);
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
