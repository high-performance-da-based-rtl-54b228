// tb_dct_dao: self-checking testbench of the DCT DA odd element.
//
// For random and extreme b0..b3 every partial-sum word of Z1, Z3, Z5, Z7 is
// compared with the word built from the bits of the 9-bit constants
// round(256*cos((2m+1)k*pi/16)), computed here with $cos, and the weighted
// sum of each output's words must equal the exact inner product.
module tb_dct_dao;
  import tb_da_pkg::*;

  localparam int IN_W = 10, Q = 9, P = 12, FRAC = 8;

  logic signed [IN_W-1:0] b [4];
  logic signed [P-1:0]    z [4][Q];

  dct_dao #(.IN_W(IN_W), .Q(Q), .P(P)) dut (.b(b), .z(z));

  int checks = 0, failures = 0;

  task automatic check();
    longint uu [4];
    for (int i = 0; i < 4; i++) uu[i] = longint'(b[i]);
    for (int kk = 0; kk < 4; kk++) begin
      int k = 2*kk + 1;
      int c [4];
      words_t w;
      longint ip = 0;
      for (int m = 0; m < 4; m++) begin
        c[m] = int'($floor(256.0 * $cos(real'((2*m+1)*k) * PI / 16.0) + 0.5));
        ip  += longint'(c[m]) * uu[m];
      end
      for (int j = 0; j < 16; j++) w[j] = (j < Q) ? longint'(z[kk][j]) : 0;
      for (int j = 0; j < Q; j++) begin
        checks++;
        if (w[j] != da_word(Q, j, 4, c, uu)) begin
          failures++;
          if (failures < 10) $display("FAIL Z%0d word %0d: %0d vs %0d", k, j, w[j], da_word(Q, j, 4, c, uu));
        end
      end
      checks++;
      if (oat_exact(Q, FRAC, w) != real'(ip) / 256.0) begin
        failures++;
        if (failures < 10) $display("FAIL Z%0d sum", k);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) b[i] = {1'b1, {(IN_W-1){1'b0}}};
    #1 check();
    for (int i = 0; i < 4; i++) b[i] = (i % 2 == 0) ? {1'b0, {(IN_W-1){1'b1}}} : {1'b1, {(IN_W-1){1'b0}}};
    #1 check();
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 4; i++) b[i] = IN_W'($urandom);
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
