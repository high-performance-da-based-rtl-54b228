// tb_dct_butterfly_matrix: self-checking testbench of the DCT DA-Butterfly-
// Matrix.
//
// For random and extreme 9-bit input vectors the testbench forms the
// butterfly terms itself (a_m, b_m, A0, A1, B0, B1), derives the 9-bit
// constants with $cos, and checks every one of the 8 x 9 partial-sum words
// against the word built from the coefficient bits. It also checks that the
// weighted sum of each output's words equals the inner product of the
// input vector with the quantized DCT row, i.e. that the butterfly
// factorisation is the DCT.
module tb_dct_butterfly_matrix;
  import tb_da_pkg::*;

  localparam int IN_W = 9, Q = 9, P = 12, FRAC = 8;

  logic signed [IN_W-1:0] x [8];
  logic signed [P-1:0]    y [8][Q];

  dct_butterfly_matrix dut (.x(x), .y(y));

  int checks = 0, failures = 0;

  function automatic int cq(int n, int m);
    real v = $cos(real'((2*m+1)*n) * PI / 16.0);
    if (n == 0) v = $cos(PI / 4.0);
    return int'($floor(256.0 * v + 0.5));
  endfunction

  task automatic check();
    longint xv [8], a [4], b [4], ue [4], uo [4], u [4];
    int c [4];
    int nin;
    for (int m = 0; m < 8; m++) xv[m] = longint'(x[m]);
    for (int m = 0; m < 4; m++) begin
      a[m] = xv[m] + xv[7-m];
      b[m] = xv[m] - xv[7-m];
    end
    ue = '{a[0] + a[3], a[1] + a[2], 0, 0};
    uo = '{a[0] - a[3], a[1] - a[2], 0, 0};
    for (int n = 0; n < 8; n++) begin
      words_t w;
      longint ip = 0;
      case (n)
        0: begin u = ue; c = '{cq(4, 0),  cq(4, 0), 0, 0}; nin = 2; end
        4: begin u = ue; c = '{cq(4, 0), -cq(4, 0), 0, 0}; nin = 2; end
        2: begin u = uo; c = '{cq(2, 0),  cq(6, 0), 0, 0}; nin = 2; end
        6: begin u = uo; c = '{cq(6, 0), -cq(2, 0), 0, 0}; nin = 2; end
        default: begin
          u = b;
          for (int m = 0; m < 4; m++) c[m] = cq(n, m);
          nin = 4;
        end
      endcase
      for (int j = 0; j < 16; j++) w[j] = (j < Q) ? longint'(y[n][j]) : 0;
      for (int j = 0; j < Q; j++) begin
        checks++;
        if (w[j] != da_word(Q, j, nin, c, u)) begin
          failures++;
          if (failures < 10) $display("FAIL Z%0d word %0d: %0d vs %0d", n, j, w[j], da_word(Q, j, nin, c, u));
        end
      end
      // the same output as a direct 8-term product with the quantized row
      for (int m = 0; m < 8; m++) ip += longint'(cq(n, m)) * xv[m];
      checks++;
      if (oat_exact(Q, FRAC, w) != real'(ip) / 256.0) begin
        failures++;
        if (failures < 10) $display("FAIL Z%0d sum %f vs %f", n, oat_exact(Q, FRAC, w), real'(ip) / 256.0);
      end
    end
  endtask

  initial begin
    for (int m = 0; m < 8; m++) x[m] = 9'sd255;
    #1 check();
    for (int m = 0; m < 8; m++) x[m] = -9'sd256;
    #1 check();
    for (int m = 0; m < 8; m++) x[m] = (m % 2 == 0) ? 9'sd255 : -9'sd256;
    #1 check();
    for (int t = 0; t < 2000; t++) begin
      for (int m = 0; m < 8; m++) x[m] = IN_W'($urandom);
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
