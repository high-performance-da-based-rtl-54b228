// da_pkg: constants shared by the distributed-arithmetic (DA) transform cores.
//
// Every transform in this design multiplies a vector by a constant matrix
// without multipliers. Each constant coefficient is held as a Q-bit two's
// complement number; its most significant bit carries a negative weight.
// The DA stage (da_pe) turns each coefficient bit into a partial-sum word and
// the optimized adder tree (oat) adds the words with their binary weights.
//
// DCT coefficients C_k = cos(k*pi/16) use 9 bits with weights
// -2^0, 2^-1 .. 2^-8, i.e. C_k = round(256*cos(k*pi/16)) / 256. The 9-bit
// DA precision is the one the document names for its DCT; the rounding of
// each constant is this design's choice.
// Haar DWT coefficients use the same 9-bit format. 1/sqrt(8) is 90/256,
// the bit pattern 0.01011010 listed in the document's DA coefficient table;
// 1/sqrt(2) is 181/256 and 1/2 is 128/256.
// DHT coefficients (values 0, +-1, +-sqrt(2)) use 9 bits with weights
// -2^1, 2^0, 2^-1 .. 2^-7, so sqrt(2) is 181/128 = 1.0110101b, the bit
// pattern of the document's DHT DA table.
package da_pkg;

  // ---- DCT, 9-bit coefficients, value = code / 256 ----
  localparam int unsigned DCT_Q    = 9;
  localparam int unsigned DCT_FRAC = 8;
  localparam int C1 = 251;   // cos(1*pi/16) = 0.98079
  localparam int C2 = 237;   // cos(2*pi/16) = 0.92388
  localparam int C3 = 213;   // cos(3*pi/16) = 0.83147
  localparam int C4 = 181;   // cos(4*pi/16) = 0.70711
  localparam int C5 = 142;   // cos(5*pi/16) = 0.55557
  localparam int C6 = 98;    // cos(6*pi/16) = 0.38268
  localparam int C7 = 50;    // cos(7*pi/16) = 0.19509

  // Odd-part matrix: [Z1 Z3 Z5 Z7] = M * [b0 b1 b2 b3], b_m = x_m - x_(7-m)
  localparam int DCT_ODD_COEF [4][4] = '{
    '{ C1,  C3,  C5,  C7},
    '{ C3, -C7, -C1, -C5},
    '{ C5, -C1,  C7,  C3},
    '{ C7, -C5,  C3, -C1}
  };

  // ---- Haar DWT, 9-bit coefficients, value = code / 256 ----
  localparam int unsigned DWT_Q    = 9;
  localparam int unsigned DWT_FRAC = 8;
  localparam int H_RS8  = 90;    // 1/sqrt(8), 0.01011010b
  localparam int H_HALF = 128;   // 1/2
  localparam int H_RS2  = 181;   // 1/sqrt(2), 0.10110101b

  // ---- DHT, 9-bit coefficients, value = code / 128 ----
  localparam int unsigned DHT_Q    = 9;
  localparam int unsigned DHT_FRAC = 7;
  localparam int D_ONE  = 128;   // 1
  localparam int D_SQ2  = 181;   // sqrt(2) = 1.0110101b

  // Even outputs [Y0 Y2 Y4 Y6] from e_n = x_n + x_(n+4), n = 0..3
  localparam int DHT_EVEN_COEF [4][4] = '{
    '{ D_ONE,  D_ONE,  D_ONE,  D_ONE},
    '{ D_ONE,  D_ONE, -D_ONE, -D_ONE},
    '{ D_ONE, -D_ONE,  D_ONE, -D_ONE},
    '{ D_ONE, -D_ONE, -D_ONE,  D_ONE}
  };
  // Odd outputs [Y1 Y3 Y5 Y7] from f_n = x_n - x_(n+4), n = 0..3
  localparam int DHT_ODD_COEF [4][4] = '{
    '{ D_ONE,  D_SQ2,  D_ONE,      0},
    '{ D_ONE,      0, -D_ONE,  D_SQ2},
    '{ D_ONE, -D_SQ2,  D_ONE,      0},
    '{ D_ONE,      0, -D_ONE, -D_SQ2}
  };

  // Number of low truncation-part columns kept exactly by every OAT.
  localparam int unsigned OAT_KEEP = 2;

endpackage
