// oat: optimized adder tree (error-compensated shift-adder tree).
//
// Adds the Q partial-sum words of one DA inner product with their binary
// weights in a single unrolled tree, as opposed to a shift-and-add
// accumulator that needs Q clock cycles. Word j is P bits signed and has
// weight 2^(E-j), E = Q-1-FRAC; word 0 belongs to the coefficient sign bit
// and is subtracted:
//   Z = -y0*2^E + sum_{j>=1} y_j * 2^(E-j)
// The result keeps only the main part (MP): the columns of weight 2^0 and
// above, i.e. an integer with the same scale as the transform inputs. The
// truncation part (TP) is the FRAC fraction columns below it. Dropping the
// TP outright loses its carries into the MP and biases the result downward;
// the tree therefore
//   * adds the KEEP most significant TP columns exactly, so their carries
//     reach the MP, and
//   * replaces the remaining TP columns by a constant: the expected value of
//     their bits (each bit one half of the time) plus one half LSB for
//     rounding to nearest.
// The document describes the MP/TP split and that the tree compensates the
// truncation error with a tree of full- and half-adder cells; that cell
// arrangement is not reproduced here, and the choice of KEEP and of an
// expected-value constant is this design's own.
// The adder tree itself is written as a sum and left to synthesis.
//
// Purely combinational; the cores register its output.
module oat #(
  parameter int unsigned P     = 12,   // word width (document example: 12)
  parameter int unsigned Q     = 6,    // number of words (document example: 6)
  parameter int unsigned FRAC  = Q-1,  // fraction columns (TP width)
  parameter int unsigned KEEP  = 2,    // TP columns added exactly
  parameter int unsigned OUT_W = P+1
) (
  input  logic signed [P-1:0]     y [Q],
  output logic signed [OUT_W-1:0] z
);

  localparam int E  = int'(Q) - 1 - int'(FRAC);
  localparam int SW = int'(P) + int'(Q) + int'(KEEP) + 4;

  if (KEEP > FRAC) begin : g_keep_check
    $error("oat: KEEP must not exceed FRAC");
  end

  // Compensation constant in units of 2^-KEEP: rounding half plus the
  // expected value of the dropped columns. Column c (weight 2^-c) holds one
  // bit of each word j with E-j <= -c, i.e. FRAC+1-c bits.
  function automatic longint comp_const();
    longint tot;                          // units of 2^-(FRAC+1)
    tot = longint'(1) << FRAC;            // 0.5
    for (longint c = longint'(KEEP) + 1; c <= longint'(FRAC); c++)
      tot += (longint'(FRAC) + 1 - c) << (longint'(FRAC) - c);
    return (tot + (longint'(1) << (FRAC - KEEP))) >>> (FRAC + 1 - KEEP);
  endfunction

  localparam longint COMP = comp_const();

  logic signed [SW-1:0] acc;

  always_comb begin
    acc = SW'(COMP);
    for (int j = 0; j < int'(Q); j++) begin
      logic signed [SW-1:0] w;
      int sh;
      sh = int'(KEEP) + E - j;
      w  = SW'(y[j]);
      if (sh >= 0) w = w <<< sh;
      else         w = w >>> (-sh);     // drop this word's bits below 2^-KEEP
      if (j == 0) acc = acc - w;
      else        acc = acc + w;
    end
  end

  assign z = OUT_W'(acc >>> KEEP);

endmodule
