// da_pe: distributed-arithmetic processing element.
//
// Computes the DA partial-sum words of N_OUT inner products
//   Z_n = sum_i COEF[n][i] * u_i
// with constant Q-bit two's complement coefficients. For output n and
// coefficient bit position j (j = 0 is the sign bit, j = Q-1 the LSB) the
// word y[n][j] is the sum of those inputs u_i whose coefficient has a one in
// that bit. All 2^N_IN subset sums of the inputs are formed once by a small
// adder network and every word is then a fixed selection from that set, so
// the selection costs only wiring; sums that no coefficient needs are left
// unused and disappear in synthesis. This is the role the document gives to
// its DA even (DAE) and odd (DAO) processing elements; forming the needed
// sums as a full subset table is this design's choice.
//
// A word whose bit is 0 in every coefficient of its output (for example
// the sign-bit word of a positive constant) is constant zero; such outputs
// are expected to be idle after synthesis.
//
// The words are weighted and added by an optimized adder tree (oat).
// Purely combinational. Words are P bits signed; P must hold the sum of all
// N_IN inputs.
module da_pe #(
  parameter int unsigned N_IN  = 2,
  parameter int unsigned N_OUT = 2,
  parameter int unsigned IN_W  = 11,
  parameter int unsigned Q     = 9,
  parameter int unsigned P     = 12,
  parameter int          COEF [N_OUT][N_IN] = '{'{181, 181}, '{181, -181}}
) (
  input  logic signed [IN_W-1:0] u [N_IN],
  output logic signed [P-1:0]    y [N_OUT][Q]
);

  localparam int unsigned NS = 1 << N_IN;

  if (P < IN_W + $clog2(N_IN)) begin : g_width_check
    $error("da_pe: P too small for the sum of the inputs");
  end

  // Subset mask for output n, coefficient bit position j (0 = sign bit).
  function automatic int unsigned sel_mask(int unsigned n, int unsigned j);
    int unsigned m = 0;
    for (int unsigned i = 0; i < N_IN; i++) begin
      logic [Q-1:0] c;
      c = Q'(COEF[n][i]);
      if (c[Q-1-j]) m |= (1 << i);
    end
    return m;
  endfunction

  logic signed [P-1:0] subset [NS];

  always_comb begin
    for (int unsigned s = 0; s < NS; s++) begin
      subset[s] = '0;
      for (int unsigned i = 0; i < N_IN; i++)
        if (s[i]) subset[s] = subset[s] + P'(u[i]);
    end
  end

  for (genvar n = 0; n < N_OUT; n++) begin : g_out
    for (genvar j = 0; j < Q; j++) begin : g_bit
      localparam int unsigned M = sel_mask(n, j);
      assign y[n][j] = subset[M];
    end
  end

endmodule
