// crc_matrix_gen - builds the transition matrix F^W of the parallel CRC from
// the divisor bits.
//
// The serial LFSR has the one-step matrix F: x_i' = x_{i-1} ^ p_i x_{M-1}.
// Absorbing W bits per clock needs F^W, whose entries are the enables of the
// AND gates in front of every XOR tree of the parallel circuit. F^W is built
// with the column recursion F^i = [ F^{i-1} P | first M-1 columns of F^{i-1} ]
// started from the identity: each step shifts the columns one place towards
// x_0 and fills the x_{M-1} column with F^{i-1} times the divisor vector.
//
// Interface: poly[j] = p_j (the x^M term is implicit); enables[i][j] = 1 when
// present-state bit x_j feeds next-state bit x_i. Purely combinational; when
// poly is a constant, as in the top level, the whole block folds into
// constants at synthesis. W <= M as the derivation requires. The M-W
// columns for x_{M-W-1}..x_0 do not depend on the divisor: they are the
// shifted identity block I_{M-W} over zeros, so those outputs are constant
// even with a live divisor input.
//
// The recursion is the published one; providing it as a combinational block
// with a divisor port, rather than as precomputed enables, is this design's
// choice.
module crc_matrix_gen #(
  parameter int unsigned M = 16,
  parameter int unsigned W = 8
) (
  input  logic [M-1:0]         poly,
  output logic [M-1:0][M-1:0]  enables
);

  initial assert (W >= 1 && W <= M)
    else $error("crc_matrix_gen: W=%0d must lie in 1..M=%0d", W, M);

  always_comb begin
    logic [M-1:0][M-1:0] f;
    logic [M-1:0]        col;
    for (int unsigned i = 0; i < M; i++)
      for (int unsigned j = 0; j < M; j++)
        f[i][j] = (i == j);
    for (int unsigned step = 0; step < W; step++) begin
      // new x_{M-1} column: F^{i-1} (x) P'
      for (int unsigned r = 0; r < M; r++)
        col[r] = ^(f[r] & poly);
      for (int unsigned r = 0; r < M; r++) begin
        f[r] = {col[r], f[r][M-1:1]};
      end
    end
    enables = f;
  end

endmodule
