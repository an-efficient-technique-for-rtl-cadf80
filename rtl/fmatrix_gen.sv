// fmatrix_gen - builds the LFSR state matrix F from a generator polynomial
// and the powers of F that the parallel CRC datapath needs.
//
// The serial CRC register advances as X'_0 = p_0 X_{m-1} xor d and
// X'_i = p_i X_{m-1} xor X_{i-1}. Written as X' = F X, the m x m matrix F has
// the polynomial coefficients in the column of X_{m-1} and ones on the
// diagonal just below the main one (the shift). Advancing k bits at once
// multiplies by F^k.
//
// F^k is formed by k left-multiplications by F. Because F is a companion
// matrix, F*A is only a row shift of A plus the polynomial-masked last row
// of A, so each step costs m*m AND/XOR gates and no full matrix product is
// needed. The chain is W steps long and is tapped every M steps, giving
// f_pow[n] = F^(M*(n+1)) for n = 0 .. W/M-1 (with the defaults F^32 and
// F^64). The polynomial is an input, so one circuit serves any m-degree
// generator; with a constant polynomial the whole block folds to constants.
//
// Matrix convention used throughout the design: mat[i][j] is the weight of
// input bit X_j in output bit X'_i (row i, column j).
//
// Interface: poly holds p_{m-1}..p_0 (p_m = 1 implied); f is F itself;
// f_pow as above. Purely combinational, no clock.
module fmatrix_gen #(
  parameter int unsigned M = crc_pkg::CRC_M,
  parameter int unsigned W = crc_pkg::CRC_W
) (
  input  logic [M-1:0]                        poly,
  output logic [M-1:0][M-1:0]                 f,
  output logic [W/M-1:0][M-1:0][M-1:0]        f_pow
);

  if (W % M != 0 || W == 0) begin : g_bad_width
    $error("fmatrix_gen: W must be a non-zero multiple of M");
  end

  // F itself: shift diagonal plus the polynomial column.
  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      for (int unsigned j = 0; j < M; j++) begin
        f[i][j] = ((i >= 1) && (j == i - 1)) ^ ((j == M - 1) & poly[i]);
      end
    end
  end

  // Power chain: acc = F^k after step k.
  always_comb begin
    logic [M-1:0][M-1:0] acc;
    logic [M-1:0][M-1:0] nxt;
    for (int unsigned i = 0; i < M; i++) begin
      acc[i] = '0;
      acc[i][i] = 1'b1;
    end
    f_pow = '0;
    for (int unsigned k = 1; k <= W; k++) begin
      nxt[0] = {M{poly[0]}} & acc[M-1];
      for (int unsigned i = 1; i < M; i++) begin
        nxt[i] = acc[i-1] ^ ({M{poly[i]}} & acc[M-1]);
      end
      acc = nxt;
      if (k % M == 0) begin
        f_pow[k/M-1] = acc;
      end
    end
  end

endmodule
