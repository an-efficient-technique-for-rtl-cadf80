// crc_parallel_top - w-bit parallel CRC generator based on the F matrix.
//
// Each clock the generator takes a w-bit word (64 bits by default) and
// advances an m-bit CRC register (32 bits by default) as if the word had been
// shifted through a bit-serial dividing LFSR one bit at a time:
//
//   fmatrix_gen        polynomial -> F^32, F^64 (F-matrix generation)
//   crc_parallel_next  x_temp = F^32 d[31:0] xor d[63:32]
//                      x_next = F^64 crc xor x_temp
//   crc_fcs_reg        crc <= x_next (clr presets, en advances)
//
// The register divides the message as it arrives, so the remainder of
// message(x) * x^m is obtained by following the k message bits with m zero
// bits: the CRC is valid in crc one clock after the last of ceil((k+m)/w)
// words. For a 64-byte message with w = 64 that is 9 words (17 with w = 32).
// When k+m is not a multiple of w, the message is preceded by zero bits to
// fill the first word; with INIT = 0 leading zeros leave the remainder
// unchanged. Data ordering: d[m-1:0] is the earlier m-bit chunk, d[w-1:w-m]
// the latest, and within a chunk the most significant bit comes first.
//
// The polynomial is an input, so any degree-m generator can be used; tie it
// to crc_pkg::CRC32_POLY for Ethernet CRC-32. Changing it takes effect in the
// same cycle (the F-matrix logic is combinational).
//
// Interface: clk; clr (synchronous, loads INIT); en (advance by one word);
// poly; d; crc = register contents; crc_next = next state; x_temp = the
// combined data term; f_matrix = the single-step matrix F, f_matrix[i][j]
// being the weight of X_j in X'_i. Timing: one word per clock, result registered.
module crc_parallel_top #(
  parameter int unsigned  M    = crc_pkg::CRC_M,
  parameter int unsigned  W    = crc_pkg::CRC_W,
  parameter logic [M-1:0] INIT = crc_pkg::CRC_INIT
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         en,
  input  logic [M-1:0] poly,
  input  logic [W-1:0] d,
  output logic [M-1:0] crc,
  output logic [M-1:0] crc_next,
  output logic [M-1:0] x_temp,
  output logic [M-1:0][M-1:0] f_matrix
);

  logic [W/M-1:0][M-1:0][M-1:0] f_pow;

  fmatrix_gen #(.M(M), .W(W)) u_fgen (
    .poly  (poly),
    .f     (f_matrix),
    .f_pow (f_pow)
  );

  crc_parallel_next #(.M(M), .W(W)) u_next (
    .x      (crc),
    .d      (d),
    .f_pow  (f_pow),
    .x_temp (x_temp),
    .x_next (crc_next)
  );

  crc_fcs_reg #(.M(M), .INIT(INIT)) u_fcs (
    .clk (clk),
    .clr (clr),
    .en  (en),
    .d   (crc_next),
    .q   (crc)
  );

endmodule
