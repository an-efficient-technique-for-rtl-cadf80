// crc_parallel_next - next-state logic of the w-bit parallel CRC.
//
// The w-bit input word is split into C = w/m chunks of m bits. Chunk 0,
// d[m-1:0], is the earliest part of the message and chunk C-1 the latest;
// inside a chunk the most significant bit is the earliest bit. Feeding an
// m-bit chunk into an m-bit dividing register that already holds X gives
// F^m X xor chunk (the chunk lands in the register unchanged, because none of
// its bits reaches the feedback tap within m shifts). Chaining C chunks gives
//
//   x_temp = F^(m(C-1)) d_0 xor ... xor F^m d_(C-2) xor d_(C-1)
//   x_next = F^w x xor x_temp
//
// With the defaults (m = 32, w = 64) this is
//   x_temp = F^32 d[31:0] xor d[63:32]
//   x_next = F^64 x xor x_temp
// i.e. one AND-XOR array for the first data word whose rows are then XORed
// with the second word bit by bit, and one AND-XOR array for the present
// state. The data array uses F^32; the state array uses F^64, which is what
// advancing the state by 64 bits requires (a single F^32 on the state would
// drop 32 of the shifts).
//
// Interface: x present state, d data word, f_pow[n] = F^(m(n+1)) from
// fmatrix_gen; x_temp and x_next as above. Purely combinational.
module crc_parallel_next #(
  parameter int unsigned M = crc_pkg::CRC_M,
  parameter int unsigned W = crc_pkg::CRC_W
) (
  input  logic [M-1:0]                 x,
  input  logic [W-1:0]                 d,
  input  logic [W/M-1:0][M-1:0][M-1:0] f_pow,
  output logic [M-1:0]                 x_temp,
  output logic [M-1:0]                 x_next
);

  localparam int unsigned C = W / M;

  if (W % M != 0 || W == 0) begin : g_bad_width
    $error("crc_parallel_next: W must be a non-zero multiple of M");
  end

  // prod[c] = F^(m(C-1-c)) d_c for the chunks that pass through an array.
  logic [C-1:0][M-1:0] prod;
  logic [M-1:0]        state_prod;

  for (genvar c = 0; c < C - 1; c++) begin : g_data_array
    gf2_matvec #(.ROWS(M), .COLS(M)) u_data (
      .a (f_pow[C-2-c]),
      .x (d[c*M +: M]),
      .y (prod[c])
    );
  end
  assign prod[C-1] = d[(C-1)*M +: M];

  gf2_matvec #(.ROWS(M), .COLS(M)) u_state (
    .a (f_pow[C-1]),
    .x (x),
    .y (state_prod)
  );

  always_comb begin
    x_temp = '0;
    for (int unsigned c = 0; c < C; c++) begin
      x_temp ^= prod[c];
    end
  end

  assign x_next = state_prod ^ x_temp;

endmodule
