// gf2_matvec - AND-XOR array: matrix-vector product over GF(2).
//
// Output bit i is the XOR over all columns j of (a[i][j] AND x[j]). This is
// one of the boxed AND-XOR row arrays of the parallel CRC datapath: every
// element of an F-matrix power is ANDed with one input bit and each row's
// products are XORed into a single next-state bit. When the matrix is a
// constant, synthesis reduces the array to plain XOR trees.
//
// Interface: a is the R x C matrix, a[i][j] being row i, column j; x is the
// C-bit input vector; y is the R-bit result. Purely combinational.
module gf2_matvec #(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 32
) (
  input  logic [ROWS-1:0][COLS-1:0] a,
  input  logic [COLS-1:0]           x,
  output logic [ROWS-1:0]           y
);

  always_comb begin
    for (int unsigned i = 0; i < ROWS; i++) begin
      y[i] = ^(a[i] & x);
    end
  end

endmodule
