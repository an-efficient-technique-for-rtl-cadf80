// fmatrix_gen_tb - self-checking test of the F-matrix generator.
//
// A full-size instance (m = 32, w = 64) is checked element by element
// against F, F^32 and F^64 obtained by running zero bits through a
// bit-serial reference register, for the Ethernet CRC-32 polynomial and for
// random polynomials. The first nine rows of F for CRC-32, printed as 32-bit
// row words with column X_31 in the top bit (40000000, 20000000, 10000000,
// 08000000, 04000000, 82000000, 01000000, 00800000, 80400000), are checked as
// fixed values. A 4-bit instance is checked against the worked CRC-4 example
// for x^4 + x^3 + 1, whose F and F^4 are known by hand.
module fmatrix_gen_tb;
  import crc_ref_pkg::*;

  localparam int unsigned M = 32;
  localparam int unsigned W = 64;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [M-1:0]                 poly;
  logic [M-1:0][M-1:0]          f;
  logic [W/M-1:0][M-1:0][M-1:0] f_pow;

  fmatrix_gen #(.M(M), .W(W)) dut (.poly(poly), .f(f), .f_pow(f_pow));

  logic [3:0]                poly4;
  logic [3:0][3:0]           f4;
  logic [0:0][3:0][3:0]      f4_pow;

  fmatrix_gen #(.M(4), .W(4)) dut4 (.poly(poly4), .f(f4), .f_pow(f4_pow));

  task automatic check_bit(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic check_all(logic [M-1:0] p);
    poly = p;
    #1;
    for (int unsigned i = 0; i < M; i++) begin
      for (int unsigned j = 0; j < M; j++) begin
        check_bit(f[i][j], fpow_elem(word_t'(p), M, 1, i, j),
                  $sformatf("F[%0d][%0d] poly %h", i, j, p));
        check_bit(f_pow[0][i][j], fpow_elem(word_t'(p), M, 32, i, j),
                  $sformatf("F^32[%0d][%0d] poly %h", i, j, p));
        check_bit(f_pow[1][i][j], fpow_elem(word_t'(p), M, 64, i, j),
                  $sformatf("F^64[%0d][%0d] poly %h", i, j, p));
      end
    end
  endtask

  // Row words of F for CRC-32, first row (output X'_31) first.
  localparam logic [31:0] CRC32_ROWS [9] = '{
    32'h4000_0000, 32'h2000_0000, 32'h1000_0000, 32'h0800_0000, 32'h0400_0000,
    32'h8200_0000, 32'h0100_0000, 32'h0080_0000, 32'h8040_0000
  };

  initial begin
    @(posedge clk);
    check_all(32'h04C1_1DB7);
    for (int r = 0; r < 9; r++) begin
      checks++;
      if (f[M-1-r] !== CRC32_ROWS[r]) begin
        failures++;
        $display("FAIL F row %0d: got %h expected %h", r, f[M-1-r], CRC32_ROWS[r]);
      end
    end
    for (int n = 0; n < 6; n++) begin
      @(posedge clk);
      check_all($urandom());
    end
    // Worked CRC-4 example: generator coefficients p0..p4 = 1,0,0,1,1.
    poly4 = 4'b1001;
    #1;
    checks++;
    if (f4 !== {4'b1100, 4'b0010, 4'b0001, 4'b1000}) begin
      failures++;
      $display("FAIL CRC-4 F: got %h", f4);
    end
    checks++;
    if (f4_pow[0] !== {4'b0111, 4'b1100, 4'b1110, 4'b1111}) begin
      failures++;
      $display("FAIL CRC-4 F^4: got %h", f4_pow[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
