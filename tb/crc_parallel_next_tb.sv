// crc_parallel_next_tb - self-checking test of the parallel next-state logic.
//
// The F-matrix powers are supplied by the testbench itself, built element by
// element with the bit-serial reference register, so the block is tested on
// its own. For random polynomials, states and data words the outputs are
// compared with the bit-serial register fed the same bits one at a time:
// x_next against the register started from x, and x_temp against the
// register started from zero. The default 64-bit configuration and a 32-bit
// (single chunk) configuration are tested.
module crc_parallel_next_tb;
  import crc_ref_pkg::*;

  localparam int unsigned M = 32;

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

  // w = 64
  logic [M-1:0]            x;
  logic [63:0]             d;
  logic [1:0][M-1:0][M-1:0] fp;
  logic [M-1:0]            x_temp, x_next;
  crc_parallel_next #(.M(M), .W(64)) dut (
    .x(x), .d(d), .f_pow(fp), .x_temp(x_temp), .x_next(x_next));

  // w = 32
  logic [31:0]              d1;
  logic [0:0][M-1:0][M-1:0] fp1;
  logic [M-1:0]             x_temp1, x_next1;
  crc_parallel_next #(.M(M), .W(32)) dut1 (
    .x(x), .d(d1), .f_pow(fp1), .x_temp(x_temp1), .x_next(x_next1));

  task automatic expect_eq(logic [M-1:0] got, logic [M-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [M-1:0] p;
    word_t s;
    @(posedge clk);
    for (int np = 0; np < 4; np++) begin
      p = (np == 0) ? 32'h04C1_1DB7 : $urandom();
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          fp[0][i][j] = fpow_elem(word_t'(p), M, 32, i, j);
          fp[1][i][j] = fpow_elem(word_t'(p), M, 64, i, j);
        end
      fp1[0] = fp[0];
      for (int n = 0; n < 100; n++) begin
        x  = $urandom();
        d  = {$urandom(), $urandom()};
        d1 = $urandom();
        if (n == 0) begin x = '1; d = '1; d1 = '1; end
        #1;
        s = feed_chunk(word_t'(x), word_t'(p), M, word_t'(d[31:0]));
        s = feed_chunk(s, word_t'(p), M, word_t'(d[63:32]));
        expect_eq(x_next, s[M-1:0], "x_next w64");
        s = feed_chunk('0, word_t'(p), M, word_t'(d[31:0]));
        s = feed_chunk(s, word_t'(p), M, word_t'(d[63:32]));
        expect_eq(x_temp, s[M-1:0], "x_temp w64");
        s = feed_chunk(word_t'(x), word_t'(p), M, word_t'(d1));
        expect_eq(x_next1, s[M-1:0], "x_next w32");
        expect_eq(x_temp1, d1, "x_temp w32");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
