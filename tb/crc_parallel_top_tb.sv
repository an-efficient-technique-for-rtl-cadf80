// crc_parallel_top_tb - end-to-end test of the parallel CRC generator at its
// default configuration (m = 32, w = 64, preset all ones).
//
// Messages of random length are framed as the generator expects: leading
// zero bits to fill the first word, the message bits, then m zero bits. The
// framed bit stream is packed into 64-bit words (d[31:0] is the earlier
// chunk, most significant bit first in each chunk) and fed one word per
// enabled clock, with random idle clocks (en low) in between. After every
// word the register, and before every clock the combinational next-state
// and data-term outputs, are compared with a bit-serial reference register
// fed the same bits. The polynomial is switched between the Ethernet CRC-32
// polynomial and random ones, and the register is preset with clr at the
// start of each message and once in the middle of a message. A 64-byte
// message must give its CRC after exactly 9 words. Each mechanism (preset,
// idle hold, polynomial change, 64-byte frame) is counted and must occur.
module crc_parallel_top_tb;
  import crc_ref_pkg::*;

  localparam int unsigned M = crc_pkg::CRC_M;
  localparam int unsigned W = crc_pkg::CRC_W;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         clr, en;
  logic [M-1:0] poly;
  logic [W-1:0] d;
  logic [M-1:0] crc, crc_next, x_temp;
  logic [M-1:0][M-1:0] f_matrix;

  crc_parallel_top dut (
    .clk(clk), .clr(clr), .en(en), .poly(poly), .d(d),
    .crc(crc), .crc_next(crc_next), .x_temp(x_temp), .f_matrix(f_matrix));

  int n_preset = 0, n_idle = 0, n_poly_change = 0, n_frame64 = 0, n_words = 0;

  task automatic expect_eq(logic [M-1:0] got, logic [M-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Framed bit stream of the current message, in time order.
  logic stream[$];

  // Frames a message of k random bits (or all ones) into stream.
  function automatic void frame(int k, bit all_ones);
    int pad;
    stream = {};
    pad = (W - ((k + M) % W)) % W;
    repeat (pad) stream.push_back(1'b0);
    repeat (k) stream.push_back(all_ones ? 1'b1 : logic'($urandom_range(0, 1)));
    repeat (M) stream.push_back(1'b0);
  endfunction

  function automatic logic [W-1:0] pack(int n);
    logic [W-1:0] w;
    for (int c = 0; c < W / M; c++)
      for (int t = 0; t < M; t++)
        w[c*M + (M-1-t)] = stream[n*W + c*M + t];
    return w;
  endfunction

  task automatic preset();
    clr = 1'b1; en = 1'b0;
    @(posedge clk); #1;
    clr = 1'b0;
    n_preset++;
    expect_eq(crc, crc_pkg::CRC_INIT, "preset");
  endtask

  // Feeds a framed stream; returns the number of enabled clocks used.
  task automatic run_message(logic [M-1:0] p, bit mid_clear, output int words);
    word_t ref_s, ref_t;
    int nw;
    nw = stream.size() / W;
    words = 0;
    ref_s = word_t'(crc_pkg::CRC_INIT);
    for (int n = 0; n < nw; n++) begin
      while ($urandom_range(0, 3) == 0) begin
        en = 1'b0; d = {$urandom(), $urandom()};
        @(posedge clk); #1;
        n_idle++;
        expect_eq(crc, ref_s[M-1:0], "hold while idle");
      end
      if (mid_clear && n == nw / 2) begin
        preset();
        ref_s = word_t'(crc_pkg::CRC_INIT);
      end
      d = pack(n);
      en = 1'b1;
      #1;
      ref_t = '0;
      for (int b = 0; b < W; b++) begin
        ref_s = step(ref_s, word_t'(p), M, stream[n*W + b]);
        ref_t = step(ref_t, word_t'(p), M, stream[n*W + b]);
      end
      expect_eq(crc_next, ref_s[M-1:0], "crc_next");
      expect_eq(x_temp, ref_t[M-1:0], "x_temp");
      @(posedge clk); #1;
      en = 1'b0;
      words++;
      n_words++;
      expect_eq(crc, ref_s[M-1:0], "crc after word");
    end
  endtask

  initial begin
    logic [M-1:0] p, last_p;
    int words;
    clr = 1'b0; en = 1'b0; d = '0;
    poly = crc_pkg::CRC32_POLY;
    last_p = poly;
    @(posedge clk); #1;

    // Single-step matrix for CRC-32: row of X'_31 and row of X'_26.
    expect_eq(f_matrix[31], 32'h4000_0000, "F row X'31");
    expect_eq(f_matrix[26], 32'h8200_0000, "F row X'26");

    // One all-ones 64-bit word straight after the preset.
    preset();
    d = '1; en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
    begin
      word_t s;
      s = word_t'(crc_pkg::CRC_INIT);
      for (int b = 0; b < W; b++) s = step(s, word_t'(poly), M, 1'b1);
      expect_eq(crc, s[M-1:0], "all-ones word");
      $display("all-ones word from preset: crc = %h", crc);
    end

    // A 64-byte Ethernet CRC-32 frame takes (512 + 32) / 64 -> 9 words.
    frame(512, 1'b0);
    preset();
    run_message(poly, 1'b0, words);
    checks++;
    if (words != 9) begin failures++; $display("FAIL 64-byte frame took %0d words", words); end
    else n_frame64++;

    for (int m = 0; m < 60; m++) begin
      p = (m % 3 == 0) ? crc_pkg::CRC32_POLY : $urandom();
      if (p != last_p) n_poly_change++;
      last_p = p;
      poly = p;
      frame($urandom_range(1, 700), m == 5);
      preset();
      run_message(p, m == 7, words);
    end

    checks++;
    if (n_preset == 0 || n_idle == 0 || n_poly_change == 0 || n_frame64 == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("presets=%0d idle_cycles=%0d poly_changes=%0d frames64=%0d words=%0d",
             n_preset, n_idle, n_poly_change, n_frame64, n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
