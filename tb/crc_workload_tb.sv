// crc_workload_tb - the evaluated workloads: CRC-32 of a 64-byte message with
// a 64-bit and with a 32-bit data path, plus known-answer checks.
//
// Two generators with a zero preset are used, one taking 64 bits per clock
// and one taking 32. Each frame is fed as leading zero bits (to fill the
// first word), the message, and 32 zero bits; the number of enabled clocks
// until the CRC is in the register is counted. Checks:
//   * a random 64-byte message takes 9 clocks at w = 64 and 17 at w = 32,
//     both give the bit-serial reference CRC, and feeding the message
//     followed by its CRC (instead of the zeros) leaves a zero remainder;
//   * the catalogue check values for the ASCII string "123456789":
//     CRC-32/POSIX 765E7680 (result complemented), CRC-32/MPEG-2 0376E6E7
//     (first 32 message bits complemented, the equivalent of an all-ones
//     start value) and the reflected Ethernet CRC-32 CBF43926 (bytes fed
//     least significant bit first, first 32 bits complemented, result
//     bit-reversed and complemented).
module crc_workload_tb;
  import crc_ref_pkg::*;

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

  localparam logic [31:0] POLY = crc_pkg::CRC32_POLY;

  logic        clr, en64, en32;
  logic [63:0] d64;
  logic [31:0] d32;
  logic [31:0] crc64, crc32, nx64, nx32, t64, t32;
  logic [31:0][31:0] fm64, fm32;

  crc_parallel_top #(.M(32), .W(64), .INIT(32'h0)) dut64 (
    .clk(clk), .clr(clr), .en(en64), .poly(POLY), .d(d64),
    .crc(crc64), .crc_next(nx64), .x_temp(t64), .f_matrix(fm64));

  crc_parallel_top #(.M(32), .W(32), .INIT(32'h0)) dut32 (
    .clk(clk), .clr(clr), .en(en32), .poly(POLY), .d(d32),
    .crc(crc32), .crc_next(nx32), .x_temp(t32), .f_matrix(fm32));

  logic msg[$];      // message bits in time order
  logic stream[$];   // framed bits

  // Appends the message and then `tail` (32 bits, most significant first),
  // preceded by enough zeros to fill whole w-bit words.
  function automatic void frame(int w, logic [31:0] tail);
    int pad;
    stream = {};
    pad = (w - ((msg.size() + 32) % w)) % w;
    repeat (pad) stream.push_back(1'b0);
    foreach (msg[i]) stream.push_back(msg[i]);
    for (int i = 31; i >= 0; i--) stream.push_back(tail[i]);
  endfunction

  // Runs the framed stream through the w-bit generator; returns the CRC and
  // the number of enabled clocks.
  task automatic run(int w, output logic [31:0] result, output int clocks);
    clr = 1'b1;
    @(posedge clk); #1;
    clr = 1'b0;
    clocks = 0;
    for (int n = 0; n < stream.size() / w; n++) begin
      for (int c = 0; c < w / 32; c++)
        for (int t = 0; t < 32; t++) begin
          if (w == 64) d64[c*32 + 31 - t] = stream[n*w + c*32 + t];
          else         d32[31 - t]        = stream[n*w + t];
        end
      if (w == 64) en64 = 1'b1; else en32 = 1'b1;
      @(posedge clk); #1;
      en64 = 1'b0; en32 = 1'b0;
      clocks++;
    end
    result = (w == 64) ? crc64 : crc32;
  endtask

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end else begin
      $display("ok   %s: %h", what, got);
    end
  endtask

  task automatic expect_int(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end else begin
      $display("ok   %s: %0d", what, got);
    end
  endtask

  function automatic logic [31:0] bitrev32(logic [31:0] v);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = v[31-i];
    return r;
  endfunction

  // "123456789" into msg, bytes in order; lsb_first selects the bit order.
  function automatic void load_check_string(bit lsb_first, bit invert_first32);
    string s = "123456789";
    msg = {};
    for (int i = 0; i < s.len(); i++)
      for (int b = 0; b < 8; b++)
        msg.push_back(lsb_first ? s[i][b] : s[i][7-b]);
    if (invert_first32) for (int i = 0; i < 32; i++) msg[i] = ~msg[i];
  endfunction

  initial begin
    logic [31:0] r64, r32, rz;
    int c64, c32;
    word_t s;
    clr = 1'b0; en64 = 1'b0; en32 = 1'b0; d64 = '0; d32 = '0;
    @(posedge clk); #1;

    // 64-byte message.
    msg = {};
    repeat (512) msg.push_back(logic'($urandom_range(0, 1)));
    s = '0;
    foreach (msg[i]) s = step(s, word_t'(POLY), 32, msg[i]);
    for (int i = 0; i < 32; i++) s = step(s, word_t'(POLY), 32, 1'b0);
    frame(64, 32'h0); run(64, r64, c64);
    frame(32, 32'h0); run(32, r32, c32);
    expect_int(c64, 9,  "64-byte frame, w=64, clocks");
    expect_int(c32, 17, "64-byte frame, w=32, clocks");
    expect_eq(r64, s[31:0], "64-byte frame, w=64, CRC");
    expect_eq(r32, s[31:0], "64-byte frame, w=32, CRC");
    frame(64, r64); run(64, rz, c64);
    expect_eq(rz, 32'h0, "message followed by its CRC, w=64, remainder");
    frame(32, r32); run(32, rz, c32);
    expect_eq(rz, 32'h0, "message followed by its CRC, w=32, remainder");

    // Known answers for "123456789".
    load_check_string(1'b0, 1'b0);
    frame(64, 32'h0); run(64, r64, c64);
    expect_eq(~r64, 32'h765E_7680, "CRC-32/POSIX check value, w=64");
    load_check_string(1'b0, 1'b1);
    frame(64, 32'h0); run(64, r64, c64);
    frame(32, 32'h0); run(32, r32, c32);
    expect_eq(r64, 32'h0376_E6E7, "CRC-32/MPEG-2 check value, w=64");
    expect_eq(r32, 32'h0376_E6E7, "CRC-32/MPEG-2 check value, w=32");
    load_check_string(1'b1, 1'b1);
    frame(64, 32'h0); run(64, r64, c64);
    expect_eq(~bitrev32(r64), 32'hCBF4_3926, "Ethernet CRC-32 check value, w=64");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
