// gf2_matvec_tb - self-checking test of the GF(2) AND-XOR array.
//
// Random matrices and vectors are applied to a 32 x 32 array and to a
// non-square 8 x 20 array. The expected output bit is found by counting, in
// a loop, the columns where both the matrix element and the input bit are
// one and taking that count modulo two. Identity and all-ones matrices are
// also applied as fixed cases.
module gf2_matvec_tb;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0][31:0] a;
  logic [31:0]       x, y;
  gf2_matvec #(.ROWS(32), .COLS(32)) dut (.a(a), .x(x), .y(y));

  logic [7:0][19:0] a2;
  logic [19:0]      x2;
  logic [7:0]       y2;
  gf2_matvec #(.ROWS(8), .COLS(20)) dut2 (.a(a2), .x(x2), .y(y2));

  function automatic logic parity_count(logic [31:0] row, logic [31:0] v, int n);
    int cnt = 0;
    for (int j = 0; j < n; j++) if (row[j] && v[j]) cnt++;
    return logic'(cnt % 2);
  endfunction

  task automatic check32();
    #1;
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (y[i] !== parity_count(a[i], x, 32)) begin
        failures++;
        if (failures < 10) $display("FAIL y[%0d] a=%h x=%h", i, a[i], x);
      end
    end
  endtask

  initial begin
    @(posedge clk);
    // Identity: output equals input.
    for (int i = 0; i < 32; i++) a[i] = 32'(1) << i;
    x = 32'hDEAD_BEEF;
    #1;
    checks++;
    if (y !== x) begin failures++; $display("FAIL identity: %h", y); end
    // All ones: every output is the parity of x.
    a = '1;
    x = 32'h0000_0007;
    check32();
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 32; i++) a[i] = $urandom();
      x = $urandom();
      check32();
      for (int i = 0; i < 8; i++) a2[i] = 20'($urandom());
      x2 = 20'($urandom());
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (y2[i] !== parity_count(32'(a2[i]), 32'(x2), 20)) begin
          failures++;
          if (failures < 10) $display("FAIL y2[%0d]", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
