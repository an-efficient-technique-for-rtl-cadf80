// crc_fcs_reg_tb - self-checking test of the CRC checksum register.
//
// Drives random clr / en / d sequences and checks after every clock edge
// that the register preset to INIT under clr (which wins over en), loaded d
// under en, and held its value otherwise. Both the default preset (all ones)
// and a zero preset are tested.
module crc_fcs_reg_tb;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        clr, en;
  logic [31:0] d, q, q0;
  crc_fcs_reg dut (.clk(clk), .clr(clr), .en(en), .d(d), .q(q));
  crc_fcs_reg #(.M(32), .INIT(32'h0)) dut0 (.clk(clk), .clr(clr), .en(en), .d(d), .q(q0));

  int n_clr = 0, n_load = 0, n_hold = 0;

  initial begin
    logic [31:0] exp, exp0;
    clr = 1'b1; en = 1'b0; d = 32'h1234_5678;
    @(posedge clk); #1;
    exp = 32'hFFFF_FFFF; exp0 = '0;
    for (int n = 0; n < 2000; n++) begin
      clr = ($urandom_range(0, 7) == 0);
      en  = $urandom_range(0, 1) == 1;
      d   = $urandom();
      @(posedge clk); #1;
      if (clr) begin exp = 32'hFFFF_FFFF; exp0 = '0; n_clr++; end
      else if (en) begin exp = d; exp0 = d; n_load++; end
      else n_hold++;
      checks += 2;
      if (q !== exp)   begin failures++; if (failures < 10) $display("FAIL q=%h exp=%h", q, exp); end
      if (q0 !== exp0) begin failures++; if (failures < 10) $display("FAIL q0=%h exp=%h", q0, exp0); end
    end
    checks++;
    if (n_clr == 0 || n_load == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
