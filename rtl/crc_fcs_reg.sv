// crc_fcs_reg - the CRC checksum (frame check sequence) register.
//
// Holds the present state X of the parallel CRC. On a rising clock edge it
// loads INIT while clr is high, otherwise loads the next state when en is
// high and keeps its value when en is low. Its output is the generated CRC.
//
// The clear input follows the design's register with a CLR pin; that the
// clear is synchronous, that it loads INIT (all ones by default) rather than
// zero, and the en input that lets a message pause between words, are this
// design's choices.
//
// Interface: clk, clr (active high, synchronous, priority over en), en,
// d (next state), q (present state / CRC). One clock from d to q.
module crc_fcs_reg #(
  parameter int unsigned   M    = crc_pkg::CRC_M,
  parameter logic [M-1:0]  INIT = crc_pkg::CRC_INIT
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         en,
  input  logic [M-1:0] d,
  output logic [M-1:0] q
);

  always_ff @(posedge clk) begin
    if (clr) begin
      q <= INIT;
    end else if (en) begin
      q <= d;
    end
  end

endmodule
