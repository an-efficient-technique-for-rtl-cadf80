// crc_pkg - constants shared by the parallel CRC generator.
//
// The generator works on an m-bit CRC (m = CRC_M) and takes w = CRC_W message
// bits per clock, w being a whole multiple of m. The defaults are the
// configuration the design was built for: the Ethernet CRC-32 polynomial
// G(x) = x^32+x^26+x^23+x^22+x^16+x^12+x^11+x^10+x^8+x^7+x^5+x^4+x^2+x+1,
// written without its x^32 term as 32'h04C11DB7, and a 64-bit data path.
// The preset value of the checksum register (all ones) is this design's
// choice, taken from the example runs of the original design in which the
// register reads FFFFFFFF while clr is high.
package crc_pkg;

  // Degree of the generator polynomial (CRC length m).
  parameter int unsigned CRC_M = 32;

  // Message bits consumed per clock (w).
  parameter int unsigned CRC_W = 64;

  // Generator polynomial coefficients p_{m-1} .. p_0 (p_m = 1 is implied).
  parameter logic [CRC_M-1:0] CRC32_POLY = 32'h04C1_1DB7;

  // Value loaded into the checksum register while clr is high.
  parameter logic [CRC_M-1:0] CRC_INIT = '1;

endpackage
