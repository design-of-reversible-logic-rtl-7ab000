// Shared constants for the reversible code converters.
//
// Each converter is characterised by three numbers: how many reversible
// gates it uses, how many of its gate outputs are garbage (not needed for
// the result, but required to keep every gate a bijection) and how many
// gate inputs are tied to constant 0 or 1. The values below are the costs
// of the 4-bit converters; the converters use the garbage counts to size
// their garbage ports and the testbenches check the port widths against
// them. The values are the published ones for these circuits.
package rev_pkg;

  // Binary to Gray: three Feynman gates, no constants.
  localparam int unsigned B2G_GATES     = 3;
  localparam int unsigned B2G_GARBAGE   = 3;
  localparam int unsigned B2G_CONSTANTS = 0;

  // Gray to binary: three XOR Feynman gates plus two copy gates.
  localparam int unsigned G2B_GATES     = 5;
  localparam int unsigned G2B_GARBAGE   = 3;
  localparam int unsigned G2B_CONSTANTS = 2;

  // BCD to excess-3: five URG and three Feynman gates.
  localparam int unsigned BCD2XS3_GATES     = 8;
  localparam int unsigned BCD2XS3_GARBAGE   = 12;
  localparam int unsigned BCD2XS3_CONSTANTS = 8;

  // Excess-3 to BCD: five URG and three Feynman gates.
  localparam int unsigned XS32BCD_GATES     = 8;
  localparam int unsigned XS32BCD_GARBAGE   = 12;
  localparam int unsigned XS32BCD_CONSTANTS = 8;

  // A 4-bit code word, bit 3 is the most significant.
  typedef logic [3:0] nibble_t;

endpackage
