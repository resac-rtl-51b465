// Shared sizes of the RESAC adder.
//
// The redundant adder is an N-bit adder split into a most significant part
// (MSP, bits N-1..K, computed exactly) and a K-bit less significant part
// (LSP). The LSP is split again into a higher-order part (HOLSP, the top
// HOLSP_W bits of the LSP) and a lower-order part (LOLSP, the remaining
// bits). MSP and HOLSP are triplicated and voted; the LOLSP is simplex.
// The numbers below are the 32-bit configuration with a 22-bit MSP, 4-bit
// HOLSP and 6-bit LOLSP, and 4-bit carry look-ahead slices in the MSP.
// All of these sizes follow the design description; only their grouping
// into one package is this design's choice.
package resac_pkg;

  parameter int unsigned ADDER_W  = 32;  // N: operand width
  parameter int unsigned LSP_W    = 10;  // K: approximate less significant part
  parameter int unsigned HOLSP_W  = 4;   // higher-order LSP, triplicated and voted
  parameter int unsigned LOLSP_W  = LSP_W - HOLSP_W;  // lower-order LSP, simplex
  parameter int unsigned MSP_W    = ADDER_W - LSP_W;  // exact part
  parameter int unsigned CLA_W    = 4;   // width of one carry look-ahead slice

endpackage
