// rf_pkg: sizes shared by the 5R4W register file.
//
// The register file holds RF_WORDS words of RF_WIDTH bits and has
// RF_RD_PORTS read ports and RF_WR_PORTS write ports (64 x 74 bits, 5R4W,
// as in the published design). The word array is split into two halves of
// RF_WORDS/2 word lines each; the last word line of each half (31 and 63)
// is the one farthest from the central data-control block and is the one
// guarded by the replica (mirror) rows.
package rf_pkg;
  localparam int unsigned RF_WORDS    = 64;
  localparam int unsigned RF_WIDTH    = 74;
  localparam int unsigned RF_RD_PORTS = 5;
  localparam int unsigned RF_WR_PORTS = 4;
  localparam int unsigned RF_AW       = $clog2(RF_WORDS);
endpackage
