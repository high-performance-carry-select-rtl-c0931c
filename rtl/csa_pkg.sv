// csa_pkg: shared constants of the carry-select adder.
//
// The default configuration is a 64-bit adder split into 9 blocks of
// 4, 4, 5, 6, 7, 8, 9, 10 and 11 bits, least significant block first. These
// are the block lengths of the main configuration of the design. Block 1 is a
// plain ripple-carry adder; blocks 2 to 9 are single-RCA blocks with the
// add-one selection logic (see addone_csa_block).
package csa_pkg;

  localparam int unsigned CSA_WIDTH  = 64;
  localparam int unsigned CSA_BLOCKS = 9;

  typedef int unsigned block_w_t [CSA_BLOCKS];

  localparam block_w_t CSA_BLOCK_W = '{4, 4, 5, 6, 7, 8, 9, 10, 11};

endpackage
