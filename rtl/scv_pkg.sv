// scv_pkg: constants shared by the cache building blocks.
//
// NPOT_EXTRA_BITS is the number of extra address bits that the
// non-power-of-two indexer feeds into its modulus table to balance the
// cache ranges (fixed at 4, as in the reference design). CRC32_POLY is the
// default hashing polynomial for 32-bit word addresses; any polynomial of
// full degree with a nonzero constant term gives a reversible hash, and the
// choice of the IEEE 802.3 polynomial is this design's own.
package scv_pkg;

  localparam int unsigned NPOT_EXTRA_BITS = 4;
  localparam logic [31:0] CRC32_POLY = 32'h04C1_1DB7;

  // Operation carried on a store request.
  typedef enum logic {
    ST_READ  = 1'b0,
    ST_WRITE = 1'b1
  } store_op_e;

endpackage
