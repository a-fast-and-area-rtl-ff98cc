// crc_pkg: constants and types shared by the CRC128 link.
//
// CRC_N is the data width and the number of redundant (CRC) bits per codeword:
// 128 data bits plus 128 CRC bits form a 256-bit codeword. loc_mode_e selects
// which error locator the receiver uses for a codeword: the single-cycle
// parallel comparator array (the main configuration) or the bit-serial one.
package crc_pkg;

  localparam int unsigned CRC_N = 128;

  typedef enum logic {
    LOC_PARALLEL = 1'b0,
    LOC_SERIAL   = 1'b1
  } loc_mode_e;

endpackage
