// ssoc_pkg: types shared by the static-segment on-chip SRAM blocks.
//
// The memory has one port and one direction control, WE/RE. Its encoding is
// this design's choice: a 1 requests a write and a 0 a read.
package ssoc_pkg;

  typedef enum logic {
    SSOC_READ  = 1'b0,
    SSOC_WRITE = 1'b1
  } ssoc_op_e;

endpackage
