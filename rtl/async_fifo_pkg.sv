// async_fifo_pkg: sizes and types shared by the dual-clock FIFO.
//
// The default geometry is 16 words of 8 bits, addressed by 4-bit pointers.
// The "previous operation" that tells a full FIFO from an empty one (the two
// look the same when the pointers are equal) is held in each clock domain as a
// last_op_e value. Nothing in this package is a choice of encoding that other
// logic depends on beyond the two enum values.
package async_fifo_pkg;

  // Pointer width: DEPTH = 2**ADDR_W_DEFAULT words.
  localparam int unsigned ADDR_W_DEFAULT = 4;
  // Width of one stored word.
  localparam int unsigned DATA_W_DEFAULT = 8;

  // Last operation seen by one clock domain. At equal pointers, LAST_WRITE
  // means the FIFO is full and LAST_READ means it is empty.
  typedef enum logic {
    LAST_READ  = 1'b0,
    LAST_WRITE = 1'b1
  } last_op_e;

endpackage
