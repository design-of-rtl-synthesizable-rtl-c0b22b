// fifo_pkg: sizes shared by the FIFO modules.
//
// The FIFO is 8 words deep and 32 bits wide; its memory is addressed by a
// 3-bit address. The control logic keeps each pointer one bit wider than
// the address so that a full FIFO (pointers equal apart from the top bit)
// can be told from an empty one (pointers fully equal); that extra bit is
// this design's own choice.
package fifo_pkg;
  localparam int unsigned FIFO_WIDTH  = 32;  // word length
  localparam int unsigned FIFO_DEPTH  = 8;   // number of words
  localparam int unsigned FIFO_ADDR_W = 3;   // log2(FIFO_DEPTH)
endpackage
