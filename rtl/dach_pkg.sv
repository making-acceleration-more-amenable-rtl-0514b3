// dach_pkg: types shared by the cache-task blocks (core, mem_if, L1) and the
// compute task that uses them.
//
// A cache task is driven through a request channel and answers through a
// response channel. A request carries an operation, a word address and, for a
// store, the word to write. The response to a load carries the whole cache line
// that holds the word (a "get_line"); the requester selects the word from it.
// A STOP request makes the cache write every dirty line back to off-chip memory
// and answer with one response when it is done, so the end of a kernel can be
// signalled through the same channel as ordinary accesses.
//
// The cache is configurable for the mapping of address bits (standard, with the
// set bits right above the line offset, or swapped, with the set bits at the top
// of the address and the tag right above the offset) and for the replacement
// policy (least recently used or first-in first-out). These two options follow
// the cache's documented configuration; the encodings are this design's own.
package dach_pkg;

  typedef enum logic [1:0] {
    OP_LOAD  = 2'd0,
    OP_STORE = 2'd1,
    OP_STOP  = 2'd2
  } cache_op_e;

  typedef enum logic {
    MAP_STANDARD = 1'b0,
    MAP_SWAPPED  = 1'b1
  } addr_map_e;

  typedef enum logic {
    REPL_LRU  = 1'b0,
    REPL_FIFO = 1'b1
  } repl_e;

  // Number of bits needed to index n items (at least 1).
  function automatic int unsigned idx_bits(int unsigned n);
    return (n <= 1) ? 1 : $clog2(n);
  endfunction

endpackage
