// cache_pkg: types and constants shared by the cache hierarchy.
//
// The hierarchy moves whole 256-byte lines between the L1 caches, the shared
// L2 and main memory, and 32-bit words between a core and its L1 caches.
// Addresses are 32-bit byte addresses. The line size of 256 bytes is the one
// the design is built around for both cache levels; the 32-bit word and
// address width are this design's own choice (a 32-bit host system).
package cache_pkg;

  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned WORD_W     = 32;
  localparam int unsigned LINE_BYTES = 256;
  localparam int unsigned LINE_W     = LINE_BYTES * 8;       // 2048 bits
  localparam int unsigned WORDS_PER_LINE = LINE_BYTES / (WORD_W / 8);  // 64
  localparam int unsigned OFFSET_W   = $clog2(LINE_BYTES);   // 8
  localparam int unsigned WORD_SEL_W = $clog2(WORDS_PER_LINE); // 6

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [LINE_W-1:0] line_t;

  // Request from an L1 cache to the shared L2 (through the arbiter).
  // A read asks for the whole line holding addr; a write stores one word.
  typedef struct packed {
    logic  write;
    addr_t addr;
    word_t wdata;
  } l2_req_t;

  // Request from the L2 to main memory: read or write of one whole line.
  typedef struct packed {
    logic  write;
    addr_t addr;   // line-aligned
    line_t wdata;
  } mem_req_t;

  typedef logic [WORD_SEL_W-1:0] word_sel_t;

  // Word of a line selected by byte-address bits [OFFSET_W-1:2].
  function automatic word_t line_word(line_t line, word_sel_t sel);
    return line[sel*WORD_W +: WORD_W];
  endfunction

  // The line with one word replaced.
  function automatic line_t line_put_word(line_t line, word_sel_t sel, word_t w);
    line_t l;
    l = line;
    l[sel*WORD_W +: WORD_W] = w;
    return l;
  endfunction

endpackage
