// rca_pkg -- types and constants shared by the reconfigurable cache.
//
// The cache sits between a 32-bit processor bus and a 64-bit wide main
// memory. A cache line is one 64-bit memory word (8 bytes), so a line
// address is the byte address without its three low bits. The control
// word kept per line stores the full line address rather than a tag: when
// the associativity changes, the tag/set split of the address moves by one
// bit, and storing every address bit means no stored tag ever has to be
// lengthened or shortened. Byte-valid bits allow a write miss to allocate a
// line without fetching it; a read that needs a byte that is not valid
// misses.
//
// Replacement strategies are ordered from simplest to most informed; the
// synthesis-time limit MAX_REPL of the top removes the strategies above it.
package rca_pkg;

  localparam int unsigned ADDR_W   = 32;          // processor byte address
  localparam int unsigned DATA_W   = 64;          // line = one PLB data beat
  localparam int unsigned BE_W     = DATA_W / 8;  // byte enables per line
  localparam int unsigned OFFS_W   = 3;           // log2(bytes per line)
  localparam int unsigned LA_W     = ADDR_W - OFFS_W; // line address width
  localparam int unsigned REPL_W   = 28;          // LRU matrix of 8 ways
  localparam int unsigned WAY_W    = 4;           // way number, up to 16 ways
  localparam int unsigned ALOG_W   = 3;           // log2(associativity)
  localparam int unsigned SIZE_W   = 5;           // log2(number of lines)

  typedef logic [LA_W-1:0]   line_addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [BE_W-1:0]   be_t;
  typedef logic [REPL_W-1:0] repl_word_t;
  typedef logic [WAY_W-1:0]  way_t;

  typedef enum logic [2:0] {
    REPL_RANDOM  = 3'd0,  // free-running LFSR
    REPL_PRANDOM = 3'd1,  // one global counter register
    REPL_FIFO    = 3'd2,  // per-set "last written way" register
    REPL_PLRU    = 3'd3,  // per-set binary tree bits
    REPL_LRU     = 3'd4   // per-set pairwise order matrix
  } repl_e;

  typedef enum logic [1:0] {
    MON_OFF  = 2'd0,
    MON_LINE = 2'd1,      // line/way, mode, hit, byte, valid
    MON_ADDR = 2'd2       // the same plus 30 address bits
  } mon_mode_e;

  // Run-time configuration of the cache.
  typedef struct packed {
    logic [SIZE_W-1:0] size_log2;   // lines in use = 2**size_log2
    logic [ALOG_W-1:0] assoc_log2;  // associativity = 2**assoc_log2
    repl_e             repl;        // replacement strategy
    logic              write_back;  // 1: write-back, 0: write-through
    logic              write_alloc; // 1: allocate a line on a write miss
    mon_mode_e         mon_mode;    // monitor output mode
  } cfg_t;

  // Control word stored per cache line in the control BRAM.
  typedef struct packed {
    be_t        bvalid;    // which bytes of the line hold data
    logic       modified;  // line differs from main memory
    line_addr_t laddr;     // full line address (tag and set index)
  } ctrl_t;

  localparam int unsigned CTRL_W = $bits(ctrl_t);   // control BRAM width

  // One monitor record, as placed in the monitor output register.
  typedef struct packed {
    logic [29:0] addr;     // address bits 31:2 (second mode only)
    way_t        way;      // way of the line inside its set
    logic        write;    // transfer mode: 1 write, 0 read
    logic        hit;      // 1 hit, 0 miss
    logic [3:0]  byte_sel; // first byte of the line that was accessed
    logic        valid;    // record holds information
  } mon_rec_t;

endpackage
