// icache_pkg - shared constants and encodings of the instruction cache.
//
// The C-processor addresses quads (32-bit words). A full virtual quad
// address is 46 bits: a 16-bit process identification number (PID) in the
// most significant bits followed by the 30-bit quad address. The cache is
// a virtual-address cache, so the PID is simply part of the tag and no
// flush is needed on a task switch.
//
// The enumerations name the replacement and prefetch algorithms that the
// cache can be built with. The default build uses LRU replacement and
// prefetch_lookup_on_hits, the combination the study found best.
package icache_pkg;

  localparam int PID_W  = 16;              // process identification bits
  localparam int QA_W   = 30;              // quad address within a process
  localparam int VA_W   = PID_W + QA_W;    // 46-bit virtual quad address
  localparam int QUAD_W = 32;              // one quad, also the memory bus width

  typedef logic [QUAD_W-1:0] quad_t;
  typedef logic [VA_W-1:0]   vaddr_t;

  // Replacement algorithm of a set.
  typedef enum logic [1:0] {
    REPL_LRU    = 2'd0,
    REPL_FIFO   = 2'd1,
    REPL_RANDOM = 2'd2
  } repl_e;

  // One-transfer-block-lookahead prefetch initiation methods.
  typedef enum logic [2:0] {
    PF_NEVER         = 3'd0,
    PF_ALWAYS        = 3'd1,
    PF_ON_MISSES     = 3'd2,
    PF_TAGGED        = 3'd3,
    PF_LOOKUP_HIT    = 3'd4,
    PF_LOOKUP_ALWAYS = 3'd5
  } prefetch_e;

  // One-cycle event pulses of the cache, brought out for performance
  // monitoring (hit ratios, prefetch and stop counts, RAM collisions).
  typedef struct packed {
    logic rb_hit;      // quad(s) served from the read buffer
    logic ram_hit;     // transfer block read from the cache RAM
    logic fb_hit;      // request found its transfer block in the fetch buffer
    logic miss;        // demand miss
    logic prefetch;    // prefetch started
    logic stop;        // fetcher stopped because of a miss
    logic split_read;  // one RAM read served quads of two transfer blocks
    logic crossing;      // request whose quads lie in two transfer blocks
    logic collision;   // fetcher had to wait for the data RAM
    logic fetch_done;  // a transfer block was stored in the cache
    logic replace;     // a block was (re)allocated in a set
    logic wrap;        // a demand fetch started in the middle of a block
  } icache_events_t;

endpackage
