// Shared types and default sizes of the software-controlled multicache
// system.
//
// The cache runs in one of three operating modes (normal, bypass, shared)
// and executes four commands that the processor passes to it (Normal,
// Bypass, Shared, Save).  Those are the protocol's own terms.  The default
// sizes below (processor count, word and address width, line size, sets,
// ways, memory latency) are this design's choices; the protocol itself does
// not depend on any of them.
package mc_pkg;

  // Default sizes used by every module's parameters.
  localparam int unsigned N_CPU_DEF      = 4;   // processors / caches
  localparam int unsigned WORD_W_DEF     = 32;  // bits per word
  localparam int unsigned ADDR_W_DEF     = 12;  // word address width (4096 words)
  localparam int unsigned LINE_WORDS_DEF = 4;   // words per cache line (z)
  localparam int unsigned SETS_DEF       = 16;  // sets per cache
  localparam int unsigned WAYS_DEF       = 2;   // lines per set
  localparam int unsigned MEM_LAT_DEF    = 4;   // main-memory access cycles

  // Cache operating modes.
  typedef enum logic [1:0] {
    MODE_NORMAL = 2'd0,
    MODE_BYPASS = 2'd1,
    MODE_SHARED = 2'd2
  } cache_mode_e;

  // Cache commands, fetched by the processor as part of the program code.
  typedef enum logic [1:0] {
    CMD_NORMAL = 2'd0,
    CMD_BYPASS = 2'd1,
    CMD_SHARED = 2'd2,
    CMD_SAVE   = 2'd3
  } cache_cmd_e;

  // Kind of request a processor presents to its cache.
  typedef enum logic [1:0] {
    CPU_LOAD  = 2'd0,
    CPU_STORE = 2'd1,
    CPU_CMD   = 2'd2
  } cpu_op_e;

  // Kind of request a cache presents to main memory.
  typedef enum logic [1:0] {
    MEM_RD_LINE = 2'd0,
    MEM_WR_LINE = 2'd1,
    MEM_RD_WORD = 2'd2,
    MEM_WR_WORD = 2'd3
  } mem_op_e;

  // One-cycle event pulses from a cache, for counting and observation.
  typedef struct packed {
    logic hit;        // access served from the cache
    logic miss;       // access missed (a line will be fetched)
    logic writeback;  // dirty victim copied back on replacement
    logic bypass;     // access carried out in main memory only
    logic shared_set; // access set a shared tag that was clear
    logic save_line;  // Save copied one shared line to memory
    logic save_done;  // Save command finished
  } cache_events_t;

endpackage
