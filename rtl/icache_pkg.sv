// Shared constants and types of the multi-ported shared instruction cache
// with software, next-line and stream prefetching.
//
// The cluster moves instructions at a 16-byte granularity everywhere: the
// cache line, the fetch width of the cores and the prefetch sub-request are
// all 16 bytes, and addresses are 32 bits wide. The L2 bus is 8 bytes wide,
// so a line refill is two beats. These numbers follow the document. The
// register offsets 0x08 (prefetch address) and 0x18 (prefetch size) also
// follow it; the offsets for the hardware prefetcher configuration and the
// statistics, the miss-request record and the encodings are this design's
// own choice.
package icache_pkg;

  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned LINE_BYTES  = 16;
  localparam int unsigned OFFSET_W    = 4;                  // log2(LINE_BYTES)
  localparam int unsigned LINE_W      = 8 * LINE_BYTES;     // 128-bit line
  localparam int unsigned LINE_ADDR_W = ADDR_W - OFFSET_W;  // line number
  localparam int unsigned L2_DATA_W   = 64;                 // 8-byte L2 bus
  localparam int unsigned L2_BEATS    = LINE_W / L2_DATA_W; // beats per refill
  localparam int unsigned MAX_WAY_W   = 3;                  // up to 8 ways

  // Replacement policy for a full set.
  typedef enum logic [0:0] {
    REPL_PRAND = 1'b0,
    REPL_PLRU  = 1'b1
  } repl_e;

  // Hardware prefetcher mode (the software prefetcher is always available).
  typedef enum logic [1:0] {
    HWPF_OFF      = 2'd0,
    HWPF_NEXTLINE = 2'd1,
    HWPF_STREAM   = 2'd2
  } hwpf_mode_e;

  // States of the prefetch request state machine.
  typedef enum logic [1:0] {
    PF_IDLE  = 2'd0,
    PF_REQ   = 2'd1,
    PF_CHECK = 2'd2,
    PF_WAIT  = 2'd3
  } pf_state_e;

  // Refill (miss) request travelling from a private controller through the
  // miss interconnect to the master controller.
  typedef struct packed {
    logic [LINE_ADDR_W-1:0] line;  // line number (address >> 4)
    logic [MAX_WAY_W-1:0]   way;   // victim way chosen by the requester
    logic                   pf;    // issued by the prefetcher
  } miss_req_t;

  // Per-cycle event flags of the prefetcher and the master controller,
  // brought out of the cache for performance counting.
  typedef struct packed {
    pf_state_e pf_state;      // state of the prefetch state machine
    logic      pf_sw_start;   // software burst started
    logic      pf_miss_start; // next-line burst started by a demand miss
    logic      pf_stream;     // stream burst started after the wait
    logic      pf_preempt;    // running burst or wait abandoned
    logic      pf_drop;       // prefetch sub-request hit, dropped
    logic      pf_issue;      // prefetch refill request accepted
    logic      merge;         // miss request merged into a pending refill
    logic      alloc;         // miss request opened a new refill
    logic      demand_miss;   // demand refill request sent to L2
  } cache_evt_t;

  // Register offsets of the cache control unit.
  localparam logic [7:0] REG_PF_ADDR   = 8'h08;  // write: start prefetch at address
  localparam logic [7:0] REG_PF_SIZE   = 8'h18;  // prefetch size in bytes
  localparam logic [7:0] REG_HWPF_MODE = 8'h20;  // hwpf_mode_e
  localparam logic [7:0] REG_HWPF_SIZE = 8'h28;  // hardware burst size in bytes
  localparam logic [7:0] REG_HWPF_WAIT = 8'h30;  // stream wait cycles
  localparam logic [7:0] REG_STATS_START = 8'h38; // write: clear and start statistics
  localparam logic [7:0] REG_STATS_STOP  = 8'h40; // write: stop (freeze) statistics
  localparam logic [7:0] REG_STATS_BASE  = 8'h80; // read: statistics window 0x80-0xFC

  // Word index of each statistic in the window (address = 0x80 + 4 * index).
  localparam int unsigned STAT_CYCLES    = 0;  // cycles while gathering
  localparam int unsigned STAT_L2_LINES  = 1;  // lines requested from L2
  localparam int unsigned STAT_L2_PF     = 2;  // of which by the prefetcher
  localparam int unsigned STAT_USED      = 3;  // bytes of valid lines at stop
  localparam int unsigned STAT_ACTIVE    = 4;  // 1 while gathering
  localparam int unsigned STAT_CORE0     = 8;  // per core c: 8+3c accesses,
                                               // 9+3c hits, 10+3c summed access time

endpackage
