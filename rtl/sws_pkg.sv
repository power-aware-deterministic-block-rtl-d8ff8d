// sws_pkg: shared constants and types of the single-way-selective (SWS) cache.
//
// The default geometry is a 16 KB, 4-way set-associative data cache with
// 32-byte lines (128 sets) and a 4-bit mini-tag, the low-order four bits of
// the tag, used to pick the single way that is accessed. The 32-bit address
// and 32-bit data word are this design's choice (an ARM-class embedded core).
package sws_pkg;

  localparam int unsigned DEF_ADDR_W  = 32;
  localparam int unsigned DEF_CACHE_BYTES = 16384;
  localparam int unsigned DEF_LINE_BYTES = 32;
  localparam int unsigned DEF_WAYS    = 4;
  localparam int unsigned DEF_MINI_W  = 4;

  // Replacement used when no mini-tag of the set matches the missing address.
  typedef enum logic [0:0] {
    REPL_RR     = 1'b0,   // round-robin pointer per set
    REPL_RANDOM = 1'b1    // 16-bit LFSR
  } repl_e;

  // One-cycle event pulses reported by the cache.
  typedef struct packed {
    logic hit;              // lookup of a new request hit
    logic miss;             // lookup of a new request missed
    logic victim_minitag;   // victim forced by a matching mini-tag
    logic victim_invalid;   // victim was an empty way
    logic victim_policy;    // victim chosen by round-robin / random
    logic writeback;        // dirty victim written back to memory
  } sws_events_t;

endpackage
