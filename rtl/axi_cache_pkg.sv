// Shared types for the AXI memory controllers and the configurable cache.
//
// rep_policy_e and write_policy_e are the two enumerated cache options
// (replacement policy of a set-associative cache, and write policy).
// cache_stat_t carries one-cycle event pulses that a cache reports so that
// hit/miss ratios and write-buffer pressure can be measured from outside.
// The AXI burst type and size encodings follow the AMBA AXI protocol.
package axi_cache_pkg;

  typedef enum logic {
    REP_LRU  = 1'b0,   // true least-recently-used
    REP_TREE = 1'b1    // tree-based pseudo-LRU
  } rep_policy_e;

  typedef enum logic {
    WP_WT = 1'b0,      // write-through, no write-allocate
    WP_WB = 1'b1       // write-back, write-allocate
  } write_policy_e;

  // Event pulses, one cycle each.
  typedef struct packed {
    logic hit;         // request served in the cycle after acceptance
    logic miss;        // request that could not be served immediately
    logic buf_full;    // write buffer full this cycle
    logic buf_stall;   // a request waits this cycle because the buffer is full
    logic flush;       // a flush request completed
  } cache_stat_t;

  localparam logic [1:0] AXI_BURST_INCR = 2'b01;

  // AXI AxSIZE encoding for a transfer of 'bits' bits.
  function automatic logic [2:0] axi_size(input int unsigned bits);
    return 3'($clog2(bits / 8));
  endfunction

endpackage
