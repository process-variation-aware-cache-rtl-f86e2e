// wp_pkg -- shared types and constants of the way-prioritized L3 cache.
//
// The cache is a 16 MB, 16-way set-associative last-level cache whose ways can
// be switched off one by one (selective cache ways) and whose switched-off ways
// have their supply gated. Which ways stay on is decided by way prioritization:
// a PRIORITY register lists the physical ways from most to least leaky and a
// DEGREE register holds the quantized leakage of each listed way.
//
// Capacity, associativity, the log2(n)-bit PRIORITY entries and the 20-cycle
// hit latency follow the published configuration. Line size, address width,
// DEGREE width and the fixed-point formats are choices of this design.
package wp_pkg;

  // Cache organisation (defaults are the full-size configuration).
  localparam int unsigned WP_N_WAYS      = 16;            // associativity
  localparam int unsigned WP_CACHE_BYTES = 16*1024*1024;  // 16 MB capacity
  localparam int unsigned WP_LINE_BYTES  = 64;            // line size (own choice)
  localparam int unsigned WP_ADDR_W      = 40;            // physical address bits (own choice)
  localparam int unsigned WP_HIT_LATENCY = 20;            // L3 hit latency in cycles

  // Leakage registers.
  localparam int unsigned WP_DEG_W   = 4;   // quantized leakage per way (0..15)
  localparam int unsigned WP_POWER_W = 16;  // core power, same unit as DEGREE

  // Fixed-point slowdown: SLOW_FRAC fractional bits, 1.0 = 2**SLOW_FRAC.
  localparam int unsigned WP_SLOW_W    = 16;
  localparam int unsigned WP_SLOW_FRAC = 12;

  // Cache request operations from the level above.
  typedef enum logic [0:0] {
    OP_READ  = 1'b0,   // line fill request (miss in the upper level)
    OP_WRITE = 1'b1    // write-back of a dirty line from the upper level
  } cache_op_e;

  // Controller-visible state of one tag entry.
  typedef struct packed {
    logic valid;
    logic dirty;
  } line_state_t;

endpackage
