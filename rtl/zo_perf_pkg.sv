// zo_perf_pkg: the event counters the processor exports, so that a user
// can see how often each stall type, ACC and ZA occur.  The counter set
// mirrors the stall classes used to analyse the design (branch, issue rules,
// arithmetic, address-generation and load-use interlocks, cache) plus
// the two techniques; the zero-offset share of the address-generation and
// load-use interlocks (AGI-0, LUI-0) is counted separately, as the
// document splits its stall cycles.  The counter set is this design's own
// addition.
package zo_perf_pkg;
  typedef struct packed {
    logic [31:0] cycles;        // cycles until HALT retires
    logic [31:0] retired;       // instructions written back (HALT included)
    logic [31:0] stall_branch;  // cycles with nothing to issue (misprediction, fetch delay)
    logic [31:0] stall_static;  // cycles the oldest waiting instr. broke an issue rule
    logic [31:0] stall_arith;   // ... waited on an ALU result
    logic [31:0] stall_agi;     // ... was a memory op waiting for its base (AGI)
    logic [31:0] stall_lui;     // ... waited on a loaded value (LUI)
    logic [31:0] stall_agi0;    // the part of stall_agi where the waiting instr. is zero-offset
    logic [31:0] stall_lui0;    // the part of stall_lui where the load is zero-offset
    logic [31:0] za_loads;      // zero-offset loads advanced (ZA)
    logic [31:0] za_stores;     // zero-offset stores advanced (ZA)
    logic [31:0] za_denied;     // advanceable but kept ordinary (port or order)
    logic [31:0] acc_used;      // zero-offset refs issued early by ACC
    logic [31:0] mispredicts;   // redirects from the ALU stage
    logic [31:0] d_redirects;   // predicted-taken redirects in D
    logic [31:0] dc_misses;     // data-cache block fills
    logic [31:0] freeze_cycles; // cycles the pipeline was frozen by the cache
    logic [31:0] nb_loads;      // load misses let go without stalling
    logic [31:0] stall_miss;    // ... waited on the register of such a load
  } perf_t;
endpackage
