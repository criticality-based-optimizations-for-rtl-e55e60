// lcp_pkg: types and constants shared by the load-criticality predictor and the
// load-path optimizations that use it.
//
// A load is judged by the number of direct consumers it had the last time it ran
// (a 4-bit count kept per PC), by a 2-bit confidence counter on that count, and
// by a "ready-but-delayed" bit. Each optimization compares the count with its own
// threshold; the threshold values below are the ones the design is tuned for.
// Sizes that the processor model fixes (96-entry ROB, 32-entry load queue,
// 20-entry store queue, 4-wide allocate/commit, 6-wide issue, 1024-entry table)
// are taken as given; register count, PC and address widths are this design's
// own choice.
package lcp_pkg;

  // Processor geometry
  localparam int unsigned ROB_ENTRIES = 96;
  localparam int unsigned LDQ_ENTRIES = 32;
  localparam int unsigned STQ_ENTRIES = 20;
  localparam int unsigned ALLOC_W     = 4;   // allocate / dispatch width
  localparam int unsigned COMMIT_W    = 4;   // commit width
  localparam int unsigned ISSUE_W     = 6;   // peak issue width
  localparam int unsigned NUM_LREGS   = 16;  // logical registers (own choice)
  localparam int unsigned PC_W        = 32;  // own choice
  localparam int unsigned ADDR_W      = 32;  // own choice
  localparam int unsigned DATA_W      = 64;  // own choice

  localparam int unsigned ROB_IDX_W  = $clog2(ROB_ENTRIES);
  localparam int unsigned LREG_W     = $clog2(NUM_LREGS);

  // Predictor state
  localparam int unsigned CNT_W        = 4;     // consumer count per ROB entry / CLPT entry
  localparam int unsigned CONF_W       = 2;     // confidence counter per CLPT entry
  localparam int unsigned CLPT_ENTRIES = 1024;
  localparam int unsigned CONF_DELTA   = 2;     // stable if |old-new| < CONF_DELTA
  localparam int unsigned CONF_LOW_MAX = 1;     // confidence <= this counts as low (own choice)

  // Criticality thresholds of the optimizations (critical when count >= threshold)
  localparam int unsigned TH_FSLP     = 5;  // load-port priority
  localparam int unsigned TH_STQ      = 2;  // store-queue search filter
  localparam int unsigned TH_INS_LRU  = 8;  // LRU insertion of non-critical fills
  localparam int unsigned TH_BYPASS   = 4;  // DL1 bypass of non-critical fills
  localparam int unsigned TH_PREFETCH = 5;  // prefetch trigger filter
  localparam int unsigned TH_MDP      = 2;  // memory-dependence predictor filter (own choice)
  localparam int unsigned MAX_DEFER   = 3;  // deferrals before a load gets priority

  // Issue-rate targets, in micro-ops per cycle
  localparam int unsigned RATE_PRED = 4;  // predictor tracks and trains below this
  localparam int unsigned RATE_STQ  = 3;  // all loads may search the STQ below this

  // What the predictor knows about one load when it is allocated
  typedef struct packed {
    logic [CNT_W-1:0] count;     // consumers seen last time
    logic             conf_low;  // confidence counter is low: treat as critical
    logic             rbd;       // ready-but-delayed last time
  } crit_info_t;

  // Which optimizations are switched on
  typedef struct packed {
    logic fslp;      // criticality-prioritised load-port select
    logic fsla;      // store AGU also computes load addresses
    logic stq_filt;  // only critical loads search the store queue
    logic mdp_filt;  // only critical loads use the memory-dependence predictor
    logic ins_slru;  // non-critical fills go to the LRU position
    logic ins_sl1;   // non-critical fills bypass the DL1
    logic ins_sp;    // only critical loads trigger prefetches
  } opt_cfg_t;

  // One allocated micro-op as seen by the consumer collection logic
  typedef struct packed {
    logic                 valid;
    logic                 is_load;
    logic                 is_store;
    logic                 has_dst;
    logic [LREG_W-1:0]    dst;
    logic                 src1_v;
    logic [LREG_W-1:0]    src1;
    logic                 src2_v;
    logic [LREG_W-1:0]    src2;
    logic [ROB_IDX_W-1:0] rob;
    logic [PC_W-1:0]      pc;
  } alloc_uop_t;

  // Store-queue pointer: index plus a wrap bit, so a full queue differs from an empty one
  localparam int unsigned STQ_IDX_W = $clog2(STQ_ENTRIES);
  typedef struct packed {
    logic                 wrap;
    logic [STQ_IDX_W-1:0] idx;
  } stq_ptr_t;

  function automatic stq_ptr_t stq_ptr_add(stq_ptr_t p, int unsigned k);
    stq_ptr_t r;
    int unsigned s;
    s = 32'(p.idx) + k;
    if (s >= STQ_ENTRIES) begin
      r.idx  = STQ_IDX_W'(s - STQ_ENTRIES);
      r.wrap = ~p.wrap;
    end else begin
      r.idx  = STQ_IDX_W'(s);
      r.wrap = p.wrap;
    end
    return r;
  endfunction

  // Number of entries from pointer a up to (not including) pointer b
  function automatic int unsigned stq_ptr_dist(stq_ptr_t a, stq_ptr_t b);
    if (a.wrap == b.wrap) return 32'(b.idx) - 32'(a.idx);
    else                  return 32'(b.idx) + STQ_ENTRIES - 32'(a.idx);
  endfunction

  // Critical with respect to one threshold: low confidence, or enough consumers
  function automatic logic is_crit(crit_info_t ci, int unsigned th);
    return ci.conf_low || (32'(ci.count) >= th);
  endfunction

endpackage
