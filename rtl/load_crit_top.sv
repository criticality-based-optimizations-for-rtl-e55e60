// load_crit_top: load-criticality predictor and the load-path optimizations
// that share it, as one unit that attaches to an out-of-order core.
//
// Prediction. At allocation each load looks up the prediction table (clpt) by
// PC and receives the consumer count, confidence and ready-but-delayed bit of
// its last instance. Meanwhile the consumer collection logic (ccl) counts the
// direct consumers of every in-flight load; when a load commits, its count and
// whether it was delayed at the cache port are written back to the table.
// Counting and training happen only while the issue-rate monitor sees fewer
// than 4 micro-ops issued per cycle on average.
//
// Use. Every load carries its prediction into the load queue (ldq), where
// load_policy derives, with a threshold per optimization:
//   - priority for the single DL1 read port (oldest critical load first,
//     at most 3 deferrals for any load);
//   - whether the load may search the store queue (stq) for forwarding or must
//     wait for all older stores to drain (all loads may search while fewer than
//     3 micro-ops issue per cycle);
//   - whether it may consult the load-wait dependence predictor and issue past
//     unknown older store addresses, or must wait for them;
//   - how its miss is filled: MRU, LRU position, or not into the DL1;
//   - whether it may trigger the prefetcher.
// The store AGU also computes load addresses when it has no store (agu_steer).
// Each optimization can be switched off through `cfg`, which gives the baseline
// behaviour for it.
//
// Interface to the core: an allocation group of ALLOC_W micro-ops (accepted only
// while `alloc_ready`; the load and store queue slots given to each slot come
// back on alloc_ldq_idx/alloc_stq_idx in the same cycle), a commit group of
// COMMIT_W, address and store-data micro-ops from the scheduler, the number of
// micro-ops issued per cycle, ordering violations and flushes. Towards memory:
// one load per cycle is issued to the DL1 tags and store queue; its outcome
// (forwarded, hit, miss with fill policy, or replay) comes out in the same
// cycle. Fills come back on the fill port. Committed stores write back one per
// cycle. The DL1 data array, the lower memory levels and the prefetcher itself
// are outside this unit.
module load_crit_top
  import lcp_pkg::*;
#(
  parameter int unsigned WINDOW = 128
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  opt_cfg_t              cfg,
  input  logic [$clog2(ISSUE_W+1)-1:0] issued,
  input  logic                  flush,
  // allocation
  input  alloc_uop_t            alloc [ALLOC_W],
  output logic                  alloc_ready,
  output logic [$clog2(LDQ_ENTRIES)-1:0] alloc_ldq_idx [ALLOC_W],
  output logic [STQ_IDX_W-1:0]  alloc_stq_idx [ALLOC_W],
  // commit
  input  logic                  cm_v       [COMMIT_W],
  input  logic [ROB_IDX_W-1:0]  cm_rob     [COMMIT_W],
  input  logic [PC_W-1:0]       cm_pc      [COMMIT_W],
  input  logic                  cm_is_load [COMMIT_W],
  input  logic                  cm_is_store[COMMIT_W],
  input  logic                  cm_has_dst [COMMIT_W],
  input  logic [LREG_W-1:0]     cm_dst     [COMMIT_W],
  // address generation
  input  logic                  ld_agu_v    [2],
  input  logic [$clog2(LDQ_ENTRIES)-1:0] ld_agu_idx [2],
  input  logic [ADDR_W-1:0]     ld_agu_base [2],
  input  logic [ADDR_W-1:0]     ld_agu_disp [2],
  output logic                  ld_agu_gnt  [2],
  input  logic                  st_agu_v,
  input  logic [STQ_IDX_W-1:0]  st_agu_idx,
  input  logic [ADDR_W-1:0]     st_agu_base,
  input  logic [ADDR_W-1:0]     st_agu_disp,
  output logic                  st_agu_gnt,
  input  logic                  std_v,
  input  logic [STQ_IDX_W-1:0]  std_idx,
  input  logic [DATA_W-1:0]     std_data,
  // ordering violation detected by the core for a load-queue entry
  input  logic                  vio_v,
  input  logic [$clog2(LDQ_ENTRIES)-1:0] vio_idx,
  // load issue and its outcome
  input  logic                  port_ready,
  output logic                  ld_iss_v,
  output logic [ROB_IDX_W-1:0]  ld_iss_rob,
  output logic [ADDR_W-1:0]     ld_iss_addr,
  output logic                  ld_fwd,
  output logic [DATA_W-1:0]     ld_fwd_data,
  output logic                  ld_hit,
  output logic                  ld_replay,
  output logic                  miss_v,
  output logic                  miss_fill_lru,
  output logic                  miss_fill_bypass,
  output logic                  pf_trig_v,
  output logic [PC_W-1:0]       pf_trig_pc,
  output logic                  stq_searched,
  // fills
  input  logic                  fill_v,
  input  logic [ADDR_W-1:0]     fill_addr,
  input  logic                  fill_lru,
  input  logic                  fill_bypass,
  output logic                  evict_v,
  output logic [ADDR_W-1:0]     evict_addr,
  // store write-back
  output logic                  wb_v,
  output logic [ADDR_W-1:0]     wb_addr,
  output logic [DATA_W-1:0]     wb_data,
  input  logic                  wb_ack,
  // status and events
  output logic                  pred_en,
  output logic                  stq_all,
  output logic                  ev_defer,
  output logic                  ev_rbd,
  output logic                  ev_starve,
  output logic                  ev_clpt_write,
  output logic                  ev_lwt_set
);

  localparam int unsigned LIW = $clog2(LDQ_ENTRIES);

  // ---------------- prediction at allocation ----------------
  logic [PC_W-1:0] al_pc   [ALLOC_W];
  crit_info_t      al_info [ALLOC_W];
  logic            al_mdp  [ALLOC_W];
  logic            al_lwt_en [ALLOC_W];
  logic            al_wait [ALLOC_W];
  logic            al_ld   [ALLOC_W];
  logic [ROB_IDX_W-1:0] al_rob [ALLOC_W];
  stq_ptr_t        al_color [ALLOC_W];
  stq_ptr_t        stq_tail, stq_head;
  logic [$clog2(ALLOC_W+1)-1:0] n_al_st;
  logic [$clog2(LDQ_ENTRIES+1)-1:0] ldq_free;
  logic [$clog2(STQ_ENTRIES+1)-1:0] stq_free;

  issue_rate_monitor #(.WINDOW(WINDOW)) u_irm (
    .clk, .rst_n, .issued, .pred_en, .stq_all
  );

  always_comb begin
    stq_ptr_t c;
    c = stq_tail;
    n_al_st = '0;
    for (int i = 0; i < int'(ALLOC_W); i++) begin
      al_pc[i]         = alloc[i].pc;
      al_rob[i]        = alloc[i].rob;
      al_ld[i]         = alloc[i].valid && alloc[i].is_load;
      al_lwt_en[i]     = al_ld[i] && al_mdp[i];
      al_color[i]      = c;
      alloc_stq_idx[i] = c.idx;
      if (alloc[i].valid && alloc[i].is_store) begin
        c = stq_ptr_add(c, 1);
        n_al_st = n_al_st + 1'b1;
      end
    end
    alloc_ready = 32'(ldq_free) >= ALLOC_W && 32'(stq_free) >= ALLOC_W;
  end

  for (genvar i = 0; i < int'(ALLOC_W); i++) begin : g_alpol
    logic unused_a, unused_b, unused_c, unused_d, unused_e;
    load_policy u_pol (
      .cfg (cfg), .info (al_info[i]), .defer_max (1'b0), .stq_all (stq_all),
      .fslp_crit (unused_a), .may_search (unused_b), .use_mdp (al_mdp[i]),
      .fill_lru (unused_c), .fill_bypass (unused_d), .pf_allow (unused_e)
    );
  end

  // ---------------- commit path ----------------
  logic [CNT_W-1:0] cm_count [COMMIT_W];
  logic             cm_trk   [COMMIT_W];
  logic             cm_rbd   [COMMIT_W];
  logic             wr_v     [COMMIT_W];
  logic             wr_rbd   [COMMIT_W];
  logic [$clog2(COMMIT_W+1)-1:0] n_cm_ld, n_cm_st;

  always_comb begin
    n_cm_ld = '0;
    n_cm_st = '0;
    ev_clpt_write = 1'b0;
    for (int c = 0; c < int'(COMMIT_W); c++) begin
      wr_v[c]   = cm_v[c] && cm_is_load[c] && cm_trk[c] && pred_en;
      wr_rbd[c] = cm_rbd[n_cm_ld[$clog2(COMMIT_W)-1:0]];
      if (wr_v[c]) ev_clpt_write = 1'b1;
      if (cm_v[c] && cm_is_load[c])  n_cm_ld = n_cm_ld + 1'b1;
      if (cm_v[c] && cm_is_store[c]) n_cm_st = n_cm_st + 1'b1;
    end
  end

  clpt u_clpt (
    .clk, .rst_n,
    .rd_pc (al_pc), .rd_info (al_info),
    .wr_v (wr_v), .wr_pc (cm_pc), .wr_count (cm_count), .wr_rbd (wr_rbd)
  );

  ccl u_ccl (
    .clk, .rst_n, .track_en (pred_en), .flush,
    .alloc (alloc),
    .cm_v, .cm_rob, .cm_has_dst, .cm_dst,
    .cm_count (cm_count), .cm_tracked (cm_trk)
  );

  logic [PC_W-1:0] vio_pc;
  logic            vio_use_mdp;
  assign ev_lwt_set = vio_v && vio_use_mdp;

  load_wait_table u_lwt (
    .clk, .rst_n,
    .rd_en (al_lwt_en), .rd_pc (al_pc), .rd_wait (al_wait),
    .set_v (ev_lwt_set), .set_pc (vio_pc)
  );

  // ---------------- address generation ----------------
  logic                 ldq_wr_v    [2];
  logic [LIW-1:0]       ldq_wr_idx  [2];
  logic [ADDR_W-1:0]    ldq_wr_addr [2];
  logic                 sta_v;
  logic [STQ_IDX_W-1:0] sta_idx;
  logic [ADDR_W-1:0]    sta_addr;

  agu_steer u_agu (
    .fsla (cfg.fsla),
    .ld_v (ld_agu_v), .ld_idx (ld_agu_idx), .ld_base (ld_agu_base), .ld_disp (ld_agu_disp),
    .st_v (st_agu_v), .st_idx (st_agu_idx), .st_base (st_agu_base), .st_disp (st_agu_disp),
    .ld_gnt (ld_agu_gnt), .st_gnt (st_agu_gnt),
    .ldq_wr_v, .ldq_wr_idx, .ldq_wr_addr,
    .stq_wr_v (sta_v), .stq_wr_idx (sta_idx), .stq_wr_addr (sta_addr)
  );

  // ---------------- load and store queues ----------------
  logic [STQ_ENTRIES-1:0] stq_unknown, stq_busy;
  logic                   iss_v, iss_may_search, iss_lru, iss_byp, iss_pf, iss_crit_unused;
  logic [LIW-1:0]         iss_idx;
  logic [ROB_IDX_W-1:0]   iss_rob;
  logic [PC_W-1:0]        iss_pc;
  logic [ADDR_W-1:0]      iss_addr;
  stq_ptr_t               iss_color;
  logic                   srch_hit, srch_wait;
  logic [DATA_W-1:0]      srch_data;

  ldq u_ldq (
    .clk, .rst_n, .flush, .cfg, .stq_all,
    .al_v (al_ld), .al_rob (al_rob), .al_pc (al_pc), .al_info (al_info),
    .al_wait (al_wait), .al_color (al_color), .al_idx (alloc_ldq_idx), .free_n (ldq_free),
    .wr_v (ldq_wr_v), .wr_idx (ldq_wr_idx), .wr_addr (ldq_wr_addr),
    .stq_head, .stq_addr_unknown (stq_unknown), .stq_busy,
    .port_ready,
    .iss_v, .iss_idx, .iss_rob, .iss_pc, .iss_addr, .iss_color,
    .iss_may_search, .iss_fill_lru (iss_lru), .iss_fill_bypass (iss_byp),
    .iss_pf_allow (iss_pf), .iss_crit (iss_crit_unused),
    .ev_defer, .ev_rbd, .ev_starve,
    .replay_v (ld_replay), .replay_idx (iss_idx),
    .vio_idx, .vio_pc, .vio_use_mdp,
    .cm_n (n_cm_ld), .cm_rbd (cm_rbd)
  );

  stq u_stq (
    .clk, .rst_n, .flush,
    .alloc_n (n_al_st), .tail (stq_tail), .head (stq_head), .free_n (stq_free),
    .sta_v, .sta_idx, .sta_addr,
    .std_v, .std_idx, .std_data,
    .commit_n (n_cm_st),
    .wb_v, .wb_addr, .wb_data, .wb_ack,
    .srch_v (stq_searched), .srch_color (iss_color), .srch_addr (iss_addr),
    .srch_hit, .srch_wait, .srch_data,
    .addr_unknown (stq_unknown), .busy (stq_busy)
  );

  // ---------------- DL1 access ----------------
  logic       lk_hit;
  logic [2:0] lk_way_unused;

  assign stq_searched = iss_v && iss_may_search;

  dl1_tags u_dl1 (
    .clk, .rst_n,
    .lk_v (iss_v && !srch_hit && !srch_wait), .lk_addr (iss_addr),
    .lk_hit, .lk_way (lk_way_unused),
    .fill_v, .fill_addr, .fill_lru, .fill_bypass,
    .evict_v, .evict_addr
  );

  always_comb begin
    ld_iss_v         = iss_v;
    ld_iss_rob       = iss_rob;
    ld_iss_addr      = iss_addr;
    ld_replay        = iss_v && srch_wait;
    ld_fwd           = iss_v && srch_hit;
    ld_fwd_data      = srch_data;
    ld_hit           = iss_v && !srch_hit && !srch_wait && lk_hit;
    miss_v           = iss_v && !srch_hit && !srch_wait && !lk_hit;
    miss_fill_lru    = iss_lru;
    miss_fill_bypass = iss_byp;
    pf_trig_v        = iss_v && !srch_wait && iss_pf;
    pf_trig_pc       = iss_pc;
  end

endmodule
