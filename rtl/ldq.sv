// ldq: load queue and scheduler for the single data-cache read port.
//
// Loads are allocated in program order (up to N_ALLOC per cycle) together with
// their criticality prediction, their load-wait prediction and the store-queue
// tail at allocation (their "color"). An AGU deposits the address later. A load
// then bids for the DL1 port when
//   - its address is known and it has not issued yet,
//   - memory disambiguation allows it: loads that may use the dependence
//     predictor (critical ones when that filter is on) go unless the predictor
//     said "wait"; all others, and predicted-wait loads, wait until every older
//     store address is known;
//   - forwarding allows it: loads allowed to search the store queue go (they
//     search when they issue); others wait until every older store has been
//     written back, after which the cache holds the right value.
// Among the bidders, crit_select grants the port to the oldest critical load, or
// the oldest load if none is critical. Non-critical means below the port
// threshold with the ready-but-delayed bit clear. A load that is passed over in
// favour of a younger one is "deferred"; after MAX_DEFER deferrals it counts as
// critical, so no load starves. A load that is passed over in favour of an older
// one is marked ready-but-delayed; that bit goes back to the prediction table
// when the load commits. Loads leave from the head at commit (`cm_n` of them).
// A flush empties the queue. The grant is combinational; all state changes at
// the clock edge. `replay` returns an issued load to the bidding pool (used when
// a forwarding search finds the store data not yet available).
module ldq
  import lcp_pkg::*;
#(
  parameter int unsigned N        = LDQ_ENTRIES,
  parameter int unsigned N_ALLOC  = ALLOC_W,
  parameter int unsigned N_COMMIT = COMMIT_W,
  parameter int unsigned N_STQ    = STQ_ENTRIES
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   flush,
  input  opt_cfg_t               cfg,
  input  logic                   stq_all,
  // allocation, one entry per slot that carries a load
  input  logic                   al_v     [N_ALLOC],
  input  logic [ROB_IDX_W-1:0]   al_rob   [N_ALLOC],
  input  logic [PC_W-1:0]        al_pc    [N_ALLOC],
  input  crit_info_t             al_info  [N_ALLOC],
  input  logic                   al_wait  [N_ALLOC],
  input  stq_ptr_t               al_color [N_ALLOC],
  output logic [$clog2(N)-1:0]   al_idx   [N_ALLOC],
  output logic [$clog2(N+1)-1:0] free_n,
  // addresses from the AGUs
  input  logic                   wr_v    [2],
  input  logic [$clog2(N)-1:0]   wr_idx  [2],
  input  logic [ADDR_W-1:0]      wr_addr [2],
  // store-queue state for disambiguation
  input  stq_ptr_t               stq_head,
  input  logic [N_STQ-1:0]       stq_addr_unknown,
  input  logic [N_STQ-1:0]       stq_busy,
  // DL1 read port
  input  logic                   port_ready,
  output logic                   iss_v,
  output logic [$clog2(N)-1:0]   iss_idx,
  output logic [ROB_IDX_W-1:0]   iss_rob,
  output logic [PC_W-1:0]        iss_pc,
  output logic [ADDR_W-1:0]      iss_addr,
  output stq_ptr_t               iss_color,
  output logic                   iss_may_search,
  output logic                   iss_fill_lru,
  output logic                   iss_fill_bypass,
  output logic                   iss_pf_allow,
  output logic                   iss_crit,      // won on criticality (non-oldest or prio)
  output logic                   ev_defer,      // some older ready load was passed over
  output logic                   ev_rbd,        // some younger ready load was delayed
  output logic                   ev_starve,     // the grant went to a load at its deferral limit
  input  logic                   replay_v,
  input  logic [$clog2(N)-1:0]   replay_idx,
  // ordering-violation lookup (for training the load-wait table)
  input  logic [$clog2(N)-1:0]   vio_idx,
  output logic [PC_W-1:0]        vio_pc,
  output logic                   vio_use_mdp,
  // commit
  input  logic [$clog2(N_COMMIT+1)-1:0] cm_n,
  output logic                   cm_rbd [N_COMMIT]
);

  localparam int unsigned IW = $clog2(N);
  localparam int unsigned DW = $clog2(MAX_DEFER + 1);

  typedef struct packed {
    logic                 valid;
    logic [ROB_IDX_W-1:0] rob;
    logic [PC_W-1:0]      pc;
    crit_info_t           info;
    logic                 wait_p;
    stq_ptr_t             color;
    logic                 addr_v;
    logic [ADDR_W-1:0]    addr;
    logic                 issued;
    logic [DW-1:0]        defer;
    logic                 rbd;
  } entry_t;

  entry_t        q [N];
  logic [IW:0]   head, tail;

  logic [N-1:0]  ready, prio, gnt, fslp_crit, may_search, use_mdp, f_lru, f_byp, pf_ok, at_limit;
  logic [IW-1:0] age [N];
  logic          gnt_v;
  logic [IW-1:0] gnt_idx;

  assign free_n = ($clog2(N+1))'(N) - ($clog2(N+1))'(tail - head);

  // store-queue distance of every entry from its head
  int unsigned sdist [N_STQ];
  always_comb
    for (int j = 0; j < int'(N_STQ); j++)
      sdist[j] = (32'(j) >= 32'(stq_head.idx)) ? 32'(j) - 32'(stq_head.idx)
                                               : 32'(j) + N_STQ - 32'(stq_head.idx);

  for (genvar i = 0; i < int'(N); i++) begin : g_ent
    load_policy u_pol (
      .cfg         (cfg),
      .info        (q[i].info),
      .defer_max   (at_limit[i]),
      .stq_all     (stq_all),
      .fslp_crit   (fslp_crit[i]),
      .may_search  (may_search[i]),
      .use_mdp     (use_mdp[i]),
      .fill_lru    (f_lru[i]),
      .fill_bypass (f_byp[i]),
      .pf_allow    (pf_ok[i])
    );
  end

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      int unsigned ncol;
      logic        old_unknown, old_busy, mem_ok, fwd_ok;
      ncol = stq_ptr_dist(stq_head, q[i].color);
      old_unknown = 1'b0;
      old_busy    = 1'b0;
      for (int j = 0; j < int'(N_STQ); j++) begin
        if (stq_busy[j] && sdist[j] < ncol) begin
          old_busy = 1'b1;
          if (stq_addr_unknown[j]) old_unknown = 1'b1;
        end
      end
      at_limit[i] = (32'(q[i].defer) >= MAX_DEFER);
      mem_ok = (use_mdp[i] && !q[i].wait_p) || !old_unknown;
      fwd_ok = may_search[i] || !old_busy;
      ready[i] = q[i].valid && q[i].addr_v && !q[i].issued && mem_ok && fwd_ok && port_ready;
      prio[i]  = !fslp_crit[i];
      age[i]   = IW'(i) - head[IW-1:0];
    end
  end

  crit_select #(.N(N), .AGE_W(IW)) u_sel (
    .req     (ready),
    .prio    (prio),
    .age     (age),
    .gnt_v   (gnt_v),
    .gnt_idx (gnt_idx),
    .gnt     (gnt)
  );

  always_comb begin
    iss_v           = gnt_v;
    iss_idx         = gnt_idx;
    iss_rob         = q[gnt_idx].rob;
    iss_pc          = q[gnt_idx].pc;
    iss_addr        = q[gnt_idx].addr;
    iss_color       = q[gnt_idx].color;
    iss_may_search  = may_search[gnt_idx];
    iss_fill_lru    = f_lru[gnt_idx];
    iss_fill_bypass = f_byp[gnt_idx];
    iss_pf_allow    = pf_ok[gnt_idx];
    iss_crit        = 1'b0;
    ev_defer        = 1'b0;
    ev_rbd          = 1'b0;
    ev_starve       = gnt_v && at_limit[gnt_idx];
    for (int i = 0; i < int'(N); i++) begin
      if (gnt_v && ready[i] && !gnt[i]) begin
        if (age[i] < age[gnt_idx]) begin
          ev_defer = 1'b1;
          iss_crit = 1'b1;
        end else begin
          ev_rbd = 1'b1;
        end
      end
    end
    vio_pc      = q[vio_idx].pc;
    vio_use_mdp = use_mdp[vio_idx];
    for (int k = 0; k < int'(N_COMMIT); k++)
      cm_rbd[k] = q[IW'(head[IW-1:0] + IW'(k))].rbd;
  end

  always_comb begin
    logic [IW:0] t;
    t = tail;
    for (int s = 0; s < int'(N_ALLOC); s++) begin
      al_idx[s] = t[IW-1:0];
      if (al_v[s]) t = t + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) q[i] <= '0;
      head <= '0;
      tail <= '0;
    end else begin
      logic [IW:0] t, h;
      // scheduling bookkeeping
      for (int i = 0; i < int'(N); i++) begin
        if (gnt_v && ready[i] && !gnt[i]) begin
          if (age[i] < age[gnt_idx]) begin
            if (!at_limit[i]) q[i].defer <= q[i].defer + 1'b1;
          end else begin
            q[i].rbd <= 1'b1;
          end
        end
      end
      if (gnt_v) q[gnt_idx].issued <= 1'b1;
      if (replay_v) q[replay_idx].issued <= 1'b0;
      for (int p = 0; p < 2; p++)
        if (wr_v[p]) begin
          q[wr_idx[p]].addr   <= wr_addr[p];
          q[wr_idx[p]].addr_v <= 1'b1;
        end
      // commit
      h = head;
      for (int k = 0; k < int'(N_COMMIT); k++)
        if (32'(k) < 32'(cm_n)) begin
          q[h[IW-1:0]].valid <= 1'b0;
          h = h + 1'b1;
        end
      head <= h;
      if (flush) begin
        for (int i = 0; i < int'(N); i++) q[i].valid <= 1'b0;
        tail <= h;
      end else begin
        t = tail;
        for (int s = 0; s < int'(N_ALLOC); s++)
          if (al_v[s]) begin
            q[t[IW-1:0]] <= '{valid: 1'b1, rob: al_rob[s], pc: al_pc[s], info: al_info[s],
                              wait_p: al_wait[s], color: al_color[s], default: '0};
            t = t + 1'b1;
          end
        tail <= t;
      end
    end
  end

endmodule
