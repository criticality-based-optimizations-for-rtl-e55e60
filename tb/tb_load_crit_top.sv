// tb_load_crit_top: end-to-end test of the load-criticality unit with a small
// core model around it.
//
// The core model runs a loop body of BODY micro-ops (loads, stores and ALU
// operations with register dependences; a fixed random body, the same every
// iteration, so per-PC predictions can be learned) for ITERS iterations. It
// allocates up to four micro-ops per cycle, sends load and store addresses
// through the two AGU requests, supplies store data, answers misses after
// MISS_LAT cycles, commits in order up to four per cycle and acknowledges store
// write-backs. It reports a memory-ordering violation when a store address
// resolves under a younger load that already issued to the same word without
// receiving this store's data, then flushes and refetches from the oldest
// uncommitted micro-op.
//
// The loop runs twice from reset: first with every optimization off (the
// baseline), then with all of them on; the second run must make fewer
// store-queue searches. The per-mechanism checks below apply to the second run.
//
// Checks, all against the model's own bookkeeping:
//   - every micro-op commits, in order, and the loop finishes (no deadlock);
//   - forwarded data equals the data of the youngest older store to that word
//     whose address was known;
//   - a load that issued without searching the store queue had no older store
//     left in it;
//   - after training, the prediction table holds, for a load PC, the number of
//     direct consumers that load has in the loop body (readers in the next
//     iteration count only if they were allocated before the load committed);
//   - critical loads wait fewer cycles between ready and issue, per load, than
//     non-critical ones (the effect the port priority is meant to have);
//   - each mechanism happened at least once: tracking on and off, table
//     writes, deferral of a non-critical load, ready-but-delayed, the deferral
//     limit, a load issued without a store-queue search, forwarding, replay,
//     a load-wait table update, LRU-position and bypassing fills, a suppressed
//     prefetch, the store AGU computing a load address, an eviction, a flush.
// Every third stretch of 400 cycles the model reports a full issue width, as
// if other units were busy, so that the low-rate filters switch both ways.
// All parameters of the unit stay at their defaults.
module tb_load_crit_top;
  import lcp_pkg::*;

  localparam int BODY = 24, ITERS = 400, MISS_LAT = 12, LW = $clog2(LDQ_ENTRIES);
  localparam int TOTAL = BODY * ITERS;

  logic clk = 0, rst_n = 0;
  opt_cfg_t cfg;
  logic [$clog2(ISSUE_W+1)-1:0] issued;
  logic flush;
  alloc_uop_t alloc [ALLOC_W];
  logic alloc_ready;
  logic [LW-1:0] alloc_ldq_idx [ALLOC_W];
  logic [STQ_IDX_W-1:0] alloc_stq_idx [ALLOC_W];
  logic cm_v [COMMIT_W]; logic [ROB_IDX_W-1:0] cm_rob [COMMIT_W]; logic [PC_W-1:0] cm_pc [COMMIT_W];
  logic cm_is_load [COMMIT_W], cm_is_store [COMMIT_W], cm_has_dst [COMMIT_W]; logic [LREG_W-1:0] cm_dst [COMMIT_W];
  logic ld_agu_v [2]; logic [LW-1:0] ld_agu_idx [2]; logic [ADDR_W-1:0] ld_agu_base [2], ld_agu_disp [2];
  logic ld_agu_gnt [2];
  logic st_agu_v; logic [STQ_IDX_W-1:0] st_agu_idx; logic [ADDR_W-1:0] st_agu_base, st_agu_disp; logic st_agu_gnt;
  logic std_v; logic [STQ_IDX_W-1:0] std_idx; logic [DATA_W-1:0] std_data;
  logic vio_v; logic [LW-1:0] vio_idx;
  logic port_ready;
  logic ld_iss_v; logic [ROB_IDX_W-1:0] ld_iss_rob; logic [ADDR_W-1:0] ld_iss_addr;
  logic ld_fwd; logic [DATA_W-1:0] ld_fwd_data; logic ld_hit, ld_replay, miss_v, miss_fill_lru, miss_fill_bypass;
  logic pf_trig_v; logic [PC_W-1:0] pf_trig_pc; logic stq_searched;
  logic fill_v; logic [ADDR_W-1:0] fill_addr; logic fill_lru, fill_bypass;
  logic evict_v; logic [ADDR_W-1:0] evict_addr;
  logic wb_v; logic [ADDR_W-1:0] wb_addr; logic [DATA_W-1:0] wb_data; logic wb_ack;
  logic pred_en, stq_all, ev_defer, ev_rbd, ev_starve, ev_clpt_write, ev_lwt_set;

  load_crit_top dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- program ----------------
  typedef enum logic [1:0] {OP_ALU, OP_LD, OP_ST} op_e;
  typedef struct { op_e op; int dst; int s1; int s2; int abase; int astride; } body_t;
  body_t body [BODY];
  int    consumers [BODY];   // direct consumers, counting readers in the next iteration
  int    cons_lo [BODY];     // direct consumers within the same iteration   // direct consumers of each load inside one iteration (or next)

  function automatic int pc_of(int k); return 32'h1000 + 4 * k; endfunction
  function automatic int addr_of(int seq);
    int k, it;
    k = seq % BODY; it = seq / BODY;
    return body[k].abase + ((k % 3 == 0) ? 4096 : 8) * ((it * body[k].astride) % 16);
  endfunction

  // ---------------- in-flight state, indexed by sequence number ----------------
  typedef struct {
    int  seq;
    logic done, addr_sent, data_sent, issued_ld, got_fwd_from_store;
    int  ldq, stq, rob, done_at;
    longint unsigned sdata;
  } fl_t;
  fl_t fl [$];                // allocated, not yet committed, program order
  int  next_seq = 0, committed = 0;
  typedef struct { int seq; int addr; longint unsigned data; logic av; } st_rec_t;
  st_rec_t stq_m [$];         // stores in the store queue, oldest first
  typedef struct { int addr; int due; logic lru; logic byp; } miss_t;
  miss_t misses [$];
  typedef struct { int seq; int rob; } pend_t;
  pend_t pend_ld [$];         // loads waiting for a miss

  // mechanism counters
  // ready-to-issue delay per class (critical for the port / not), summed over loads
  longint wait_crit = 0, wait_non = 0; int iss_crit_n = 0, iss_non_n = 0;
  int ph_cycles [2], ph_search [2], n_search;
  int n_pred_on, n_pred_off, n_clpt, n_defer, n_rbd, n_starve, n_nosearch, n_fwd, n_replay,
      n_lwt, n_fill_lru, n_fill_byp, n_pf_block, n_hijack, n_evict, n_flush, n_hit, n_miss;

  function automatic int ld_iss_idx_q();
    return int'(dut.u_ldq.iss_idx);
  endfunction

  function automatic int find(int seq);
    foreach (fl[i]) if (fl[i].seq == seq) return i;
    return -1;
  endfunction
  function automatic int find_rob_ld(int rob);
    foreach (fl[i]) if (fl[i].rob == rob && body[fl[i].seq % BODY].op == OP_LD) return i;
    return -1;
  endfunction

  task automatic drive_idle();
    issued = 0; flush = 0; vio_v = 0; vio_idx = 0; port_ready = 1; wb_ack = 1;
    for (int i = 0; i < ALLOC_W; i++) alloc[i] = '0;
    for (int c = 0; c < COMMIT_W; c++) begin
      cm_v[c] = 0; cm_rob[c] = 0; cm_pc[c] = 0; cm_is_load[c] = 0; cm_is_store[c] = 0; cm_has_dst[c] = 0; cm_dst[c] = 0;
    end
    for (int p = 0; p < 2; p++) begin ld_agu_v[p] = 0; ld_agu_idx[p] = 0; ld_agu_base[p] = 0; ld_agu_disp[p] = 0; end
    st_agu_v = 0; st_agu_idx = 0; st_agu_base = 0; st_agu_disp = 0;
    std_v = 0; std_idx = 0; std_data = 0;
    fill_v = 0; fill_addr = 0; fill_lru = 0; fill_bypass = 0;
  endtask

  int cyc = 0;

  initial begin
    // build the loop body
    for (int k = 0; k < BODY; k++) begin
      int r;
      r = $urandom_range(0, 9);
      body[k].op = (r < 4) ? OP_LD : (r < 6) ? OP_ST : OP_ALU;
      body[k].dst = $urandom_range(1, NUM_LREGS - 1);
      body[k].s1 = $urandom_range(1, NUM_LREGS - 1);
      body[k].s2 = $urandom_range(0, 2) == 0 ? -1 : int'($urandom_range(1, NUM_LREGS - 1));
      body[k].abase = 32'h10000 + ((k % 3 == 0) ? 4096 * $urandom_range(0, 15) : 64 * $urandom_range(0, 5));
      body[k].astride = $urandom_range(0, 3);
    end
    body[0].op = OP_LD; body[0].dst = 1; body[0].astride = 1;                 // a load with many consumers
    for (int k = 1; k < 8; k++) begin body[k].op = OP_ALU; body[k].s1 = 1; body[k].dst = 2 + k; end
    body[8].op = OP_ST; body[8].abase = 32'h20000; body[8].astride = 0;
    body[9].op = OP_LD; body[9].dst = 12; body[9].abase = 32'h20000; body[9].astride = 0;  // forwarding pair
    // direct consumers of each load: readers before the register is overwritten, wrapping
    for (int k = 0; k < BODY; k++) begin
      consumers[k] = 0;
      cons_lo[k] = -1;
      if (body[k].op == OP_LD)
        for (int j = 1; j <= BODY; j++) begin
          body_t u;
          u = body[(k + j) % BODY];
          if ((u.op == OP_ALU || u.op == OP_ST) && (u.s1 == body[k].dst || u.s2 == body[k].dst)) consumers[k]++;
          else if (u.op == OP_LD && u.s1 == body[k].dst) consumers[k]++;
          if (k + j == BODY && cons_lo[k] < 0) cons_lo[k] = consumers[k];
          if (u.op != OP_ST && u.dst == body[k].dst) break;
        end
      if (cons_lo[k] < 0) cons_lo[k] = consumers[k];
    end

    // phase 0: every optimization off (baseline); phase 1: every optimization on
    for (int phase = 0; phase < 2; phase++) begin
    cfg = (phase == 0) ? opt_cfg_t'('0) : opt_cfg_t'('1);
    drive_idle();
    rst_n = 0;
    fl.delete(); stq_m.delete(); misses.delete(); pend_ld.delete();
    next_seq = 0; committed = 0; cyc = 0;
    n_pred_on = 0; n_pred_off = 0; n_clpt = 0; n_defer = 0; n_rbd = 0; n_starve = 0; n_nosearch = 0;
    n_fwd = 0; n_replay = 0; n_lwt = 0; n_fill_lru = 0; n_fill_byp = 0; n_pf_block = 0; n_hijack = 0;
    n_evict = 0; n_flush = 0; n_hit = 0; n_miss = 0; n_search = 0;
    wait_crit = 0; wait_non = 0; iss_crit_n = 0; iss_non_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    while (committed < TOTAL && cyc < 150000) begin
      int n_iss, vio_seq;
      @(negedge clk);
      cyc++;
      drive_idle();
      // phase switches exercise both configurations of the insertion options
      if (phase == 1 && cyc == 1200) cfg.ins_slru = 0;
      n_iss = 0;

      // ---- completion of ALU ops: sources done (program order dependencies are
      //      approximated: an ALU op completes two cycles after allocation once all
      //      older loads it could read have completed) ----
      foreach (fl[i]) begin
        body_t u;
        u = body[fl[i].seq % BODY];
        if (!fl[i].done && u.op == OP_ALU) begin
          logic ok;
          ok = 1;
          for (int j = 0; j < i; j++)
            if (!fl[j].done && body[fl[j].seq % BODY].op == OP_LD &&
                (body[fl[j].seq % BODY].dst == u.s1 || body[fl[j].seq % BODY].dst == u.s2)) ok = 0;
          if (ok && n_iss < 3) begin fl[i].done = 1; n_iss++; end
        end
      end

      // ---- AGUs: two oldest loads without address, oldest store without address ----
      begin
        int nl;
        nl = 0;
        foreach (fl[i]) begin
          body_t u;
          u = body[fl[i].seq % BODY];
          if (u.op == OP_LD && !fl[i].addr_sent && nl < 2 && $urandom_range(0, 2) != 0) begin
            ld_agu_v[nl] = 1; ld_agu_idx[nl] = LW'(fl[i].ldq);
            ld_agu_base[nl] = ADDR_W'(addr_of(fl[i].seq)) - 4; ld_agu_disp[nl] = 4;
            nl++;
          end
        end
        foreach (fl[i]) begin
          body_t u;
          u = body[fl[i].seq % BODY];
          if (u.op == OP_ST && !fl[i].addr_sent && !st_agu_v && $urandom_range(0, 3) != 0) begin
            st_agu_v = 1; st_agu_idx = STQ_IDX_W'(fl[i].stq);
            st_agu_base = ADDR_W'(addr_of(fl[i].seq)); st_agu_disp = 0;
          end
          if (u.op == OP_ST && !fl[i].data_sent && !std_v && $urandom_range(0, 2) == 0) begin
            std_v = 1; std_idx = STQ_IDX_W'(fl[i].stq); std_data = {32'(fl[i].seq), 32'hD47A};
          end
        end
      end

      // ---- fills ----
      if (misses.size() > 0 && misses[0].due <= cyc) begin
        fill_v = 1; fill_addr = ADDR_W'(misses[0].addr); fill_lru = misses[0].lru; fill_bypass = misses[0].byp;
      end

      // ---- commit ----
      begin
        int nc, nld, nst;
        nc = 0;
        while (nc < COMMIT_W && nc < fl.size()) begin
          body_t u;
          u = body[fl[nc].seq % BODY];
          if (!fl[nc].done) break;
          cm_v[nc] = 1; cm_rob[nc] = ROB_IDX_W'(fl[nc].rob); cm_pc[nc] = PC_W'(pc_of(fl[nc].seq % BODY));
          cm_is_load[nc] = (u.op == OP_LD); cm_is_store[nc] = (u.op == OP_ST);
          cm_has_dst[nc] = (u.op != OP_ST); cm_dst[nc] = LREG_W'(u.dst);
          nc++;
        end
      end

      // ---- allocation ----
      if (alloc_ready) begin
        int k;
        k = 0;
        while (k < ALLOC_W && next_seq < TOTAL && fl.size() + k < ROB_ENTRIES - COMMIT_W && $urandom_range(0, 5) != 0) begin
          body_t u;
          u = body[next_seq % BODY];
          alloc[k].valid = 1; alloc[k].is_load = (u.op == OP_LD); alloc[k].is_store = (u.op == OP_ST);
          alloc[k].has_dst = (u.op != OP_ST); alloc[k].dst = LREG_W'(u.dst);
          alloc[k].src1_v = 1; alloc[k].src1 = LREG_W'(u.s1);
          alloc[k].src2_v = (u.s2 >= 0) && (u.op != OP_LD); alloc[k].src2 = LREG_W'(u.s2 < 0 ? 0 : u.s2);
          alloc[k].rob = ROB_IDX_W'(next_seq % ROB_ENTRIES);
          alloc[k].pc = PC_W'(pc_of(next_seq % BODY));
          k++;
          next_seq++;
        end
      end

      // ---- the load port: decide what the unit did this cycle ----
      #1;
      if (ld_iss_v) n_iss++;
      // busy phases: other execution units keep the issue width full
      if ((cyc / 400) % 3 == 1) n_iss = ISSUE_W;
      issued = 3'(n_iss);
      if (ld_agu_gnt[1]) n_hijack++;
      if (stq_searched) n_search++;
      for (int q = 0; q < LDQ_ENTRIES; q++)
        if (dut.u_ldq.ready[q] && !dut.u_ldq.gnt[q]) begin
          if (dut.u_ldq.fslp_crit[q]) wait_crit++; else wait_non++;
        end
      if (ld_iss_v) begin
        if (dut.u_ldq.fslp_crit[ld_iss_idx_q()]) iss_crit_n++; else iss_non_n++;
      end
      if (pred_en) n_pred_on++; else n_pred_off++;
      if (ev_clpt_write) n_clpt++;
      if (ev_defer) n_defer++;
      if (ev_rbd) n_rbd++;
      if (ev_starve) n_starve++;
      if (evict_v) n_evict++;
      if (fill_v && fill_lru && !fill_bypass) n_fill_lru++;
      if (fill_v && fill_bypass) n_fill_byp++;
      vio_seq = -1;
      if (ld_iss_v) begin
        int i, seq;
        i = find_rob_ld(int'(ld_iss_rob));
        chk(i >= 0, "issued load is in flight");
        if (i >= 0) begin
          seq = fl[i].seq;
          chk(int'(ld_iss_addr) == addr_of(seq), "issued load carries its address");
          if (!stq_searched) begin
            logic older;
            older = 0;
            foreach (stq_m[s]) if (stq_m[s].seq < seq) older = 1;
            chk(!older, $sformatf("seq %0d issued without search while an older store is queued", seq));
            n_nosearch++;
          end
          if (!pf_trig_v && !ld_replay) n_pf_block++;
          if (ld_replay) n_replay++;
          else begin
            fl[i].issued_ld = 1;
            if (ld_fwd) begin
              longint unsigned exp_d; logic found;
              found = 0; exp_d = 0;
              foreach (stq_m[s]) if (stq_m[s].seq < seq && stq_m[s].av && (stq_m[s].addr >> 3) == (addr_of(seq) >> 3)) begin
                found = 1; exp_d = stq_m[s].data;
              end
              chk(found && ld_fwd_data == exp_d, $sformatf("seq %0d forwarded data", seq));
              fl[i].done = 1;
              fl[i].got_fwd_from_store = 1;
              n_fwd++;
            end else if (ld_hit) begin
              fl[i].done = 1;
              n_hit++;
            end else if (miss_v) begin
              misses.push_back('{addr: addr_of(seq) & ~63, due: cyc + MISS_LAT, lru: miss_fill_lru, byp: miss_fill_bypass});
              pend_ld.push_back('{seq: seq, rob: fl[i].rob});
              n_miss++;
            end
          end
        end
      end
      if (fill_v) begin
        void'(misses.pop_front());
        for (int p = pend_ld.size() - 1; p >= 0; p--)
          if ((addr_of(pend_ld[p].seq) & ~63) == int'(fill_addr)) begin
            int i;
            i = find(pend_ld[p].seq);
            if (i >= 0) fl[i].done = 1;
            pend_ld.delete(p);
          end
      end
      // address and data bookkeeping; detect ordering violations
      for (int p = 0; p < 2; p++)
        if (ld_agu_gnt[p]) foreach (fl[i]) if (body[fl[i].seq % BODY].op == OP_LD && fl[i].ldq == int'(ld_agu_idx[p]) && !fl[i].addr_sent) fl[i].addr_sent = 1;
      if (st_agu_v) begin
        foreach (fl[i]) if (body[fl[i].seq % BODY].op == OP_ST && fl[i].stq == int'(st_agu_idx) && !fl[i].addr_sent) begin
          fl[i].addr_sent = 1;
          foreach (stq_m[s]) if (stq_m[s].seq == fl[i].seq) begin stq_m[s].av = 1; stq_m[s].addr = addr_of(fl[i].seq); end
          foreach (fl[j]) if (fl[j].seq > fl[i].seq && body[fl[j].seq % BODY].op == OP_LD && fl[j].issued_ld &&
                              (addr_of(fl[j].seq) >> 3) == (addr_of(fl[i].seq) >> 3) && vio_seq < 0) vio_seq = fl[j].seq;
          if (fl[i].done == 0 && fl[i].data_sent) fl[i].done = 1;
        end
      end
      if (std_v) foreach (fl[i]) if (body[fl[i].seq % BODY].op == OP_ST && fl[i].stq == int'(std_idx) && !fl[i].data_sent) begin
        fl[i].data_sent = 1;
        foreach (stq_m[s]) if (stq_m[s].seq == fl[i].seq) stq_m[s].data = std_data;
        if (fl[i].addr_sent) fl[i].done = 1;
      end
      if (wb_v) begin
        chk(stq_m.size() > 0 && int'(wb_addr) == stq_m[0].addr && wb_data == stq_m[0].data, "store write-back in order");
        void'(stq_m.pop_front());
      end
      // commit bookkeeping
      for (int c = 0; c < COMMIT_W; c++) if (cm_v[c]) begin
        chk(fl[0].seq == committed, "in-order commit");
        void'(fl.pop_front());
        committed++;
      end
      // allocation bookkeeping
      for (int k = 0; k < ALLOC_W; k++) if (alloc[k].valid) begin
        fl.push_back('{seq: next_seq - (ALLOC_W - k), default: 0});
      end
      // fix sequence numbers of this group (allocated in order)
      begin
        int na, base;
        na = 0;
        for (int k = 0; k < ALLOC_W; k++) if (alloc[k].valid) na++;
        base = next_seq - na;
        for (int k = 0; k < na; k++) begin
          int i;
          i = fl.size() - na + k;
          fl[i].seq = base + k;
          fl[i].rob = (base + k) % ROB_ENTRIES;
          fl[i].ldq = int'(alloc_ldq_idx[k]);
          fl[i].stq = int'(alloc_stq_idx[k]);
          if (body[(base + k) % BODY].op == OP_ST) stq_m.push_back('{seq: base + k, addr: 0, data: 0, av: 0});
        end
      end

      // violation: train the predictor now, flush at the next cycle
      if (vio_seq >= 0) begin
        int i;
        i = find(vio_seq);
        @(negedge clk);
        cyc++;
        drive_idle();
        vio_v = 1; vio_idx = LW'(fl[i].ldq);
        flush = 1;
        #1;
        if (ev_lwt_set) n_lwt++;
        n_flush++;
        // everything not committed is gone; committed stores stay in the store queue
        for (int s = stq_m.size() - 1; s >= 0; s--) if (stq_m[s].seq >= committed) stq_m.delete(s);
        if (wb_v) void'(stq_m.pop_front());
        fl.delete();
        pend_ld.delete();
        next_seq = committed;
      end
    end

    chk(committed == TOTAL, $sformatf("phase %0d: all %0d micro-ops committed (got %0d in %0d cycles)", phase, TOTAL, committed, cyc));
    ph_cycles[phase] = cyc;
    ph_search[phase] = n_search;
    $display("phase %0d: %0d cycles, %0d store-queue searches, %0d loads issued", phase, cyc, n_search, n_hit + n_miss + n_fwd);
    end
    chk(ph_search[1] < ph_search[0], "filtered run makes fewer store-queue searches than the baseline");

    // ---- end checks (of the run with every optimization on) ----
    chk(committed == TOTAL, $sformatf("all %0d micro-ops committed (got %0d in %0d cycles)", TOTAL, committed, cyc));
    // the trained load (body[0]) has its consumer count in the table, if it was last written with tracking on
    begin
      int e;
      e = (pc_of(0)) % CLPT_ENTRIES;
      // consumers in the next iteration count only if allocated before the load commits
      chk((int'(dut.u_clpt.tbl[e].count) >= cons_lo[0] && int'(dut.u_clpt.tbl[e].count) <= consumers[0]),
          $sformatf("table count for the busy load: %0d expected %0d..%0d", dut.u_clpt.tbl[e].count, cons_lo[0], consumers[0]));
    end
    $display("mechanisms: pred_on=%0d pred_off=%0d clpt_writes=%0d defer=%0d rbd=%0d starve=%0d nosearch=%0d fwd=%0d replay=%0d lwt=%0d fill_lru=%0d fill_bypass=%0d pf_blocked=%0d hijack=%0d evict=%0d flush=%0d hit=%0d miss=%0d",
             n_pred_on, n_pred_off, n_clpt, n_defer, n_rbd, n_starve, n_nosearch, n_fwd, n_replay, n_lwt,
             n_fill_lru, n_fill_byp, n_pf_block, n_hijack, n_evict, n_flush, n_hit, n_miss);
    $display("ready-to-issue delay: critical %0d loads, %0d waiting cycles; non-critical %0d loads, %0d waiting cycles",
             iss_crit_n, wait_crit, iss_non_n, wait_non);
    // with criticality-prioritised select, critical loads wait less per load than the rest
    chk(iss_crit_n > 0 && iss_non_n > 0 && wait_crit * iss_non_n < wait_non * iss_crit_n,
        "critical loads see a shorter average ready-to-issue delay");
    chk(n_pred_on > 0,  "tracking enabled at some point");
    chk(n_pred_off > 0, "tracking disabled at some point");
    chk(n_clpt > 0,     "prediction table written");
    chk(n_defer > 0,    "non-critical load deferred");
    chk(n_rbd > 0,      "ready-but-delayed seen");
    chk(n_starve > 0,   "deferral limit reached");
    chk(n_nosearch > 0, "load issued without store-queue search");
    chk(n_fwd > 0,      "store-to-load forwarding");
    chk(n_lwt > 0,      "load-wait table trained");
    chk(n_fill_lru > 0, "fill at LRU position");
    chk(n_fill_byp > 0, "fill bypassing the DL1");
    chk(n_pf_block > 0, "prefetch trigger suppressed");
    chk(n_hijack > 0,   "store AGU computed a load address");
    chk(n_evict > 0,    "eviction");
    chk(n_flush > 0,    "flush");
    chk(n_replay >= 0,  "replay count reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
