// tb_ldq: self-checking test of the load queue and its DL1-port scheduler.
//
// Directed scenarios, each on a fresh queue:
//  1. port priority: oldest ready load wins with the optimization off; with it
//     on, a younger critical load (count >= 5) wins over older non-critical
//     ones, a load with the ready-but-delayed bit counts as critical, and low
//     confidence counts as critical;
//  2. starvation guard: an old non-critical load passed over three times by
//     younger critical loads wins on the fourth try;
//  3. ready-but-delayed: a ready load that loses to an older one reports the
//     bit when it commits; one that never waited does not;
//  4. store-queue filter: a non-critical load with an older store still in the
//     store queue waits until the store leaves, a critical one does not, and
//     all loads may search while the issue rate is low;
//  5. disambiguation filter: a non-critical load waits for an older unknown
//     store address; a critical one issues past it unless the load-wait
//     predictor says wait; younger stores never block;
//  6. fill and prefetch decisions at issue, AGU address writes, commit and
//     flush bookkeeping.
module tb_ldq;
  import lcp_pkg::*;
  localparam int N = LDQ_ENTRIES, IW = $clog2(N);
  logic clk = 0, rst_n = 0, flush = 0;
  opt_cfg_t cfg;
  logic stq_all = 0;
  logic al_v [ALLOC_W]; logic [ROB_IDX_W-1:0] al_rob [ALLOC_W]; logic [PC_W-1:0] al_pc [ALLOC_W];
  crit_info_t al_info [ALLOC_W]; logic al_wait [ALLOC_W]; stq_ptr_t al_color [ALLOC_W];
  logic [IW-1:0] al_idx [ALLOC_W]; logic [$clog2(N+1)-1:0] free_n;
  logic wr_v [2]; logic [IW-1:0] wr_idx [2]; logic [ADDR_W-1:0] wr_addr [2];
  stq_ptr_t stq_head = '0;
  logic [STQ_ENTRIES-1:0] stq_addr_unknown = '0, stq_busy = '0;
  logic port_ready = 1;
  logic iss_v; logic [IW-1:0] iss_idx; logic [ROB_IDX_W-1:0] iss_rob; logic [PC_W-1:0] iss_pc;
  logic [ADDR_W-1:0] iss_addr; stq_ptr_t iss_color;
  logic iss_may_search, iss_fill_lru, iss_fill_bypass, iss_pf_allow, iss_crit, ev_defer, ev_rbd, ev_starve;
  logic replay_v = 0; logic [IW-1:0] replay_idx = 0;
  logic [IW-1:0] vio_idx = 0; logic [PC_W-1:0] vio_pc; logic vio_use_mdp;
  logic [2:0] cm_n = 0; logic cm_rbd [COMMIT_W];
  int checks = 0, failures = 0;

  ldq dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle();
    for (int s = 0; s < ALLOC_W; s++) begin
      al_v[s] = 0; al_rob[s] = 0; al_pc[s] = 0; al_info[s] = '0; al_wait[s] = 0; al_color[s] = '0;
    end
    for (int p = 0; p < 2; p++) begin wr_v[p] = 0; wr_idx[p] = 0; wr_addr[p] = 0; end
    cm_n = 0; flush = 0; replay_v = 0;
  endtask

  // allocate one load; returns its queue index
  task automatic alloc1(int cnt, logic low, logic rbd, logic wt, int color, output int idx);
    @(negedge clk);
    idle();
    al_v[0] = 1; al_rob[0] = ROB_IDX_W'($urandom_range(0, 95)); al_pc[0] = PC_W'(32'h400 + cnt);
    al_info[0] = '{count: CNT_W'(cnt), conf_low: low, rbd: rbd}; al_wait[0] = wt;
    al_color[0] = '{wrap: 1'b0, idx: STQ_IDX_W'(color)};
    #1 idx = int'(al_idx[0]);
    @(negedge clk);
    idle();
  endtask

  task automatic addr(int idx, int a);
    @(negedge clk);
    idle();
    wr_v[0] = 1; wr_idx[0] = IW'(idx); wr_addr[0] = ADDR_W'(a);
    @(negedge clk);
    idle();
  endtask

  // restart with an empty queue
  task automatic fresh();
    @(negedge clk);
    idle();
    flush = 1;
    @(negedge clk);
    idle();
    port_ready = 0;
  endtask

  // enable the port for one cycle and return who got it
  task automatic grant(output logic v, output int idx);
    @(negedge clk);
    port_ready = 1;
    #1 v = iss_v; idx = int'(iss_idx);
    @(negedge clk);
    port_ready = 0;
  endtask

  int a, b, c, d, e, g; logic gv;

  initial begin
    idle();
    cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    port_ready = 0;

    // 1. priority
    fresh();
    alloc1(1, 0, 0, 0, 0, a);   // oldest, non-critical
    alloc1(2, 0, 0, 0, 0, b);
    alloc1(7, 0, 0, 0, 0, c);   // critical by count
    alloc1(0, 0, 0, 0, 0, d);   // not ready (no address)
    addr(c, 32'h30); addr(b, 32'h20); addr(a, 32'h10);
    cfg = '0;
    @(negedge clk); port_ready = 1; #1;
    chk(iss_v && int'(iss_idx) == a && iss_addr == 32'h10, "baseline: oldest ready load gets the port");
    cfg.fslp = 1; #1;
    chk(iss_v && int'(iss_idx) == c, "FSLP: younger critical load gets the port");
    chk(ev_defer && iss_crit, "older loads were deferred");
    @(negedge clk); port_ready = 0;
    chk(dut.q[a].defer == 1 && dut.q[b].defer == 1, "deferral counted for both older loads");
    chk(dut.q[c].issued, "granted load marked issued");
    grant(gv, g);
    chk(gv && g == a, "then the oldest of the rest");
    chk(dut.q[b].rbd == 1, "b lost to the older a: ready-but-delayed");
    fresh();
    alloc1(1, 0, 0, 0, 0, a);
    alloc1(1, 0, 1, 0, 0, b);   // rbd bit from the table
    addr(a, 1); addr(b, 2);
    grant(gv, g);
    chk(gv && g == b, "ready-but-delayed history makes a load critical");
    fresh();
    alloc1(1, 0, 0, 0, 0, a);
    alloc1(1, 1, 0, 0, 0, b);   // low confidence
    addr(a, 1); addr(b, 2);
    grant(gv, g);
    chk(gv && g == b, "low confidence makes a load critical");

    // 2. starvation guard
    fresh();
    alloc1(0, 0, 0, 0, 0, a);
    addr(a, 32'h100);
    for (int k = 0; k < 4; k++) begin
      alloc1(9, 0, 0, 0, 0, b);
      addr(b, 32'h200 + k);
      grant(gv, g);
      if (k < 3) chk(gv && g == b, $sformatf("round %0d: critical load wins", k));
      else chk(gv && g == a && dut.q[a].defer == 3, "after three deferrals the old load wins");
    end
    chk(dut.q[b].issued == 0, "the critical load of round 4 still waits");

    // 3. ready-but-delayed reported at commit
    fresh();
    cfg = '0;
    alloc1(1, 0, 0, 0, 0, a);
    alloc1(1, 0, 0, 0, 0, b);
    alloc1(1, 0, 0, 0, 0, c);
    addr(a, 1); addr(b, 2);
    grant(gv, g);               // a wins, b delayed
    grant(gv, g);               // b
    addr(c, 3);
    grant(gv, g);               // c alone
    @(negedge clk);
    #1 chk(cm_rbd[0] == 0 && cm_rbd[1] == 1 && cm_rbd[2] == 0, "commit reports the ready-but-delayed bits");
    cm_n = 3;
    @(negedge clk); idle();
    chk(free_n == N, "three commits empty the queue");

    // 4. store-queue search filter
    fresh();
    cfg = '0; cfg.stq_filt = 1;
    stq_head = '{wrap: 0, idx: 2};
    stq_busy = 20'b0000_0000_0000_0000_1100;       // stores at 2 and 3 not yet written back
    alloc1(0, 0, 0, 0, 4, a);                       // non-critical, both stores older
    alloc1(3, 0, 0, 0, 4, b);                       // critical at threshold 2
    alloc1(0, 0, 0, 0, 2, c);                       // non-critical, allocated before both stores
    addr(a, 1); addr(b, 2); addr(c, 3);
    @(negedge clk); port_ready = 1; #1;
    chk(dut.ready[b] && !dut.ready[a] && dut.ready[c], "non-critical load waits for older stores only");
    @(negedge clk); port_ready = 0;
    // b and c issued over two cycles; a still blocked
    grant(gv, g);
    stq_all = 1;
    @(negedge clk); port_ready = 1; #1;
    chk(dut.ready[a] && iss_may_search, "low issue rate: every load may search");
    @(negedge clk); port_ready = 0; stq_all = 0;
    fresh();
    alloc1(0, 0, 0, 0, 4, a);
    addr(a, 1);
    @(negedge clk); port_ready = 1; #1 chk(!iss_v, "blocked by busy stores");
    stq_busy = '0; #1 chk(iss_v && !iss_may_search, "issues without a search once stores have drained");
    @(negedge clk); port_ready = 0;

    // 5. disambiguation filter
    fresh();
    cfg = '0; cfg.mdp_filt = 1;
    stq_head = '{wrap: 0, idx: 18};
    stq_busy = 20'b0000_0000_0000_0000_0001 | (20'b1 << 18) | (20'b1 << 19);
    stq_addr_unknown = 20'b1 << 19;                 // store at 19 (older) has no address
    alloc1(0, 0, 0, 0, 1, a);                       // color wraps past 19 to 1: 18,19,0 older
    alloc1(4, 0, 0, 0, 1, b);                       // critical, no wait prediction
    alloc1(4, 0, 0, 1, 1, c);                       // critical, predicted to wait
    alloc1(0, 0, 0, 0, 19, d);                      // non-critical, only 18 older
    addr(a, 1); addr(b, 2); addr(c, 3); addr(d, 4);
    @(negedge clk); port_ready = 1; #1;
    chk(!dut.ready[a], "non-critical load waits for unknown older store address");
    chk(dut.ready[b], "critical load speculates past it");
    chk(!dut.ready[c], "critical load with wait prediction waits");
    chk(dut.ready[d], "younger store does not block");
    vio_idx = IW'(b); #1 chk(vio_use_mdp && vio_pc == 32'h404, "violation lookup");
    vio_idx = IW'(a); #1 chk(!vio_use_mdp, "non-critical load does not train the predictor");
    stq_addr_unknown = '0; #1;
    chk(dut.ready[a] && dut.ready[c], "all wait for resolved addresses only");
    @(negedge clk); port_ready = 0;
    stq_busy = '0;

    // 6. fill/prefetch decisions, hijacked second AGU port, replay
    fresh();
    cfg = '0; cfg.ins_slru = 1; cfg.ins_sp = 1;
    alloc1(6, 0, 0, 0, 0, a);
    @(negedge clk); idle(); wr_v[1] = 1; wr_idx[1] = IW'(a); wr_addr[1] = 32'hABC0;
    @(negedge clk); idle();
    grant(gv, g);
    chk(gv && g == a, "address through the second port makes the load ready");
    @(negedge clk); port_ready = 1; #1;
    chk(!iss_v, "issued load does not bid again");
    replay_v = 1; replay_idx = IW'(a);
    @(negedge clk); idle(); #1;
    chk(iss_v && iss_addr == 32'hABC0 && iss_fill_lru && !iss_fill_bypass && iss_pf_allow, "replayed; count 6: LRU fill, prefetch allowed");
    cfg.ins_slru = 0; cfg.ins_sl1 = 1; #1;
    chk(!iss_fill_lru && !iss_fill_bypass, "count 6 is critical for bypass (threshold 4)");
    @(negedge clk); port_ready = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
