// tb_ccl: self-checking test of the consumer collection logic.
//
// First replays the four-instruction example of a load feeding two adds
// (I0: load R1, I1: load R2, I2: R3=R1+R2, I3: R4=R1+R3), once one micro-op per
// cycle and once as a single allocation group, and checks the counts 2 and 1 at
// commit and the clearing of the mapping. Then runs random allocation and
// commit traffic against a reference model kept in the testbench (the same
// rules written sequentially, one micro-op at a time), including tracking on/off
// and flushes.
module tb_ccl;
  import lcp_pkg::*;

  logic clk = 0, rst_n = 0, track_en = 1, flush = 0;
  alloc_uop_t           alloc [ALLOC_W];
  logic                 cm_v  [COMMIT_W];
  logic [ROB_IDX_W-1:0] cm_rob [COMMIT_W];
  logic                 cm_has_dst [COMMIT_W];
  logic [LREG_W-1:0]    cm_dst [COMMIT_W];
  logic [CNT_W-1:0]     cm_count [COMMIT_W];
  logic                 cm_tracked [COMMIT_W];
  int checks = 0, failures = 0;

  ccl dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic m_rv [NUM_LREGS]; int m_rr [NUM_LREGS]; logic m_rl [NUM_LREGS];
  int   m_cnt [ROB_ENTRIES]; logic m_trk [ROB_ENTRIES];

  task automatic m_reset();
    for (int r = 0; r < NUM_LREGS; r++) begin m_rv[r] = 0; m_rr[r] = 0; m_rl[r] = 0; end
    for (int e = 0; e < ROB_ENTRIES; e++) begin m_cnt[e] = 0; m_trk[e] = 0; end
  endtask

  task automatic m_alloc(alloc_uop_t u, logic trk);
    int p1, p2; logic l1, l2;
    if (!u.valid) return;
    l1 = u.src1_v && m_rv[u.src1] && m_rl[u.src1]; p1 = m_rr[u.src1];
    l2 = u.src2_v && m_rv[u.src2] && m_rl[u.src2]; p2 = m_rr[u.src2];
    if (u.is_load) begin m_cnt[u.rob] = 0; m_trk[u.rob] = trk; end
    if (trk) begin
      if (l1) m_cnt[p1] = (m_cnt[p1] < 15) ? m_cnt[p1] + 1 : 15;
      if (l2 && !(l1 && p1 == p2)) m_cnt[p2] = (m_cnt[p2] < 15) ? m_cnt[p2] + 1 : 15;
    end
    if (u.has_dst) begin m_rv[u.dst] = 1; m_rr[u.dst] = u.rob; m_rl[u.dst] = u.is_load; end
  endtask

  task automatic clear_ports();
    for (int i = 0; i < ALLOC_W; i++) alloc[i] = '0;
    for (int c = 0; c < COMMIT_W; c++) begin cm_v[c] = 0; cm_rob[c] = 0; cm_has_dst[c] = 0; cm_dst[c] = 0; end
  endtask

  function automatic alloc_uop_t mk(logic ld, int dst, int s1, int s2, int rob);
    alloc_uop_t u;
    u = '0;
    u.valid = 1; u.is_load = ld; u.has_dst = 1; u.dst = LREG_W'(dst);
    u.src1_v = (s1 >= 0); u.src1 = LREG_W'(s1 < 0 ? 0 : s1);
    u.src2_v = (s2 >= 0); u.src2 = LREG_W'(s2 < 0 ? 0 : s2);
    u.rob = ROB_IDX_W'(rob);
    return u;
  endfunction

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  alloc_uop_t ex [4];
  int rob_base;

  initial begin
    clear_ports();
    m_reset();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      rob_base = pass * 10;
      ex[0] = mk(1, 1, -1, -1, rob_base + 0);   // load R1
      ex[1] = mk(1, 2, -1, -1, rob_base + 1);   // load R2
      ex[2] = mk(0, 3, 1, 2, rob_base + 2);     // R3 = R1 + R2
      ex[3] = mk(0, 4, 1, 3, rob_base + 3);     // R4 = R1 + R3
      if (pass == 0) begin
        for (int k = 0; k < 4; k++) begin
          @(negedge clk); alloc[0] = ex[k];
          @(negedge clk); clear_ports();
        end
      end else begin
        @(negedge clk); for (int k = 0; k < 4; k++) alloc[k] = ex[k];
        @(negedge clk); clear_ports();
      end
      cm_v[0] = 1; cm_rob[0] = ROB_IDX_W'(rob_base); cm_has_dst[0] = 1; cm_dst[0] = 1;
      cm_v[1] = 1; cm_rob[1] = ROB_IDX_W'(rob_base + 1); cm_has_dst[1] = 1; cm_dst[1] = 2;
      #1;
      chk(cm_count[0] == 2, $sformatf("pass %0d: I0 has 2 consumers, got %0d", pass, cm_count[0]));
      chk(cm_count[1] == 1, $sformatf("pass %0d: I1 has 1 consumer, got %0d", pass, cm_count[1]));
      chk(cm_tracked[0] == 1, "I0 tracked");
      @(negedge clk); clear_ports();
      chk(dut.rat[1].valid == 0, "R1 mapping retired at commit");
      chk(dut.rat[2].valid == 0, "R2 mapping retired at commit");
      chk(dut.rat[3].valid == 1 && dut.rat[3].is_load == 0, "R3 maps to a non-load");
      // retire the adds
      cm_v[0] = 1; cm_rob[0] = ROB_IDX_W'(rob_base + 2); cm_has_dst[0] = 1; cm_dst[0] = 3;
      cm_v[1] = 1; cm_rob[1] = ROB_IDX_W'(rob_base + 3); cm_has_dst[1] = 1; cm_dst[1] = 4;
      @(negedge clk); clear_ports();
    end

    // random traffic against the model
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    m_reset();
    for (int e = 0; e < ROB_ENTRIES; e++) begin m_cnt[e] = int'(dut.cnt[e]); m_trk[e] = dut.trk[e]; end
    begin
      int rob = 0;
      for (int cyc = 0; cyc < 3000; cyc++) begin
        @(negedge clk);
        clear_ports();
        track_en = ($urandom_range(0, 9) != 0);
        if ($urandom_range(0, 199) == 0) begin
          flush = 1;
          @(negedge clk); flush = 0;
          for (int r = 0; r < NUM_LREGS; r++) m_rv[r] = 0;
          continue;
        end
        for (int i = 0; i < ALLOC_W; i++) begin
          if ($urandom_range(0, 3) != 0) begin
            alloc[i] = mk($urandom_range(0, 2) == 0, $urandom_range(0, NUM_LREGS - 1),
                          $urandom_range(0, 4) == 0 ? -1 : int'($urandom_range(0, NUM_LREGS - 1)),
                          $urandom_range(0, 2) == 0 ? -1 : int'($urandom_range(0, NUM_LREGS - 1)), rob);
            alloc[i].has_dst = ($urandom_range(0, 5) != 0);
            rob = (rob + 1) % ROB_ENTRIES;
          end
        end
        // commit ports only read counters here; pick random entries to compare
        for (int c = 0; c < COMMIT_W; c++) cm_rob[c] = ROB_IDX_W'($urandom_range(0, ROB_ENTRIES - 1));
        #1;
        for (int c = 0; c < COMMIT_W; c++) begin
          chk(int'(cm_count[c]) == m_cnt[cm_rob[c]],
              $sformatf("cyc %0d rob %0d count dut=%0d model=%0d", cyc, cm_rob[c], cm_count[c], m_cnt[cm_rob[c]]));
          if (m_trk[cm_rob[c]] !== 1'bx) chk(cm_tracked[c] == m_trk[cm_rob[c]], "tracked flag");
        end
        for (int i = 0; i < ALLOC_W; i++) m_alloc(alloc[i], track_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
