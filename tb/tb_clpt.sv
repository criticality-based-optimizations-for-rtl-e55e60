// tb_clpt: self-checking test of the critical load prediction table.
//
// Checks the reset state (count 0, low confidence), the confidence counter's
// up/down rule with the distance-2 band and its saturation, the
// ready-but-delayed bit, aliasing of PCs that share low bits, and the later
// write winning when two commit slots hit one entry. Then random writes and
// reads are compared with a reference table in the testbench.
module tb_clpt;
  import lcp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [PC_W-1:0]  rd_pc [ALLOC_W];
  crit_info_t       rd_info [ALLOC_W];
  logic             wr_v [COMMIT_W];
  logic [PC_W-1:0]  wr_pc [COMMIT_W];
  logic [CNT_W-1:0] wr_count [COMMIT_W];
  logic             wr_rbd [COMMIT_W];
  int checks = 0, failures = 0;

  clpt dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_cnt [CLPT_ENTRIES], m_conf [CLPT_ENTRIES]; logic m_rbd [CLPT_ENTRIES];

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle();
    for (int w = 0; w < COMMIT_W; w++) begin wr_v[w] = 0; wr_pc[w] = 0; wr_count[w] = 0; wr_rbd[w] = 0; end
  endtask

  task automatic write1(int pc, int cnt, logic rbd);
    @(negedge clk);
    idle();
    wr_v[0] = 1; wr_pc[0] = PC_W'(pc); wr_count[0] = CNT_W'(cnt); wr_rbd[0] = rbd;
    @(negedge clk);
    idle();
  endtask

  function automatic crit_info_t model(int pc);
    int i;
    i = pc % CLPT_ENTRIES;
    return '{count: CNT_W'(m_cnt[i]), conf_low: (m_conf[i] <= 1), rbd: m_rbd[i]};
  endfunction

  initial begin
    idle();
    for (int r = 0; r < ALLOC_W; r++) rd_pc[r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    rd_pc[0] = 32'h123;
    #1 chk(rd_info[0].count == 0 && rd_info[0].conf_low && !rd_info[0].rbd, "reset entry is zero, low confidence");
    // stable counts raise confidence: 0 ->1 ->2 (no longer low) ->3 ->3
    write1(32'h123, 6, 0);  #1 chk(rd_info[0].count == 6 && rd_info[0].conf_low, "diff 6: confidence stays 0");
    write1(32'h123, 7, 0);  #1 chk(rd_info[0].conf_low, "diff 1: confidence 1, still low");
    write1(32'h123, 6, 1);  #1 chk(!rd_info[0].conf_low && rd_info[0].rbd, "diff 1: confidence 2, rbd stored");
    write1(32'h123, 6, 0);  #1 chk(!rd_info[0].conf_low && !rd_info[0].rbd, "confidence 3");
    write1(32'h123, 6, 0);  #1 chk(dut.tbl[32'h123].conf == 3, "confidence saturates at 3");
    write1(32'h123, 8, 0);  #1 chk(dut.tbl[32'h123].conf == 2 && !rd_info[0].conf_low, "diff 2: confidence down to 2");
    write1(32'h123, 12, 0); #1 chk(rd_info[0].conf_low && rd_info[0].count == 12, "diff 4: confidence 1, low");
    // aliasing: PC + 1024 maps to the same entry
    rd_pc[1] = 32'h123 + CLPT_ENTRIES;
    #1 chk(rd_info[1] == rd_info[0], "untagged: aliasing PCs share an entry");
    // two writes to one entry in one cycle: the later slot wins
    @(negedge clk);
    wr_v[0] = 1; wr_pc[0] = 32'h200; wr_count[0] = 3;
    wr_v[2] = 1; wr_pc[2] = 32'h200; wr_count[2] = 9;
    @(negedge clk); idle();
    rd_pc[2] = 32'h200;
    #1 chk(rd_info[2].count == 9, "later commit slot wins");

    // random against the model
    @(negedge clk);
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int i = 0; i < CLPT_ENTRIES; i++) begin m_cnt[i] = 0; m_conf[i] = 0; m_rbd[i] = 0; end
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      idle();
      for (int w = 0; w < COMMIT_W; w++)
        if ($urandom_range(0, 1) == 1) begin
          wr_v[w] = 1; wr_pc[w] = PC_W'($urandom_range(0, 63) * 4 + 32'h4000);
          wr_count[w] = CNT_W'($urandom_range(0, 15)); wr_rbd[w] = 1'($urandom_range(0, 1));
        end
      for (int r = 0; r < ALLOC_W; r++) rd_pc[r] = PC_W'($urandom_range(0, 63) * 4 + 32'h4000);
      #1;
      for (int r = 0; r < ALLOC_W; r++)
        chk(rd_info[r] == model(int'(rd_pc[r])), $sformatf("cyc %0d read %0d", cyc, r));
      // model update in slot order, each from the stored (old) value
      begin
        int oc [COMMIT_W];
        for (int w = 0; w < COMMIT_W; w++) oc[w] = m_conf[int'(wr_pc[w]) % CLPT_ENTRIES];
        for (int w = 0; w < COMMIT_W; w++) if (wr_v[w]) begin
          int i, d, c;
          i = int'(wr_pc[w]) % CLPT_ENTRIES;
          d = m_cnt_old(i, w) - int'(wr_count[w]);
          if (d < 0) d = -d;
          c = oc[w];
          c = (d < 2) ? (c < 3 ? c + 1 : 3) : (c > 0 ? c - 1 : 0);
          m_conf[i] = c;
          m_rbd[i] = wr_rbd[w];
        end
        for (int w = 0; w < COMMIT_W; w++) if (wr_v[w]) m_cnt[int'(wr_pc[w]) % CLPT_ENTRIES] = int'(wr_count[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count before this cycle's writes (writes of earlier slots are not visible)
  function automatic int m_cnt_old(int i, int w);
    return m_cnt[i];
  endfunction
endmodule
