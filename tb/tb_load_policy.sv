// tb_load_policy: exhaustive self-checking test of the per-optimization
// criticality decisions.
//
// Sweeps every count (0..15), confidence state, ready-but-delayed bit,
// deferral-limit flag, low-issue-rate flag and configuration, and compares each
// decision with the thresholds written out here: port priority at 5, store-queue
// search at 2, dependence predictor at 2, LRU insertion below 8, DL1 bypass
// below 4 (LRU insertion taking precedence), prefetch at 5.
module tb_load_policy;
  import lcp_pkg::*;
  opt_cfg_t   cfg;
  crit_info_t info;
  logic defer_max, stq_all;
  logic fslp_crit, may_search, use_mdp, fill_lru, fill_bypass, pf_allow;
  int checks = 0, failures = 0;

  load_policy dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int c = 0; c < 128; c++)
      for (int n = 0; n < 16; n++)
        for (int m = 0; m < 16; m++) begin
          logic lo, rb;
          cfg = opt_cfg_t'(c);
          lo = m[0]; rb = m[1]; defer_max = m[2]; stq_all = m[3];
          info = '{count: 4'(n), conf_low: lo, rbd: rb};
          #1;
          chk(fslp_crit  == (!cfg.fslp || lo || n >= 5 || rb || defer_max), $sformatf("fslp c%0d n%0d m%0d", c, n, m));
          chk(may_search == (!cfg.stq_filt || stq_all || lo || n >= 2), "search");
          chk(use_mdp    == (!cfg.mdp_filt || lo || n >= 2), "mdp");
          chk(fill_lru   == (cfg.ins_slru && !lo && n < 8), "lru");
          chk(fill_bypass== (cfg.ins_sl1 && !cfg.ins_slru && !lo && n < 4), "bypass");
          chk(pf_allow   == (!cfg.ins_sp || lo || n >= 5), "prefetch");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
