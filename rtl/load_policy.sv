// load_policy: turns a load's predicted consumer count into the decisions of
// each criticality-based optimization.
//
// A load is critical for an optimization when its confidence is low or its
// count reaches that optimization's threshold. Decisions, each active only
// when its optimization is enabled in `cfg` (otherwise the baseline behaviour):
//   fslp_crit   load-port priority: critical at TH_FSLP (5), or when the
//               ready-but-delayed bit is set, or when the load has already been
//               deferred MAX_DEFER (3) times.
//   may_search  store-queue search allowed: critical at TH_STQ (2), or the
//               issue rate is low (`stq_all`); otherwise the load waits for all
//               older stores to be written back.
//   use_mdp     may consult the memory-dependence predictor and issue
//               speculatively past unknown store addresses (TH_MDP, own choice).
//   fill_lru    a miss fill goes to the LRU position (non-critical at TH_INS_LRU, 8).
//   fill_bypass a miss fill skips the DL1 (non-critical at TH_BYPASS, 4);
//               when both insertion options are on, LRU insertion wins.
//   pf_allow    the load may trigger the prefetcher (critical at TH_PREFETCH, 5).
// Purely combinational.
module load_policy
  import lcp_pkg::*;
(
  input  opt_cfg_t   cfg,
  input  crit_info_t info,
  input  logic       defer_max,
  input  logic       stq_all,
  output logic       fslp_crit,
  output logic       may_search,
  output logic       use_mdp,
  output logic       fill_lru,
  output logic       fill_bypass,
  output logic       pf_allow
);

  always_comb begin
    fslp_crit   = !cfg.fslp || is_crit(info, TH_FSLP) || info.rbd || defer_max;
    may_search  = !cfg.stq_filt || stq_all || is_crit(info, TH_STQ);
    use_mdp     = !cfg.mdp_filt || is_crit(info, TH_MDP);
    fill_lru    = cfg.ins_slru && !is_crit(info, TH_INS_LRU);
    fill_bypass = cfg.ins_sl1 && !cfg.ins_slru && !is_crit(info, TH_BYPASS);
    pf_allow    = !cfg.ins_sp || is_crit(info, TH_PREFETCH);
  end

endmodule
