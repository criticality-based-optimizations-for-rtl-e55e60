// ccl: consumer collection logic.
//
// Counts, for every load in the instruction window, how many instructions read
// its result directly (children only, not grandchildren). The register alias
// table is kept here together with one extra bit per logical register that says
// "the in-flight producer of this register is a load". An allocated load sets
// that bit for its destination and clears the consumer counter of its ROB entry;
// any other allocated instruction looks up its sources and, for each source
// whose producer is a load, bumps that load's counter. A micro-op that reads the
// same load through both sources counts as one child (own choice). Sources
// produced earlier in the same allocation group are taken from that group, as a
// rename stage's intra-group bypass would do. Counters are 4 bits and saturate.
//
// Tracking only happens while `track_en` is high (the issue-rate monitor's
// low-performance signal); a load allocated while tracking is off is marked
// untracked and will not train the prediction table when it commits. Flushes
// clear all in-flight RAT mappings and do not repair counters, as in the design
// this follows.
//
// Timing: allocation and commit are processed in the same clock edge; the commit
// outputs (count and tracked flag of the committing entries) are combinational
// reads of the current state.
module ccl
  import lcp_pkg::*;
#(
  parameter int unsigned N_ROB  = ROB_ENTRIES,
  parameter int unsigned N_ALLOC = ALLOC_W,
  parameter int unsigned N_COMMIT = COMMIT_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 track_en,
  input  logic                 flush,
  input  alloc_uop_t           alloc   [N_ALLOC],
  input  logic                 cm_v    [N_COMMIT],
  input  logic [ROB_IDX_W-1:0] cm_rob  [N_COMMIT],
  input  logic                 cm_has_dst [N_COMMIT],
  input  logic [LREG_W-1:0]    cm_dst  [N_COMMIT],
  output logic [CNT_W-1:0]     cm_count   [N_COMMIT],
  output logic                 cm_tracked [N_COMMIT]
);

  typedef struct packed {
    logic                 valid;    // mapping points at an in-flight producer
    logic [ROB_IDX_W-1:0] rob;
    logic                 is_load;  // the bit the CCL adds
  } rat_e_t;

  rat_e_t              rat [NUM_LREGS];
  logic [CNT_W-1:0]    cnt [N_ROB];
  logic                trk [N_ROB];

  // Producer of each source, after intra-group bypass
  logic                 p_load [N_ALLOC][2];
  logic [ROB_IDX_W-1:0] p_rob  [N_ALLOC][2];

  always_comb begin
    for (int i = 0; i < int'(N_ALLOC); i++) begin
      for (int s = 0; s < 2; s++) begin
        logic                 sv;
        logic [LREG_W-1:0]    sr;
        sv = (s == 0) ? alloc[i].src1_v : alloc[i].src2_v;
        sr = (s == 0) ? alloc[i].src1   : alloc[i].src2;
        p_load[i][s] = sv && rat[sr].valid && rat[sr].is_load;
        p_rob[i][s]  = rat[sr].rob;
        for (int j = 0; j < i; j++) begin
          if (alloc[j].valid && alloc[j].has_dst && alloc[j].dst == sr) begin
            p_load[i][s] = sv && alloc[j].is_load;
            p_rob[i][s]  = alloc[j].rob;
          end
        end
      end
    end
  end

  always_comb begin
    for (int c = 0; c < int'(N_COMMIT); c++) begin
      cm_count[c]   = cnt[cm_rob[c]];
      cm_tracked[c] = trk[cm_rob[c]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NUM_LREGS); r++) rat[r] <= '0;
      for (int e = 0; e < int'(N_ROB); e++) begin
        cnt[e] <= '0;
        trk[e] <= 1'b0;
      end
    end else begin
      // Consumer counters
      for (int e = 0; e < int'(N_ROB); e++) begin
        logic [CNT_W-1:0] base;
        logic             is_new;
        int unsigned      inc;
        base   = cnt[e];
        is_new = 1'b0;
        inc    = 0;
        for (int i = 0; i < int'(N_ALLOC); i++) begin
          if (alloc[i].valid && alloc[i].is_load && alloc[i].rob == ROB_IDX_W'(e)) is_new = 1'b1;
          if (alloc[i].valid && track_en &&
              ((p_load[i][0] && p_rob[i][0] == ROB_IDX_W'(e)) ||
               (p_load[i][1] && p_rob[i][1] == ROB_IDX_W'(e))))
            inc++;
        end
        if (is_new) begin
          base   = '0;
          trk[e] <= track_en;
        end
        if (32'(base) + inc > (2**CNT_W) - 1) cnt[e] <= '1;
        else                                  cnt[e] <= CNT_W'(32'(base) + inc);
      end

      // RAT: commit retires the mapping if it is still the newest one, then
      // allocation writes new mappings (later slots win).
      if (flush) begin
        for (int r = 0; r < int'(NUM_LREGS); r++) rat[r].valid <= 1'b0;
      end else begin
        for (int c = 0; c < int'(N_COMMIT); c++)
          if (cm_v[c] && cm_has_dst[c] && rat[cm_dst[c]].valid && rat[cm_dst[c]].rob == cm_rob[c])
            rat[cm_dst[c]].valid <= 1'b0;
        for (int i = 0; i < int'(N_ALLOC); i++)
          if (alloc[i].valid && alloc[i].has_dst)
            rat[alloc[i].dst] <= '{valid: 1'b1, rob: alloc[i].rob, is_load: alloc[i].is_load};
      end
    end
  end

endmodule
