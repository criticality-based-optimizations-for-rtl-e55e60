// agu_steer: address generation with the store AGU shared by loads.
//
// The core has one load AGU and one store AGU. Each cycle the scheduler offers
// up to two load-address micro-ops (ld_v[0] oldest) and one store-address
// micro-op. The load AGU always takes ld[0]. The store AGU takes the store if
// there is one; when there is none and `fsla` is on, it computes ld[1] instead.
// Both AGUs are adders (base + displacement). A load address from either AGU is
// written into the load queue; the store AGU's output is therefore routed to
// both the load queue and the store queue. Giving stores first call on their
// own AGU is this design's choice. Grants and results are combinational in the
// same cycle as the request; register them outside if the pipeline needs it.
// The queue indices on the result ports are the requests' own indices passed
// through (selected by the steering), so they come straight from inputs.
module agu_steer
  import lcp_pkg::*;
#(
  parameter int unsigned LDQ_IDX_W = $clog2(LDQ_ENTRIES)
) (
  input  logic                  fsla,
  input  logic                  ld_v    [2],
  input  logic [LDQ_IDX_W-1:0]  ld_idx  [2],
  input  logic [ADDR_W-1:0]     ld_base [2],
  input  logic [ADDR_W-1:0]     ld_disp [2],
  input  logic                  st_v,
  input  logic [STQ_IDX_W-1:0]  st_idx,
  input  logic [ADDR_W-1:0]     st_base,
  input  logic [ADDR_W-1:0]     st_disp,
  output logic                  ld_gnt  [2],
  output logic                  st_gnt,
  // results: two load-queue write ports and one store-queue write port
  output logic                  ldq_wr_v    [2],
  output logic [LDQ_IDX_W-1:0]  ldq_wr_idx  [2],
  output logic [ADDR_W-1:0]     ldq_wr_addr [2],
  output logic                  stq_wr_v,
  output logic [STQ_IDX_W-1:0]  stq_wr_idx,
  output logic [ADDR_W-1:0]     stq_wr_addr
);

  logic [ADDR_W-1:0] ld_sum, st_sum;
  logic              hijack;

  always_comb begin
    hijack = fsla && !st_v && ld_v[1];
    ld_sum = ld_base[0] + ld_disp[0];
    st_sum = hijack ? ld_base[1] + ld_disp[1] : st_base + st_disp;

    ld_gnt[0] = ld_v[0];
    ld_gnt[1] = hijack;
    st_gnt    = st_v;

    ldq_wr_v[0]    = ld_v[0];
    ldq_wr_idx[0]  = ld_idx[0];
    ldq_wr_addr[0] = ld_sum;
    ldq_wr_v[1]    = hijack;
    ldq_wr_idx[1]  = ld_idx[1];
    ldq_wr_addr[1] = st_sum;

    stq_wr_v    = st_v;
    stq_wr_idx  = st_idx;
    stq_wr_addr = st_sum;
  end

endmodule
