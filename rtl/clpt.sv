// clpt: critical load prediction table.
//
// An untagged, PC-indexed table. Each entry holds the number of direct consumers
// a load had the last time it committed (4 bits), a 2-bit confidence counter on
// that number, and a "ready-but-delayed" bit (the load was ready to use the DL1
// port but an older load got it). The count is stored rather than a single
// critical bit so that every optimization can apply its own threshold.
//
// Reads (one per allocation slot) are combinational and return the entry as a
// crit_info_t; conf_low is set while the confidence counter is at or below
// CONF_LOW_MAX, which tells users to treat the load as critical whatever the
// count says. Writes (one per commit slot) replace count and ready-but-delayed
// bit and move the confidence counter up when the new count is within
// CONF_DELTA-1 of the old one and down otherwise, saturating at both ends. Two
// writes to one entry in a cycle: the later slot wins. The index is the low PC
// bits. After reset every entry is zero, so unknown loads are treated as
// critical (own choice). Writes take effect at the next clock edge.
module clpt
  import lcp_pkg::*;
#(
  parameter int unsigned ENTRIES  = CLPT_ENTRIES,
  parameter int unsigned N_RD     = ALLOC_W,
  parameter int unsigned N_WR     = COMMIT_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [PC_W-1:0]       rd_pc   [N_RD],
  output crit_info_t            rd_info [N_RD],
  input  logic                  wr_v     [N_WR],
  input  logic [PC_W-1:0]       wr_pc    [N_WR],
  input  logic [CNT_W-1:0]      wr_count [N_WR],
  input  logic                  wr_rbd   [N_WR]
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);

  typedef struct packed {
    logic [CNT_W-1:0]  count;
    logic [CONF_W-1:0] conf;
    logic              rbd;
  } entry_t;

  entry_t tbl [ENTRIES];

  always_comb begin
    for (int r = 0; r < int'(N_RD); r++) begin
      entry_t e;
      e = tbl[rd_pc[r][IDX_W-1:0]];
      rd_info[r] = '{count: e.count, conf_low: (32'(e.conf) <= CONF_LOW_MAX), rbd: e.rbd};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) tbl[i] <= '0;
    end else begin
      for (int w = 0; w < int'(N_WR); w++) begin
        if (wr_v[w]) begin
          entry_t           o;
          logic [CNT_W-1:0] diff;
          logic [CONF_W-1:0] c;
          o    = tbl[wr_pc[w][IDX_W-1:0]];
          diff = (o.count > wr_count[w]) ? o.count - wr_count[w] : wr_count[w] - o.count;
          c    = o.conf;
          if (32'(diff) < CONF_DELTA) begin
            if (c != '1) c = c + 1'b1;
          end else begin
            if (c != '0) c = c - 1'b1;
          end
          tbl[wr_pc[w][IDX_W-1:0]] <= '{count: wr_count[w], conf: c, rbd: wr_rbd[w]};
        end
      end
    end
  end

endmodule
