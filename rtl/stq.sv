// stq: store queue with a gated associative forwarding search.
//
// Stores are allocated in program order at the tail (up to N_ALLOC per cycle),
// get their address from an AGU and their data from a store-data micro-op, are
// marked committed by retirement, and leave from the head once their write to
// the data cache has been accepted (`wb_ack`). Pointers carry a wrap bit so that
// a load can record, at allocation, the tail position ("color") that separates
// older stores from younger ones.
//
// The forwarding search is the associative (CAM) lookup a load normally makes:
// given the load's color and address it finds the youngest older store whose
// address is known and matches on the same 8-byte word (own choice of
// granularity). It is performed only when `srch_v` is asserted; the caller
// asserts it only for loads that are allowed to search, so the CAM is not
// exercised at all for the others. A match whose data has not arrived yet is
// reported as `srch_wait`.
//
// Status vectors for disambiguation: `addr_unknown[i]` marks valid stores whose
// address is still unknown, `busy[i]` marks valid stores (not yet written back).
// Allocation, address/data writes, commit and write-back act at the clock edge;
// the search and status outputs are combinational.
module stq
  import lcp_pkg::*;
#(
  parameter int unsigned N       = STQ_ENTRIES,
  parameter int unsigned N_ALLOC = ALLOC_W,
  parameter int unsigned N_COMMIT = COMMIT_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  flush,
  // allocation: number of stores in the group, in slot order
  input  logic [$clog2(N_ALLOC+1)-1:0] alloc_n,
  output stq_ptr_t              tail,
  output stq_ptr_t              head,
  output logic [$clog2(N+1)-1:0] free_n,
  // address from an AGU
  input  logic                  sta_v,
  input  logic [STQ_IDX_W-1:0]  sta_idx,
  input  logic [ADDR_W-1:0]     sta_addr,
  // data from a store-data micro-op
  input  logic                  std_v,
  input  logic [STQ_IDX_W-1:0]  std_idx,
  input  logic [DATA_W-1:0]     std_data,
  // retirement: number of stores committing this cycle
  input  logic [$clog2(N_COMMIT+1)-1:0] commit_n,
  // write-back of the oldest committed store
  output logic                  wb_v,
  output logic [ADDR_W-1:0]     wb_addr,
  output logic [DATA_W-1:0]     wb_data,
  input  logic                  wb_ack,
  // forwarding search
  input  logic                  srch_v,
  input  stq_ptr_t              srch_color,
  input  logic [ADDR_W-1:0]     srch_addr,
  output logic                  srch_hit,
  output logic                  srch_wait,
  output logic [DATA_W-1:0]     srch_data,
  // status
  output logic [N-1:0]          addr_unknown,
  output logic [N-1:0]          busy
);

  typedef struct packed {
    logic              valid;
    logic              addr_v;
    logic              data_v;
    logic              committed;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
  } entry_t;

  entry_t   q [N];
  stq_ptr_t cmt;     // next store to be marked committed
  logic [$clog2(N+1)-1:0] count;

  assign free_n = ($clog2(N+1))'(N) - count;

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      addr_unknown[i] = q[i].valid && !q[i].addr_v;
      busy[i]         = q[i].valid;
    end
    wb_v    = q[head.idx].valid && q[head.idx].committed && q[head.idx].addr_v && q[head.idx].data_v;
    wb_addr = q[head.idx].addr;
    wb_data = q[head.idx].data;
  end

  // Search: walk from the oldest store to the newest one older than the load;
  // the last match seen is the youngest older one.
  always_comb begin
    int unsigned n_old;
    stq_ptr_t    p;
    srch_hit  = 1'b0;
    srch_wait = 1'b0;
    srch_data = '0;
    n_old = stq_ptr_dist(head, srch_color);
    p = head;
    for (int k = 0; k < int'(N); k++) begin
      if (srch_v && 32'(k) < n_old && q[p.idx].valid && q[p.idx].addr_v &&
          q[p.idx].addr[ADDR_W-1:3] == srch_addr[ADDR_W-1:3]) begin
        srch_hit  = q[p.idx].data_v;
        srch_wait = !q[p.idx].data_v;
        srch_data = q[p.idx].data;
      end
      p = stq_ptr_add(p, 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) q[i] <= '0;
      head  <= '0;
      tail  <= '0;
      cmt   <= '0;
      count <= '0;
    end else begin
      logic [$clog2(N+1)-1:0] cnt_n;
      stq_ptr_t               p;
      cnt_n = count;
      if (sta_v) begin
        q[sta_idx].addr   <= sta_addr;
        q[sta_idx].addr_v <= 1'b1;
      end
      if (std_v) begin
        q[std_idx].data   <= std_data;
        q[std_idx].data_v <= 1'b1;
      end
      p = cmt;
      for (int k = 0; k < int'(N_COMMIT); k++) begin
        if (32'(k) < 32'(commit_n)) q[p.idx].committed <= 1'b1;
        p = stq_ptr_add(p, 1);
      end
      cmt <= stq_ptr_add(cmt, 32'(commit_n));
      if (wb_v && wb_ack) begin
        q[head.idx].valid <= 1'b0;
        head  <= stq_ptr_add(head, 1);
        cnt_n = cnt_n - 1'b1;
      end
      if (flush) begin
        // Uncommitted stores are squashed; committed ones still drain.
        stq_ptr_t c2, h2;
        c2 = stq_ptr_add(cmt, 32'(commit_n));
        h2 = (wb_v && wb_ack) ? stq_ptr_add(head, 1) : head;
        p  = c2;
        for (int k = 0; k < int'(N); k++) begin
          if (32'(k) < stq_ptr_dist(c2, tail)) q[p.idx].valid <= 1'b0;
          p = stq_ptr_add(p, 1);
        end
        tail  <= c2;
        cnt_n = ($clog2(N+1))'(stq_ptr_dist(h2, c2));
      end else begin
        p = tail;
        for (int k = 0; k < int'(N_ALLOC); k++) begin
          if (32'(k) < 32'(alloc_n)) q[p.idx] <= '{valid: 1'b1, default: '0};
          p = stq_ptr_add(p, 1);
        end
        tail  <= stq_ptr_add(tail, 32'(alloc_n));
        cnt_n = cnt_n + ($clog2(N+1))'(alloc_n);
      end
      count <= cnt_n;
    end
  end

endmodule
