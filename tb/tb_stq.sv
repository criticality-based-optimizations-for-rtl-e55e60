// tb_stq: self-checking test of the store queue.
//
// Directed part: stores allocated before and after a load's color, forwarding
// from the youngest older matching store, no forwarding from younger stores,
// "wait" when the matching store's data is missing, no result when the search
// is not requested, status vectors, commit and in-order write-back, a flush
// that squashes only uncommitted stores, and wrap-around of the pointers.
// Random part: allocation, address/data writes, commit, write-back and searches
// compared each cycle with a reference queue kept in the testbench.
module tb_stq;
  import lcp_pkg::*;

  localparam int N = STQ_ENTRIES;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [2:0] alloc_n = 0;
  stq_ptr_t tail, head;
  logic [$clog2(N+1)-1:0] free_n;
  logic sta_v = 0; logic [STQ_IDX_W-1:0] sta_idx = 0; logic [ADDR_W-1:0] sta_addr = 0;
  logic std_v = 0; logic [STQ_IDX_W-1:0] std_idx = 0; logic [DATA_W-1:0] std_data = 0;
  logic [2:0] commit_n = 0;
  logic wb_v; logic [ADDR_W-1:0] wb_addr; logic [DATA_W-1:0] wb_data; logic wb_ack = 0;
  logic srch_v = 0; stq_ptr_t srch_color; logic [ADDR_W-1:0] srch_addr = 0;
  logic srch_hit, srch_wait; logic [DATA_W-1:0] srch_data;
  logic [N-1:0] addr_unknown, busy;
  int checks = 0, failures = 0;

  stq dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle();
    alloc_n = 0; sta_v = 0; std_v = 0; commit_n = 0; wb_ack = 0; srch_v = 0; flush = 0;
  endtask

  // reference model: ordered list of stores (oldest first) with absolute sequence numbers
  typedef struct { int seq; logic av; logic dv; logic cm; int unsigned addr; longint unsigned data; } ms_t;
  ms_t mq [$];
  int  next_seq = 0, ncm = 0;

  initial begin
    stq_ptr_t col;
    srch_color = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(free_n == N && busy == '0, "empty after reset");
    // three stores: S0, S1, then a load's color, then S2
    alloc_n = 2; @(negedge clk); idle();
    col = tail;
    alloc_n = 1; @(negedge clk); idle();
    chk(free_n == N - 3 && busy == 20'b111 && addr_unknown == 20'b111, "three stores, addresses unknown");
    sta_v = 1; sta_idx = 0; sta_addr = 32'h100; std_v = 1; std_idx = 0; std_data = 64'hAA; @(negedge clk); idle();
    sta_v = 1; sta_idx = 1; sta_addr = 32'h104; @(negedge clk); idle();   // same 8-byte word, no data
    sta_v = 1; sta_idx = 2; sta_addr = 32'h100; std_v = 1; std_idx = 2; std_data = 64'hCC; @(negedge clk); idle();
    chk(addr_unknown == '0, "all addresses known");
    srch_v = 1; srch_color = col; srch_addr = 32'h100;
    #1 chk(!srch_hit && srch_wait, "youngest older match (S1) has no data yet: wait");
    std_v = 1; std_idx = 1; std_data = 64'hBB; @(negedge clk); std_v = 0;
    #1 chk(srch_hit && srch_data == 64'hBB, "forward from S1, not from the younger S2");
    srch_color = '0;
    #1 chk(!srch_hit && !srch_wait, "no older store for a load allocated before S0");
    srch_v = 0; srch_color = col;
    #1 chk(!srch_hit && !srch_wait, "no search requested, no result");
    srch_v = 1; srch_addr = 32'h200;
    #1 chk(!srch_hit, "different address does not match");
    srch_v = 0;
    chk(!wb_v, "nothing committed, nothing to write back");
    commit_n = 1; @(negedge clk); idle();
    chk(wb_v && wb_addr == 32'h100 && wb_data == 64'hAA, "oldest committed store offered for write-back");
    wb_ack = 1; @(negedge clk); idle();
    chk(busy == 20'b110 && free_n == N - 2, "S0 written back and freed");
    commit_n = 1; @(negedge clk); idle();
    flush = 1; @(negedge clk); idle();
    chk(busy == 20'b010 && free_n == N - 1, "flush drops uncommitted S2, keeps committed S1");
    wb_ack = 1; @(negedge clk); idle();
    chk(busy == '0 && free_n == N && head == tail, "empty again");

    // random against model
    mq.delete();
    next_seq = int'(tail.idx) + (tail.wrap ? N : 0);
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int na, nc, pos, tgt;
      @(negedge clk);
      idle();
      na = $urandom_range(0, 4);
      if (na > int'(free_n)) na = int'(free_n);
      alloc_n = 3'(na);
      // address / data for random known entries
      if (mq.size() > 0) begin
        pos = $urandom_range(0, mq.size() - 1);
        sta_v = 1; sta_idx = STQ_IDX_W'(mq[pos].seq % N); sta_addr = 32'h1000 + 8 * $urandom_range(0, 7);
        pos = $urandom_range(0, mq.size() - 1);
        std_v = 1; std_idx = STQ_IDX_W'(mq[pos].seq % N); std_data = 64'($urandom);
      end
      nc = $urandom_range(0, 2);
      begin
        int unc;
        unc = 0;
        foreach (mq[k]) if (!mq[k].cm) unc++;
        if (nc > unc) nc = unc;
      end
      commit_n = 3'(nc);
      wb_ack = $urandom_range(0, 1);
      // search with a random color inside the queue
      tgt = $urandom_range(0, mq.size());
      srch_v = 1; srch_addr = 32'h1000 + 8 * $urandom_range(0, 7);
      begin
        int s;
        s = (mq.size() > 0) ? mq[0].seq : next_seq;
        s = s + tgt;
        srch_color.idx = STQ_IDX_W'(s % N);
        srch_color.wrap = 1'((s / N) % 2);
      end
      #1;
      begin
        logic eh, ew; longint unsigned ed;
        eh = 0; ew = 0; ed = 0;
        for (int k = 0; k < tgt; k++)
          if (mq[k].av && mq[k].addr[31:3] == srch_addr[31:3]) begin eh = mq[k].dv; ew = !mq[k].dv; ed = mq[k].data; end
        chk(srch_hit == eh && srch_wait == ew && (!eh || srch_data == ed), $sformatf("cyc %0d search", cyc));
        chk(wb_v == (mq.size() > 0 && mq[0].cm && mq[0].av && mq[0].dv), $sformatf("cyc %0d wb_v", cyc));
        chk(int'(free_n) == N - mq.size(), $sformatf("cyc %0d free %0d model %0d", cyc, free_n, N - mq.size()));
      end
      // model update (same order as the queue: writes, commit, write-back, allocation)
      foreach (mq[k]) begin
        if (sta_v && (mq[k].seq % N) == int'(sta_idx)) begin mq[k].av = 1; mq[k].addr = sta_addr; end
        if (std_v && (mq[k].seq % N) == int'(std_idx)) begin mq[k].dv = 1; mq[k].data = std_data; end
      end
      begin
        int c;
        c = nc;
        foreach (mq[k]) if (!mq[k].cm && c > 0) begin mq[k].cm = 1; c--; end
      end
      if (wb_v && wb_ack) void'(mq.pop_front());
      for (int k = 0; k < na; k++) begin
        mq.push_back('{seq: next_seq, av: 0, dv: 0, cm: 0, addr: 0, data: 0});
        next_seq++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
