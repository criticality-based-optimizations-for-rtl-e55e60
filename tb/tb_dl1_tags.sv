// tb_dl1_tags: self-checking test of the DL1 tag array and its insertion
// policies.
//
// Directed: a line inserted at MRU survives seven more fills of its set; a line
// inserted at the LRU position is the next victim unless a hit promotes it
// first; a bypassed fill leaves the set unchanged. Random: lookups and fills
// with random policy bits on a few sets, compared every cycle with a recency
// list per set kept in the testbench (front = MRU).
module tb_dl1_tags;
  import lcp_pkg::*;
  localparam int SETS = 64, WAYS = 8;
  logic clk = 0, rst_n = 0;
  logic lk_v = 0; logic [ADDR_W-1:0] lk_addr = 0;
  logic lk_hit; logic [2:0] lk_way;
  logic fill_v = 0; logic [ADDR_W-1:0] fill_addr = 0; logic fill_lru = 0, fill_bypass = 0;
  logic evict_v; logic [ADDR_W-1:0] evict_addr;
  int checks = 0, failures = 0;

  dl1_tags dut (.*);

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

  function automatic logic [ADDR_W-1:0] la(int set, int tag);
    return ADDR_W'((tag * SETS + set) * 64);
  endfunction

  task automatic fill(logic [ADDR_W-1:0] a, logic lru, logic byp);
    @(negedge clk);
    fill_v = 1; fill_addr = a; fill_lru = lru; fill_bypass = byp;
    @(negedge clk);
    fill_v = 0; fill_lru = 0; fill_bypass = 0;
  endtask

  function automatic logic probe(logic [ADDR_W-1:0] a);
    // non-destructive: look at the array directly
    for (int w = 0; w < WAYS; w++)
      if (dut.ways[a[11:6]][w].valid && dut.ways[a[11:6]][w].tag == a[31:12]) return 1;
    return 0;
  endfunction

  // model: per set, list of tags, MRU first
  int ml [SETS][$];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // MRU insertion: A then 7 more lines, A still present; one more evicts A
    fill(la(3, 100), 0, 0);
    for (int t = 1; t <= 7; t++) fill(la(3, 100 + t), 0, 0);
    chk(probe(la(3, 100)), "MRU-inserted line survives 7 fills");
    fill(la(3, 200), 0, 0);
    chk(!probe(la(3, 100)), "8th fill evicts the oldest line");
    // LRU insertion: X goes to LRU; the next fill evicts it
    fill(la(3, 300), 1, 0);
    chk(probe(la(3, 300)), "LRU-inserted line is installed");
    @(negedge clk);
    chk(evict_v == 0, "no fill, no eviction");
    fill_v = 1; fill_addr = la(3, 301);
    #1 chk(evict_v && evict_addr == la(3, 300), "next fill of the set evicts the LRU-inserted line");
    @(negedge clk); fill_v = 0;
    chk(!probe(la(3, 300)), "LRU-inserted line gone");
    // LRU insertion then a hit: promoted to MRU and survives
    fill(la(5, 400), 0, 0);
    for (int t = 1; t < 8; t++) fill(la(5, 400 + t), 0, 0);
    fill(la(5, 500), 1, 0);
    lk_v = 1; lk_addr = la(5, 500) + 8;
    #1 chk(lk_hit, "lookup hits the LRU-inserted line");
    @(negedge clk); lk_v = 0;
    fill(la(5, 501), 0, 0);
    chk(probe(la(5, 500)), "promoted line survives the next fill");
    // bypass leaves the set untouched
    fill(la(5, 600), 0, 1);
    chk(!probe(la(5, 600)) && probe(la(5, 500)) && probe(la(5, 501)), "bypassed fill not installed");

    // random against model
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int s = 0; s < SETS; s++) ml[s].delete();
    for (int cyc = 0; cyc < 8000; cyc++) begin
      int ls, lt, fs, ft, hitpos;
      @(negedge clk);
      ls = $urandom_range(0, 3); lt = $urandom_range(0, 11);
      fs = $urandom_range(0, 3); ft = $urandom_range(0, 11);
      lk_v = 1'($urandom_range(0, 1)); lk_addr = la(ls, lt);
      fill_v = 1'($urandom_range(0, 1)); fill_addr = la(fs, ft);
      fill_lru = 1'($urandom_range(0, 1)); fill_bypass = ($urandom_range(0, 4) == 0);
      // avoid filling a line that is already present (the cache never does)
      foreach (ml[fs][k]) if (ml[fs][k] == ft) fill_v = 0;
      #1;
      hitpos = -1;
      foreach (ml[ls][k]) if (ml[ls][k] == lt) hitpos = k;
      chk(lk_hit == (lk_v && hitpos >= 0), $sformatf("cyc %0d hit", cyc));
      // model: promotion first, then fill
      if (lk_v && hitpos >= 0) begin
        ml[ls].delete(hitpos);
        ml[ls].push_front(lt);
      end
      if (fill_v && !fill_bypass)
        chk(evict_v == (ml[fs].size() == WAYS) &&
            (!evict_v || evict_addr == la(fs, ml[fs][WAYS - 1])), $sformatf("cyc %0d eviction ev=%0d addr=%h exp=%h lk=%0d ls=%0d hitpos=%0d size=%0d", cyc, evict_v, evict_addr, la(fs, ml[fs][WAYS-1]), lk_v, ls, hitpos, ml[fs].size()));
      if (fill_v && !fill_bypass) begin
        if (ml[fs].size() == WAYS) void'(ml[fs].pop_back());
        if (fill_lru) ml[fs].push_back(ft); else ml[fs].push_front(ft);
      end
    end
    lk_v = 0; fill_v = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
