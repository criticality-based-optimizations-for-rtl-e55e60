// dl1_tags: tag array and recency stack of the level-1 data cache.
//
// SETS x WAYS lines of LINE_B bytes (32KB, 8-way, 64-byte lines: 64 sets). Every
// way of a set has a recency rank, 0 for the most recently used line up to
// WAYS-1 for the least recently used one; the ranks of a set are always a
// permutation. A lookup that hits moves its line to rank 0 (MRU) and ages the
// lines that were younger. A fill replaces an invalid way if there is one, else
// the LRU way, and places the new line either at MRU (the usual policy) or,
// when `fill_lru` is set, leaves it at the LRU position, where the next fill of
// the set evicts it unless it is hit first. A fill with `fill_bypass` set is not
// installed at all. Lookup results are combinational; state changes at the
// clock edge. When a lookup and a fill address the same set in one cycle, the
// lookup's promotion is applied first. Only tags are kept: the data array of the
// cache is outside this block. `evict_addr` is a line address: its offset bits
// are always zero and its set bits are those of the fill address, so a netlist
// shows them as constant or copied from an input; that is intended.
module dl1_tags
  import lcp_pkg::*;
#(
  parameter int unsigned SETS   = 64,
  parameter int unsigned WAYS   = 8,
  parameter int unsigned LINE_B = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    lk_v,
  input  logic [ADDR_W-1:0]       lk_addr,
  output logic                    lk_hit,
  output logic [$clog2(WAYS)-1:0] lk_way,
  input  logic                    fill_v,
  input  logic [ADDR_W-1:0]       fill_addr,
  input  logic                    fill_lru,
  input  logic                    fill_bypass,
  output logic                    evict_v,
  output logic [ADDR_W-1:0]       evict_addr
);

  localparam int unsigned OFF_W = $clog2(LINE_B);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned TAG_W = ADDR_W - OFF_W - SET_W;
  localparam int unsigned WAY_W = $clog2(WAYS);

  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
    logic [WAY_W-1:0] rank;
  } way_t;

  way_t ways [SETS][WAYS];

  logic [SET_W-1:0] lk_set, f_set;
  logic [TAG_W-1:0] lk_tag, f_tag;
  logic [WAY_W-1:0] victim;
  logic             f_inval;

  assign lk_set = lk_addr[OFF_W +: SET_W];
  assign lk_tag = lk_addr[ADDR_W-1 -: TAG_W];
  assign f_set  = fill_addr[OFF_W +: SET_W];
  assign f_tag  = fill_addr[ADDR_W-1 -: TAG_W];

  always_comb begin
    lk_hit = 1'b0;
    lk_way = '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (lk_v && ways[lk_set][w].valid && ways[lk_set][w].tag == lk_tag) begin
        lk_hit = 1'b1;
        lk_way = WAY_W'(w);
      end
  end

  // Victim: first invalid way, else the way at the LRU rank (after any promotion
  // by a lookup hit in the same set and cycle)
  always_comb begin
    victim  = '0;
    f_inval = 1'b0;
    for (int w = int'(WAYS) - 1; w >= 0; w--) begin
      logic [WAY_W-1:0] r;
      // rank after this cycle's lookup promotion, if it is in the same set
      r = ways[f_set][w].rank;
      if (lk_hit && lk_set == f_set) begin
        if (WAY_W'(w) == lk_way)                  r = '0;
        else if (r < ways[lk_set][lk_way].rank)   r = r + 1'b1;
      end
      if (r == WAY_W'(WAYS - 1)) victim = WAY_W'(w);
    end
    for (int w = int'(WAYS) - 1; w >= 0; w--)
      if (!ways[f_set][w].valid) begin
        victim  = WAY_W'(w);
        f_inval = 1'b1;
      end
    evict_v    = fill_v && !fill_bypass && !f_inval;
    evict_addr = {ways[f_set][victim].tag, f_set, {OFF_W{1'b0}}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SETS); s++)
        for (int w = 0; w < int'(WAYS); w++)
          ways[s][w] <= '{valid: 1'b0, tag: '0, rank: WAY_W'(w)};
    end else begin
      way_t             st [WAYS];
      logic [WAY_W-1:0] r0;
      if (lk_hit) begin
        for (int w = 0; w < int'(WAYS); w++) st[w] = ways[lk_set][w];
        r0 = st[lk_way].rank;
        for (int w = 0; w < int'(WAYS); w++)
          if (st[w].rank < r0) st[w].rank = st[w].rank + 1'b1;
        st[lk_way].rank = '0;
        for (int w = 0; w < int'(WAYS); w++) ways[lk_set][w] <= st[w];
      end
      if (fill_v && !fill_bypass) begin
        if (lk_hit && lk_set == f_set) begin
          // st already holds this set after the promotion
        end else begin
          for (int w = 0; w < int'(WAYS); w++) st[w] = ways[f_set][w];
        end
        // move the victim to the LRU rank first, keeping ranks a permutation
        r0 = st[victim].rank;
        for (int w = 0; w < int'(WAYS); w++)
          if (st[w].rank > r0) st[w].rank = st[w].rank - 1'b1;
        st[victim].rank  = WAY_W'(WAYS - 1);
        st[victim].valid = 1'b1;
        st[victim].tag   = f_tag;
        if (!fill_lru) begin
          for (int w = 0; w < int'(WAYS); w++)
            if (w != int'(victim)) st[w].rank = st[w].rank + 1'b1;
          st[victim].rank = '0;
        end
        for (int w = 0; w < int'(WAYS); w++) ways[f_set][w] <= st[w];
      end
    end
  end

endmodule
