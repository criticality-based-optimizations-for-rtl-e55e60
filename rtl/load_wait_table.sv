// load_wait_table: a PC-indexed memory-dependence predictor of one bit per entry.
//
// A set bit predicts that the load will collide with an older store whose
// address is still unknown, so the load must wait until all older store
// addresses are resolved. A bit is set when a load of that PC is caught issuing
// before a conflicting older store (an ordering violation). All bits are cleared
// every CLEAR_INTERVAL cycles so that stale predictions age out (the periodic
// clear is this design's choice, in the style of the load-wait table it
// follows). Only loads predicted critical read and train the table: callers
// qualify `rd_en` and `set_v` with the load's criticality, which is what lets
// the table shrink from 1024 to 64 entries. Reads are combinational; a bit read
// by a disabled port returns 0.
module load_wait_table
  import lcp_pkg::*;
#(
  parameter int unsigned ENTRIES        = 64,
  parameter int unsigned N_RD           = ALLOC_W,
  parameter int unsigned CLEAR_INTERVAL = 16384
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_en   [N_RD],
  input  logic [PC_W-1:0]  rd_pc   [N_RD],
  output logic             rd_wait [N_RD],
  input  logic             set_v,
  input  logic [PC_W-1:0]  set_pc
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic [ENTRIES-1:0]                bits;
  logic [$clog2(CLEAR_INTERVAL)-1:0] timer;

  always_comb
    for (int r = 0; r < int'(N_RD); r++)
      rd_wait[r] = rd_en[r] && bits[rd_pc[r][IDX_W-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits  <= '0;
      timer <= '0;
    end else begin
      timer <= timer + 1'b1;
      if (32'(timer) == CLEAR_INTERVAL - 1) begin
        bits  <= '0;
        timer <= '0;
      end else if (set_v) begin
        bits[set_pc[IDX_W-1:0]] <= 1'b1;
      end
    end
  end

endmodule
