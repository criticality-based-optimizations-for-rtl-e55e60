// issue_rate_monitor: detects periods of low processor throughput.
//
// Adds up the number of micro-ops issued each cycle over a window of WINDOW
// cycles. At the end of each window the average issue rate is compared with two
// targets: below RATE_PRED (4 per cycle) the criticality predictor tracks
// consumers and trains its table (`pred_en`); below RATE_STQ (3 per cycle)
// every load, critical or not, may search the store queue (`stq_all`). The
// comparison is done without division: sum < target * WINDOW. Both flags are
// registered and hold for the whole next window. The window length is this
// design's choice; the flags come out of reset set, i.e. the processor is
// assumed slow until a window has been measured.
module issue_rate_monitor
  import lcp_pkg::*;
#(
  parameter int unsigned WINDOW    = 128,
  parameter int unsigned PEAK      = ISSUE_W,
  parameter int unsigned TGT_PRED  = RATE_PRED,
  parameter int unsigned TGT_STQ   = RATE_STQ
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(PEAK+1)-1:0]   issued,
  output logic                        pred_en,
  output logic                        stq_all
);

  localparam int unsigned SUM_W = $clog2(PEAK * WINDOW + 1);
  localparam int unsigned CYC_W = $clog2(WINDOW);

  logic [SUM_W-1:0] sum;
  logic [CYC_W-1:0] cyc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum     <= '0;
      cyc     <= '0;
      pred_en <= 1'b1;
      stq_all <= 1'b1;
    end else begin
      if (32'(cyc) == WINDOW - 1) begin
        logic [SUM_W-1:0] total;
        total   = sum + SUM_W'(issued);
        pred_en <= 32'(total) < TGT_PRED * WINDOW;
        stq_all <= 32'(total) < TGT_STQ * WINDOW;
        sum     <= '0;
        cyc     <= '0;
      end else begin
        sum <= sum + SUM_W'(issued);
        cyc <= cyc + 1'b1;
      end
    end
  end

endmodule
