// crit_select: oldest-first select logic extended with a criticality bit.
//
// Each of N candidates bids with `req` and carries an age timestamp (smaller is
// older) and a priority bit that is 0 for critical and 1 for non-critical
// instructions. The priority bit is placed above the timestamp, so the grant
// goes to the bidder with the smallest {prio, age}: the oldest critical bidder
// if there is one, otherwise the oldest bidder. With every prio bit at 0 this is
// the plain oldest-first select. Ties (equal keys) go to the lower index.
// Purely combinational.
module crit_select #(
  parameter int unsigned N     = 8,
  parameter int unsigned AGE_W = 3
) (
  input  logic [N-1:0]             req,
  input  logic [N-1:0]             prio,
  input  logic [AGE_W-1:0]         age [N],
  output logic                     gnt_v,
  output logic [$clog2(N)-1:0]     gnt_idx,
  output logic [N-1:0]             gnt
);

  logic [AGE_W:0] best;

  always_comb begin
    gnt_v   = 1'b0;
    gnt_idx = '0;
    best    = '1;
    for (int i = 0; i < int'(N); i++) begin
      if (req[i] && (!gnt_v || {prio[i], age[i]} < best)) begin
        gnt_v   = 1'b1;
        gnt_idx = $clog2(N)'(i);
        best    = {prio[i], age[i]};
      end
    end
    gnt = '0;
    if (gnt_v) gnt[gnt_idx] = 1'b1;
  end

endmodule
