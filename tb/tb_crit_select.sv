// tb_crit_select: self-checking test of the criticality-extended oldest-first
// select.
//
// First the eight-entry example: entries E,A,F,G,B,D,H,C with timestamps
// 100,000,101,110,001,011,111,010, ready A, D and H. Without criticality bits A
// (timestamp 000) wins; with D marked critical, D (extended 0011) wins over A
// (1000). Then random requests, priorities and distinct ages are checked
// against a search for the smallest {prio, age} written in the testbench.
module tb_crit_select;
  localparam int N = 8, AW = 3;
  logic [N-1:0]     req, prio, gnt;
  logic [AW-1:0]    age [N];
  logic             gnt_v;
  logic [2:0]       gnt_idx;
  int checks = 0, failures = 0;

  crit_select #(.N(N), .AGE_W(AW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    // rows: E A F G B D H C
    int ts [N] = '{4, 0, 5, 6, 1, 3, 7, 2};
    for (int i = 0; i < N; i++) age[i] = AW'(ts[i]);
    req = 8'b0110_0010;       // A (1), D (5), H (6)
    prio = '0;
    #1 chk(gnt_v && gnt_idx == 1 && gnt == 8'b0000_0010, "oldest ready (A) wins without criticality");
    prio = 8'b1011_1111;      // only B (4) and D (5) critical... B not ready
    prio[4] = 0; prio[5] = 0;
    prio = ~8'b0011_0000;
    #1 chk(gnt_v && gnt_idx == 5, "critical D wins over older non-critical A");
    req = '0;
    #1 chk(!gnt_v && gnt == '0, "no request, no grant");

    for (int t = 0; t < 5000; t++) begin
      int perm [N];
      int best, bk;
      for (int i = 0; i < N; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < N; i++) age[i] = AW'(perm[i]);
      req  = N'($urandom);
      prio = N'($urandom);
      best = -1; bk = 1 << 10;
      for (int i = 0; i < N; i++)
        if (req[i] && ((int'(prio[i]) << AW) + perm[i]) < bk) begin
          bk = (int'(prio[i]) << AW) + perm[i];
          best = i;
        end
      #1;
      chk(gnt_v == (best >= 0), "grant valid");
      if (best >= 0) chk(int'(gnt_idx) == best && gnt == N'(1 << best), $sformatf("t %0d grant %0d expected %0d", t, gnt_idx, best));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
