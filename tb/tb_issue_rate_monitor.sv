// tb_issue_rate_monitor: self-checking test of the issue-rate monitor.
//
// Drives a sequence of windows whose average issue rate is chosen per window
// (below 3, exactly 3, between 3 and 4, exactly 4, above 4, random), keeps a
// cycle-accurate count of its own, and checks both flags every cycle: they must
// change only on the clock edge that ends a window and then reflect
// sum < 4*W and sum < 3*W for that window.
module tb_issue_rate_monitor;
  import lcp_pkg::*;

  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic [2:0] issued = 0;
  logic pred_en, stq_all;
  int checks = 0, failures = 0;

  issue_rate_monitor #(.WINDOW(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int sum = 0, cyc = 0, n_p_low = 0, n_s_low = 0, n_p_hi = 0, n_s_hi = 0;
  logic exp_p = 1, exp_s = 1;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int win = 0; win < 80; win++) begin
      int target;
      case (win % 8)
        0: target = 2 * W;
        1: target = 3 * W;
        2: target = 3 * W - 1;
        3: target = 4 * W;
        4: target = 4 * W - 1;
        5: target = 6 * W;
        default: target = $urandom_range(0, 6 * W);
      endcase
      for (int c = 0; c < W; c++) begin
        int left, v;
        left = target - sum;
        v = (c == W - 1) ? left : $urandom_range(0, 6);
        if (v > left) v = left;
        if (left - v > 6 * (W - 1 - c)) v = 6;
        issued = 3'(v);
        sum += v;
        @(posedge clk);
        if (c == W - 1) begin
          exp_p = sum < 4 * W;
          exp_s = sum < 3 * W;
          sum = 0;
        end
        @(negedge clk);
        chk(pred_en == exp_p, $sformatf("win %0d cyc %0d pred_en", win, c));
        chk(stq_all == exp_s, $sformatf("win %0d cyc %0d stq_all", win, c));
      end
      if (exp_p) n_p_low++; else n_p_hi++;
      if (exp_s) n_s_low++; else n_s_hi++;
    end
    chk(n_p_low > 0 && n_p_hi > 0 && n_s_low > 0 && n_s_hi > 0, "both flag values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
