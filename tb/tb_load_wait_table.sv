// tb_load_wait_table: self-checking test of the load-wait dependence predictor.
//
// Checks: empty after reset; a violation sets the bit for that PC and for PCs
// aliasing to it (64 entries, low PC bits), but not for others; a disabled read
// port (a non-critical load) always sees "no wait"; the periodic clear empties
// the table exactly CLEAR_INTERVAL cycles after reset and then again every
// interval.
module tb_load_wait_table;
  import lcp_pkg::*;
  localparam int CI = 64;
  logic clk = 0, rst_n = 0;
  logic rd_en [ALLOC_W];
  logic [PC_W-1:0] rd_pc [ALLOC_W];
  logic rd_wait [ALLOC_W];
  logic set_v = 0; logic [PC_W-1:0] set_pc = 0;
  int checks = 0, failures = 0;
  int cyc = 0;

  load_wait_table #(.CLEAR_INTERVAL(CI)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;
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

  initial begin
    for (int r = 0; r < ALLOC_W; r++) begin rd_en[r] = 1; rd_pc[r] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 64; p++) begin rd_pc[0] = PC_W'(p); #1 chk(!rd_wait[0], "empty after reset"); end
    set_v = 1; set_pc = 32'h0000_1234; @(negedge clk); set_v = 0;
    rd_pc[0] = 32'h1234; rd_pc[1] = 32'h1234 + 64; rd_pc[2] = 32'h1235; rd_pc[3] = 32'h1234;
    rd_en[3] = 0;
    #1;
    chk(rd_wait[0], "violating PC now predicted to wait");
    chk(rd_wait[1], "aliasing PC shares the bit");
    chk(!rd_wait[2], "other PC unaffected");
    chk(!rd_wait[3], "disabled port sees no wait");
    // wait for the periodic clear: it happens on the edge that ends cycle CI-1
    while (cyc < CI - 1) begin
      @(negedge clk);
      chk(rd_wait[0], $sformatf("bit held at cycle %0d", cyc));
    end
    @(negedge clk);
    chk(!rd_wait[0], "cleared after CLEAR_INTERVAL cycles");
    // set again, and the next clear comes one interval later
    set_v = 1; @(negedge clk); set_v = 0;
    while (cyc < 2 * CI - 1) begin
      @(negedge clk);
      chk(rd_wait[0], "held in second interval");
    end
    @(negedge clk);
    chk(!rd_wait[0], "cleared again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
