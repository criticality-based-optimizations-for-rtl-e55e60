// tb_agu_steer: self-checking test of the shared store AGU.
//
// Random requests with the hijack option on and off. Checked: the load AGU
// always serves the first load; the store AGU serves a waiting store first and
// otherwise, only with the option on, the second load; every computed address
// is base + displacement and reaches the right queue and entry.
module tb_agu_steer;
  import lcp_pkg::*;
  localparam int LW = $clog2(LDQ_ENTRIES);
  logic fsla;
  logic ld_v [2]; logic [LW-1:0] ld_idx [2]; logic [ADDR_W-1:0] ld_base [2], ld_disp [2];
  logic st_v; logic [STQ_IDX_W-1:0] st_idx; logic [ADDR_W-1:0] st_base, st_disp;
  logic ld_gnt [2]; logic st_gnt;
  logic ldq_wr_v [2]; logic [LW-1:0] ldq_wr_idx [2]; logic [ADDR_W-1:0] ldq_wr_addr [2];
  logic stq_wr_v; logic [STQ_IDX_W-1:0] stq_wr_idx; logic [ADDR_W-1:0] stq_wr_addr;
  int checks = 0, failures = 0, n_hijack = 0;

  agu_steer dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 4000; t++) begin
      logic exp_h;
      fsla = 1'($urandom_range(0, 1));
      for (int i = 0; i < 2; i++) begin
        ld_v[i] = 1'($urandom_range(0, 1)); ld_idx[i] = LW'($urandom);
        ld_base[i] = $urandom; ld_disp[i] = $urandom;
      end
      st_v = 1'($urandom_range(0, 1)); st_idx = STQ_IDX_W'($urandom_range(0, STQ_ENTRIES - 1));
      st_base = $urandom; st_disp = $urandom;
      #1;
      exp_h = fsla && !st_v && ld_v[1];
      if (exp_h) n_hijack++;
      chk(ld_gnt[0] == ld_v[0] && ldq_wr_v[0] == ld_v[0], "load AGU serves load 0");
      if (ld_v[0]) chk(ldq_wr_idx[0] == ld_idx[0] && ldq_wr_addr[0] == ld_base[0] + ld_disp[0], "load 0 address");
      chk(st_gnt == st_v && stq_wr_v == st_v, "store AGU serves the store first");
      if (st_v) chk(stq_wr_idx == st_idx && stq_wr_addr == st_base + st_disp, "store address");
      chk(ld_gnt[1] == exp_h && ldq_wr_v[1] == exp_h, "second load only through the idle store AGU when enabled");
      if (exp_h) chk(ldq_wr_idx[1] == ld_idx[1] && ldq_wr_addr[1] == ld_base[1] + ld_disp[1], "load 1 address");
    end
    chk(n_hijack > 100, "store AGU computed load addresses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
