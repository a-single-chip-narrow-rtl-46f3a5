// threshold_sel_tb: checks the selection of N from the four sigma levels and
// the threshold mu + N*sigma on edge cases (sigma equal to a level, below all,
// above all) and on random values.
`timescale 1ns/1ps
module threshold_sel_tb;
  import fdis_pkg::*;
  int checks = 0, failures = 0;
  logic [DB_W-1:0] mu, sigma;
  logic [NLEV-1:0][DB_W-1:0] sigma_lvl;
  logic [NSEL-1:0][NV_W-1:0] n_val;
  logic [2:0] n_sel;
  logic [DB_W+NV_W-NV_F:0] thr;

  threshold_sel dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int lv [4] = '{192, 320, 512, 768};
    automatic int nv [5] = '{32, 24, 16, 8, 4};      // 2, 1.5, 1, 0.5, 0.25
    for (int i = 0; i < 4; i++) sigma_lvl[i] = DB_W'(lv[i]);
    for (int i = 0; i < 5; i++) n_val[i] = NV_W'(nv[i]);
    mu = 2000;
    sigma = 100; #1; check(n_sel == 0 && thr == 2200, $sformatf("low sigma: %0d %0d", n_sel, thr));
    sigma = 192; #1; check(n_sel == 0, "equal to level 0 does not exceed it");
    sigma = 193; #1; check(n_sel == 1 && thr == 2000 + 193 * 24 / 16, "just above level 0");
    sigma = 600; #1; check(n_sel == 3 && thr == 2300, $sformatf("level 2..3: %0d %0d", n_sel, thr));
    sigma = 1000; #1; check(n_sel == 4 && thr == 2250, "above all levels: N = 1/4");
    for (int i = 0; i < 3000; i++) begin
      int cnt, e;
      mu = DB_W'($urandom); sigma = DB_W'($urandom_range(0, 1200));
      for (int j = 0; j < 5; j++) n_val[j] = NV_W'($urandom);
      #1;
      cnt = 0;
      for (int j = 0; j < 4; j++) if (int'(sigma) > lv[j]) cnt++;
      e = int'(mu) + (int'(sigma) * int'(n_val[cnt])) / 16;
      check(int'(n_sel) == cnt && int'(thr) == e, $sformatf("random %0d: %0d %0d vs %0d %0d", i, n_sel, thr, cnt, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
