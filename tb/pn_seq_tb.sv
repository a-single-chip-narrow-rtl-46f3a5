// pn_seq_tb: checks the PN generator against an independent shift-register
// model for 1000 steps, that it never reaches zero, that its period is
// 2^16 - 1, and that its low bit is balanced over a period.
`timescale 1ns/1ps
module pn_seq_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] rnd;

  pn_seq #(.SEED(16'h0001)) dut (.clk, .rst_n, .rnd);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m;
    int ones, period;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    #1;
    m = 16'h0001;
    check(rnd == m, "seed");
    ones = 0; period = 0;
    for (int i = 1; i <= 65535; i++) begin
      @(posedge clk);
      #1;
      // Galois step written bit by bit: shift right, taps 16, 14, 13, 11
      begin
        logic out;
        out = m[0];
        m = m >> 1;
        if (out) begin m[15] = 1'b1; m[13] = ~m[13]; m[12] = ~m[12]; m[10] = ~m[10]; end
      end
      if (i <= 1000) check(rnd == m, $sformatf("step %0d: %h vs %h", i, rnd, m));
      if (rnd == 0) check(0, "zero state");
      ones += rnd[0];
      if (rnd == 16'h0001 && period == 0) period = i;
    end
    check(period == 65535, $sformatf("period %0d", period));
    check(ones == 32768, $sformatf("ones %0d", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
