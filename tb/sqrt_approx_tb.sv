// sqrt_approx_tb: checks the approximate square root on exact powers of four,
// on small values, and on random 24-bit values against sqrt() within the
// 1.5 % error of the straight-line mantissa approximation.
`timescale 1ns/1ps
module sqrt_approx_tb;
  int checks = 0, failures = 0;
  logic [23:0] y;
  logic [11:0] r;

  sqrt_approx #(.YW(24), .RW(12)) dut (.*);

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
    y = 0; #1; check(r == 0, "zero");
    for (int p = 0; p < 12; p++) begin
      y = 24'(1) << (2 * p); #1;
      check(r == 12'(1 << p), $sformatf("4^%0d -> %0d", p, r));
    end
    for (int i = 0; i < 5000; i++) begin
      real t;
      y = 24'($urandom) >> ($urandom % 24);
      #1;
      t = $sqrt(real'(y));
      check(real'(r) <= t + 0.001 && real'(r) >= t * 0.984 - 1.0,
            $sformatf("sqrt(%0d) = %0d, true %.2f", y, r, t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
