// log_mag_tb: checks the approximate 10*log10|X| on exact powers of two (no
// approximation error), on zero, and on random complex values against the
// true value within the combined error of the magnitude and log
// approximations (at most 0.54 dB low, 0.26 dB from the log and 0.05 dB truncation).
`timescale 1ns/1ps
module log_mag_tb;
  import fdis_pkg::*;
  int checks = 0, failures = 0;
  cplx_t x;
  logic [DB_W-1:0] db;

  log_mag dut (.*);

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
    x = '0; #1; check(db == 0, "zero");
    for (int p = 0; p < 19; p++) begin
      x.re = DATA_W'(1 << p); x.im = 0; #1;
      check(db == DB_W'(3 * p * 64), $sformatf("2^%0d: %0d", p, db));
      x.re = 0; x.im = -DATA_W'(1 << p); #1;
      check(db == DB_W'(3 * p * 64), $sformatf("-j 2^%0d: %0d", p, db));
    end
    for (int i = 0; i < 5000; i++) begin
      real m, t, g;
      x.re = $signed(DATA_W'($urandom)) >>> ($urandom % 16);
      x.im = $signed(DATA_W'($urandom)) >>> ($urandom % 16);
      #1;
      m = $sqrt(real'(x.re) * real'(x.re) + real'(x.im) * real'(x.im));
      if (m < 1.0) continue;
      t = 10.0 * $log10(m);
      g = real'(db) / 64.0;
      check(g - t < 0.3 && t - g < 0.95, $sformatf("(%0d,%0d): %.2f dB vs %.2f", x.re, x.im, g, t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
