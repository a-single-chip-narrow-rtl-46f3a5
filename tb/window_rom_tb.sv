// window_rom_tb: checks all 256 window coefficients against the four-term
// Blackman-Harris formula within one LSB, the window's symmetry w(n) = w(N-n),
// its near-zero ends and its peak of almost 1.0 at n = N/2.
`timescale 1ns/1ps
module window_rom_tb;
  import fdis_pkg::*;
  localparam int unsigned LOG2N = 8;
  localparam int unsigned N = 1 << LOG2N;
  int checks = 0, failures = 0;
  logic [LOG2N-1:0] n0, n1;
  logic [WIN_W-1:0] w0, w1;

  window_rom #(.LOG2N(LOG2N)) dut (.*);

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
    for (int i = 0; i < N; i++) begin
      real x, e;
      n0 = LOG2N'(i); n1 = LOG2N'((N - i) % N);
      #1;
      x = 2.0 * 3.14159265358979 * i / N;
      e = 65536.0 * (0.35875 - 0.48829 * $cos(x) + 0.14128 * $cos(2 * x) - 0.01168 * $cos(3 * x));
      if (e > 65535.0) e = 65535.0;
      check(real'(w0) - e <= 1.0 && e - real'(w0) <= 1.0, $sformatf("w(%0d) = %0d, expected %.1f", i, w0, e));
      if (i != 0) check(w0 == w1, $sformatf("symmetry at %0d", i));
    end
    n0 = 0; n1 = LOG2N'(N / 2);
    #1;
    check(w0 < 16'd8, "ends near zero");
    check(w1 > 16'd65500, "peak near one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
