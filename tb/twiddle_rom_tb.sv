// twiddle_rom_tb: checks every forward and inverse weight of the 256-point
// ROM against cos and sin within one LSB, plus exact values at k = 0 and
// k = N/4.
`timescale 1ns/1ps
module twiddle_rom_tb;
  import fdis_pkg::*;
  localparam int unsigned LOG2N = 8;
  localparam int unsigned N = 1 << LOG2N;
  int checks = 0, failures = 0;
  logic inv;
  logic [LOG2N-2:0] k;
  logic signed [TW_W-1:0] w_re, w_im;

  twiddle_rom #(.LOG2N(LOG2N)) dut (.*);

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

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    for (int d = 0; d < 2; d++)
      for (int i = 0; i < N / 2; i++) begin
        real er, ei;
        inv = 1'(d); k = (LOG2N-1)'(i);
        #1;
        er = 16384.0 * $cos(2.0 * 3.14159265358979 * i / N);
        ei = ((d != 0) ? 16384.0 : -16384.0) * $sin(2.0 * 3.14159265358979 * i / N);
        check(absr(real'(w_re) - er) <= 1.0 && absr(real'(w_im) - ei) <= 1.0,
              $sformatf("inv %0d k %0d: %0d %0d", d, i, w_re, w_im));
      end
    inv = 0; k = 0; #1; check(w_re == 16384 && w_im == 0, "W^0");
    inv = 0; k = (LOG2N-1)'(N / 4); #1; check(w_re == 0 && w_im == -16384, "forward W^(N/4) = -j");
    inv = 1; #1; check(w_re == 0 && w_im == 16384, "inverse W^(N/4) = +j");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
