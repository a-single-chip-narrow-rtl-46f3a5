// overlap_window_tb: streams a known input at one sample per two clocks and
// reads every block as soon as it is ready. Checks that block m holds samples
// m*N/2 .. m*N/2+N-1 (50 % overlap), each multiplied by the Blackman-Harris
// coefficient of its position (computed here from the formula, within one
// LSB), that the paths alternate, that data follow `start` by two clocks, and
// that `rdy` does not rise before a block's last sample is in.
`timescale 1ns/1ps
module overlap_window_tb;
  import fdis_pkg::*;
  localparam int unsigned LOG2N = 8;
  localparam int unsigned N = 1 << LOG2N;
  localparam int unsigned NS = 6 * N;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, rdy, start = 0, out_valid, out_sop, out_path, overrun;
  logic signed [IN_W-1:0] in_re = '0, in_im = '0;
  cplx_t out0, out1;

  overlap_window #(.LOG2N(LOG2N)) dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (4 * NS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [NS], xi [NS];
  int nin = 0;

  function automatic int expv(int x, int n);
    real w, v;
    w = 0.35875 - 0.48829 * $cos(2.0 * 3.14159265358979 * n / N)
        + 0.14128 * $cos(4.0 * 3.14159265358979 * n / N)
        - 0.01168 * $cos(6.0 * 3.14159265358979 * n / N);
    v = real'(x) * w;
    return $rtoi($floor(v + 0.5));
  endfunction

  initial begin
    for (int g = 0; g < NS; g++) begin
      xr[g] = int'($urandom_range(0, 4095)) - 2048;
      xi[g] = int'($urandom_range(0, 4095)) - 2048;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int g = 0; g < NS; g++) begin
      in_valid <= 1; in_re <= IN_W'(xr[g]); in_im <= IN_W'(xi[g]);
      @(posedge clk);
      nin++;
      in_valid <= 0;
      @(posedge clk);
    end
  end

  initial begin
    int nblk;
    nblk = (NS - N) / (N / 2) + 1;
    @(posedge rst_n);
    for (int m = 0; m < nblk; m++) begin
      @(posedge clk iff rdy);
      check(nin >= m * int'(N) / 2 + int'(N), $sformatf("block %0d ready after %0d samples", m, nin));
      start <= 1;
      @(posedge clk);
      start <= 0;
      @(posedge clk);
      for (int p = 0; p < N / 2; p++) begin
        #1;
        check(out_valid && out_sop == (p == 0) && out_path == 1'(m % 2), "framing");
        for (int h = 0; h < 2; h++) begin
          int n, g, er, ei;
          cplx_t o;
          n = 2 * p + h; g = m * N / 2 + n; o = (h != 0) ? out1 : out0;
          er = expv(xr[g], n); ei = expv(xi[g], n);
          check(int'(o.re) - er <= 1 && er - int'(o.re) <= 1 && int'(o.im) - ei <= 1 && ei - int'(o.im) <= 1,
                $sformatf("block %0d n %0d: (%0d,%0d) vs (%0d,%0d)", m, n, o.re, o.im, er, ei));
        end
        @(posedge clk);
      end
    end
    check(!overrun, "overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
