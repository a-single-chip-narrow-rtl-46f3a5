// overlap_select_tb: sends inverse-transform blocks in bit-reversed order
// (with a forward block in between, which must be ignored) and checks that the
// output is the middle half of each block, N/4 .. 3N/4-1, in natural order,
// the halves of successive blocks joined without gaps or repeats, and that
// values beyond 12 bits saturate.
`timescale 1ns/1ps
module overlap_select_tb;
  import fdis_pkg::*;
  localparam int unsigned LOG2N = 8;
  localparam int unsigned N = 1 << LOG2N;
  localparam int unsigned NB = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_sop = 0, out_valid, overrun;
  blk_tag_t in_tag = '0;
  cplx_t in0 = '0, in1 = '0;
  logic signed [IN_W-1:0] out_re, out_im;

  overlap_select #(.LOG2N(LOG2N)) dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (NB * N * 3) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // value of time sample n of block b
  function automatic int val(int b, int n, bit im);
    if (b == 3 && n == N / 2) return im ? -100000 : 100000;   // saturates
    return im ? -(b * 300 + n) : (b * 300 + n);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      for (int fwd = 0; fwd < 2; fwd++) begin
        for (int p = 0; p < N / 2; p++) begin
          int n0, n1;
          n0 = bitrev(2 * p, LOG2N); n1 = bitrev(2 * p + 1, LOG2N);
          in_sop <= (p == 0);
          in_tag <= '{valid: 1'b1, inv: fwd == 0, scale: fwd == 0};
          in0.re <= (fwd != 0) ? DATA_W'(7777) : DATA_W'(val(b, n0, 0));
          in0.im <= (fwd != 0) ? DATA_W'(7777) : DATA_W'(val(b, n0, 1));
          in1.re <= (fwd != 0) ? DATA_W'(7777) : DATA_W'(val(b, n1, 0));
          in1.im <= (fwd != 0) ? DATA_W'(7777) : DATA_W'(val(b, n1, 1));
          @(posedge clk);
        end
      end
    end
    in_sop <= 0; in_tag <= '0;
  end

  initial begin
    int cnt;
    cnt = 0;
    @(posedge rst_n);
    while (cnt < int'(NB * N / 2)) begin
      @(posedge clk);
      if (out_valid) begin
        int b, n, er, ei;
        b = cnt / (N / 2); n = N / 4 + cnt % (N / 2);
        er = val(b, n, 0); ei = val(b, n, 1);
        if (er > 2047) er = 2047;
        if (ei < -2048) ei = -2048;
        check(int'(out_re) == er && int'(out_im) == ei,
              $sformatf("output %0d: (%0d,%0d) vs (%0d,%0d)", cnt, out_re, out_im, er, ei));
        cnt++;
      end
    end
    repeat (N) @(posedge clk);
    check(!out_valid, "no extra output");
    check(!overrun, "overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
