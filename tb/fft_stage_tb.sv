// fft_stage_tb: checks single FFT stages of an eight-point transform against
// the butterfly equations of the eight-point flow graph.
//   stage 0: input in natural order, output pairs
//            (x[i] + x[i+4], (x[i] - x[i+4]) W8^i), i = 0..3, one block later
//   stage 1: input in stage 0's output order x'0, x'4, x'1, x'5, ...,
//            output pairs (x'0 + x'2, (x'0 - x'2) W8^0), (x'1 + x'3, .. W8^2),
//            (x'4 + x'6, .. W8^0), (x'5 + x'7, .. W8^2)
// Blocks alternate forward (unscaled) and inverse (scaled, conjugate weights)
// to check that the tag travels with its block. Then the two test
// multiplexers are checked: RAM bypass (butterfly of the incoming pair) and
// RAM plus butterfly bypass (one-register delay). Tolerance 2.5 LSB (weight
// quantization and dithered rounding).
`timescale 1ns/1ps
module fft_stage_tb;
  import fdis_pkg::*;
  localparam int unsigned LOG2N = 3;
  localparam int unsigned N = 8;
  localparam int unsigned NB = 6;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic byp_ram = 0, byp_bfly = 0;
  logic in_sop = 0, o0_sop, o1_sop;
  blk_tag_t in_tag = '0, o0_tag, o1_tag;
  cplx_t in0 = '0, in1 = '0, o0_0, o0_1, o1_0, o1_1;

  fft_stage #(.LOG2N(LOG2N), .STAGE(0)) s0 (.clk, .rst_n, .byp_ram, .byp_bfly,
    .in_sop, .in_tag, .in0, .in1, .out_sop(o0_sop), .out_tag(o0_tag), .out0(o0_0), .out1(o0_1));
  fft_stage #(.LOG2N(LOG2N), .STAGE(1)) s1 (.clk, .rst_n, .byp_ram, .byp_bfly,
    .in_sop, .in_tag, .in0, .in1, .out_sop(o1_sop), .out_tag(o1_tag), .out0(o1_0), .out1(o1_1));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream values: v[b][j] is the j-th value entering in block b
  int vr [NB][N], vi [NB][N];

  function automatic bit near(logic signed [DATA_W-1:0] got, real e);
    return real'(got) - e <= 2.5 && e - real'(got) <= 2.5;
  endfunction

  // expected butterfly on elements (ea, eb) with weight exponent k
  task automatic exp_bf(int b, int ia, int ib, int k, output real y0r, y0i, y1r, y1i);
    real dr, di, c, s, sc;
    bit inv;
    inv = (b % 2 == 1);
    sc = inv ? 0.5 : 1.0;
    c = $cos(2.0 * PI * k / N);
    s = inv ? $sin(2.0 * PI * k / N) : -$sin(2.0 * PI * k / N);
    y0r = sc * (vr[b][ia] + vr[b][ib]);
    y0i = sc * (vi[b][ia] + vi[b][ib]);
    dr = vr[b][ia] - vr[b][ib];
    di = vi[b][ia] - vi[b][ib];
    y1r = sc * (dr * c - di * s);
    y1i = sc * (dr * s + di * c);
  endtask

  initial begin
    for (int b = 0; b < NB; b++)
      for (int j = 0; j < N; j++) begin
        vr[b][j] = int'($urandom_range(0, 60000)) - 30000;
        vi[b][j] = int'($urandom_range(0, 60000)) - 30000;
      end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < NB + 1; b++)
      for (int p = 0; p < N / 2; p++) begin
        in_sop <= (p == 0);
        in_tag <= (b < NB) ? '{valid: 1'b1, inv: b % 2 == 1, scale: b % 2 == 1} : '0;
        in0.re <= (b < NB) ? DATA_W'(vr[b][2*p]) : '0;   in0.im <= (b < NB) ? DATA_W'(vi[b][2*p]) : '0;
        in1.re <= (b < NB) ? DATA_W'(vr[b][2*p+1]) : '0; in1.im <= (b < NB) ? DATA_W'(vi[b][2*p+1]) : '0;
        @(posedge clk);
      end
  end

  // stage 0 elements in stream position: x[j] = v[j]; stage 1 stream holds
  // x'0, x'4, x'1, x'5, x'2, x'6, x'3, x'7 so x'[e] sits at position pos1[e]
  int pos1 [8] = '{0, 2, 4, 6, 1, 3, 5, 7};
  int pa1 [4] = '{0, 1, 4, 5};
  int kk1 [4] = '{0, 2, 0, 2};

  initial begin
    int t_in;
    @(posedge rst_n);
    t_in = int'($time / 10) + 1;
    for (int b = 0; b < NB; b++) begin
      do begin @(posedge clk); #1; end while (!o0_sop);
      check(int'($time / 10) - t_in - b * 4 == int'(N / 2 + 1), $sformatf("stage 0 latency %0d", int'($time / 10) - t_in - b * 4));
      check(o0_tag.valid && o0_tag.inv == (b % 2 == 1), "stage 0 tag");
      check(o1_sop && o1_tag == o0_tag, "stage 1 sop and tag aligned with stage 0 (same block size)");
      for (int p = 0; p < 4; p++) begin
        real y0r, y0i, y1r, y1i;
        if (p > 0) #1;
        exp_bf(b, p, p + 4, p, y0r, y0i, y1r, y1i);
        check(near(o0_0.re, y0r) && near(o0_0.im, y0i) && near(o0_1.re, y1r) && near(o0_1.im, y1i),
              $sformatf("stage 0 block %0d pair %0d: %0d %0d %0d %0d vs %.1f %.1f %.1f %.1f",
                        b, p, o0_0.re, o0_0.im, o0_1.re, o0_1.im, y0r, y0i, y1r, y1i));
        exp_bf(b, pos1[pa1[p]], pos1[pa1[p] + 2], kk1[p], y0r, y0i, y1r, y1i);
        check(near(o1_0.re, y0r) && near(o1_0.im, y0i) && near(o1_1.re, y1r) && near(o1_1.im, y1i),
              $sformatf("stage 1 block %0d pair %0d", b, p));
        if (p < 3) @(posedge clk);
      end
    end
    // test multiplexers
    repeat (12) @(posedge clk);
    byp_ram <= 1;
    in_tag  <= '{valid: 1'b1, inv: 1'b0, scale: 1'b0};
    in0.re  <= 20'sd1000; in0.im <= 20'sd200; in1.re <= 20'sd300; in1.im <= -20'sd100;
    @(posedge clk);
    #1;
    check(o0_0.re == 1300 && o0_0.im == 100 && o0_1.re == 700 && o0_1.im == 300,
          "RAM bypass: butterfly of the incoming pair (W^0)");
    byp_bfly <= 1;
    in0.re   <= 20'sd11; in1.im <= 20'sd22;
    @(posedge clk);
    #1;
    check(o0_0.re == 11 && o0_1.im == 22 && o1_0.re == 11, "RAM and butterfly bypass: delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
