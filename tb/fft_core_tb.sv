// fft_core_tb: self-checking test of the pipelined FFT core.
//
// Two cores are tested side by side: the full 256-point core and the
// eight-point core of the worked example (LOG2N = 3), whose address sequences
// the stage tests follow table by table. Each is fed blocks back to back:
// forward blocks of random 12-bit data, inverse (scaled) blocks of random
// spectra and idle blocks, in a mixed order so that adjacent stages work in
// opposite directions. Every valid output block is compared with a
// double-precision DFT (bins in bit-reversed order) within a rounding
// tolerance; the output tags and the exact latency are checked too.
`timescale 1ns/1ps
module fft_core_tb;
  import fdis_pkg::*;
  localparam int unsigned NBLK = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // watchdog
  initial begin
    repeat ((NBLK + 8) * 256) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
  end

  logic [1:0] done_v;

  for (genvar g = 0; g < 2; g++) begin : g_size
    localparam int unsigned LOG2N = (g == 0) ? 8 : 3;
    localparam int unsigned N     = 1 << LOG2N;
    localparam int unsigned LAT   = N + (N / 2 - 2) + LOG2N;   // N/2+N/2+(N/4+..+2)+regs

    logic     in_sop, out_sop;
    blk_tag_t in_tag, out_tag;
    cplx_t    in0, in1, out0, out1;
    logic     done = 0;

    fft_core #(.LOG2N(LOG2N)) dut (
      .clk, .rst_n, .byp_ram('0), .byp_bfly('0),
      .in_sop, .in_tag, .in0, .in1, .out_sop, .out_tag, .out0, .out1);

    real xr [NBLK][N], xi [NBLK][N];
    blk_tag_t tags [NBLK];
    int unsigned sop_in_time [NBLK];

    assign done_v[g] = done;

    // stimulus
    initial begin
      for (int b = 0; b < NBLK; b++) begin
        tags[b].valid = (b != 3);
        tags[b].inv   = (b % 2 == 1) || (b == 6);
        tags[b].scale = tags[b].inv;
        for (int n = 0; n < N; n++) begin
          if (tags[b].inv) begin
            xr[b][n] = real'($signed($urandom_range(0, 1 << 19) - (1 << 18)));
            xi[b][n] = real'($signed($urandom_range(0, 1 << 19) - (1 << 18)));
          end else begin
            xr[b][n] = real'($signed($urandom_range(0, 4095) - 2048));
            xi[b][n] = real'($signed($urandom_range(0, 4095) - 2048));
          end
        end
      end
      in_sop = 0; in_tag = '0; in0 = '0; in1 = '0;
      @(posedge rst_n);
      @(posedge clk);
      for (int b = 0; b < NBLK + 4; b++) begin
        for (int p = 0; p < N / 2; p++) begin
          int bb;
          bb = (b < NBLK) ? b : 3;
          in_sop <= (p == 0);
          in_tag <= (b < NBLK) ? tags[b] : '0;
          in0.re <= DATA_W'($rtoi(xr[bb][2*p]));   in0.im <= DATA_W'($rtoi(xi[bb][2*p]));
          in1.re <= DATA_W'($rtoi(xr[bb][2*p+1])); in1.im <= DATA_W'($rtoi(xi[bb][2*p+1]));
          if (p == 0 && b < NBLK) sop_in_time[b] = int'($time / 10);
          @(posedge clk);
        end
      end
    end

    // checker
    initial begin
      automatic int ob = 0;
      int unsigned t_sop;
      @(posedge rst_n);
      while (ob < NBLK) begin
        @(posedge clk);
        if (out_sop) begin
          t_sop = int'($time / 10);
          check(out_tag == tags[ob], $sformatf("tag of block %0d", ob));
          check(t_sop - sop_in_time[ob] == LAT + 1,
                $sformatf("latency of block %0d: %0d", ob, t_sop - sop_in_time[ob]));
          for (int p = 0; p < N / 2; p++) begin
            for (int h = 0; h < 2; h++) begin
              int unsigned k;
              real er, ei, ang, sgn, tol;
              cplx_t got;
              got = (h != 0) ? out1 : out0;
              k = bitrev(2 * p + h, LOG2N);
              er = 0; ei = 0;
              sgn = tags[ob].inv ? 1.0 : -1.0;
              for (int n = 0; n < N; n++) begin
                ang = sgn * 2.0 * 3.14159265358979 * real'((k * n) % N) / real'(N);
                er += xr[ob][n] * $cos(ang) - xi[ob][n] * $sin(ang);
                ei += xr[ob][n] * $sin(ang) + xi[ob][n] * $cos(ang);
              end
              if (tags[ob].inv) begin er /= real'(N); ei /= real'(N); end
              tol = tags[ob].inv ? 8.0 : 40.0;
              if (tags[ob].valid) begin
                check((real'(got.re) - er) < tol && (er - real'(got.re)) < tol &&
                      (real'(got.im) - ei) < tol && (ei - real'(got.im)) < tol,
                      $sformatf("blk %0d bin %0d got (%0d,%0d) exp (%.1f,%.1f)",
                                ob, k, got.re, got.im, er, ei));
              end
            end
            if (p != N / 2 - 1) @(posedge clk);
            if (p != N / 2 - 1) check(!out_sop, "sop inside block");
          end
          ob++;
        end
      end
      done = 1;
    end
  end

  initial begin
    wait (&done_v);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
