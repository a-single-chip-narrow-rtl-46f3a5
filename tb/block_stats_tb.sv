// block_stats_tb: feeds blocks of dB values (two per clock, 256 per block)
// back to back (40 blocks: constant, noise-like, with outliers, full-range
// and of growing spread) and checks the mean exactly, the standard deviation against
// the exact population value within the square-root approximation, and that
// the result arrives two clocks after the last pair.
`timescale 1ns/1ps
module block_stats_tb;
  import fdis_pkg::*;
  localparam int unsigned LOG2N = 8;
  localparam int unsigned N = 1 << LOG2N;
  localparam int NB = 40;   // blocks
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_first = 0, in_last = 0, done;
  logic [DB_W-1:0] l0 = '0, l1 = '0, mu, sigma;

  block_stats #(.LOG2N(LOG2N)) dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (NB * (N / 2 + 8) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int vals [NB][N];
  int t_last [NB];

  initial begin
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < N; i++)
        case (b)
          0: vals[b][i] = 2000;                                   // constant
          1: vals[b][i] = 1500 + int'($urandom_range(0, 400));    // noise floor
          2: vals[b][i] = (i % 64 == 5) ? 3500 : 1600 + int'($urandom_range(0, 200));
          3: vals[b][i] = int'($urandom_range(0, 4095));          // full range
          default: vals[b][i] = 1000 + b * 40 + int'($urandom_range(0, 20 * b));  // growing spread
        endcase
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      for (int p = 0; p < N / 2; p++) begin
        in_valid <= 1; in_first <= (p == 0); in_last <= (p == N / 2 - 1);
        l0 <= DB_W'(vals[b][2*p]); l1 <= DB_W'(vals[b][2*p+1]);
        @(posedge clk);
        if (p == N / 2 - 1) t_last[b] = int'($time / 10);
      end
      if (b == 2) begin   // a gap between blocks
        in_valid <= 0; in_first <= 0; in_last <= 0;
        repeat (5) @(posedge clk);
      end
    end
    in_valid <= 0; in_first <= 0; in_last <= 0;
  end

  initial begin
    @(posedge rst_n);
    for (int b = 0; b < NB; b++) begin
      real s, q, m, v, sd;
      @(posedge clk iff done);
      check(int'($time / 10) - t_last[b] == 2, $sformatf("latency %0d", int'($time / 10) - t_last[b]));
      s = 0; q = 0;
      for (int i = 0; i < N; i++) begin s += vals[b][i]; q += real'(vals[b][i]) * vals[b][i]; end
      m  = s / N;
      v  = q / N - m * m;
      sd = $sqrt(v);
      check(int'(mu) == int'($floor(m)), $sformatf("block %0d mean %0d vs %.2f", b, mu, m));
      check(real'(sigma) <= sd + 1.0 && real'(sigma) >= sd * 0.984 - 1.5,
            $sformatf("block %0d sigma %0d vs %.2f", b, sigma, sd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
