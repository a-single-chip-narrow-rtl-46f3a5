// addr_gen_first_tb: checks the first-stage address generator against the
// three permutations of an eight-point FFT (rotation by 0, 1 and 2 bits), and
// that they repeat after log2(N) blocks; then checks for N = 256 that every
// block's addresses are a permutation and that reading the previous block
// delivers the butterfly pairs (i, i + N/2) in order.
`timescale 1ns/1ps
module addr_gen_first_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // N = 8
  logic s8 = 0, run8, f8;
  logic [1:0] pc8;
  logic [2:0] a0_8, a1_8;
  addr_gen_first #(.LOG2N(3)) u8 (.clk, .rst_n, .start(s8), .running(run8), .pair_cnt(pc8),
                                  .blk_first(f8), .addr0(a0_8), .addr1(a1_8));
  // N = 256
  logic s256 = 0, run256, f256;
  logic [6:0] pc256;
  logic [7:0] a0_256, a1_256;
  addr_gen_first #(.LOG2N(8)) u256 (.clk, .rst_n, .start(s256), .running(run256),
                                    .pair_cnt(pc256), .blk_first(f256), .addr0(a0_256), .addr1(a1_256));

  int perm [3][8] = '{'{0, 1, 2, 3, 4, 5, 6, 7}, '{0, 4, 1, 5, 2, 6, 3, 7}, '{0, 2, 4, 6, 1, 3, 5, 7}};

  initial begin
    int lbl [256];      // which element of the previous block each word holds
    bit seen [256];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(!run8, "idle before start");
    s8 <= 1; s256 <= 1;
    // N = 8: blocks 0..5 run in parallel with the first N = 256 blocks
    fork
      begin @(posedge clk); s8 <= 0; s256 <= 0; end
      for (int b = 0; b < 6; b++)
        for (int p = 0; p < 4; p++) begin
          #1;
          check(f8 == (p == 0), "blk_first");
          check(a0_8 == 3'(perm[b % 3][2*p]) && a1_8 == 3'(perm[b % 3][2*p+1]),
                $sformatf("N=8 block %0d pair %0d: %0d %0d", b, p, a0_8, a1_8));
          @(posedge clk);
        end
      for (int b = 0; b < 10; b++) begin
        foreach (seen[i]) seen[i] = 0;
        for (int p = 0; p < 128; p++) begin
          #1;
          if (b > 0) begin
            check(lbl[a0_256] == p && lbl[a1_256] == p + 128,
                  $sformatf("N=256 block %0d pair %0d reads %0d,%0d", b, p, lbl[a0_256], lbl[a1_256]));
          end
          check(!seen[a0_256] && !seen[a1_256], "address repeated within a block");
          seen[a0_256] = 1; seen[a1_256] = 1;
          lbl[a0_256] = 2 * p; lbl[a1_256] = 2 * p + 1;
          @(posedge clk);
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
