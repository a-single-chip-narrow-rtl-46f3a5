// addr_gen_sub_tb: checks the subsequent-stage address generator against the
// normal and reversed permutations of an eight-point FFT (alternating by
// block), and for an 8-bit address that odd blocks swap only the MSB and LSB.
`timescale 1ns/1ps
module addr_gen_sub_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic st = 0, r3, o3, r8, o8;
  logic [1:0] p3;
  logic [2:0] a0_3, a1_3;
  logic [6:0] p8;
  logic [7:0] a0_8, a1_8;
  addr_gen_sub #(.M(3)) u3 (.clk, .rst_n, .start(st), .running(r3), .pair_cnt(p3), .odd_blk(o3),
                            .addr0(a0_3), .addr1(a1_3));
  addr_gen_sub #(.M(8)) u8 (.clk, .rst_n, .start(st), .running(r8), .pair_cnt(p8), .odd_blk(o8),
                            .addr0(a0_8), .addr1(a1_8));

  int normal [8]   = '{0, 1, 2, 3, 4, 5, 6, 7};
  int reversed [8] = '{0, 4, 2, 6, 1, 5, 3, 7};

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    st <= 1;
    fork
      begin @(posedge clk); st <= 0; end
      for (int b = 0; b < 6; b++)
        for (int p = 0; p < 4; p++) begin
          #1;
          if (b % 2 == 0)
            check(a0_3 == 3'(normal[2*p]) && a1_3 == 3'(normal[2*p+1]), $sformatf("normal b%0d p%0d", b, p));
          else
            check(a0_3 == 3'(reversed[2*p]) && a1_3 == 3'(reversed[2*p+1]), $sformatf("reversed b%0d p%0d", b, p));
          @(posedge clk);
        end
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 128; c++) begin
          int e0, e1;
          #1;
          e0 = 2 * c; e1 = 2 * c + 1;
          if (b % 2 != 0) begin
            e0 = (e0 & 32'h7E) | ((e0 & 1) << 7) | (e0 >> 7);
            e1 = (e1 & 32'h7E) | ((e1 & 1) << 7) | (e1 >> 7);
          end
          check(a0_8 == 8'(e0) && a1_8 == 8'(e1), $sformatf("M=8 b%0d c%0d got %0d %0d", b, c, a0_8, a1_8));
          @(posedge clk);
        end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
