// addr_gen_sub: address generator of the FFT stages after the first.
//
// A base counter runs over the stage memory of 2^M words and a one-bit block
// counter toggles at every memory-sized block. On odd blocks the MSB and LSB of
// the counted address are swapped (the "reversed" permutation), on even ones
// the count is used as is ("normal"). Reading the previous block and writing the
// new one at the same addresses yields butterfly pairs whose elements differ in
// the stage's span. Stage s >= 1 of an N-point FFT uses M = log2(N)+1-s address
// bits (N words for the second stage, halving from the third on). Two
// addresses, one pair, per clock. Counting starts at the first `start` pulse.
module addr_gen_sub #(
  parameter int unsigned M = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           running,
  output logic [M-2:0]   pair_cnt,   // pair index within the memory-sized block
  output logic           odd_blk,    // block counter (1: reversed permutation)
  output logic [M-1:0]   addr0,
  output logic [M-1:0]   addr1
);
  logic [M-2:0] cnt;

  function automatic logic [M-1:0] swap_ends(logic [M-1:0] v);
    logic [M-1:0] r;
    r        = v;
    r[M-1]   = v[0];
    r[0]     = v[M-1];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      cnt     <= '0;
      odd_blk <= 1'b0;
    end else if (running | start) begin
      running <= 1'b1;
      cnt     <= cnt + 1'b1;
      if (&cnt) odd_blk <= ~odd_blk;
    end
  end

  assign pair_cnt = cnt;
  assign addr0    = odd_blk ? swap_ends({cnt, 1'b0}) : {cnt, 1'b0};
  assign addr1    = odd_blk ? swap_ends({cnt, 1'b1}) : {cnt, 1'b1};

  initial assert (M >= 2) else $error("addr_gen_sub: M must be at least 2");
endmodule
