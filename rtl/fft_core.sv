// fft_core: N-point pipelined radix-2 DIF FFT, log2(N) cascaded stages.
//
// Input: one pair of complex samples per clock, in natural order, block after
// block without gaps; `in_sop` marks the first pair of each block and `in_tag`
// says whether the block is valid, forward or inverse, and scaled. Input words
// are IN_W bits and are sign-extended to the DATA_W-bit internal precision.
// Output: the same pair stream, bins in bit-reversed order (position p holds
// bin bitrev(p)), with the tag and sop delayed along with the data. A forward
// block is unscaled (the word grows up to one bit per stage); an inverse block
// with `scale` set is divided by two in each stage, i.e. by N overall.
// Latency: N/2 + N/2 + (N/4 + ... + 2) clocks of buffering plus one register
// per stage (390 clocks for N = 256). One pair per clock sustained, so a 20 MHz
// clock gives 40 M complex samples per second.
// The stage structure and control propagation follow the design; the pair
// interface and the test-bypass vectors are this design's interface choices.
module fft_core
  import fdis_pkg::*;
#(
  parameter int unsigned LOG2N = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [LOG2N-1:0]   byp_ram,    // per-stage RAM bypass (test)
  input  logic [LOG2N-1:0]   byp_bfly,   // per-stage butterfly bypass (test)
  input  logic               in_sop,
  input  blk_tag_t           in_tag,
  input  cplx_t              in0,
  input  cplx_t              in1,
  output logic               out_sop,
  output blk_tag_t           out_tag,
  output cplx_t              out0,
  output cplx_t              out1
);
  logic     sop [LOG2N+1];
  blk_tag_t tag [LOG2N+1];
  cplx_t    d0  [LOG2N+1];
  cplx_t    d1  [LOG2N+1];

  assign sop[0] = in_sop;
  assign tag[0] = in_tag;
  assign d0[0]  = in0;
  assign d1[0]  = in1;

  for (genvar s = 0; s < LOG2N; s++) begin : g_stage
    fft_stage #(
      .LOG2N(LOG2N), .STAGE(s), .SEED(16'hACE1 ^ 16'(s * 16'h1357))
    ) u_stage (
      .clk, .rst_n,
      .byp_ram(byp_ram[s]), .byp_bfly(byp_bfly[s]),
      .in_sop(sop[s]), .in_tag(tag[s]), .in0(d0[s]), .in1(d1[s]),
      .out_sop(sop[s+1]), .out_tag(tag[s+1]), .out0(d0[s+1]), .out1(d1[s+1]));
  end

  assign out_sop = sop[LOG2N];
  assign out_tag = tag[LOG2N];
  assign out0    = d0[LOG2N];
  assign out1    = d1[LOG2N];
endmodule
