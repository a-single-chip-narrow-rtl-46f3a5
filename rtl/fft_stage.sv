// fft_stage: one stage of the pipelined radix-2 decimation-in-frequency FFT.
//
// Data move as a pair of complex values per clock. Each clock the stage reads
// two words of its RAM (the butterfly pair of the previous block) and writes
// the incoming pair from the preceding stage into the two locations just
// freed (read-modify-write, read before write in the same clock). The address
// generator permutes the addresses block by block so that the reads come out
// as butterfly pairs: stage 0 rotates a base count right by the block number
// (N words), later stages swap the MSB and LSB of the count on odd blocks,
// with N words for stage 1 and N/2^(s-1) words for stage s >= 2. The butterfly
// weight index follows from the pair counter: k = pair for stage 0 and
// k = pair[M-3:0] << s for stage s >= 1 (M = address bits).
//
// The block tag (valid, inverse, scale) and the start-of-block flag travel with
// the data: each memory-sized block's tag is captured when it is written and
// sent out while it is read, so neighbouring stages may work on transforms of
// opposite direction. Two test multiplexers (as in the stage diagram) can
// bypass the RAM (`byp_ram`) and the butterfly (`byp_bfly`).
//
// Timing: the stage starts at the first `in_sop` after reset and then runs
// every clock. Latency is M/2 clocks of buffering plus one output register.
// Output order is the input order of the next stage; after the last stage the
// bins leave in bit-reversed order.
module fft_stage
  import fdis_pkg::*;
#(
  parameter int unsigned  LOG2N = 8,
  parameter int unsigned  STAGE = 0,
  parameter logic [15:0]  SEED  = 16'hACE1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     byp_ram,
  input  logic     byp_bfly,
  input  logic     in_sop,
  input  blk_tag_t in_tag,
  input  cplx_t    in0,
  input  cplx_t    in1,
  output logic     out_sop,
  output blk_tag_t out_tag,
  output cplx_t    out0,
  output cplx_t    out1
);
  localparam int unsigned M     = (STAGE == 0) ? LOG2N : LOG2N + 1 - STAGE;
  localparam int unsigned WORDS = 1 << M;

  logic             running;
  logic [M-2:0]     pair_cnt;
  logic [M-1:0]     addr0, addr1;
  logic [LOG2N-2:0] tw_k;

  generate
    if (STAGE == 0) begin : g_first
      logic unused_first;
      addr_gen_first #(.LOG2N(LOG2N)) u_ag (
        .clk, .rst_n, .start(in_sop), .running, .pair_cnt,
        .blk_first(unused_first), .addr0, .addr1);
      assign tw_k = pair_cnt;
    end else begin : g_sub
      logic unused_odd;
      addr_gen_sub #(.M(M)) u_ag (
        .clk, .rst_n, .start(in_sop), .running, .pair_cnt,
        .odd_blk(unused_odd), .addr0, .addr1);
      if (M >= 3) begin : g_k
        assign tw_k = (LOG2N-1)'(pair_cnt[M-3:0]) << STAGE;
      end else begin : g_k0
        assign tw_k = '0;
      end
    end
  endgenerate

  wire go = running | in_sop;

  // ---------------- RAM, read-modify-write ----------------
  cplx_t mem [WORDS];
  cplx_t rd0, rd1;

  assign rd0 = mem[addr0];
  assign rd1 = mem[addr1];

  always_ff @(posedge clk) begin
    if (go) begin
      mem[addr0] <= in0;
      mem[addr1] <= in1;
    end
  end

  // ---------------- tags of the block being written / read ----------------
  blk_tag_t wr_tag, rd_tag_q, rd_tag;
  logic     wr_first, rd_first;
  wire      blk_edge = go && (pair_cnt == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_tag     <= '0;
      rd_tag_q   <= '0;
      wr_first   <= 1'b0;
    end else if (blk_edge) begin
      rd_tag_q   <= wr_tag;
      wr_tag     <= in_tag;
      wr_first   <= in_sop;
    end
  end

  assign rd_tag   = blk_edge ? wr_tag : rd_tag_q;
  assign rd_first = blk_edge ? wr_first : 1'b0;

  // ---------------- test multiplexer 1: RAM bypass ----------------
  cplx_t    a, b;
  blk_tag_t bf_tag;
  logic     bf_sop;

  always_comb begin
    if (byp_ram) begin
      a = in0; b = in1; bf_tag = in_tag; bf_sop = in_sop;
    end else begin
      a = rd0; b = rd1; bf_tag = rd_tag; bf_sop = rd_first && go;
    end
  end

  // ---------------- weights, rounding source, butterfly ----------------
  logic signed [TW_W-1:0] w_re, w_im;
  logic [15:0]            rnd;
  cplx_t                  y0, y1;

  twiddle_rom #(.LOG2N(LOG2N)) u_rom (
    .inv(bf_tag.inv), .k(tw_k), .w_re, .w_im);

  pn_seq #(.SEED(SEED)) u_pn (.clk, .rst_n, .rnd);

  butterfly u_bf (
    .a_re(a.re), .a_im(a.im), .b_re(b.re), .b_im(b.im),
    .w_re, .w_im, .scale(bf_tag.scale), .rnd,
    .y0_re(y0.re), .y0_im(y0.im), .y1_re(y1.re), .y1_im(y1.im));

  // ---------------- test multiplexer 2: butterfly bypass, output register ---
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_sop <= 1'b0;
      out_tag <= '0;
      out0    <= '0;
      out1    <= '0;
    end else begin
      out_sop <= bf_sop;
      out_tag <= bf_tag;
      out0    <= byp_bfly ? a : y0;
      out1    <= byp_bfly ? b : y1;
    end
  end
endmodule
