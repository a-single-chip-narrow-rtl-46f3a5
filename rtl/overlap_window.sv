// overlap_window: input buffer, 50 % overlap and windowing.
//
// Input samples (IN_W-bit I and Q, at most one per two clocks) are written to
// a circular buffer of 2N entries. Block m covers samples m*N/2 .. m*N/2+N-1,
// so consecutive blocks overlap by half: even blocks form the "normal" path
// and odd blocks the path delayed by half a block. As soon as a block's last
// sample is stored, `rdy` rises; the scheduler pulses `start` and, two clocks
// later, the block leaves as N/2 pairs on consecutive clocks, each sample
// multiplied by its window coefficient w(n) and rounded back to IN_W bits
// (sign-extended to DATA_W for the FFT core). `out_path` says which path the
// block belongs to. `overrun` flags input that overwrote an unread block.
// Overlap and windowing follow the design; the shared buffer, the rounding
// and the handshake are this design's choices.
module overlap_window
  import fdis_pkg::*;
#(
  parameter int unsigned LOG2N = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   in_re,
  input  logic signed [IN_W-1:0]   in_im,
  output logic                     rdy,
  input  logic                     start,
  output logic                     out_valid,
  output logic                     out_sop,
  output logic                     out_path,
  output cplx_t                    out0,
  output cplx_t                    out1,
  output logic                     overrun
);
  localparam int unsigned N  = 1 << LOG2N;
  localparam int unsigned AW = LOG2N + 1;          // buffer address, 2N words
  localparam int unsigned PW = LOG2N - 1;

  typedef struct packed {
    logic signed [IN_W-1:0] re;
    logic signed [IN_W-1:0] im;
  } in_cplx_t;

  in_cplx_t      buf_q [2 * N];
  logic [AW-1:0] wr_ptr, blk_start, rd_base;
  logic [AW:0]   fill;                              // samples stored past blk_start
  logic          rd_act, path;
  logic [PW-1:0] rd_cnt;
  logic          take;

  assign rdy  = (fill >= (AW+1)'(N)) && !rd_act;
  assign take = start && rdy;

  always_ff @(posedge clk) begin
    if (in_valid) buf_q[wr_ptr] <= '{re: in_re, im: in_im};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0; blk_start <= '0; rd_base <= '0; fill <= '0;
      rd_act <= 1'b0; rd_cnt <= '0; path <= 1'b0; overrun <= 1'b0;
    end else begin
      if (in_valid) wr_ptr <= wr_ptr + 1'b1;
      fill <= fill + (AW+1)'(in_valid) - (take ? (AW+1)'(N / 2) : '0);
      if (in_valid && fill >= (AW+1)'(2 * N - 1)) overrun <= 1'b1;
      if (take) begin
        rd_base   <= blk_start;
        blk_start <= blk_start + AW'(N / 2);
        rd_act    <= 1'b1;
        rd_cnt    <= '0;
      end else if (rd_act) begin
        rd_cnt <= rd_cnt + 1'b1;
        if (rd_cnt == PW'(N / 2 - 1)) begin
          rd_act <= 1'b0;
          path   <= ~path;
        end
      end
    end
  end

  // read, window, round
  in_cplx_t         s0, s1;
  logic [WIN_W-1:0] w0, w1;

  assign s0 = buf_q[rd_base + AW'({rd_cnt, 1'b0})];
  assign s1 = buf_q[rd_base + AW'({rd_cnt, 1'b1})];

  window_rom #(.LOG2N(LOG2N)) u_win (
    .n0({rd_cnt, 1'b0}), .n1({rd_cnt, 1'b1}), .w0, .w1);

  function automatic logic signed [DATA_W-1:0] wmul(logic signed [IN_W-1:0] x,
                                                     logic [WIN_W-1:0] w);
    logic signed [IN_W+WIN_W+1:0] p;
    p = (IN_W+WIN_W+2)'(x) * (IN_W+WIN_W+2)'(signed'({1'b0, w}));
    p = (p + (IN_W+WIN_W+2)'(1 << (WIN_W - 1))) >>> WIN_W;
    return DATA_W'(p);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_sop <= 1'b0; out_path <= 1'b0; out0 <= '0; out1 <= '0;
    end else begin
      out_valid <= rd_act;
      out_sop   <= rd_act && rd_cnt == '0;
      out_path  <= path;
      out0.re   <= rd_act ? wmul(s0.re, w0) : '0;
      out0.im   <= rd_act ? wmul(s0.im, w0) : '0;
      out1.re   <= rd_act ? wmul(s1.re, w1) : '0;
      out1.im   <= rd_act ? wmul(s1.im, w1) : '0;
    end
  end
endmodule
