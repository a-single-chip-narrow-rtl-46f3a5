// overlap_select: output selection of the two overlapped paths.
//
// Inverse-transform blocks (tag valid and inverse) arrive from the FFT core as
// pairs of samples per clock in bit-reversed order. Of each block only the
// middle half, time indices N/4 .. 3N/4-1, is kept; the quarter at each end,
// where the window attenuates most, is dropped. Because successive blocks
// alternate between the normal and the delayed path and start N/2 samples
// apart, the kept halves join into one continuous output stream. The kept
// samples are placed in natural order in one of two banks of N/2 words; once a
// block is complete its half-block leaves one sample per clock with
// `out_valid`, saturated to OUT_W bits.
// Dropping N/4 at each end and joining the paths follows the design; the
// banks, output pacing and saturation are this design's choices.
module overlap_select
  import fdis_pkg::*;
#(
  parameter int unsigned LOG2N = 8,
  parameter int unsigned OUT_W = IN_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_sop,
  input  blk_tag_t                 in_tag,    // scale bit not needed here
  input  cplx_t                    in0,
  input  cplx_t                    in1,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_re,
  output logic signed [OUT_W-1:0]  out_im,
  output logic                     overrun
);
  localparam int unsigned N  = 1 << LOG2N;
  localparam int unsigned PW = LOG2N - 1;

  cplx_t          mem [N];                          // two banks of N/2
  logic           wr_act, wr_bank, rd_act, rd_bank;
  logic [PW-1:0]  wr_cnt, rd_cnt;
  logic           ready [2];
  logic           first, take, last;

  assign first = in_sop && in_tag.valid && in_tag.inv;
  assign take  = first || wr_act;
  assign last  = take && !first && wr_cnt == PW'(N / 2 - 1);

  logic [LOG2N-1:0] n0, n1;
  logic             k0, k1;
  logic [PW-1:0]    pc;

  assign pc = first ? '0 : wr_cnt;
  assign n0 = LOG2N'(bitrev({pc, 1'b0}, LOG2N));
  assign n1 = LOG2N'(bitrev({pc, 1'b1}, LOG2N));
  assign k0 = n0 >= LOG2N'(N / 4) && n0 < LOG2N'(3 * N / 4);
  assign k1 = n1 >= LOG2N'(N / 4) && n1 < LOG2N'(3 * N / 4);

  always_ff @(posedge clk) begin
    if (take && k0) mem[{wr_bank, PW'(n0 - LOG2N'(N / 4))}] <= in0;
    if (take && k1) mem[{wr_bank, PW'(n1 - LOG2N'(N / 4))}] <= in1;
  end

  function automatic logic signed [OUT_W-1:0] sat(logic signed [DATA_W-1:0] v);
    if (v > DATA_W'((1 << (OUT_W - 1)) - 1))        return OUT_W'((1 << (OUT_W - 1)) - 1);
    else if (v < -DATA_W'(signed'(1 << (OUT_W - 1)))) return OUT_W'(1 << (OUT_W - 1));
    else                                            return v[OUT_W-1:0];
  endfunction

  cplx_t rd;
  assign rd = mem[{rd_bank, rd_cnt}];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_act <= 1'b0; wr_bank <= 1'b0; wr_cnt <= '0;
      rd_act <= 1'b0; rd_bank <= 1'b0; rd_cnt <= '0;
      ready[0] <= 1'b0; ready[1] <= 1'b0; overrun <= 1'b0;
      out_valid <= 1'b0; out_re <= '0; out_im <= '0;
    end else begin
      if (take) begin
        wr_cnt <= pc + 1'b1;
        wr_act <= !last;
        if (first && ready[wr_bank]) overrun <= 1'b1;
        if (last) begin
          ready[wr_bank] <= 1'b1;
          wr_bank        <= ~wr_bank;
        end
      end
      if (!rd_act && ready[rd_bank]) begin
        rd_act <= 1'b1;
        rd_cnt <= '0;
      end else if (rd_act) begin
        rd_cnt <= rd_cnt + 1'b1;
        if (rd_cnt == PW'(N / 2 - 1)) begin
          rd_act         <= 1'b0;
          ready[rd_bank] <= 1'b0;
          rd_bank        <= ~rd_bank;
        end
      end
      out_valid <= rd_act;
      out_re    <= rd_act ? sat(rd.re) : '0;
      out_im    <= rd_act ? sat(rd.im) : '0;
    end
  end
endmodule
