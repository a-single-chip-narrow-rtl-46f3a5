// excisor: N-sigma frequency-domain excisor.
//
// Forward-transform blocks from the FFT core (tag valid and not inverse) are
// taken in as pairs of bins per clock. Each bin's log magnitude (log_mag) is
// accumulated into the block statistics (block_stats) while the bins are
// stored in a two-bank block buffer, the FIFO of the N-sigma diagram. When the
// statistics are done the threshold mu + N*sigma (threshold_sel) is stored
// with the bank and `rdy` rises. The scheduler then pulses `start` and the
// block leaves as N/2 pairs on consecutive clocks, two clocks after `start`.
// On the way out the magnitude is computed again rather than stored, compared
// with the threshold, and a bin above it is set to zero when excision is
// enabled; otherwise the bin passes unchanged.
//
// The buffer is written in the core's output order (bit-reversed bins) and read
// at bit-reversed addresses, so the block leaves in natural bin order as the
// inverse transform needs. Status outputs give mu, sigma, the selected N index
// and the number of bins zeroed in the last block sent. `overrun` flags a
// forward block that arrived while both banks were still full.
// The statistics, the threshold choice, the magnitude recomputation and the
// enable follow the design; the buffer organisation, handshake and status
// outputs are this design's choices.
module excisor
  import fdis_pkg::*;
#(
  parameter int unsigned LOG2N = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  excise_cfg_t        cfg,
  // from the FFT core
  input  logic               in_sop,
  input  blk_tag_t           in_tag,     // scale bit not needed here
  input  cplx_t              in0,
  input  cplx_t              in1,
  // to the FFT core input (inverse slot)
  output logic               rdy,
  input  logic               start,
  output logic               out_valid,
  output logic               out_sop,
  output cplx_t              out0,
  output cplx_t              out1,
  // status
  output logic [DB_W-1:0]    st_mu,
  output logic [DB_W-1:0]    st_sigma,
  output logic [2:0]         st_nsel,
  output logic [LOG2N:0]     st_excised,
  output logic               st_done,     // pulse: statistics of a block ready
  output logic               overrun
);
  localparam int unsigned N   = 1 << LOG2N;
  localparam int unsigned PW  = LOG2N - 1;
  localparam int unsigned THW = DB_W + NV_W - NV_F + 1;

  // ---------------- input side ----------------
  logic          wr_act, wr_bank, st_bank;
  logic [PW-1:0] wr_cnt;
  logic          take, first, last;
  logic          ready [2];

  assign first = in_sop && in_tag.valid && !in_tag.inv;
  assign take  = first || wr_act;
  assign last  = take && !first && (wr_cnt == PW'(N / 2 - 1));

  cplx_t mem [2 * N];

  always_ff @(posedge clk) begin
    if (take) begin
      mem[{wr_bank, first ? PW'(0) : wr_cnt, 1'b0}] <= in0;
      mem[{wr_bank, first ? PW'(0) : wr_cnt, 1'b1}] <= in1;
    end
  end

  logic [DB_W-1:0] l0, l1;
  log_mag u_lm0 (.x(in0), .db(l0));
  log_mag u_lm1 (.x(in1), .db(l1));

  logic            bs_done;
  logic [DB_W-1:0] mu, sigma;
  block_stats #(.LOG2N(LOG2N)) u_stats (
    .clk, .rst_n, .in_valid(take), .in_first(first), .in_last(last),
    .l0, .l1, .done(bs_done), .mu, .sigma);

  logic [2:0]     nsel;
  logic [THW-1:0] thr_c;
  threshold_sel u_thr (
    .mu, .sigma, .sigma_lvl(cfg.sigma_lvl), .n_val(cfg.n_val), .n_sel(nsel), .thr(thr_c));

  logic [THW-1:0] thr [2];
  logic           rd_act, rd_bank;
  logic [PW-1:0]  rd_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_act <= 1'b0; wr_bank <= 1'b0; wr_cnt <= '0; st_bank <= 1'b0;
      ready[0] <= 1'b0; ready[1] <= 1'b0; thr[0] <= '0; thr[1] <= '0;
      st_mu <= '0; st_sigma <= '0; st_nsel <= '0; st_done <= 1'b0; overrun <= 1'b0;
    end else begin
      st_done <= 1'b0;
      if (take) begin
        wr_cnt <= (first ? PW'(0) : wr_cnt) + 1'b1;
        wr_act <= !last;
        if (first && ready[wr_bank]) overrun <= 1'b1;
        if (last) begin
          st_bank <= wr_bank;
          wr_bank <= ~wr_bank;
        end
      end
      if (bs_done) begin
        thr[st_bank]   <= thr_c;
        ready[st_bank] <= 1'b1;
        st_mu <= mu; st_sigma <= sigma; st_nsel <= nsel; st_done <= 1'b1;
      end
      if (rd_act && rd_cnt == PW'(N / 2 - 1)) ready[rd_bank] <= 1'b0;
    end
  end

  // ---------------- output side ----------------
  assign rdy = ready[rd_bank] && !rd_act;

  logic [LOG2N-1:0] ra0, ra1;
  cplx_t            r0, r1;
  logic [DB_W-1:0]  m0, m1;
  logic             z0, z1;
  logic [LOG2N:0]   exc_cnt;

  assign ra0 = LOG2N'(bitrev({rd_cnt, 1'b0}, LOG2N));
  assign ra1 = LOG2N'(bitrev({rd_cnt, 1'b1}, LOG2N));
  assign r0  = mem[{rd_bank, ra0}];
  assign r1  = mem[{rd_bank, ra1}];

  log_mag u_lm2 (.x(r0), .db(m0));
  log_mag u_lm3 (.x(r1), .db(m1));

  assign z0 = cfg.excise_en && (THW'(m0) > thr[rd_bank]);
  assign z1 = cfg.excise_en && (THW'(m1) > thr[rd_bank]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_act <= 1'b0; rd_bank <= 1'b0; rd_cnt <= '0;
      out_valid <= 1'b0; out_sop <= 1'b0; out0 <= '0; out1 <= '0;
      exc_cnt <= '0; st_excised <= '0;
    end else begin
      out_valid <= rd_act;
      out_sop   <= rd_act && rd_cnt == '0;
      out0      <= (rd_act && !z0) ? r0 : '0;
      out1      <= (rd_act && !z1) ? r1 : '0;
      if (start && rdy) begin
        rd_act  <= 1'b1;
        rd_cnt  <= '0;
        exc_cnt <= '0;
      end else if (rd_act) begin
        rd_cnt  <= rd_cnt + 1'b1;
        exc_cnt <= exc_cnt + (LOG2N+1)'(z0) + (LOG2N+1)'(z1);
        if (rd_cnt == PW'(N / 2 - 1)) begin
          rd_act     <= 1'b0;
          rd_bank    <= ~rd_bank;
          st_excised <= exc_cnt + (LOG2N+1)'(z0) + (LOG2N+1)'(z1);
        end
      end
    end
  end

  initial assert (LOG2N >= 2) else $error("excisor: LOG2N must be at least 2");
endmodule
