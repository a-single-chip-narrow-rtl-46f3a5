// fdis_top: single-chip frequency-domain interference suppressor.
//
// Signal flow (four FFT operations on one core):
//   input -> overlap_window (normal and half-block-delayed windowed blocks)
//         -> fft_core, forward -> excisor (N-sigma threshold, zero bins)
//         -> fft_core, inverse (scaled 1/N) -> overlap_select -> output
// The forward and inverse transforms of both overlapped paths share one
// pipelined FFT core. A slot scheduler divides the core's time into slots of
// N/2 clocks (one block, two samples per clock) that alternate between forward
// slots, filled with the next windowed block, and inverse slots, filled with
// the next excised block. A slot whose source has no block ready is sent as an
// idle block (tag valid = 0), so the core never stops and block boundaries stay
// aligned. Each N/2 input samples make one new block, so the core carries four
// times the input sample rate: a 20 MHz clock gives 40 M complex samples per
// second in the core and 10 M per second at the input, one sample per two
// clocks at most.
//
// Interface: `in_valid` with 12-bit I/Q in; `out_valid` with 12-bit I/Q out,
// in bursts of N/2 samples at one per clock. `cfg` holds the user-programmable
// excision enable, four sigma levels and five N values. `byp_ram`/`byp_bfly`
// drive the per-stage test multiplexers and are zero in normal use. Status
// outputs report the statistics of the last block, the bins zeroed and
// overrun flags. Latency, first input sample to its output, is 1,801 clocks
// for N = 256 (90 us at 20 MHz).
// The chain, the shared core and the rates follow the design; the slot
// scheduler and all handshakes are this design's own.
module fdis_top
  import fdis_pkg::*;
#(
  parameter int unsigned LOG2N = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  excise_cfg_t              cfg,
  input  logic [LOG2N-1:0]         byp_ram,
  input  logic [LOG2N-1:0]         byp_bfly,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   in_re,
  input  logic signed [IN_W-1:0]   in_im,
  output logic                     out_valid,
  output logic signed [IN_W-1:0]   out_re,
  output logic signed [IN_W-1:0]   out_im,
  output logic [DB_W-1:0]          st_mu,
  output logic [DB_W-1:0]          st_sigma,
  output logic [2:0]               st_nsel,
  output logic [LOG2N:0]           st_excised,
  output logic                     st_done,
  output logic [2:0]               overrun     // {output, excisor, input}
);
  localparam int unsigned PW = LOG2N - 1;

  // ---------------- slot scheduler ----------------
  logic [PW-1:0] slot_cnt;
  logic          inv_slot;                 // current slot type
  logic          slot_end, slot_pre;
  logic          win_rdy, exc_rdy, start_fwd, start_inv;

  assign slot_end  = (slot_cnt == PW'((1 << PW) - 1));
  // sources answer `start` two clocks later, so they are started one clock
  // before the slot boundary
  assign slot_pre  = (slot_cnt == PW'((1 << PW) - 2));
  assign start_fwd = slot_pre &&  inv_slot && win_rdy;   // next slot is forward
  assign start_inv = slot_pre && !inv_slot && exc_rdy;   // next slot is inverse

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot_cnt <= '0;
      inv_slot <= 1'b0;
    end else begin
      slot_cnt <= slot_cnt + 1'b1;
      if (slot_end) inv_slot <= ~inv_slot;
    end
  end

  // ---------------- windowed-block source ----------------
  logic  win_valid, win_sop, win_path;
  cplx_t win0, win1;

  overlap_window #(.LOG2N(LOG2N)) u_win (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .rdy(win_rdy), .start(start_fwd),
    .out_valid(win_valid), .out_sop(win_sop), .out_path(win_path),
    .out0(win0), .out1(win1), .overrun(overrun[0]));

  // ---------------- shared FFT core ----------------
  logic     core_in_sop, core_out_sop;
  blk_tag_t core_in_tag, core_out_tag;
  cplx_t    core_in0, core_in1, core_out0, core_out1;
  logic     exc_valid, exc_sop;
  cplx_t    exc0, exc1;

  assign core_in_sop = (slot_cnt == '0);

  always_comb begin
    if (inv_slot) begin
      core_in_tag = '{valid: exc_valid, inv: 1'b1, scale: 1'b1};
      core_in0    = exc0;
      core_in1    = exc1;
    end else begin
      core_in_tag = '{valid: win_valid, inv: 1'b0, scale: 1'b0};
      core_in0    = win0;
      core_in1    = win1;
    end
  end

  fft_core #(.LOG2N(LOG2N)) u_core (
    .clk, .rst_n, .byp_ram, .byp_bfly,
    .in_sop(core_in_sop), .in_tag(core_in_tag), .in0(core_in0), .in1(core_in1),
    .out_sop(core_out_sop), .out_tag(core_out_tag), .out0(core_out0), .out1(core_out1));

  // ---------------- N-sigma excisor ----------------
  excisor #(.LOG2N(LOG2N)) u_exc (
    .clk, .rst_n, .cfg,
    .in_sop(core_out_sop), .in_tag(core_out_tag), .in0(core_out0), .in1(core_out1),
    .rdy(exc_rdy), .start(start_inv),
    .out_valid(exc_valid), .out_sop(exc_sop), .out0(exc0), .out1(exc1),
    .st_mu, .st_sigma, .st_nsel, .st_excised, .st_done, .overrun(overrun[1]));

  // ---------------- output selection ----------------
  overlap_select #(.LOG2N(LOG2N), .OUT_W(IN_W)) u_sel (
    .clk, .rst_n,
    .in_sop(core_out_sop), .in_tag(core_out_tag), .in0(core_out0), .in1(core_out1),
    .out_valid, .out_re, .out_im, .overrun(overrun[2]));

  // a block source must start exactly at a slot boundary
  assert property (@(posedge clk) disable iff (!rst_n) win_sop |-> slot_cnt == '0 && !inv_slot);
  assert property (@(posedge clk) disable iff (!rst_n) exc_sop |-> slot_cnt == '0 && inv_slot);
  logic unused_path;
  assign unused_path = win_path;
endmodule
