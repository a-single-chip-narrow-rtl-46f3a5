// addr_gen_first: address generator of the first FFT stage.
//
// A base counter runs 0..N-1 and a block counter 0..log2(N)-1 advances at
// every block boundary; the address is the base count rotated right by the
// block number. Writing each new block at these addresses while reading the
// previous one from them delivers butterfly pairs (i, i+N/2) in order, with a
// single N-word memory (read-modify-write). Two addresses, for the even and odd
// sample of a pair, are produced per clock because the stage moves a pair of
// complex values per clock. Counting starts at the first `start` pulse after
// reset (the first block boundary) and then runs freely; `base` and `blk` are
// exposed for the twiddle index and tag logic. The structure follows the
// design's description; the pair-per-clock form is this design's reading.
module addr_gen_first #(
  parameter int unsigned LOG2N = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,      // first block boundary
  output logic               running,
  output logic [LOG2N-2:0]   pair_cnt,   // pair index within the block
  output logic               blk_first,  // current pair is the first of a block
  output logic [LOG2N-1:0]   addr0,      // address of the even sample
  output logic [LOG2N-1:0]   addr1       // address of the odd sample
);
  localparam int unsigned BW = (LOG2N > 1) ? $clog2(LOG2N) : 1;

  logic [LOG2N-2:0] cnt;
  logic [BW-1:0]    blk;
  logic             go;

  function automatic logic [LOG2N-1:0] rotr(logic [LOG2N-1:0] v, logic [BW-1:0] s);
    return LOG2N'(({v, v} >> s));
  endfunction

  assign go = running | start;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      cnt     <= '0;
      blk     <= '0;
    end else if (go) begin
      running <= 1'b1;
      cnt     <= cnt + 1'b1;
      if (&cnt) blk <= (blk == BW'(LOG2N - 1)) ? '0 : blk + 1'b1;
    end
  end

  assign pair_cnt  = cnt;
  assign blk_first = (cnt == '0);
  assign addr0     = rotr({cnt, 1'b0}, blk);
  assign addr1     = rotr({cnt, 1'b1}, blk);
endmodule
