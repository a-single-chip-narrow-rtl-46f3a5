// pn_seq: pseudo-noise generator used for unbiased (dithered) rounding in an
// FFT stage (the PN-SEQ box of the stage diagram).
//
// A 16-bit maximal-length Galois LFSR (taps x^16+x^14+x^13+x^11+1) advances
// every clock; `rnd` is its state. The polynomial, width and seed are this
// design's choice: the design only calls for a random-number generator that
// makes rounding unbiased. Each instance takes its own SEED so that stages do
// not share a sequence. Reset loads SEED (must be non-zero).
module pn_seq #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] rnd
);
  logic [15:0] state;

  always_ff @(posedge clk) begin
    if (!rst_n) state <= SEED;
    else        state <= {1'b0, state[15:1]} ^ (state[0] ? 16'hB400 : 16'h0000);
  end

  assign rnd = state;

  initial assert (SEED != 0) else $error("pn_seq: SEED must be non-zero");
endmodule
