// block_stats: mean and standard deviation of the log magnitudes of one block.
//
// Two dB values (one pair) are accumulated per clock while `in_valid` is high:
// S = sum(L) and Q = sum(L^2). `in_last` marks the last pair of the block; one
// clock later the sums are frozen and the next clock delivers
//   mu    = S / N
//   var   = (N*Q - S^2) / N^2        (the bracket of the design's eq. 10b)
//   sigma = sqrt(var)                (sqrt_approx)
// with `done` high for one clock. mu and sigma carry LF fraction bits like the
// inputs (var carries 2*LF). Divisions by N are shifts. A new block may start
// in the clock after `in_last`. The accumulation and the order of operations
// follow the design; register placement is this design's choice.
module block_stats
  import fdis_pkg::*;
#(
  parameter int unsigned LOG2N = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_first,   // first pair of the block
  input  logic              in_last,    // last pair of the block
  input  logic [DB_W-1:0]   l0,
  input  logic [DB_W-1:0]   l1,
  output logic              done,
  output logic [DB_W-1:0]   mu,
  output logic [DB_W-1:0]   sigma
);
  localparam int unsigned SW = DB_W + LOG2N;          // sum width
  localparam int unsigned QW = 2 * DB_W + LOG2N;      // sum of squares width
  localparam int unsigned VW = 2 * DB_W;              // variance width

  logic [SW-1:0] s_acc, s_fin;
  logic [QW-1:0] q_acc, q_fin;
  logic          fin_v;
  logic [SW-1:0] s_base;
  logic [QW-1:0] q_base;

  assign s_base = in_first ? '0 : s_acc;
  assign q_base = in_first ? '0 : q_acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_acc <= '0; q_acc <= '0; fin_v <= 1'b0;
      s_fin <= '0; q_fin <= '0;
    end else begin
      fin_v <= 1'b0;
      if (in_valid) begin
        s_acc <= s_base + SW'(l0) + SW'(l1);
        q_acc <= q_base + QW'(l0 * l0) + QW'(l1 * l1);
        if (in_last) begin
          s_fin <= s_base + SW'(l0) + SW'(l1);
          q_fin <= q_base + QW'(l0 * l0) + QW'(l1 * l1);
          fin_v <= 1'b1;
        end
      end
    end
  end

  // final arithmetic on the frozen sums
  logic [QW+LOG2N-1:0] nq, ss, vnum;
  logic [VW-1:0]       var_q;
  logic [DB_W-1:0]     sig_c;

  always_comb begin
    nq    = (QW+LOG2N)'(q_fin) << LOG2N;
    ss    = (QW+LOG2N)'(s_fin) * (QW+LOG2N)'(s_fin);
    vnum  = (nq > ss) ? nq - ss : '0;
    var_q = VW'(vnum >> (2 * LOG2N));
  end

  sqrt_approx #(.YW(VW), .RW(DB_W)) u_sqrt (.y(var_q), .r(sig_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done <= 1'b0; mu <= '0; sigma <= '0;
    end else begin
      done <= fin_v;
      if (fin_v) begin
        mu    <= DB_W'(s_fin >> LOG2N);
        sigma <= sig_c;
      end
    end
  end
endmodule
