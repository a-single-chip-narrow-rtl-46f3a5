// sqrt_approx: approximate square root of an unsigned integer.
//
// y is written as a * 2^b with 1 <= a < 2 (b = position of the leading one).
// sqrt(y) = sqrt(a) * 2^(b/2) for even b and sqrt(a) * 2^((b-1)/2) * sqrt(2)
// for odd b. sqrt(a) is the straight line through (1,1) and (2,sqrt 2),
// 1 + (a-1)*0.4140625, and sqrt(2) is 1.4140625; both constants are shift-add
// sums (1/4+1/8+1/32+1/128). Twelve mantissa bits are kept. The exponent split
// follows the design; the line and the constants are this design's choice
// (worst error about 1.5 %). Purely combinational; the result is truncated.
module sqrt_approx #(
  parameter int unsigned YW = 24,
  parameter int unsigned RW = 12
) (
  input  logic [YW-1:0] y,
  output logic [RW-1:0] r
);
  localparam int unsigned FB = 12;                 // mantissa fraction bits
  localparam int unsigned PB = $clog2(YW);

  logic [PB-1:0]        b;
  logic [YW+FB-1:0]     norm;
  logic [FB-1:0]        f;
  logic [FB+2:0]        sa, sa2;                   // Q3.FB
  logic [YW+FB+2:0]     scaled;

  function automatic logic [FB+2:0] times_k(logic [FB+2:0] v);
    // v * 0.4140625 = v/4 + v/8 + v/32 + v/128
    return (v >> 2) + (v >> 3) + (v >> 5) + (v >> 7);
  endfunction

  always_comb begin
    b = '0;
    for (int i = 0; i < YW; i++) if (y[i]) b = PB'(i);
    norm   = {y, FB'(0)} >> b;                       // 1.f in Q1.FB
    f      = norm[FB-1:0];
    sa     = (FB+3)'(1 << FB) + times_k((FB+3)'(f));
    sa2    = b[0] ? sa + times_k(sa) : sa;          // * 1.4140625 for odd b
    scaled = (YW+FB+3)'(sa2) << (b >> 1);
    r      = (y == '0) ? '0 : RW'(scaled >> FB);
  end
endmodule
