// log_mag: approximate 10*log10(|X|) of a complex value, in dB with LF
// fraction bits.
//
// Magnitude: |X| ~ max(|Re|,|Im|) + min(|Re|,|Im|)/4 (shift and add, about
// 11.6 % low at odd multiples of 45 degrees). Logarithm: 10*log10(m) =
// 10*log10(2)*log2(m) ~ 3*log2(m); log2(m) is taken piecewise linearly as the
// position of the leading one plus the LF bits that follow it as a fraction,
// and the factor 3 is an add of the value and its double. m = 0 gives 0.
// Purely combinational. The magnitude and log formulas follow the design; the
// piecewise-linear log2 and the output format are this design's choice.
module log_mag
  import fdis_pkg::*;
(
  input  cplx_t            x,
  output logic [DB_W-1:0]  db
);
  localparam int unsigned MW = DATA_W + 1;          // magnitude width
  localparam int unsigned PB = $clog2(MW);          // leading-one position bits

  logic [DATA_W-1:0] ar, ai, mx, mn;
  logic [MW-1:0]     mag;
  logic [PB-1:0]     pos;
  logic [MW+LF-1:0]  norm;
  logic [LF-1:0]     frac;
  logic [PB+LF+1:0]  l2, db3;

  function automatic logic [DATA_W-1:0] absv(logic signed [DATA_W-1:0] v);
    return v[DATA_W-1] ? DATA_W'(-v) : DATA_W'(v);
  endfunction

  always_comb begin
    ar  = absv(x.re);
    ai  = absv(x.im);
    mx  = (ar > ai) ? ar : ai;
    mn  = (ar > ai) ? ai : ar;
    mag = MW'(mx) + MW'(mn >> 2);
    pos = '0;
    for (int i = 0; i < MW; i++) if (mag[i]) pos = PB'(i);
    norm = {mag, LF'(0)} >> pos;                     // leading one at bit LF
    frac = norm[LF-1:0];
    l2   = (PB+LF+2)'({pos, frac});
    db3  = (mag == '0) ? '0 : l2 + (l2 << 1);
    db   = DB_W'(db3);
  end
endmodule
