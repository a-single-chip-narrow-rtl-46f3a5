// butterfly: radix-2 decimation-in-frequency butterfly (two-point DFT).
//
//   y0 = a + b
//   y1 = (a - b) * W
//
// W is a Q1.14 twiddle weight. The product is brought back to DATA_W bits by
// an arithmetic right shift of TW_F bits after adding random dither bits from
// the stage's PN sequence, which makes the rounding unbiased. With `scale` set
// both outputs are additionally divided by two (again with a random rounding
// bit); an inverse transform sets it in all log2(N) stages, which gives the 1/N
// factor of the inverse DFT. Outputs saturate at DATA_W bits. Purely
// combinational; the stage registers the result.
// The dithered rounding and saturation are this design's concrete form of the
// "random-number generator (provides for unbiased rounding)".
module butterfly
  import fdis_pkg::*;
(
  input  logic signed [DATA_W-1:0] a_re, a_im,
  input  logic signed [DATA_W-1:0] b_re, b_im,
  input  logic signed [TW_W-1:0]   w_re, w_im,
  input  logic                     scale,
  input  logic [15:0]              rnd,     // random bits for rounding
  output logic signed [DATA_W-1:0] y0_re, y0_im,
  output logic signed [DATA_W-1:0] y1_re, y1_im
);
  localparam int unsigned SW = DATA_W + 1;          // sum/difference width
  localparam int unsigned PW = SW + TW_W + 1;       // product width

  logic signed [SW-1:0] s_re, s_im, d_re, d_im;
  logic signed [PW-1:0] p_re, p_im;
  logic signed [PW-1:0] dith;
  logic signed [SW:0]   s_re_r, s_im_r, s_dith;
  logic signed [PW-1:0] p_re_r, p_im_r;

  function automatic logic signed [DATA_W-1:0] sat(logic signed [PW-1:0] v);
    if (v > PW'(signed'((1 << (DATA_W - 1)) - 1)))   return DATA_W'((1 << (DATA_W - 1)) - 1);
    else if (v < -PW'(signed'(1 << (DATA_W - 1))))  return DATA_W'(1 << (DATA_W - 1));
    else                                             return v[DATA_W-1:0];
  endfunction

  always_comb begin
    s_re = SW'(a_re) + SW'(b_re);
    s_im = SW'(a_im) + SW'(b_im);
    d_re = SW'(a_re) - SW'(b_re);
    d_im = SW'(a_im) - SW'(b_im);
    p_re = PW'(d_re) * PW'(w_re) - PW'(d_im) * PW'(w_im);
    p_im = PW'(d_re) * PW'(w_im) + PW'(d_im) * PW'(w_re);
    // dither: TW_F random bits, one more when the result is also halved
    dith = scale ? PW'({1'b0, rnd[TW_F:0]}) : PW'({1'b0, rnd[TW_F-1:0]});
    p_re_r = (p_re + dith) >>> (scale ? TW_F + 1 : TW_F);
    p_im_r = (p_im + dith) >>> (scale ? TW_F + 1 : TW_F);
    s_dith = (SW+1)'(signed'({1'b0, rnd[15] & scale}));
    s_re_r = ((SW+1)'(s_re) + s_dith) >>> (scale ? 1 : 0);
    s_im_r = ((SW+1)'(s_im) + s_dith) >>> (scale ? 1 : 0);
    y0_re = sat(PW'(s_re_r));
    y0_im = sat(PW'(s_im_r));
    y1_re = sat(p_re_r);
    y1_im = sat(p_im_r);
  end
endmodule
