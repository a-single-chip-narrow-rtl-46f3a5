// twiddle_rom: read-only store of the FFT weights W_N^k = exp(-/+ j 2 pi k / N).
//
// The address is {inv, k}: the lower half holds the forward weights
// exp(-j 2 pi k/N) and the upper half the inverse weights exp(+j 2 pi k/N), so a
// change of transform direction is only a change of ROM section, as in the
// design. k runs over 0..N/2-1. Entries are computed at elaboration as
// round(2^TW_F * cos) and round(-/+ 2^TW_F * sin) in Q1.14 (the coefficient
// width is this design's choice). Combinational read.
module twiddle_rom
  import fdis_pkg::*;
#(
  parameter int unsigned LOG2N = 8
) (
  input  logic                    inv,
  input  logic [LOG2N-2:0]        k,
  output logic signed [TW_W-1:0]  w_re,
  output logic signed [TW_W-1:0]  w_im
);
  localparam int unsigned HALF = 1 << (LOG2N - 1);

  typedef logic signed [TW_W-1:0] coef_t;
  typedef coef_t rom_t [2*HALF];

  function automatic rom_t make_rom(bit want_im);
    rom_t  r;
    real   ang, v;
    for (int i = 0; i < 2 * HALF; i++) begin
      ang = 2.0 * 3.14159265358979323846 * real'(i % HALF) / real'(2 * HALF);
      if (want_im) v = (i >= HALF) ? $sin(ang) : -$sin(ang);
      else         v = $cos(ang);
      r[i] = coef_t'($rtoi($floor(v * real'(1 << TW_F) + 0.5)));
    end
    return r;
  endfunction

  localparam rom_t ROM_RE = make_rom(1'b0);
  localparam rom_t ROM_IM = make_rom(1'b1);

  assign w_re = ROM_RE[{inv, k}];
  assign w_im = ROM_IM[{inv, k}];
endmodule
