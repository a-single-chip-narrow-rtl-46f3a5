// window_rom: window coefficients w(n), n = 0..N-1, applied before the
// forward FFT.
//
// The coefficients are those of the minimum four-term Blackman-Harris window
// (-92 dB sidelobes), in its periodic form
//   w(n) = 0.35875 - 0.48829 cos(2 pi n/N) + 0.14128 cos(4 pi n/N)
//          - 0.01168 cos(6 pi n/N),
// computed at elaboration and stored as unsigned Q0.16 (1.0 clamps to
// 0xFFFF). Two coefficients are read per clock (the even and odd sample of a
// pair). Combinational read. The window family follows the design; the exact
// coefficients, periodic form and word size are this design's choice.
module window_rom
  import fdis_pkg::*;
#(
  parameter int unsigned LOG2N = 8
) (
  input  logic [LOG2N-1:0]  n0,
  input  logic [LOG2N-1:0]  n1,
  output logic [WIN_W-1:0]  w0,
  output logic [WIN_W-1:0]  w1
);
  localparam int unsigned N = 1 << LOG2N;
  typedef logic [WIN_W-1:0] win_t;
  typedef win_t rom_t [N];

  function automatic rom_t make_rom();
    rom_t r;
    real  x, v;
    for (int i = 0; i < N; i++) begin
      x = 2.0 * 3.14159265358979323846 * real'(i) / real'(N);
      v = 0.35875 - 0.48829 * $cos(x) + 0.14128 * $cos(2.0 * x) - 0.01168 * $cos(3.0 * x);
      v = v * real'(1 << WIN_W) + 0.5;
      if (v > real'((1 << WIN_W) - 1)) v = real'((1 << WIN_W) - 1);
      if (v < 0.0) v = 0.0;
      r[i] = win_t'($rtoi($floor(v)));
    end
    return r;
  endfunction

  localparam rom_t ROM = make_rom();

  assign w0 = ROM[n0];
  assign w1 = ROM[n1];
endmodule
