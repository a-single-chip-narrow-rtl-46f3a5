// butterfly_tb: checks the radix-2 butterfly on hand-worked cases (W = 1,
// W = -j, scaling) and on random operands against a wide-integer model of
// sum, difference-times-weight, dithered rounding and saturation.
`timescale 1ns/1ps
module butterfly_tb;
  import fdis_pkg::*;
  int checks = 0, failures = 0;

  logic signed [DATA_W-1:0] a_re, a_im, b_re, b_im, y0_re, y0_im, y1_re, y1_im;
  logic signed [TW_W-1:0]   w_re, w_im;
  logic                     scale;
  logic [15:0]              rnd;

  butterfly dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(longint v);
    longint mx = (64'sd1 <<< (DATA_W - 1)) - 1;
    if (v > mx) return mx;
    if (v < -mx - 1) return -mx - 1;
    return v;
  endfunction

  function automatic longint fdiv(longint v, int sh);   // floor division by 2^sh
    longint d = 64'sd1 <<< sh;
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  initial begin
    // W = 1, no scaling: plain sum and difference
    a_re = 1000; a_im = -300; b_re = 250; b_im = 77; w_re = 16384; w_im = 0; scale = 0; rnd = 16'h1234;
    #1;
    check(y0_re == 1250 && y0_im == -223 && y1_re == 750 && y1_im == -377, "W=1");
    // W = -j: (d) * (-j) = (d_im, -d_re)
    w_re = 0; w_im = -16384; rnd = 0;
    #1;
    check(y1_re == -377 && y1_im == -750, "W=-j");
    // scaling halves both outputs
    w_re = 16384; w_im = 0; scale = 1; rnd = 0;
    #1;
    check(y0_re == 625 && y0_im == -112 && y1_re == 375 && y1_im == -189, "scale");
    // saturation
    a_re = 20'sh7FFFF; b_re = 20'sh7FFFF; scale = 0;
    #1;
    check(y0_re == 20'sh7FFFF, "saturation");
    // random
    for (int i = 0; i < 3000; i++) begin
      longint ar, ai, br, bi, wr, wi, dr, di, pr, pi, dith, sd, e0r, e0i, e1r, e1i;
      ar = longint'($signed(20'($urandom))) >>> ($urandom % 3);
      ai = longint'($signed(20'($urandom))) >>> ($urandom % 3);
      br = longint'($signed(20'($urandom))) >>> ($urandom % 3);
      bi = longint'($signed(20'($urandom))) >>> ($urandom % 3);
      wr = longint'($signed(16'($urandom_range(0, 32768) - 16384)));
      wi = longint'($signed(16'($urandom_range(0, 32768) - 16384)));
      scale = 1'($urandom);
      rnd = 16'($urandom);
      a_re = DATA_W'(ar); a_im = DATA_W'(ai); b_re = DATA_W'(br); b_im = DATA_W'(bi);
      w_re = TW_W'(wr); w_im = TW_W'(wi);
      #1;
      dr = ar - br; di = ai - bi;
      pr = dr * wr - di * wi;
      pi = dr * wi + di * wr;
      dith = scale ? longint'(rnd) & 64'h7FFF : longint'(rnd) & 64'h3FFF;
      sd   = scale ? longint'(rnd[15]) : 0;
      e0r = sat(fdiv(ar + br + sd, scale ? 1 : 0));
      e0i = sat(fdiv(ai + bi + sd, scale ? 1 : 0));
      e1r = sat(fdiv(pr + dith, scale ? 15 : 14));
      e1i = sat(fdiv(pi + dith, scale ? 15 : 14));
      check(longint'(y0_re) == e0r && longint'(y0_im) == e0i &&
            longint'(y1_re) == e1r && longint'(y1_im) == e1i,
            $sformatf("random %0d: got %0d %0d %0d %0d exp %0d %0d %0d %0d", i,
                      y0_re, y0_im, y1_re, y1_im, e0r, e0i, e1r, e1i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
