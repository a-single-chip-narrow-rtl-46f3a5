// excisor_tb: drives the N-sigma excisor with forward-transform blocks in the
// FFT core's bit-reversed output order and checks what it sends on.
//
// Blocks hold a noise floor plus a few strong bins. The testbench works out the
// threshold on its own, in floating point from the design's formulas
// (|X| ~ max + min/4, 10 log10, mean, standard deviation, N chosen by the
// sigma levels), and then checks each bin that lies clearly above or below it:
// zeroed or passed unchanged, in natural bin order. It also checks the count
// of zeroed bins, that excision disabled passes every bin, the handshake
// timing (data two clocks after start), and that inverse blocks are ignored.
`timescale 1ns/1ps
module excisor_tb;
  import fdis_pkg::*;
  localparam int unsigned LOG2N = 8;
  localparam int unsigned N = 1 << LOG2N;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  excise_cfg_t cfg;
  logic in_sop = 0, rdy, start = 0, out_valid, out_sop, st_done, overrun;
  blk_tag_t in_tag = '0;
  cplx_t in0 = '0, in1 = '0, out0, out1;
  logic [DB_W-1:0] st_mu, st_sigma;
  logic [2:0] st_nsel;
  logic [LOG2N:0] st_excised;

  excisor #(.LOG2N(LOG2N)) dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [N], xi [N];
  real lv [4] = '{3.0, 5.0, 8.0, 12.0};
  real nv [5] = '{2.0, 1.5, 1.0, 0.5, 0.25};

  function automatic real ldb(int re, int im);
    real a, b, m;
    a = re < 0 ? -re : re; b = im < 0 ? -im : im;
    m = (a > b) ? a + b / 4.0 : b + a / 4.0;
    return (m < 1.0) ? 0.0 : 10.0 * $log10(m);
  endfunction

  task automatic send_block(bit inv);
    for (int p = 0; p < N / 2; p++) begin
      in_sop <= (p == 0);
      in_tag <= '{valid: 1'b1, inv: inv, scale: inv};
      in0.re <= DATA_W'(xr[bitrev(2*p, LOG2N)]);   in0.im <= DATA_W'(xi[bitrev(2*p, LOG2N)]);
      in1.re <= DATA_W'(xr[bitrev(2*p+1, LOG2N)]); in1.im <= DATA_W'(xi[bitrev(2*p+1, LOG2N)]);
      @(posedge clk);
    end
    in_sop <= 0; in_tag <= '0;
  endtask

  task automatic run_block(int ntones, bit en, output int zeroed);
    real s, q, m, sd, thr;
    int  sel, nz;
    for (int k = 0; k < N; k++) begin
      xr[k] = int'($urandom_range(0, 4000)) - 2000;
      xi[k] = int'($urandom_range(0, 4000)) - 2000;
    end
    for (int t = 0; t < ntones; t++)
      for (int d = -1; d <= 1; d++) begin
        xr[(20 + 45 * t + d) % N] = (d == 0) ? 400000 : 150000;
        xi[(20 + 45 * t + d) % N] = -90000;
      end
    cfg.excise_en = en;
    send_block(0);
    // independent threshold
    s = 0; q = 0;
    for (int k = 0; k < N; k++) begin s += ldb(xr[k], xi[k]); q += ldb(xr[k], xi[k]) ** 2; end
    m = s / N; sd = $sqrt(q / N - m * m);
    sel = 0;
    for (int i = 0; i < 4; i++) if (sd > lv[i]) sel++;
    thr = m + nv[sel] * sd;
    wait (rdy);
    @(posedge clk);
    check(st_nsel == 3'(sel), $sformatf("N index %0d vs %0d (sigma %.2f)", st_nsel, sel, sd));
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    nz = 0;
    for (int p = 0; p < N / 2; p++) begin
      #1;
      check(out_valid && (out_sop == (p == 0)), "output framing two clocks after start");
      for (int h = 0; h < 2; h++) begin
        int k; real l; cplx_t o;
        k = 2 * p + h; o = (h != 0) ? out1 : out0;
        l = ldb(xr[k], xi[k]);
        if (o == '0) nz++;
        if (!en || l < thr - 1.2)
          check(int'(o.re) == xr[k] && int'(o.im) == xi[k], $sformatf("bin %0d passed (l %.2f thr %.2f)", k, l, thr));
        else if (l > thr + 1.2)
          check(o == '0, $sformatf("bin %0d zeroed (l %.2f thr %.2f)", k, l, thr));
      end
      @(posedge clk);
    end
    #1;
    check(!out_valid, "block length");
    @(posedge clk);
    check(int'(st_excised) == (en ? nz : 0), $sformatf("excised count %0d vs %0d", st_excised, nz));
    zeroed = nz;
  endtask

  initial begin
    int z;
    cfg.sigma_lvl = {DB_W'(12 * 64), DB_W'(8 * 64), DB_W'(5 * 64), DB_W'(3 * 64)};
    cfg.n_val     = {NV_W'(4), NV_W'(8), NV_W'(16), NV_W'(24), NV_W'(32)};
    cfg.excise_en = 1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // an inverse block must be ignored
    send_block(1);
    repeat (5) @(posedge clk);
    check(!rdy, "inverse block ignored");
    run_block(0, 1, z);
    run_block(1, 1, z);
    check(z >= 3, $sformatf("one tone: %0d bins zeroed", z));
    run_block(5, 1, z);
    check(z >= 15, $sformatf("five tones: %0d bins zeroed", z));
    run_block(5, 0, z);
    check(z == 0, "excision disabled");
    check(!overrun, "no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
