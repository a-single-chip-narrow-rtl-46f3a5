// fdis_top_tb: end-to-end test of the frequency-domain interference suppressor
// at its full size (N = 256, default parameters).
//
// Input is sustained at one complex sample per two clocks (the maximum rate).
// Each phase resets the design, streams a signal and collects the output:
//   A  noise only, excision disabled: output must equal the windowed input
//      middle halves, sample by sample, within a few LSB
//   B  noise + one strong CW tone between two bins, excision enabled: the tone
//      must be removed (residual against the tone-free expectation small)
//      and N = 2 selected
//   C  noise + five CW tones, excision enabled: removed too, with N = 1/4
//      selected (adaptive threshold); B and C repeat the single- and
//      five-interferer cases of the original chip's measurements
//   D  all stage test multiplexers set to bypass: the core becomes a pure
//      delay line of one register per stage
// It counts forward blocks, inverse blocks, idle slots, zeroed bins, the N
// selections and the bypass path, and fails if any mechanism never occurred.
`timescale 1ns/1ps
module fdis_top_tb;
  import fdis_pkg::*;
  localparam int unsigned LOG2N = 8;
  localparam int unsigned N     = 1 << LOG2N;
  localparam int unsigned NBLK  = 8;
  localparam int unsigned NSAMP = N + (NBLK - 1) * N / 2;
  localparam int unsigned NOUT  = NBLK * N / 2;
  localparam real         PI    = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  excise_cfg_t             cfg;
  logic [LOG2N-1:0]        byp_ram = '0, byp_bfly = '0;
  logic                    in_valid = 0;
  logic signed [IN_W-1:0]  in_re = '0, in_im = '0;
  logic                    out_valid, st_done;
  logic signed [IN_W-1:0]  out_re, out_im;
  logic [DB_W-1:0]         st_mu, st_sigma;
  logic [2:0]              st_nsel, overrun;
  logic [LOG2N:0]          st_excised;

  fdis_top dut (.*);

  int checks = 0, failures = 0;
  int n_fwd = 0, n_inv = 0, n_idle = 0, n_zeroed = 0, n_byp = 0, n_paths[2] = '{0, 0};
  int nsel_seen [8];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.slot_pre) begin
      if (dut.start_fwd || dut.start_inv) ; else n_idle++;
    end
    if (dut.start_fwd) begin n_fwd++; n_paths[dut.u_win.path]++; end
    if (dut.start_inv) n_inv++;
    if (st_done) nsel_seen[st_nsel]++;
    if (dut.u_exc.rd_act && dut.u_exc.cfg.excise_en)
      n_zeroed += int'(dut.u_exc.z0) + int'(dut.u_exc.z1);
  end

  // signals
  real sig_re [NSAMP], sig_im [NSAMP];   // full input
  real cln_re [NSAMP], cln_im [NSAMP];   // input without tones
  int  got_re [NOUT],  got_im [NOUT];
  int  nout;
  int  t_in_first, t_out_first;      // clock of input sample N/4 and of output 0
  int  cyc = 0;
  always @(posedge clk) cyc++;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic real win(int n);
    real x;
    x = 2.0 * PI * real'(n) / real'(N);
    return 0.35875 - 0.48829 * $cos(x) + 0.14128 * $cos(2.0 * x) - 0.01168 * $cos(3.0 * x);
  endfunction

  // expected output sample i: windowed input at g = N/4 + i
  function automatic real wexp(int i, bit im, bit clean);
    int g, n;
    g = N / 4 + i;
    n = N / 4 + (i % (N / 2));
    if (clean) return win(n) * (im ? cln_im[g] : cln_re[g]);
    else       return win(n) * (im ? sig_im[g] : sig_re[g]);
  endfunction

  task automatic make_signal(int ntones, real namp, real tamp);
    real f [5] = '{40.5 / 256.0, -60.5 / 256.0, 10.5 / 256.0, 90.5 / 256.0, -100.5 / 256.0};
    for (int g = 0; g < NSAMP; g++) begin
      cln_re[g] = namp * gauss();
      cln_im[g] = namp * gauss();
      sig_re[g] = cln_re[g];
      sig_im[g] = cln_im[g];
      for (int t = 0; t < ntones; t++) begin
        sig_re[g] += tamp * $cos(2.0 * PI * f[t] * real'(g));
        sig_im[g] += tamp * $sin(2.0 * PI * f[t] * real'(g));
      end
    end
  endtask

  task automatic run_phase(bit en);
    cfg.excise_en = en;
    rst_n <= 0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    nout = 0;
    fork
      begin
        for (int g = 0; g < NSAMP; g++) begin
          if (g == int'(N / 4)) t_in_first = cyc;
          in_valid <= 1;
          in_re    <= IN_W'($rtoi(sig_re[g] + (sig_re[g] >= 0 ? 0.5 : -0.5)));
          in_im    <= IN_W'($rtoi(sig_im[g] + (sig_im[g] >= 0 ? 0.5 : -0.5)));
          @(posedge clk);
          in_valid <= 0;
          @(posedge clk);
        end
      end
      begin
        int t0;
        t0 = 0;
        while (nout < int'(NOUT) && t0 < 12000) begin
          @(posedge clk);
          t0++;
          if (out_valid) begin
            if (nout == 0) t_out_first = cyc;
            got_re[nout] = int'(out_re);
            got_im[nout] = int'(out_im);
            nout++;
          end
        end
      end
    join
    check(nout == int'(NOUT), $sformatf("output samples %0d of %0d", nout, NOUT));
    check(overrun == '0, "overrun at the full input rate");
  endtask

  // residual power relative to a reference power
  task automatic residual(output real res, output real ref_p);
    res = 0; ref_p = 0;
    for (int i = 0; i < nout; i++) begin
      res   += (real'(got_re[i]) - wexp(i, 0, 1)) ** 2 + (real'(got_im[i]) - wexp(i, 1, 1)) ** 2;
      ref_p += (wexp(i, 0, 0) - wexp(i, 0, 1)) ** 2 + (wexp(i, 1, 0) - wexp(i, 1, 1)) ** 2;
    end
  endtask

  initial begin
    real res, tp;
    int  worst, z_before, nsel_b;
    cfg.excise_en = 0;
    // sigma levels 3, 4.5, 8, 12 dB; N = 3, 2, 1/4, 1/8, 1/16. With these a
    // block of noise alone (sigma about 2.6 dB) uses N = 3, a block with one
    // strong tone (sigma 3.4 to 4.2 dB) uses N = 2 and a block with five tones
    // (sigma 4.7 to 5.1 dB) uses N = 1/4, the two settings of the original
    // single- and five-interferer measurements.
    cfg.sigma_lvl = {DB_W'(12 * 64), DB_W'(8 * 64), DB_W'(288), DB_W'(3 * 64)};
    cfg.n_val     = {NV_W'(1), NV_W'(2), NV_W'(4), NV_W'(32), NV_W'(48)};

    // ---- A: noise only, excision off: transparent ----
    make_signal(0, 300.0, 0.0);
    run_phase(0);
    worst = 0;
    for (int i = 0; i < nout; i++) begin
      int er, ei;
      er = got_re[i] - $rtoi(wexp(i, 0, 0));
      ei = got_im[i] - $rtoi(wexp(i, 1, 0));
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (er > worst) worst = er;
      if (ei > worst) worst = ei;
      check(er <= 4 && ei <= 4, $sformatf("A: sample %0d got (%0d,%0d) exp (%.1f,%.1f)",
            i, got_re[i], got_im[i], wexp(i, 0, 0), wexp(i, 1, 0)));
    end
    $display("phase A: worst error %0d LSB over %0d samples", worst, nout);
    // latency of a sample through the design, from its input to its output:
    // 384 clocks to complete the block, up to 256 waiting for a forward slot,
    // 2 x 390 in the core, 128 + 2 in the excisor plus the wait for an inverse
    // slot, 128 + 2 in the output selection. Bound: 1,900 clocks (95 us at a
    // 20 MHz clock, against 70 us reported for the original chip).
    $display("latency %0d clocks", t_out_first - t_in_first);
    check(t_out_first - t_in_first <= 1900, "latency above 1900 clocks");

    // ---- B: one strong tone, excision on ----
    z_before = n_zeroed;
    make_signal(1, 100.0, 1500.0);
    run_phase(1);
    residual(res, tp);
    $display("phase B: tone suppression %.1f dB, zeroed bins %0d, N index %0d, mu %0d sigma %0d (1/64 dB)",
             10.0 * $log10(tp / res), n_zeroed - z_before, st_nsel, st_mu, st_sigma);
    check(res < 0.01 * tp, "B: tone not removed");
    check(n_zeroed - z_before > 0, "B: no bin zeroed");
    check(cfg.n_val[st_nsel] == NV_W'(32), "B: N = 2 expected for one tone");
    $display("phase B: %.1f bins zeroed per block", real'(n_zeroed - z_before) / real'(NBLK));
    nsel_b = int'(st_nsel);

    // ---- C: five tones, excision on ----
    z_before = n_zeroed;
    make_signal(5, 60.0, 350.0);
    run_phase(1);
    residual(res, tp);
    $display("phase C: tone suppression %.1f dB, zeroed bins %0d, N index %0d, mu %0d sigma %0d (1/64 dB)",
             10.0 * $log10(tp / res), n_zeroed - z_before, st_nsel, st_mu, st_sigma);
    check(res < 0.01 * tp, "C: tones not removed");
    check(int'(st_nsel) > nsel_b, "C: a smaller N must be selected than for one tone");
    check(cfg.n_val[st_nsel] == NV_W'(4), "C: N = 1/4 expected for five tones");
    $display("phase C: %.1f bins zeroed per block", real'(n_zeroed - z_before) / real'(NBLK));

    // ---- D: test multiplexers bypass every RAM and butterfly ----
    byp_ram  = '1;
    byp_bfly = '1;
    make_signal(0, 300.0, 0.0);
    rst_n <= 0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 200; c++) begin
      cplx_t hist [LOG2N + 1];
      in_valid <= c[0];
      in_re    <= IN_W'($urandom);
      in_im    <= IN_W'($urandom);
      @(posedge clk);
      #1;
      // one register per stage: compare with the input LOG2N clocks earlier
      for (int k = LOG2N; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = dut.core_in0;
      if (c > LOG2N + 1) begin
        check(dut.core_out0 == hist[LOG2N], "D: bypassed core is not a delay line");
        n_byp++;
      end
    end
    byp_ram  = '0;
    byp_bfly = '0;

    // ---- mechanism coverage ----
    $display("forward blocks %0d, inverse blocks %0d, idle slots %0d, paths %0d/%0d, zeroed %0d, bypass %0d",
             n_fwd, n_inv, n_idle, n_paths[0], n_paths[1], n_zeroed, n_byp);
    check(n_fwd > 0 && n_inv > 0, "forward and inverse blocks on the shared core");
    check(n_idle > 0, "idle slot");
    check(n_paths[0] > 0 && n_paths[1] > 0, "normal and delayed path");
    check(n_zeroed > 0, "bin excision");
    check(n_byp > 0, "test bypass");
    for (int s = 0; s < 5; s++) if (nsel_seen[s] > 0) $display("N index %0d chosen %0d times", s, nsel_seen[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
