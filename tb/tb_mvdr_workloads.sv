// tb_mvdr_workloads: the input-scaling study of the original design, run
// through the complete beamformer at its default parameters. For each input
// scale 2^-2, 2^-5, 2^-8 and 2^-13 the two-source scenario (desired source at
// -70 degrees, SNR 10 dB; interferer at 30 degrees, INR 40 dB) is fed for the
// number of iterations the original study needed to converge at that scale
// (200, 900, 30000 and 500000 sample sets), as consecutive jobs of at most
// 200 sets that carry the adaptation over. The scales and iteration counts
// follow that study; the checks are this testbench's:
//   - the outputs of the last job of each run against the MVDR output
//     computed directly from Phi(n) (tolerance relative to the input scale),
//   - the weight vector formed from the final hardware state against the
//     floating-point MVDR weights (within 5%; within 50% at 2^-13, where the
//     20 fraction bits can no longer follow the noise part of Phi), and its
//     beam: unit gain (+-2%) at -70 degrees, a null deeper than -30 dB at 30
//     degrees. The consistency of the state (L L^H against Phi, L a against
//     s) is printed for each run.
// The plusarg +short divides every run by 100 for a quick look.
`timescale 1ns/1ps
module tb_mvdr_workloads;
  import mvdr_pkg::*;
  import mvdr_ref_pkg::*;

  localparam int  K        = 3;
  localparam int  MAXS     = 200;
  localparam int  OUT_BASE = 2 * K * MAXS;
  localparam int  AW       = $clog2(OUT_BASE + 2 * MAXS);
  localparam real SQD      = 0.125;
  localparam int  NRUNS    = 4;
  localparam int  SHIFT [NRUNS] = '{2, 5, 8, 13};
  localparam int  ITERS [NRUNS] = '{200, 900, 30000, 500000};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          host_en = 0, host_we = 0;
  logic [AW-1:0] host_addr = '0;
  fx_t           host_wdata = '0, host_rdata;
  logic          start = 0;
  logic [15:0]   num_sets = '0;
  logic          busy, done;
  logic          cfg_init = 0;
  fx_t           cfg_init_phi = '0;
  cpx_t          cfg_init_a [K];
  cpx_t          l_out [K][K];
  cpx_t          a_out [K];
  logic [31:0]   beat_count;

  mvdr_beamformer_top dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // 40M cycles cover the full study (about 32M cycles).
  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_done = 0;
  always @(posedge clk) if (rst_n && done) n_done++;

  task automatic host_write(input int a, input fx_t d);
    @(negedge clk);
    host_en = 1; host_we = 1; host_addr = AW'(a); host_wdata = d;
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic host_read(input int a, output fx_t d);
    @(negedge clk);
    host_en = 1; host_we = 0; host_addr = AW'(a);
    @(negedge clk);
    host_en = 0;
    d = host_rdata;
  endtask

  rvec_t s, si;

  function automatic rvec_t make_sample(input real scale);
    rvec_t u;
    rc_t   ds, di;
    ds = '{$sqrt(10.0) * gauss() / $sqrt(2.0), $sqrt(10.0) * gauss() / $sqrt(2.0)};
    di = '{100.0 * gauss() / $sqrt(2.0), 100.0 * gauss() / $sqrt(2.0)};
    for (int k = 0; k < K; k++) begin
      rc_t a, b;
      a = c_mul(ds, s[k]);
      b = c_mul(di, si[k]);
      u[k].re = from_fx(to_fx(scale * (a.re + b.re + gauss() / $sqrt(2.0))));
      u[k].im = from_fx(to_fx(scale * (a.im + b.im + gauss() / $sqrt(2.0))));
    end
    return u;
  endfunction

  function automatic rc_t beam(input rc_t w [K], input rvec_t d);
    rc_t g, t;
    g = '{0.0, 0.0};
    for (int i = 0; i < K; i++) begin
      t = c_mul(c_conj(w[i]), d[i]);
      g.re += t.re; g.im += t.im;
    end
    return g;
  endfunction

  task automatic run_study(input int r, input int iters);
    real   scale, lsb, max_err, tol_abs;
    rmat_t phi;
    rvec_t uset [MAXS];
    rc_t   eref [MAXS];
    rvec_t a0h;
    int    left, n, dn0;

    scale = 2.0 ** (-SHIFT[r]);
    lsb   = 1.0 / (2.0 ** FW);
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        phi[i][j] = '{(i == j) ? SQD * SQD : 0.0, 0.0};
    for (int k = 0; k < K; k++) a0h[k] = '{s[k].re / SQD, -s[k].im / SQD};

    @(negedge clk);
    cfg_init_phi = to_fx(SQD);
    for (int k = 0; k < K; k++) cfg_init_a[k] = '{re: to_fx(a0h[k].re), im: to_fx(a0h[k].im)};
    cfg_init = 1;
    @(negedge clk);
    cfg_init = 0;

    left = iters;
    max_err = 0.0;
    // outputs are compared to within 2% plus an absolute term that follows
    // the input scale (fixed rounding of about 64 LSB, and 0.002 at 2^-6)
    tol_abs = 64.0 * lsb + 0.002 * scale * 64.0;
    while (left > 0) begin
      n = (left > MAXS) ? MAXS : left;
      for (int m = 0; m < n; m++) begin
        uset[m] = make_sample(scale);
        phi_update(phi, uset[m], 1.0, K);
        if (left == n) eref[m] = mvdr_output(phi, s, uset[m], K);
        for (int k = 0; k < K; k++) begin
          host_write(2*K*m + 2*k,     to_fx(uset[m][k].re));
          host_write(2*K*m + 2*k + 1, to_fx(uset[m][k].im));
        end
      end
      dn0 = n_done;
      @(negedge clk);
      start = 1; num_sets = 16'(n);
      @(negedge clk);
      start = 0;
      while (n_done == dn0) @(negedge clk);
      if (left == n) begin
        for (int m = 0; m < n; m++) begin
          fx_t re, im;
          real err;
          host_read(OUT_BASE + 2*m, re);
          host_read(OUT_BASE + 2*m + 1, im);
          err = c_abs('{from_fx(re) - eref[m].re, from_fx(im) - eref[m].im});
          if (err > max_err) max_err = err;
          check(err <= tol_abs + 0.02 * c_abs(eref[m]),
                $sformatf("2^-%0d: e(%0d) = (%g,%g), reference (%g,%g)", SHIFT[r], iters - n + m,
                          from_fx(re), from_fx(im), eref[m].re, eref[m].im));
        end
      end
      left -= n;
    end

    // weights from the hardware state: w = L^-H a / ||a||^2, a = conj(a_out)
    begin
      rc_t   av [K], wh [K], wr [K], gs, gi, gsr, gir;
      rvec_t z;
      real   nrm, den, werr, wnorm;
      nrm = 0.0;
      for (int k = 0; k < K; k++) begin
        av[k] = '{from_fx(a_out[k].re), -from_fx(a_out[k].im)};
        nrm  += av[k].re * av[k].re + av[k].im * av[k].im;
      end
      for (int i = K - 1; i >= 0; i--) begin
        rc_t acc;
        acc = av[i];
        for (int j = i + 1; j < K; j++) begin
          rc_t t;
          t = c_mul(c_conj('{from_fx(l_out[j][i].re), from_fx(l_out[j][i].im)}), wh[j]);
          acc.re -= t.re; acc.im -= t.im;
        end
        wh[i] = c_div(acc, '{from_fx(l_out[i][i].re), 0.0});
      end
      for (int i = 0; i < K; i++) wh[i] = '{wh[i].re / nrm, wh[i].im / nrm};
      // floating-point MVDR weights from Phi
      z = c_solve(phi, s, K);
      den = 0.0;
      for (int i = 0; i < K; i++) den += s[i].re * z[i].re + s[i].im * z[i].im;
      werr = 0.0; wnorm = 0.0;
      for (int i = 0; i < K; i++) begin
        wr[i] = '{z[i].re / den, z[i].im / den};
        werr  += (wh[i].re - wr[i].re) ** 2 + (wh[i].im - wr[i].im) ** 2;
        wnorm += wr[i].re ** 2 + wr[i].im ** 2;
      end
      werr = $sqrt(werr / wnorm);
      // state consistency: L L^H against Phi, and L a against s
      begin
        real dphi, nphi, dla;
        dphi = 0.0; nphi = 0.0; dla = 0.0;
        for (int i = 0; i < K; i++) begin
          rc_t la;
          la = '{0.0, 0.0};
          for (int j = 0; j < K; j++) begin
            rc_t llh, t;
            llh = '{0.0, 0.0};
            for (int m = 0; m < K; m++) begin
              t = c_mul('{from_fx(l_out[i][m].re), from_fx(l_out[i][m].im)},
                        c_conj('{from_fx(l_out[j][m].re), from_fx(l_out[j][m].im)}));
              llh.re += t.re; llh.im += t.im;
            end
            dphi += (llh.re - phi[i][j].re) ** 2 + (llh.im - phi[i][j].im) ** 2;
            nphi += phi[i][j].re ** 2 + phi[i][j].im ** 2;
            t = c_mul('{from_fx(l_out[i][j].re), from_fx(l_out[i][j].im)}, av[j]);
            la.re += t.re; la.im += t.im;
          end
          dla += (la.re - s[i].re) ** 2 + (la.im - s[i].im) ** 2;
        end
        $display("  state: |L L^H - Phi| / |Phi| = %g, |L a - s| = %g", $sqrt(dphi / nphi), $sqrt(dla));
      end
      gs  = beam(wh, s);  gi  = beam(wh, si);
      gsr = beam(wr, s);  gir = beam(wr, si);
      $display("scale 2^-%0d, %0d iterations: max |e - ref| %g; weight error %g; gain at -70 deg %f (ref %f); at 30 deg %0.1f dB (ref %0.1f dB)",
               SHIFT[r], iters, max_err, werr, c_abs(gs), c_abs(gsr),
               20.0 * $log10(c_abs(gi) + 1e-12), 20.0 * $log10(c_abs(gir) + 1e-12));
      // At 2^-13 a noise sample adds less than one LSB to the noise part of
      // the diagonal (about 0.05 LSB), so that part of Phi^(1/2) cannot grow
      // in 20 fraction bits and the weights differ from the floating-point
      // ones by tens of percent; the beam checks below still hold.
      check(werr < ((SHIFT[r] >= 13) ? 0.5 : 0.05),
            $sformatf("2^-%0d: hardware weights match the MVDR weights", SHIFT[r]));
      check(c_abs(gs) > 0.98 && c_abs(gs) < 1.02, $sformatf("2^-%0d: unit gain at -70 deg", SHIFT[r]));
      check(c_abs(gi) < 0.0316, $sformatf("2^-%0d: null below -30 dB at 30 deg", SHIFT[r]));
    end
  endtask

  initial begin
    int div;
    div = $test$plusargs("short") ? 100 : 1;
    s  = steering(-70.0, K);
    si = steering(30.0, K);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NRUNS; r++)
      run_study(r, (ITERS[r] / div < 50) ? 50 : ITERS[r] / div);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
