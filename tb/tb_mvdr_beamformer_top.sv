// tb_mvdr_beamformer_top: full-size end-to-end test of the beamformer at its
// default parameters (three antennas, 200 sample sets = 1200 real numbers).
//
// Job 1: a desired source at -70 degrees (SNR 10 dB) and an interferer at
// 30 degrees (INR 40 dB) in white noise, scaled by 2^-5. The 1200 words are
// written through the host port and read back, the job is started, and after
// 'done' the 200 beam outputs are read from the result region and compared
// with the MVDR output computed directly from Phi(n). At the end the adapted
// state is checked: L L^H must equal Phi and L a must equal s, and the weight
// vector formed from it must pass the steering direction with unit gain and
// null the interferer.
// Job 2: an all-zero start (Phi^(1/2) = 0, a = 0) whose first set is zero, so
// the boundary cells meet r = 0 and the final cell a zero norm; the outputs
// must be exactly zero and L L^H must equal the sum of u u^H.
// Job 3: an empty job, which must signal 'done' at once.
// The scenario (three antennas, -70 / 30 degrees, SNR 10 dB, INR 40 dB, 200
// sets) is the one the original design was evaluated with; the 2^-5 input
// scale is one of the scalings it studied.
// Every mechanism below is counted, and one that never happened is a failure:
// host writes and reads, sets taken, drain bubbles, results stored, done
// pulses, the zero-radius rotation, reciprocal normalisation in both
// directions, the zero-norm output and the empty job.
`timescale 1ns/1ps
module tb_mvdr_beamformer_top;
  import mvdr_pkg::*;
  import mvdr_ref_pkg::*;

  localparam int  K        = 3;
  localparam int  NSETS    = 200;
  localparam int  OUT_BASE = 2 * K * NSETS;
  localparam int  AW       = $clog2(OUT_BASE + 2 * NSETS);
  localparam real SCALE    = 1.0 / 32.0;
  localparam real SQD      = 0.125;
  localparam real TH_S     = -70.0;
  localparam real TH_I     = 30.0;
  localparam int  NZ       = 6;         // sets of job 2

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

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_wr = 0, n_rd = 0, n_taken = 0, n_bubble = 0, n_stored = 0, n_done = 0;
  int n_rzero = 0, n_exp_pos = 0, n_exp_neg = 0, n_nrm_zero = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (host_en && host_we) n_wr++;
      if (host_en && !host_we) n_rd++;
      if (dut.in_take && busy) begin
        if (dut.arr_valid) n_taken++; else n_bubble++;
      end
      if (dut.u_buf.wr_im) n_stored++;
      if (done) n_done++;
      if (dut.ctrl.commit && dut.u_array.u_final.beta.valid && dut.u_array.u_final.nrm_in == 0)
        n_nrm_zero++;
    end
  end

  for (genvar i = 0; i < K; i++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && dut.ctrl.commit && dut.u_array.g_row[i].g_col[i].g_bc.u_bc.valid_q) begin
        if (dut.u_array.g_row[i].g_col[i].g_bc.u_bc.r_zero) n_rzero++;
        // the exponent carries the reciprocal's 9 extra mantissa bits
        // (DW-3-FW), so the divisor was shifted right above it, left below
        else if (int'(dut.u_array.g_row[i].g_col[i].g_bc.u_bc.e) > DW - 3 - FW) n_exp_pos++;
        else if (int'(dut.u_array.g_row[i].g_col[i].g_bc.u_bc.e) < DW - 3 - FW) n_exp_neg++;
      end
    end
  end

  // ------------------------------------------------------------ host side
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

  task automatic configure(input real phi0, input rvec_t a0h);
    @(negedge clk);
    cfg_init_phi = to_fx(phi0);
    for (int k = 0; k < K; k++) cfg_init_a[k] = '{re: to_fx(a0h[k].re), im: to_fx(a0h[k].im)};
    cfg_init = 1;
    @(negedge clk);
    cfg_init = 0;
  endtask

  task automatic run_job(input int n, output int beats);
    int t0, dn0;
    dn0 = n_done;
    @(negedge clk);
    start = 1; num_sets = 16'(n);
    t0 = int'(beat_count);
    @(negedge clk);
    start = 0;
    while (n_done == dn0) @(negedge clk);
    beats = int'(beat_count) - t0;
  endtask

  // ------------------------------------------------------------ reference
  rvec_t s, si;
  rmat_t phi;
  rvec_t uset [NSETS];
  rc_t   eref [NSETS];

  function automatic rvec_t make_sample();
    rvec_t u;
    rc_t   ds, di;
    real   as, ai;
    as = $sqrt(10.0);
    ai = 100.0;
    ds = '{as * gauss() / $sqrt(2.0), as * gauss() / $sqrt(2.0)};
    di = '{ai * gauss() / $sqrt(2.0), ai * gauss() / $sqrt(2.0)};
    for (int k = 0; k < K; k++) begin
      rc_t a, b;
      a = c_mul(ds, s[k]);
      b = c_mul(di, si[k]);
      u[k].re = from_fx(to_fx(SCALE * (a.re + b.re + gauss() / $sqrt(2.0))));
      u[k].im = from_fx(to_fx(SCALE * (a.im + b.im + gauss() / $sqrt(2.0))));
    end
    return u;
  endfunction

  // Phi_hw = L L^H from the observed factor
  function automatic rmat_t hw_phi();
    rmat_t m;
    for (int i = 0; i < K; i++)
      for (int k = 0; k < K; k++) begin
        m[i][k] = '{0.0, 0.0};
        for (int j = 0; j < K; j++) begin
          rc_t t;
          t = c_mul('{from_fx(l_out[i][j].re), from_fx(l_out[i][j].im)},
                    c_conj('{from_fx(l_out[k][j].re), from_fx(l_out[k][j].im)}));
          m[i][k].re += t.re;
          m[i][k].im += t.im;
        end
      end
    return m;
  endfunction

  task automatic check_phi(input rmat_t ref_phi, input real rel, input string tag);
    rmat_t m;
    real   big, err;
    m = hw_phi();
    big = 0.0; err = 0.0;
    for (int i = 0; i < K; i++)
      for (int k = 0; k < K; k++) begin
        if (c_abs(ref_phi[i][k]) > big) big = c_abs(ref_phi[i][k]);
        if (c_abs('{m[i][k].re - ref_phi[i][k].re, m[i][k].im - ref_phi[i][k].im}) > err)
          err = c_abs('{m[i][k].re - ref_phi[i][k].re, m[i][k].im - ref_phi[i][k].im});
      end
    $display("%s: max |L L^H - Phi| = %g (max |Phi| = %g)", tag, err, big);
    check(err <= rel * big + 1e-4, $sformatf("%s: L L^H matches Phi", tag));
  endtask

  initial begin
    fx_t  d;
    int   beats;
    rvec_t a0h, zero_v;
    real  max_err;

    s  = steering(TH_S, K);
    si = steering(TH_I, K);
    for (int k = 0; k < K; k++) begin
      a0h[k]    = '{s[k].re / SQD, -s[k].im / SQD};     // a^H(0)
      zero_v[k] = '{0.0, 0.0};
    end
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        phi[i][j] = '{(i == j) ? SQD * SQD : 0.0, 0.0};
    for (int n = 0; n < NSETS; n++) begin
      uset[n] = make_sample();
      phi_update(phi, uset[n], 1.0, K);
      eref[n] = mvdr_output(phi, s, uset[n], K);
    end

    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------------------------------------------------------- job 1
    for (int n = 0; n < NSETS; n++)
      for (int k = 0; k < K; k++) begin
        host_write(2*K*n + 2*k,     to_fx(uset[n][k].re));
        host_write(2*K*n + 2*k + 1, to_fx(uset[n][k].im));
      end
    for (int n = 0; n < NSETS; n++)
      for (int k = 0; k < K; k++) begin
        host_read(2*K*n + 2*k, d);
        check(d == to_fx(uset[n][k].re), $sformatf("read back set %0d antenna %0d re", n, k));
        host_read(2*K*n + 2*k + 1, d);
        check(d == to_fx(uset[n][k].im), $sformatf("read back set %0d antenna %0d im", n, k));
      end
    configure(SQD, a0h);
    run_job(NSETS, beats);
    $display("job 1: %0d sets in %0d beats", NSETS, beats);
    check(beats <= NSETS + 2*K + 3, "job 1 beat count");
    max_err = 0.0;
    for (int n = 0; n < NSETS; n++) begin
      fx_t re, im;
      real err;
      host_read(OUT_BASE + 2*n, re);
      host_read(OUT_BASE + 2*n + 1, im);
      err = c_abs('{from_fx(re) - eref[n].re, from_fx(im) - eref[n].im});
      if (err > max_err) max_err = err;
      check(err <= 0.002 + 0.02 * c_abs(eref[n]),
            $sformatf("e(%0d) = (%f,%f), reference (%f,%f)", n, from_fx(re), from_fx(im), eref[n].re, eref[n].im));
    end
    $display("job 1: max |e - reference| = %g", max_err);
    check_phi(phi, 2e-3, "job 1");
    // L a = s with a = conj(a_out); weight w = L^-H a / ||a||^2
    begin
      rc_t  av [K], wv [K], la, g;
      real  nrm, gs, gi, lerr;
      nrm = 0.0; lerr = 0.0;
      for (int k = 0; k < K; k++) begin
        av[k] = '{from_fx(a_out[k].re), -from_fx(a_out[k].im)};
        nrm  += av[k].re * av[k].re + av[k].im * av[k].im;
      end
      for (int i = 0; i < K; i++) begin
        la = '{0.0, 0.0};
        for (int j = 0; j <= i; j++) begin
          rc_t t;
          t = c_mul('{from_fx(l_out[i][j].re), from_fx(l_out[i][j].im)}, av[j]);
          la.re += t.re; la.im += t.im;
        end
        if (c_abs('{la.re - s[i].re, la.im - s[i].im}) > lerr)
          lerr = c_abs('{la.re - s[i].re, la.im - s[i].im});
      end
      check(lerr < 0.01, $sformatf("L a = s (error %g)", lerr));
      // back substitution L^H w' = a, then w = w' / ||a||^2
      for (int i = K - 1; i >= 0; i--) begin
        rc_t acc;
        acc = av[i];
        for (int j = i + 1; j < K; j++) begin
          rc_t t;
          t = c_mul(c_conj('{from_fx(l_out[j][i].re), from_fx(l_out[j][i].im)}), wv[j]);
          acc.re -= t.re; acc.im -= t.im;
        end
        wv[i] = c_div(acc, '{from_fx(l_out[i][i].re), 0.0});
      end
      for (int i = 0; i < K; i++) wv[i] = '{wv[i].re / nrm, wv[i].im / nrm};
      g = '{0.0, 0.0};
      for (int i = 0; i < K; i++) begin
        rc_t t;
        t = c_mul(c_conj(wv[i]), s[i]);
        g.re += t.re; g.im += t.im;
      end
      gs = c_abs(g);
      g = '{0.0, 0.0};
      for (int i = 0; i < K; i++) begin
        rc_t t;
        t = c_mul(c_conj(wv[i]), si[i]);
        g.re += t.re; g.im += t.im;
      end
      gi = c_abs(g);
      $display("job 1: beam gain %f towards %0.0f deg, %f (%0.1f dB) towards %0.0f deg",
               gs, TH_S, gi, 20.0 * $log10(gi + 1e-12), TH_I);
      check(gs > 0.99 && gs < 1.01, "unit gain towards the steering direction");
      check(gi < 0.01, "interferer nulled below -40 dB");
    end

    // ---------------------------------------------------------------- job 2
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        phi[i][j] = '{0.0, 0.0};
    for (int n = 0; n < NZ; n++) begin
      rvec_t u;
      u = (n == 0) ? zero_v : make_sample();
      phi_update(phi, u, 1.0, K);
      for (int k = 0; k < K; k++) begin
        host_write(2*K*n + 2*k,     to_fx(u[k].re));
        host_write(2*K*n + 2*k + 1, to_fx(u[k].im));
      end
    end
    configure(0.0, zero_v);
    run_job(NZ, beats);
    for (int n = 0; n < NZ; n++) begin
      fx_t re, im;
      host_read(OUT_BASE + 2*n, re);
      host_read(OUT_BASE + 2*n + 1, im);
      check(re == 0 && im == 0, $sformatf("job 2: e(%0d) is zero with a zero steering row", n));
    end
    check_phi(phi, 2e-3, "job 2");

    // ---------------------------------------------------------------- job 3
    begin
      int dn0, st0;
      dn0 = n_done;
      st0 = n_stored;
      run_job(0, beats);
      check(n_done == dn0 + 1 && n_stored == st0 && !busy, "empty job signals done at once");
    end

    // ---------------------------------------------------------------- mechanisms
    $display("mechanisms: writes %0d reads %0d taken %0d bubbles %0d stored %0d done %0d",
             n_wr, n_rd, n_taken, n_bubble, n_stored, n_done);
    $display("mechanisms: zero-radius %0d, reciprocal exponent >0 %0d <0 %0d, zero-norm outputs %0d",
             n_rzero, n_exp_pos, n_exp_neg, n_nrm_zero);
    check(n_wr == 2*K*(NSETS + NZ), "host writes");
    check(n_rd >= 2*K*NSETS + 2*(NSETS + NZ), "host reads");
    check(n_taken == NSETS + NZ, "every set taken once");
    check(n_bubble > 0, "drain bubbles");
    check(n_stored == NSETS + NZ, "every result stored");
    check(n_done == 3, "one done per job");
    check(n_rzero > 0, "zero-radius rotation");
    check(n_exp_pos > 0, "reciprocal normalised upwards");
    check(n_exp_neg > 0, "reciprocal normalised downwards");
    check(n_nrm_zero > 0, "zero-norm output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
