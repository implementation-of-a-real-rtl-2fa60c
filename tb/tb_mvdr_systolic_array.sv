// tb_mvdr_systolic_array: end-to-end check of the systolic array on a
// beamforming scenario: three antennas, a desired source at -70 degrees
// (SNR 10 dB), an interferer at 30 degrees (INR 40 dB), white noise, all
// scaled by 2^-6 into the fixed-point range. Each beam output is compared
// with the MVDR output computed directly from Phi(n) by Gaussian elimination,
// the pipeline latency of 2K+1 beats is checked, a bubble (beat with no
// sample) is inserted, and at the end the output must suppress the
// interferer: a probe vector from the interferer direction must come out
// far weaker than one from the steering direction.
`timescale 1ns/1ps
module tb_mvdr_systolic_array;
  import mvdr_pkg::*;
  import mvdr_ref_pkg::*;

  localparam int  K       = 3;
  localparam int  NS      = 80;           // samples
  localparam int  BUBBLE  = 10;           // sample index before which one bubble is sent
  localparam real SCALE   = 1.0 / 64.0;
  localparam real SQD     = 0.125;        // sqrt(delta)
  localparam real TH_S    = -70.0;
  localparam real TH_I    = 30.0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        run, init, in_valid, in_take;
  fx_t         init_phi;
  cpx_t        init_a [K];
  cpx_t        in_u [K];
  smp_t        e_out;
  cpx_t        l_out [K][K];
  cpx_t        a_out [K];
  beat_ctrl_t  ctrl;
  logic [31:0] beat_count;

  mvdr_systolic_array #(.K(K)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rvec_t s, si, ucur;
  rmat_t phi;
  rc_t   exp_q [$];
  int    beat_q [$];
  int    sent = 0, got = 0, bubbles = 0;
  real   max_err = 0.0;
  bit    bubble_done = 0;
  bit    probing = 0;
  rc_t   probe_out [2];
  int    probe_got = 0;

  function automatic rvec_t make_sample();
    rvec_t u;
    real   as, ai;
    rc_t   ds, di;
    as = $sqrt(10.0 ** (10.0 / 10.0));
    ai = $sqrt(10.0 ** (40.0 / 10.0));
    ds.re = as * gauss() / $sqrt(2.0); ds.im = as * gauss() / $sqrt(2.0);
    di.re = ai * gauss() / $sqrt(2.0); di.im = ai * gauss() / $sqrt(2.0);
    for (int k = 0; k < K; k++) begin
      rc_t a, b;
      a = c_mul(ds, s[k]);
      b = c_mul(di, si[k]);
      u[k].re = SCALE * (a.re + b.re + gauss() / $sqrt(2.0));
      u[k].im = SCALE * (a.im + b.im + gauss() / $sqrt(2.0));
    end
    return u;
  endfunction

  // Drive one sample per beat; update the reference when it is taken.
  always @(posedge clk) begin
    if (rst_n && in_take) begin
      if (in_valid) begin
        if (!probing) begin
          rvec_t uq;
          for (int k = 0; k < K; k++) uq[k] = '{from_fx(in_u[k].re), from_fx(in_u[k].im)};
          phi_update(phi, uq, 1.0, K);
          exp_q.push_back(mvdr_output(phi, s, uq, K));
          beat_q.push_back(int'(beat_count));
        end
        sent++;
      end else if (run) bubbles++;
    end
  end

  // Collect outputs: e_out changes on the commit edge, so a valid e_out at
  // phase 0 is a new result.
  always @(posedge clk) begin
    if (rst_n && ctrl.start && e_out.valid) begin
      rc_t hw, ex;
      int  b0;
      hw.re = from_fx(e_out.v.re);
      hw.im = from_fx(e_out.v.im);
      if (exp_q.size() > 0) begin
        real err, tol;
        ex  = exp_q.pop_front();
        b0  = beat_q.pop_front();
        err = c_abs('{hw.re - ex.re, hw.im - ex.im});
        tol = 0.002 + 0.02 * c_abs(ex);
        if (err > max_err) max_err = err;
        check(err <= tol, $sformatf("e(%0d) hw=(%f,%f) ref=(%f,%f)", got, hw.re, hw.im, ex.re, ex.im));
        // taken at the end of beat b0, out at the end of beat beat_count-1
        check(int'(beat_count) - 1 - b0 == 2*K + 1,
              $sformatf("latency %0d beats", int'(beat_count) - 1 - b0));
        got++;
      end else if (probing && probe_got < 2) begin
        probe_out[probe_got] = hw;
        probe_got++;
      end
    end
  end

  initial begin
    s  = steering(TH_S, K);
    si = steering(TH_I, K);
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        phi[i][j] = '{(i == j) ? SQD * SQD : 0.0, 0.0};
    run = 0; init = 0; in_valid = 0;
    init_phi = to_fx(SQD);
    for (int k = 0; k < K; k++) begin
      init_a[k] = '{re: to_fx(s[k].re / SQD), im: to_fx(-s[k].im / SQD)};  // a^H(0)
      in_u[k]   = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    init <= 1;
    @(posedge clk);
    init <= 0;
    run  <= 1;
    ucur = make_sample();
    for (int k = 0; k < K; k++) in_u[k] <= '{re: to_fx(ucur[k].re), im: to_fx(ucur[k].im)};
    in_valid <= 1;
    while (sent < NS) begin
      @(posedge clk);
      if (in_take) begin
        if (sent == BUBBLE && !bubble_done) begin
          in_valid    <= 0;
          bubble_done = 1;
        end else begin
          ucur = make_sample();
          for (int k = 0; k < K; k++) in_u[k] <= '{re: to_fx(ucur[k].re), im: to_fx(ucur[k].im)};
          in_valid <= 1;
        end
      end
    end
    // drain
    in_valid <= 0;
    wait (got == NS);
    // Probe: a unit vector from the steering direction and one from the
    // interferer direction (the array keeps adapting, but one small sample
    // hardly moves Phi).
    probing = 1;
    for (int p = 0; p < 2; p++) begin
      @(posedge clk iff in_take);
      for (int k = 0; k < K; k++) begin
        rc_t v;
        v = (p == 0) ? s[k] : si[k];
        in_u[k] <= '{re: to_fx(SCALE * 0.5 * v.re), im: to_fx(SCALE * 0.5 * v.im)};
      end
      in_valid <= 1;
      @(posedge clk iff in_take);
      in_valid <= 0;
    end
    wait (probe_got == 2);
    begin
      real gs, gi;
      gs = c_abs(probe_out[0]) / (SCALE * 0.5);
      gi = c_abs(probe_out[1]) / (SCALE * 0.5);
      $display("steering gain %f, interferer gain %f, max |e| error %g", gs, gi, max_err);
      check(gs > 0.8 && gs < 1.2, "unit gain towards the steering direction");
      check(gi < 0.1, "interferer suppressed");
    end
    check(bubbles >= 1, "a bubble went through the array");
    check(got == NS, "all outputs received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
