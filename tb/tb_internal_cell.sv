// tb_internal_cell: runs two internal cells (SCALE = 1 and SCALE = 0.875)
// under the global controller with random rotations and samples, and checks
// every beat against a floating-point model:
//   xl = SCALE x,  x' = c xl + s u,  u' = c u - conj(s) xl,
//   nrm_out = nrm_in + |x'|^2,
// plus the pass-through of the rotation, beats without a rotation (x must
// stay, u_out.valid low) and 'init'.
`timescale 1ns/1ps
module tb_internal_cell;
  import mvdr_pkg::*;
  import mvdr_ref_pkg::*;

  localparam real SC1 = 0.875;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        run = 0;
  beat_ctrl_t  ctrl;
  logic [31:0] beat_count;
  logic        init = 0;
  cpx_t        init_val = '0;
  rot_t        rot_in = '0;
  smp_t        u_in = '0;
  fx_t         nrm_in = '0;

  rot_t rot_out [2];
  smp_t u_out [2];
  fx_t  nrm_out [2];
  cpx_t x [2];

  global_ctrl u_ctrl (.clk, .rst_n, .run, .ctrl, .beat_count);

  internal_cell dut0 (
    .clk, .rst_n, .ctrl, .init, .init_val, .rot_in, .u_in, .nrm_in,
    .rot_out (rot_out[0]), .u_out (u_out[0]), .nrm_out (nrm_out[0]), .x (x[0])
  );
  internal_cell #(.SCALE(fx_t'(longint'(SC1 * (2.0 ** FW))))) dut1 (
    .clk, .rst_n, .ctrl, .init, .init_val, .rot_in, .u_in, .nrm_in,
    .rot_out (rot_out[1]), .u_out (u_out[1]), .nrm_out (nrm_out[1]), .x (x[1])
  );

  int checks = 0, failures = 0, n_bubble = 0, n_rot = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit close(input real got, input real ex);
    real d;
    d = got - ex;
    if (d < 0) d = -d;
    return d <= 1e-5 + 1e-5 * ((ex < 0) ? -ex : ex);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rc_t  xm [2];           // model of x
  rc_t  eu [2];
  real  en [2];
  bit   pend = 0;
  rot_t pend_rot;

  task automatic beat(input bit valid, input bit do_init, input rc_t iv);
    @(negedge clk iff ctrl.commit);
    // 'init' is applied on the commit edge and overrides the committed x, so
    // the x check of the beat in flight is skipped then.
    if (do_init) begin
      init = 1;
      init_val = '{re: to_fx(iv.re), im: to_fx(iv.im)};
    end
    @(posedge clk);
    @(negedge clk);
    init = 0;
    if (pend) begin
      for (int d = 0; d < 2; d++) begin
        check(rot_out[d] == pend_rot, "rotation passed down unchanged");
        check(u_out[d].valid == pend_rot.valid, "u_out.valid follows the rotation");
        if (!do_init) check(close(from_fx(x[d].re), xm[d].re) && close(from_fx(x[d].im), xm[d].im),
              $sformatf("x[%0d] (%f,%f) exp (%f,%f)", d, from_fx(x[d].re), from_fx(x[d].im), xm[d].re, xm[d].im));
        if (pend_rot.valid) begin
          check(close(from_fx(u_out[d].v.re), eu[d].re) && close(from_fx(u_out[d].v.im), eu[d].im),
                $sformatf("u'[%0d] (%f,%f) exp (%f,%f)", d, from_fx(u_out[d].v.re), from_fx(u_out[d].v.im), eu[d].re, eu[d].im));
          check(close(from_fx(nrm_out[d]), en[d]), $sformatf("nrm[%0d] %f exp %f", d, from_fx(nrm_out[d]), en[d]));
        end
      end
    end
    begin
      real ang, sm, ph;
      ang = urand01() * 1.5;
      ph  = urand01() * 6.28;
      sm  = $sin(ang);
      rot_in.valid = valid;
      rot_in.c     = to_rot($cos(ang));
      rot_in.s     = '{re: to_rot(sm * $cos(ph)), im: to_rot(sm * $sin(ph))};
    end
    u_in.valid = valid;
    u_in.v     = '{re: to_fx(2.0 * urand01() - 1.0), im: to_fx(2.0 * urand01() - 1.0)};
    nrm_in     = to_fx(4.0 * urand01());
    pend     = 1;
    pend_rot = rot_in;
    for (int d = 0; d < 2; d++) begin
      real c, sre, sim, ur, ui, xr, xi, sc;
      if (do_init) xm[d] = '{from_fx(init_val.re), from_fx(init_val.im)};
      if (valid) begin
        sc  = (d == 0) ? 1.0 : SC1;
        c   = from_rot(rot_in.c); sre = from_rot(rot_in.s.re); sim = from_rot(rot_in.s.im);
        ur  = from_fx(u_in.v.re); ui = from_fx(u_in.v.im);
        xr  = sc * xm[d].re; xi = sc * xm[d].im;
        xm[d].re = c * xr + sre * ur - sim * ui;
        xm[d].im = c * xi + sre * ui + sim * ur;
        eu[d].re = c * ur - (sre * xr + sim * xi);
        eu[d].im = c * ui - (sre * xi - sim * xr);
        en[d]    = from_fx(nrm_in) + xm[d].re * xm[d].re + xm[d].im * xm[d].im;
      end
    end
    if (valid) n_rot++; else n_bubble++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run = 1;
    xm[0] = '{0.0, 0.0}; xm[1] = '{0.0, 0.0};
    beat(1, 1, '{0.5, -0.25});
    for (int i = 0; i < 60; i++)
      beat((i % 9) != 4, (i % 25 == 12), '{2.0 * urand01() - 1.0, 2.0 * urand01() - 1.0});
    beat(0, 0, '{0.0, 0.0});
    check(n_bubble >= 5 && n_rot >= 50, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
