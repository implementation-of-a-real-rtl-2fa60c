// tb_boundary_cell: runs the boundary cell under the global controller and
// checks every beat against a floating-point model of the complex Givens
// rotation: c = f/r, s = conj(u)/r, phi := r with f = phi, gamma_out =
// gamma_in * c. Covered cases: random samples over a wide range of sizes,
// the all-zero case (phi = 0 and u = 0 must give c = 1, s = 0), beats
// without a sample (phi must stay, rot_out.valid must be low) and 'init'.
`timescale 1ns/1ps
module tb_boundary_cell;
  import mvdr_pkg::*;
  import mvdr_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        run = 0;
  beat_ctrl_t  ctrl;
  logic [31:0] beat_count;
  logic        init = 0;
  fx_t         init_val = '0;
  smp_t        u_in = '0;
  fx_t         gamma_in = '0;
  rot_t        rot_out;
  fx_t         gamma_out;
  fx_t         phi;

  global_ctrl u_ctrl (.clk, .rst_n, .run, .ctrl, .beat_count);
  boundary_cell dut (.*);

  int checks = 0, failures = 0;
  int n_zero = 0, n_bubble = 0, n_rot = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit close(input real got, input real ex, input real rel, input real abs_tol);
    real d;
    d = got - ex;
    if (d < 0) d = -d;
    return d <= abs_tol + rel * ((ex < 0) ? -ex : ex);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results of the beat in flight
  bit  pend = 0, pend_valid;
  real e_c, e_sre, e_sim, e_g, e_phi;
  real phi_m;            // model of phi
  real g_hold;           // last gamma_out (kept over bubbles)

  task automatic check_outputs(input bit phi_reloaded);
    real lsb, tcs;
    lsb = 1.0 / (2.0 ** FW);
    // c and s are quotients by r: the absolute error of the square root
    // (tens of LSBs) becomes a relative error of that over r.
    tcs = 40 * lsb + ((e_phi > 0.0) ? 64 * lsb / e_phi : 0.0);
    check(rot_out.valid == pend_valid, "rot_out.valid follows u_in.valid");
    if (pend_valid) begin
      if (!phi_reloaded)
        check(close(from_fx(phi), e_phi, 2e-4, 40 * lsb), $sformatf("phi %f exp %f", from_fx(phi), e_phi));
      check(close(from_rot(rot_out.c), e_c, 2e-4, tcs), $sformatf("c %f exp %f", from_rot(rot_out.c), e_c));
      check(close(from_rot(rot_out.s.re), e_sre, 2e-4, tcs), $sformatf("s.re %f exp %f", from_rot(rot_out.s.re), e_sre));
      check(close(from_rot(rot_out.s.im), e_sim, 2e-4, tcs), $sformatf("s.im %f exp %f", from_rot(rot_out.s.im), e_sim));
      check(close(from_fx(gamma_out), e_g, 2e-4, tcs), $sformatf("gamma %f exp %f", from_fx(gamma_out), e_g));
    end else begin
      if (!phi_reloaded)
        check(close(from_fx(phi), e_phi, 2e-4, 40 * lsb), "phi kept over a bubble");
    end
  endtask

  // Called at the negedge of a commit cycle: check the beat ending now, then
  // present the next input (and optionally re-initialise phi).
  task automatic beat(input bit valid, input real ure, input real uim, input real gam,
                      input bit do_init, input real init_phi);
    real f, r;
    @(negedge clk iff ctrl.commit);
    // 'init' is applied on the commit edge, so the new phi is in place when
    // the next beat starts; it overrides the committed phi.
    if (do_init) begin
      init = 1; init_val = to_fx(init_phi);
    end
    @(posedge clk);              // commit edge of the beat in flight
    @(negedge clk);
    init = 0;
    if (pend) check_outputs(do_init);
    u_in.valid = valid;
    u_in.v     = '{re: to_fx(ure), im: to_fx(uim)};
    gamma_in   = to_fx(gam);
    if (do_init) phi_m = from_fx(to_fx(init_phi));
    // model, on the quantised inputs
    pend       = 1;
    pend_valid = valid;
    if (valid) begin
      real qr, qi, qg;
      qr = from_fx(u_in.v.re); qi = from_fx(u_in.v.im); qg = from_fx(gamma_in);
      f = phi_m;
      r = $sqrt(f * f + qr * qr + qi * qi);
      if (qr == 0.0 && qi == 0.0) begin
        e_c = 1.0; e_sre = 0.0; e_sim = 0.0; n_zero++;
      end else begin
        e_c = f / r; e_sre = qr / r; e_sim = -qi / r; n_rot++;
      end
      e_g   = qg * e_c;
      phi_m = r;
    end else n_bubble++;
    e_phi = phi_m;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    init = 1; init_val = '0;
    @(negedge clk);
    init = 0;
    phi_m = 0.0;
    run = 1;
    beat(1, 0.0, 0.0, 1.0, 0, 0.0);          // r = 0
    beat(1, 0.3, -0.4, 1.0, 0, 0.0);         // f = 0, g != 0: c = 0
    beat(1, 0.1, 0.2, 0.9, 0, 0.0);
    beat(0, 0.7, 0.7, 0.5, 0, 0.0);          // bubble
    beat(1, -0.05, 0.01, 0.8, 0, 0.0);
    for (int i = 0; i < 60; i++) begin
      real sc;
      sc = 2.0 ** (-real'($urandom_range(0, 10)));
      if (i % 15 == 7)
        beat(0, 0.0, 0.0, 0.0, 0, 0.0);
      else
        beat(1, sc * (2.0 * urand01() - 1.0), sc * (2.0 * urand01() - 1.0), urand01(),
             (i % 20 == 0), 0.01 + 2.0 * urand01());
    end
    beat(1, 0.0, 0.0, 0.6, 0, 0.0);          // u = 0 with phi > 0: identity, phi kept
    beat(1, 0.0, 0.0, 0.3, 1, 0.0);          // re-init to zero, r = 0 again
    beat(1, 0.0, 0.0, 0.3, 0, 0.0);          // let it finish
    check(n_zero >= 3 && n_bubble >= 2 && n_rot >= 40, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
