// tb_final_cell: runs the final cell under the global controller and checks
// e = -beta * gamma / nrm against floating point for squared norms from far
// below to far above one (so the reciprocal exponent takes both signs), and
// that a beat without beta gives e_out.valid low.
`timescale 1ns/1ps
module tb_final_cell;
  import mvdr_pkg::*;
  import mvdr_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        run = 0;
  beat_ctrl_t  ctrl;
  logic [31:0] beat_count;
  smp_t        beta = '0;
  fx_t         nrm_in = '0;
  fx_t         gamma_in = '0;
  smp_t        e_out;

  global_ctrl u_ctrl (.clk, .rst_n, .run, .ctrl, .beat_count);
  final_cell dut (.*);

  int checks = 0, failures = 0, n_small = 0, n_big = 0, n_bubble = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit close(input real got, input real ex);
    real d;
    d = got - ex;
    if (d < 0) d = -d;
    return d <= 4.0 / (2.0 ** FW) + 1e-4 * ((ex < 0) ? -ex : ex);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit  pend = 0, pend_valid;
  rc_t ee;

  task automatic beat(input bit valid, input rc_t b, input real g, input real n);
    @(negedge clk iff ctrl.commit);
    @(posedge clk);
    @(negedge clk);
    if (pend) begin
      check(e_out.valid == pend_valid, "e_out.valid follows beta.valid");
      if (pend_valid)
        check(close(from_fx(e_out.v.re), ee.re) && close(from_fx(e_out.v.im), ee.im),
              $sformatf("e (%f,%f) exp (%f,%f)", from_fx(e_out.v.re), from_fx(e_out.v.im), ee.re, ee.im));
    end
    beta.valid = valid;
    beta.v     = '{re: to_fx(b.re), im: to_fx(b.im)};
    gamma_in   = to_fx(g);
    nrm_in     = to_fx(n);
    pend       = 1;
    pend_valid = valid;
    ee.re = -from_fx(beta.v.re) * from_fx(gamma_in) / from_fx(nrm_in);
    ee.im = -from_fx(beta.v.im) * from_fx(gamma_in) / from_fx(nrm_in);
    if (!valid) n_bubble++;
    else if (from_fx(nrm_in) < 0.5) n_small++;
    else if (from_fx(nrm_in) > 1.0) n_big++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run = 1;
    beat(1, '{0.25, -0.5}, 1.0, 1.0);
    beat(1, '{0.001, 0.002}, 0.9, 0.01);
    beat(1, '{1.5, 0.5}, 0.5, 200.0);
    beat(0, '{1.0, 1.0}, 1.0, 1.0);
    for (int i = 0; i < 60; i++) begin
      real n, bm;
      n  = (2.0 ** (real'($urandom_range(0, 20)) - 10.0)) * (1.0 + urand01());
      bm = n * 0.5 * urand01();           // keep |e| in range
      if (bm > 8.0) bm = 8.0;
      beat((i % 13) != 6, '{bm * (2.0 * urand01() - 1.0), bm * (2.0 * urand01() - 1.0)}, 0.2 + 0.8 * urand01(), n);
    end
    beat(0, '{0.0, 0.0}, 0.0, 1.0);
    check(n_small >= 5 && n_big >= 5 && n_bubble >= 3, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
