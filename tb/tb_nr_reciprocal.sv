// tb_nr_reciprocal: drives the load/seed/iter/out strobe sequence of the
// Newton-Raphson unit for divisors over a wide range (below 0.5, inside
// [0.5, 1] and far above 1, so the normalisation shifts both ways) and
// checks q * 2^-e against 1/D. A zero or negative divisor must give q = 0.
`timescale 1ns/1ps
module tb_nr_reciprocal;
  import mvdr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load = 0, seed = 0, iter = 0, out = 0;
  fx_t  divisor = '0, q;
  logic signed [7:0] e;

  nr_reciprocal dut (.*);

  int checks = 0, failures = 0, n_up = 0, n_down = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input fx_t d);
    real dv, got, ex;
    @(negedge clk); divisor = d; load = 1;
    @(negedge clk); load = 0; divisor = $urandom; seed = 1;
    @(negedge clk); seed = 0; iter = 1;
    repeat (NR_ITERS - 1) @(negedge clk);
    @(negedge clk); iter = 0;
    @(negedge clk); out = 1;
    @(negedge clk); out = 0;
    checks++;
    if (d <= 0) begin
      if (q != 0) begin
        failures++;
        $display("FAIL: divisor %0d gave q=%0d", d, q);
      end
      return;
    end
    if (e > 0) n_up++;
    if (e < 0) n_down++;
    dv  = real'(d) / (2.0 ** FW);
    ex  = 1.0 / dv;
    got = (real'(q) / (2.0 ** FW)) * (2.0 ** (-e));
    if ((got - ex) > 1.0e-8 * ex || (ex - got) > 1.0e-8 * ex) begin
      failures++;
      $display("FAIL: 1/%f got %f exp %f (q=%0d e=%0d)", dv, got, ex, q, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_one(FX_ONE);
    run_one(FX_ONE >>> 1);
    run_one(fx_t'(3) <<< FW);
    run_one(fx_t'(1));
    run_one(fx_t'(32'h7fff_ffff));
    run_one(0);
    run_one(-FX_ONE);
    for (int i = 0; i < 300; i++)
      run_one(fx_t'(($urandom >> 1) >> $urandom_range(0, 30)) | fx_t'(1));
    checks++;
    if (n_up == 0 || n_down == 0) begin
      failures++;
      $display("FAIL: normalisation not exercised both ways");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
