// tb_sqrt_unit: random (f, g) pairs with f >= 0 and g complex; checks
// r = sqrt(f^2 + |g|^2) against floating point and the 2*(ITERS+1)-cycle
// latency of the two cascaded CORDIC passes.
`timescale 1ns/1ps
module tb_sqrt_unit;
  import mvdr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, done;
  fx_t  f = '0, r;
  cpx_t g = '0;

  sqrt_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input fx_t ff, input fx_t gr, input fx_t gi);
    real e, got, tol;
    int  lat;
    @(negedge clk);
    f = ff; g = '{re: gr, im: gi}; start = 1;
    @(negedge clk);
    start = 0;
    f = $urandom; g = '{re: $urandom, im: $urandom};
    lat = 1;
    while (!done && lat < 200) begin @(negedge clk); lat++; end
    e   = $sqrt(real'(ff) * real'(ff) + real'(gr) * real'(gr) + real'(gi) * real'(gi)) / (2.0 ** FW);
    got = real'(r) / (2.0 ** FW);
    tol = 1.0e-6 * e + 2.0 / (2.0 ** FW);    // CORDIC angle residue plus rounding
    checks++;
    if ((got - e > tol) || (e - got > tol)) begin
      failures++;
      $display("FAIL: f=%0d g=(%0d,%0d) got %f exp %f", ff, gr, gi, got, e);
    end
    checks++;
    if (lat != 2 * (CORDIC_ITERS + 1)) begin
      failures++;
      $display("FAIL: latency %0d", lat);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_one(fx_t'(1) <<< FW, fx_t'(2) <<< FW, fx_t'(2) <<< FW);   // 3
    run_one(0, fx_t'(3) <<< FW, -(fx_t'(4) <<< FW));              // 5
    run_one(fx_t'(5) <<< (FW - 2), 0, 0);
    run_one(0, 0, 0);
    for (int i = 0; i < 150; i++) begin
      fx_t ff, gr, gi;
      int  sh;
      sh = 5 + $urandom_range(0, 14);
      ff = fx_t'($urandom >> (sh + 1));
      gr = fx_t'($signed($urandom) >>> sh);
      gi = fx_t'($signed($urandom) >>> sh);
      run_one(ff, gr, gi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
