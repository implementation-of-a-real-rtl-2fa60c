// tb_cordic_vec: drives random vectors, including all four quadrants and the
// axes, into the CORDIC magnitude unit and compares the result with
// sqrt(x^2 + y^2) computed in floating point, to within 1e-6 relative plus
// two LSBs. Full-range inputs check the saturation of magnitudes beyond the
// fx_t range. Also checks that 'done' comes ITERS+1 cycles after 'start'.
`timescale 1ns/1ps
module tb_cordic_vec;
  import mvdr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, done;
  fx_t  x_in = '0, y_in = '0, mag;

  cordic_vec dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input fx_t x, input fx_t y);
    real exp_m, got_m, tol;
    int  lat;
    @(negedge clk);
    x_in = x; y_in = y; start = 1;
    @(negedge clk);
    start = 0;
    x_in = $urandom; y_in = $urandom;      // inputs are only sampled on start
    lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    exp_m = $sqrt((real'(x) * real'(x) + real'(y) * real'(y))) / (2.0 ** FW);
    if (exp_m > real'(32'h7fffffff) / (2.0 ** FW)) exp_m = real'(32'h7fffffff) / (2.0 ** FW);  // saturates
    got_m = real'(mag) / (2.0 ** FW);
    tol   = 1.0e-6 * exp_m + 2.0 / (2.0 ** FW);
    checks++;
    if ((got_m - exp_m > tol) || (exp_m - got_m > tol)) begin
      failures++;
      $display("FAIL: |(%0d,%0d)| got %f exp %f", x, y, got_m, exp_m);
    end
    checks++;
    if (lat != CORDIC_ITERS + 1) begin
      failures++;
      $display("FAIL: latency %0d", lat);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_one(fx_t'(3) <<< FW, fx_t'(4) <<< FW);      // 5
    run_one(-(fx_t'(3) <<< FW), fx_t'(4) <<< FW);
    run_one(fx_t'(3) <<< FW, -(fx_t'(4) <<< FW));
    run_one(0, fx_t'(7) <<< (FW - 1));
    run_one(fx_t'(1) <<< (FW - 3), 0);
    run_one(0, 0);
    run_one(fx_t'(32'h80000000), fx_t'(32'h80000000));  // full range: saturates
    run_one(fx_t'(32'h7fffffff), 0);
    run_one(fx_t'(32'h60000000), fx_t'(32'h20000000));
    for (int i = 0; i < 200; i++) begin
      fx_t x, y;
      x = fx_t'($signed($urandom) >>> $urandom_range(0, 20));
      y = fx_t'($signed($urandom) >>> $urandom_range(0, 20));
      run_one(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
