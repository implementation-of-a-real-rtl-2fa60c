// tb_sample_buffer: the sample buffer with the global controller and a
// behavioural stand-in for the systolic array, which returns for each taken
// set the sum of its K samples, 2K+1 beats later. The testbench writes sample
// sets through the host port, reads them back, runs jobs (20 sets, an empty
// job, then 5 sets) and checks the results in the result region, the
// busy/done handshake, that every set was taken exactly once and in order,
// and that bubbles were sent while the pipeline drained.
`timescale 1ns/1ps
module tb_sample_buffer;
  import mvdr_pkg::*;

  localparam int K        = 3;
  localparam int MAX_SETS = 200;
  localparam int OUT_BASE = 2 * K * MAX_SETS;
  localparam int AW       = $clog2(OUT_BASE + 2 * MAX_SETS);
  localparam int LAT      = 2 * K + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          host_en = 0, host_we = 0;
  logic [AW-1:0] host_addr = '0;
  fx_t           host_wdata = '0, host_rdata;
  logic          start = 0;
  logic [15:0]   num_sets = '0;
  logic          busy, done;
  beat_ctrl_t    ctrl;
  logic          in_take, run, arr_valid;
  smp_t          e_in;
  cpx_t          arr_u [K];
  logic [31:0]   beat_count;

  global_ctrl u_ctrl (.clk, .rst_n, .run, .ctrl, .beat_count);
  assign in_take = ctrl.commit;

  sample_buffer #(.K(K), .MAX_SETS(MAX_SETS)) dut (.*);

  // Stand-in array: fixed latency of LAT beats, output = sum of the samples.
  smp_t pipe [LAT];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int d = 0; d < LAT; d++) pipe[d] <= '0;
    end else if (ctrl.commit) begin
      cpx_t sum;
      sum = '0;
      for (int k = 0; k < K; k++) begin
        sum.re += arr_u[k].re;
        sum.im += arr_u[k].im;
      end
      pipe[0] <= '{valid: arr_valid, v: sum};
      for (int d = 1; d < LAT; d++) pipe[d] <= pipe[d-1];
    end
  end
  assign e_in = pipe[LAT-1];

  int checks = 0, failures = 0;
  int n_taken = 0, n_bubble = 0, n_done = 0;
  fx_t words [2*K*MAX_SETS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Order check: the set taken must be the next one of the job.
  int take_idx = 0;
  always @(posedge clk) begin
    if (rst_n && in_take && busy) begin
      if (arr_valid) begin
        for (int k = 0; k < K; k++)
          check(arr_u[k].re == words[2*K*take_idx + 2*k] && arr_u[k].im == words[2*K*take_idx + 2*k + 1],
                $sformatf("set %0d antenna %0d presented in order", take_idx, k));
        take_idx++;
        n_taken++;
      end else n_bubble++;
    end
    if (rst_n && done) n_done++;
  end

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

  task automatic run_job(input int n);
    int  t0, t1, dn0;
    fx_t d;
    for (int i = 0; i < 2 * K * n; i++) begin
      words[i] = fx_t'($signed($urandom) >>> 8);
      host_write(i, words[i]);
    end
    for (int i = 0; i < 2 * K * n; i++) begin
      host_read(i, d);
      check(d == words[i], $sformatf("host read back word %0d", i));
    end
    take_idx = 0;
    dn0 = n_done;
    @(negedge clk);
    start = 1; num_sets = 16'(n);
    @(negedge clk);
    start = 0;
    t0 = int'(beat_count);
    if (n > 0) check(busy, "busy after start");
    while (!(n_done > dn0)) @(negedge clk);
    t1 = int'(beat_count);
    check(!busy, "busy low after done");
    check(take_idx == n, $sformatf("%0d sets taken, expected %0d", take_idx, n));
    if (n > 0) check(t1 - t0 <= n + LAT + 2, $sformatf("job of %0d sets took %0d beats", n, t1 - t0));
    for (int i = 0; i < n; i++) begin
      fx_t re, im, er, ei;
      er = '0; ei = '0;
      for (int k = 0; k < K; k++) begin
        er += words[2*K*i + 2*k];
        ei += words[2*K*i + 2*k + 1];
      end
      host_read(OUT_BASE + 2*i, re);
      host_read(OUT_BASE + 2*i + 1, im);
      check(re == er && im == ei, $sformatf("result %0d stored", i));
    end
    repeat (3 * CELL_PERIOD) @(negedge clk);
    check(n_done == dn0 + 1, "exactly one done pulse per job");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_job(20);
    run_job(0);
    run_job(5);
    check(n_taken == 25, "all sets taken");
    check(n_bubble >= LAT, "bubbles while the pipeline drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
