// tb_global_ctrl: runs the controller for several beats and checks that every
// strobe is high exactly at its phase, that a beat lasts CELL_PERIOD cycles,
// and that dropping 'run' stops the counter at the end of the beat.
`timescale 1ns/1ps
module tb_global_ctrl;
  import mvdr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        run = 0;
  beat_ctrl_t  ctrl;
  logic [31:0] beat_count;

  global_ctrl dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0, last_start = -1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Phase tracked independently: cycles since the first start strobe.
  int ph_ref = -1;
  always @(negedge clk) begin
    if (rst_n) begin
      if (ctrl.start) begin
        if (last_start >= 0) check(cyc - last_start == CELL_PERIOD, $sformatf("beat length %0d", cyc - last_start));
        last_start = cyc;
        ph_ref = 0;
      end
      if (ph_ref >= 0) begin
        check(ctrl.recip_load == (ph_ref == 35), "recip_load phase");
        check(ctrl.recip_seed == (ph_ref == 36), "recip_seed phase");
        check(ctrl.recip_iter == (ph_ref >= 37 && ph_ref <= 39), "recip_iter phase");
        check(ctrl.recip_out  == (ph_ref == 42), "recip_out phase");
        check(ctrl.mul_en     == (ph_ref >= 45 && ph_ref <= 48), "mul_en phase");
        if (ctrl.mul_en) check(int'(ctrl.mul_step) == ph_ref - 45, "mul_step");
        check(ctrl.commit     == (ph_ref == 50), "commit phase");
        ph_ref = (ph_ref == 50) ? -1 : ph_ref + 1;
      end else begin
        check(!(ctrl.recip_load || ctrl.commit || ctrl.mul_en), "no strobe outside a beat");
      end
      cyc++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    run <= 1;
    wait (beat_count == 4);
    run <= 0;
    repeat (3 * CELL_PERIOD) @(posedge clk);
    check(beat_count == 5, $sformatf("stopped after the beat in progress (beats %0d)", beat_count));
    check(!ctrl.start, "idle after run drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
