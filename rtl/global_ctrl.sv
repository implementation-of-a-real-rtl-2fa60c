// global_ctrl: the one control unit shared by every cell of the array.
//
// The published design replaces per-cell control with a single counter whose
// value is compared against a few constants (35, 36, 42, 45) to produce the
// register enables, multiplexer selects and counter enables of all boundary
// and internal cells, and releases the results of every cell together on the
// 51st cycle so that the whole array moves in lock step. This module is that
// counter and decoder: 'phase' counts 0..CELL_PERIOD-1 while 'run' is high,
// and the strobes of beat_ctrl_t are decoded from it (see mvdr_pkg for the
// phase of each). Which strobe sits at which constant is this design's choice.
//
// Interface and timing: 'run' low holds the counter at 0 with all strobes low;
// when 'run' rises the first beat starts on the next cycle. 'beat_count'
// counts completed beats (it wraps). The strobe outputs are decoded from the
// phase register, so each is high for whole cycles.
module global_ctrl
  import mvdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  output beat_ctrl_t  ctrl,
  output logic [31:0] beat_count
);

  phase_t phase_q;
  logic   active_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q    <= '0;
      active_q   <= 1'b0;
      beat_count <= '0;
    end else if (!active_q) begin
      phase_q  <= '0;
      active_q <= run;
    end else if (int'(phase_q) == CELL_PERIOD - 1) begin
      phase_q    <= '0;
      beat_count <= beat_count + 1'b1;
      active_q   <= run;
    end else begin
      phase_q <= phase_q + 1'b1;
    end
  end

  always_comb begin
    int p;
    p = int'(phase_q);
    ctrl            = '0;
    ctrl.phase      = phase_q;
    ctrl.start      = active_q && (p == PH_START);
    ctrl.recip_load = active_q && (p == PH_RECIP_LOAD);
    ctrl.recip_seed = active_q && (p == PH_RECIP_SEED);
    ctrl.recip_iter = active_q && (p > PH_RECIP_SEED) && (p <= PH_RECIP_SEED + NR_ITERS);
    ctrl.recip_out  = active_q && (p == PH_RECIP_OUT);
    ctrl.mul_en     = active_q && (p >= PH_MUL_START) && (p < PH_MUL_START + PH_MUL_STEPS);
    ctrl.mul_step   = 2'(p - PH_MUL_START);
    ctrl.commit     = active_q && (p == PH_COMMIT);
  end

endmodule
